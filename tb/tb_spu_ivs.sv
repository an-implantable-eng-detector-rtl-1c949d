// tb_spu_ivs: velocity-spectrum workload on the signal processing unit.
//
// Runs the intrinsic-velocity-spectrum program built by build_ivs in
// tb_spu_ref_pkg: sixteen delay-and-add channels for 15, 19, ... 75 m/s over
// nine adjacent channels, 3.5 mm electrode pitch and 33.3 kS/s per channel
// (one set every 90 link clocks of 3 MHz).  The slowest velocity needs 63
// sample periods of history, twice what the 32-block sample memory holds
// directly; the program extends the delay lines by copying old samples into
// variable words, which then age with their block.
//
// Three phases each inject two synthetic action potentials (a Mexican-hat
// pulse, sigma 1.5 samples) travelling at 20, 42 and 14 m/s over a noisy
// baseline.  Between phases the memory-clearing program resets the peak
// words.  Every output word and tag is compared with the reference model,
// every run must take program length + 1 cycles and fit in one set period
// (1440 cycles of a 48 MHz clock), and the velocity channel with the largest
// peak must be the grid velocity nearest the injected one (15 m/s for
// 14 m/s, the edge of the range).
//
// A fourth phase runs thirty interpolated delay-and-add outputs at once
// (20 to 78 m/s in 2 m/s steps over all ten channels, rectified sums output
// every set) with a 30 m/s pulse, which must peak at 30 m/s.  A fifth sums
// a 20 m/s pulse with delays tuned to 10, 20 and 30 m/s over nine channels;
// 10 m/s needs 94 sample periods of history (three chain levels), and the
// 20 m/s output must be the largest.
module tb_spu_ivs;
  import vsr_pkg::*;
  import tb_spu_ref_pkg::*;

  localparam real FS       = 3.0e6 / 90.0;   // samples per second per channel
  localparam real PITCH    = 3.5e-3;         // electrode pitch, m
  localparam int  NV       = 16;
  localparam real V0       = 15.0;
  localparam real DV       = 4.0;
  localparam int  NCH      = 9;
  localparam int  SET_CYC  = 16 * 90;        // SPU clocks per sample set

  logic clk = 0, rst_n = 1;
  logic s_valid = 0, set_done = 0, prog_we = 0;
  logic [3:0] s_ch = 0;
  sample_t s_data = 0;
  logic [9:0] prog_addr = 0;
  instr_t prog_data = '0;
  logic out_valid, running, overrun;
  logic [15:0] out_data;
  logic [9:0] out_tag;

  int checks = 0, failures = 0;
  int got_data [$], got_tag [$];

  spu dut (.*);

  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  always @(posedge clk) if (out_valid) begin
    got_data.push_back(int'(out_data));
    got_tag.push_back(int'(out_tag));
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  spu_model m;
  instr_t ivs [$], clr [$];
  int codes [N_CH];
  int max_age, words_used;
  int n_sets = 0, n_out = 0, n_runs = 0, n_hold_out = 0, n_hold_runs = 0;
  instr_t v30 [$], fig [$];
  int age30, words30, age_fig, words_fig;

  task automatic send_set(input int cds [N_CH]);
    for (int c = 0; c < N_CH; c++) begin
      @(negedge clk);
      s_valid = 1; s_ch = 4'(c); s_data = 10'(cds[c]);
      set_done = (c == N_CH - 1);
    end
    @(negedge clk);
    s_valid = 0; set_done = 0;
  endtask

  task automatic load(input instr_t p [$]);
    foreach (p[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = p[i];
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  // one set through DUT and model; compare every output
  task automatic step(input int cds [N_CH], input bit compare);
    int cyc;
    got_data.delete(); got_tag.delete();
    send_set(cds);
    m.new_set(cds);
    n_sets++;
    cyc = 0;
    while (running) begin
      @(negedge clk);
      cyc++;
    end
    repeat (2) @(negedge clk);
    if (compare) begin
      n_runs++;
      check(cyc == m.prog.size() + 1 && cyc + N_CH < SET_CYC,
            $sformatf("set %0d: run took %0d cycles, expected %0d", n_sets, cyc, m.prog.size() + 1));
      check(got_data.size() == m.out_data.size(),
            $sformatf("set %0d: %0d outputs, model %0d", n_sets, got_data.size(), m.out_data.size()));
      for (int i = 0; i < got_data.size() && i < m.out_data.size(); i++)
        check(got_data[i] == m.out_data[i] && got_tag[i] == m.out_tag[i],
              $sformatf("set %0d out %0d: %0d/%0d model %0d/%0d", n_sets, i,
                        got_data[i], got_tag[i], m.out_data[i], m.out_tag[i]));
      n_out += got_data.size();
    end
  endtask

  // Mexican-hat pulse centred on sample t0 + c * pitch * fs / v
  function automatic int pulse(int n, int c, real t0, real v, real amp);
    real x;
    x = (real'(n) - t0 - real'(c) * PITCH * FS / v) / 1.5;
    return int'(amp * (1.0 - x * x) * $exp(-x * x / 2.0));
  endfunction

  // One phase: reset the variables with the clearing program, load prog and
  // send two pulses at velocity v.  With hold, the last 16 sets report every
  // velocity's held peak; without, the peak is taken over all outputs.
  task automatic phase(input instr_t prog [$], input int nv, input real v0,
                       input real dv, input bit hold, input int nch,
                       input real v, input int expect_j);
    int best, best_j;
    int peak [32];
    string spec;
    m.prog = clr;
    load(clr);
    foreach (codes[c]) codes[c] = 512;
    for (int n = 0; n < 32; n++) step(codes, 0);
    m.prog = prog;
    load(prog);
    foreach (peak[j]) peak[j] = 0;
    for (int n = 0; n < 240; n++) begin
      for (int c = 0; c < N_CH; c++) begin
        int a;
        a = (c < nch) ? pulse(n, c, 20.0, v, 150.0) + pulse(n, c, 120.0, v, 150.0) : 0;
        codes[c] = 512 + a + int'($urandom_range(0, 6)) - 3;
      end
      step(codes, 1);
      if (hold) begin
        n_hold_runs++;
        n_hold_out += got_data.size();
        if (n >= 240 - 16)
          foreach (got_tag[i]) peak[got_tag[i] % 32] = got_data[i];
      end else
        foreach (got_tag[i]) if (got_data[i] > peak[got_tag[i] % 32]) peak[got_tag[i] % 32] = got_data[i];
    end
    best = -1; best_j = -1;
    spec = "";
    for (int j = 0; j < nv; j++) begin
      if (peak[j] > best) begin best = peak[j]; best_j = j; end
      spec = {spec, $sformatf(" %0d", peak[j])};
    end
    $display("%0d velocities, %0.0f m/s: spectrum peak at %0.0f m/s (%0d); %0.0f..%0.0f m/s:%s",
             nv, v, v0 + dv * real'(best_j), best, v0, v0 + dv * real'(nv - 1), spec);
    check(best_j == expect_j, $sformatf("%0.0f m/s: peak at channel %0d, expected %0d", v, best_j, expect_j));
    check(peak[expect_j] > 2 * peak[(expect_j + nv / 2) % nv], "spectrum is selective");
  endtask

  initial begin : main
    m = new();
    build_clear(clr);
    build_ivs(ivs, NV, V0, DV, NCH, PITCH * FS, 16'h7FFF, 1'b1, max_age, words_used);
    $display("IVS program: %0d words, history %0d sample periods, %0d of 32 words per block",
             ivs.size(), max_age, words_used);
    check(ivs.size() <= 1024, "program fits in program memory");
    check(words_used <= 32, "variables fit in a block");
    check(max_age > 61, "history extended beyond the sample memory");
    build_ivs(v30, 30, 20.0, 2.0, N_CH, PITCH * FS, 16'h7FFF, 1'b0, age30, words30);
    $display("30-output program: %0d words, history %0d sample periods, %0d of 32 words per block",
             v30.size(), age30, words30);
    check(v30.size() <= 1024 && v30.size() + N_CH < SET_CYC, "30 outputs fit program memory and set period");
    check(words30 <= 32, "30-output variables fit in a block");
    build_ivs(fig, 3, 10.0, 10.0, NCH, PITCH * FS, 16'h7FFF, 1'b0, age_fig, words_fig);
    $display("10/20/30 m/s program: %0d words, history %0d sample periods, %0d of 32 words per block",
             fig.size(), age_fig, words_fig);
    check(age_fig > 92 && words_fig <= 32, "three-level history chain");
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase(ivs, NV, V0, DV, 1'b1, NCH, 20.0, 1);
    phase(ivs, NV, V0, DV, 1'b1, NCH, 42.0, 7);
    phase(ivs, NV, V0, DV, 1'b1, NCH, 14.0, 0);
    phase(v30, 30, 20.0, 2.0, 1'b0, N_CH, 30.0, 5);
    phase(fig, 3, 10.0, 10.0, 1'b0, NCH, 20.0, 1);
    check(!overrun, "no overrun");
    check(n_hold_out == n_hold_runs, "peak-hold program: one output word per sample set");
    $display("sets=%0d runs_checked=%0d outputs=%0d", n_sets, n_runs, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
