// tb_spu: self-checking testbench of the VSR signal processing unit.
//
// Loads the demonstration delay-and-add program, feeds 70 sample sets of a
// travelling test waveform plus pseudo-random noise (more than two trips
// round the circular sample memory) and compares every output word and tag
// with the reference model in tb_spu_ref_pkg.  Also checks that each run
// takes program length + 1 cycles from set_done to halt, that the ring
// counter sub-samples the outputs, and that a set arriving mid-run raises
// overrun.
module tb_spu;
  import vsr_pkg::*;
  import tb_spu_ref_pkg::*;

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
    repeat (400000) @(posedge clk);
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
  instr_t prog [$];
  int d [4] = '{4, 6, 8, 12};
  int codes [N_CH];
  int true_d = 6; // quarter samples per channel: matches velocity 1
  int n_out = 0, n_detect = 0;
  int peak [4] = '{0, 0, 0, 0};

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

  initial begin : main
    int cyc;
    m = new();
    build_vsr(prog, d, 20);
    m.prog = prog;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load program
    check(!running && !overrun, "idle after reset");
    // warm-up: clear the whole data memory with 32 zero-valued sets
    begin
      instr_t clr [$];
      build_clear(clr);
      m.prog = clr;
      load(clr);
      foreach (codes[c]) codes[c] = 512;
      for (int n = 0; n < 32; n++) begin
        send_set(codes);
        m.new_set(codes);
        while (running) @(negedge clk);
      end
      m.prog = prog;
    end
    load(prog);

    for (int n = 0; n < 70; n++) begin
      for (int c = 0; c < N_CH; c++) begin
        // spike 2 samples wide travelling one channel every 1.5 samples,
        // repeating every 40 sets
        int ph, a;
        ph = ((n * 4 - c * true_d) % 160 + 160) % 160;
        a = (ph < 8) ? (ph < 4 ? ph * 60 : (8 - ph) * 60) : 0;
        codes[c] = 512 + a + int'($urandom_range(0, 6)) - 3;
      end
      got_data.delete(); got_tag.delete();
      send_set(codes);
      m.new_set(codes);
      cyc = 0;
      while (running) begin
        @(negedge clk);
        cyc++;
      end
      repeat (2) @(negedge clk);
      // set_done was applied on the last send cycle; running rose after it
      check(cyc == prog.size() + 1, $sformatf("set %0d: run took %0d cycles, expected %0d", n, cyc, prog.size() + 1));
      check(got_data.size() == m.out_data.size(),
            $sformatf("set %0d: %0d outputs, model %0d", n, got_data.size(), m.out_data.size()));
      for (int i = 0; i < got_data.size() && i < m.out_data.size(); i++) begin
        check(got_data[i] == m.out_data[i] && got_tag[i] == m.out_tag[i],
              $sformatf("set %0d out %0d: %0d/%0d model %0d/%0d", n, i,
                        got_data[i], got_tag[i], m.out_data[i], m.out_tag[i]));
        if (got_tag[i] < 4 && got_data[i] > peak[got_tag[i]]) peak[got_tag[i]] = got_data[i];
        if (got_tag[i] >= 8 && got_tag[i] < 12 && got_data[i] != 0) n_detect++;
      end
      n_out += got_data.size();
    end
    check(n_detect > 0, "some threshold detections");
    $display("peak envelope per velocity channel: %0d %0d %0d %0d", peak[0], peak[1], peak[2], peak[3]);
    check(peak[1] > peak[0] && peak[1] > peak[2] && peak[1] > peak[3], "matched velocity channel has the largest peak");
    check(!overrun, "no overrun in normal operation");
    // a set arriving while the program runs
    send_set(codes);
    repeat (5) @(negedge clk);
    send_set(codes);
    repeat (2) @(negedge clk);
    check(overrun, "overrun flagged");
    $display("outputs=%0d detections=%0d", n_out, n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
