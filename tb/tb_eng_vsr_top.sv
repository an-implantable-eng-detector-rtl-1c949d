// tb_eng_vsr_top: end-to-end test of the whole digital system at its
// default parameters.
//
// Five ADC models digitise a synthetic compound signal: a narrow spike that
// travels along the ten channels at 1.5 samples per electrode pitch, plus
// noise.  The electrode unit sends each sample set over the DDR back
// channel, the monitoring unit receives it and the SPU runs the
// demonstration delay-and-add program (four velocity channels).  Every SPU
// output word and tag is compared with the reference model fed with the
// codes the ADCs converted.  The test also stops acquisition, switches the
// cable multiplexer to a second cable driven by the testbench (one frame with
// a corrupted parity bit), returns to the electrode unit, and finally removes
// the program's HALT to provoke an overrun.  Half-way through the last
// acquisition phase the EU is switched from dipole to tripole mode; the
// tri/dipole select must change only between sets.  It counts how often each
// mechanism happened and fails any that never did.
module tb_eng_vsr_top;
  import vsr_pkg::*;
  import tb_spu_ref_pkg::*;

  logic clk = 0, rst_n = 1, run = 0, tripole = 0;
  logic tri_sel, tri_q, mon_hold_q;
  int n_mode_changes = 0;
  bit mon_ok = 0;
  logic [N_ADC-1:0] adc_start, adc_done;
  sample_t adc_data [N_ADC];
  logic sh_hold, ch_sel, link_clk, eu_dout;
  logic [2:0] ext_dout = '0;
  logic [1:0] cable_sel = 0;
  logic prog_we = 0;
  logic [9:0] prog_addr = 0;
  instr_t prog_data = '0;
  logic out_valid, set_done, parity_err, spu_running, spu_overrun;
  logic [15:0] out_data, err_count;
  logic [9:0] out_tag;

  int checks = 0, failures = 0;

  eng_vsr_top dut (.*);

  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  // tri/dipole select: never changes while a set is being converted
  always @(posedge link_clk) begin
    if (rst_n && mon_ok) begin
      if (sh_hold && mon_hold_q) check(tri_sel == tri_q, "tri/dipole mode stable during a set");
      if (tri_sel != tri_q) n_mode_changes++;
    end
    tri_q  <= tri_sel;
    mon_hold_q <= sh_hold;
    mon_ok <= rst_n;
  end

  // ---------------- analogue stand-in and ADCs ----------------
  sample_t ana [N_CH];
  logic [9:0] ain [N_ADC];
  int frame_no = 0;
  for (genvar k = 0; k < N_ADC; k++) begin : g_adc
    assign ain[k] = ana[2*k + int'(ch_sel)];
    adc_model #(.CONV_CYCLES(12)) u_adc (
      .clk(link_clk), .start(adc_start[k]), .ain(ain[k]), .done(adc_done[k]), .data(adc_data[k])
    );
  end

  // new analogue values for every frame, computed when the hold is released
  bit warmup = 1;
  task automatic make_codes(input int n);
    for (int c = 0; c < N_CH; c++) begin
      int ph, a;
      if (warmup) begin ana[c] = 10'd512; continue; end
      ph = ((n * 4 - c * 6) % 160 + 160) % 160;
      a = (ph < 8) ? (ph < 4 ? ph * 60 : (8 - ph) * 60) : 0;
      ana[c] = 10'(512 + a + int'($urandom_range(0, 6)) - 3);
    end
  endtask

  // codes of every set on its way to the SPU, in order
  logic [N_CH-1:0][9:0] code_q [$];
  logic hold_q = 0;
  always @(posedge link_clk) begin
    hold_q <= sh_hold;
    if (hold_q && !sh_hold) begin
      logic [N_CH-1:0][9:0] snap;
      foreach (ana[c]) snap[c] = ana[c];
      code_q.push_back(snap);
      frame_no++;
      make_codes(frame_no);
    end
  end

  // ---------------- checking ----------------
  spu_model m;
  instr_t prog [$];
  int d [4] = '{4, 6, 8, 12};
  int got_data [$], got_tag [$];
  bit compare_on = 1;
  int n_sets = 0, n_runs_checked = 0, n_sub = 0, n_detect = 0, n_halt = 0;
  int peak [4] = '{0, 0, 0, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (out_valid) begin
    got_data.push_back(int'(out_data));
    got_tag.push_back(int'(out_tag));
  end

  always @(posedge clk) if (set_done && rst_n) begin
    int cds [N_CH];
    n_sets++;
    check(code_q.size() > 0, $sformatf("set received that was never sent (t=%0t)", $time));
    if (code_q.size() > 0) begin
      logic [N_CH-1:0][9:0] snap;
      snap = code_q.pop_front();
      foreach (cds[c]) cds[c] = int'(snap[c]);
      m.new_set(cds);
    end
  end

  // compare the outputs of each run when the SPU halts
  logic run_q = 0;
  always @(posedge clk) begin
    run_q <= spu_running;
    if (run_q && !spu_running && compare_on) begin
      n_halt++;
      n_runs_checked++;
      check(got_data.size() == m.out_data.size(),
            $sformatf("set %0d: %0d outputs, model %0d", n_sets, got_data.size(), m.out_data.size()));
      for (int i = 0; i < got_data.size() && i < m.out_data.size(); i++) begin
        check(got_data[i] == m.out_data[i] && got_tag[i] == m.out_tag[i],
              $sformatf("set %0d out %0d: %0d/%0d model %0d/%0d", n_sets, i,
                        got_data[i], got_tag[i], m.out_data[i], m.out_tag[i]));
        if (got_tag[i] < 4) begin
          n_sub++;
          if (got_data[i] > peak[got_tag[i]]) peak[got_tag[i]] = got_data[i];
        end
        if (got_tag[i] >= 8 && got_tag[i] < 12 && got_data[i] != 0) n_detect++;
      end
      got_data.delete();
      got_tag.delete();
    end
  end

  // ---------------- second cable ----------------
  task automatic send_ext_frame(input int cds [N_CH], input int bad_ch);
    logic bits [$];
    bits.push_back(1'b1);
    for (int c = 0; c < N_CH; c++) begin
      logic [9:0] v;
      v = 10'(cds[c]);
      for (int b = 0; b < 10; b++) bits.push_back(v[b]);
      bits.push_back((^v) ^ (c == bad_ch));
    end
    bits.push_back(1'b0);
    begin
      logic [N_CH-1:0][9:0] snap;
      foreach (cds[c]) snap[c] = 10'(cds[c]);
      code_q.push_back(snap);
    end
    while (bits.size() > 0) begin
      @(posedge link_clk); ext_dout[1] = bits.pop_front();
      @(negedge link_clk); ext_dout[1] = bits.pop_front();
    end
    @(posedge link_clk); ext_dout[1] = 1'b0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input instr_t p [$]);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i);
      prog_data = (i < p.size()) ? p[i] : mk(OP_NOP, 0, 0);
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  initial begin : main
    int cds [N_CH];
    int sets_before;
    longint cyc0;
    m = new();
    build_vsr(prog, d, 20);
    make_codes(0);
    repeat (4) @(negedge clk);
    rst_n = 1;
    // warm-up: 32 zero-valued sets with a program that clears the rest of
    // the data memory, so that every word the model assumes zero is zero
    begin
      instr_t clr [$];
      build_clear(clr);
      m.prog = clr;
      load(clr);
      compare_on = 0;
      run = 1;
      wait (n_sets == 31);
      warmup = 0;
      wait (n_sets == 32);
      run = 0;
      repeat (3 * 90 * 16) @(negedge clk);
      check(code_q.size() == 0, "warm-up sets delivered");
      frame_no = 0;
      make_codes(0);
    end
    // load the program, fill the rest with NOPs
    load(prog);
    m.prog = prog;
    compare_on = 1;
    sets_before = n_sets;

    // 1) normal acquisition: 45 sets, more than one trip round the memory
    run = 1;
    wait (n_sets == sets_before + 1);
    cyc0 = $time;
    wait (n_sets == sets_before + 45);
    check(($time - cyc0) == 44 * 90 * 16 * 10, $sformatf("44 set periods took %0t", $time - cyc0));
    run = 0;
    repeat (3 * 90 * 16) @(negedge clk);
    check(code_q.size() == 0, "all converted sets delivered");

    // 2) second cable, one frame with a parity error
    cable_sel = 2'd1;
    sets_before = n_sets;
    for (int f = 0; f < 3; f++) begin
      foreach (cds[c]) cds[c] = int'($urandom_range(400, 620));
      send_ext_frame(cds, f == 1 ? 3 : -1);
      repeat (200) @(negedge clk);
    end
    check(n_sets == sets_before + 3, "three sets from the second cable");
    check(err_count == 16'd1, $sformatf("parity errors counted: %0d", err_count));
    cable_sel = 2'd0;

    // 3) back to the electrode unit
    run = 1;
    wait (n_sets == sets_before + 3 + 6);
    tripole = 1;
    wait (n_sets == sets_before + 3 + 12);
    run = 0;
    repeat (3 * 90 * 16) @(negedge clk);

    // 4) remove the HALT: the program no longer ends before the next set
    @(negedge clk);
    prog_we = 1; prog_addr = 10'(prog.size() - 1); prog_data = mk(OP_NOP, 0, 0);
    @(negedge clk);
    prog_we = 0;
    compare_on = 0;
    check(!spu_overrun, "no overrun before the HALT was removed");
    run = 1;
    repeat (4 * 90 * 16) @(negedge clk);
    run = 0;

    // mechanism counts
    $display("sets=%0d runs_checked=%0d halts=%0d subsampled_outputs=%0d detections=%0d parity_errors=%0d overrun=%0d mode_switches=%0d",
             n_sets, n_runs_checked, n_halt, n_sub, n_detect, err_count, spu_overrun, n_mode_changes);
    $display("peak envelope per velocity channel: %0d %0d %0d %0d", peak[0], peak[1], peak[2], peak[3]);
    check(n_sets - 32 > 32, "sample memory wrapped round (more than 32 sets)");
    check(n_runs_checked >= 60, "program runs compared");
    check(n_sub > 0 && n_sub < 4 * n_runs_checked, "sub-sampled outputs");
    check(n_detect > 0, "threshold detections");
    check(err_count > 0, "parity error detected");
    check(spu_overrun, "overrun detected");
    check(n_mode_changes == 1 && tri_sel, $sformatf("tri/dipole mode switched (%0d changes)", n_mode_changes));
    check(peak[1] > peak[0] && peak[1] > peak[2] && peak[1] > peak[3], "matched velocity channel has the largest peak");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
