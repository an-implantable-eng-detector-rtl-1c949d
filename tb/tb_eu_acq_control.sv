// tb_eu_acq_control: five ADC models with different conversion times convert
// a set of per-frame test codes.  Checks that a sample set is delivered every
// FRAME_CYCLES cycles, that channel 2k+s comes from ADC k with the channel
// mux at s, that starts happen only in hold, and that run stops acquisition.
// The requested tri/dipole mode toggles at random times; tri_sel must take
// the request only as a set starts and hold it for the whole set.
module tb_eu_acq_control;
  import vsr_pkg::*;
  logic clk = 0, rst_n = 1, run = 0, tripole = 0;
  logic tri_sel, tri_req_q, hold_q, tri_q;
  int n_mode_changes = 0;
  logic [N_ADC-1:0] adc_start, adc_done;
  sample_t adc_data [N_ADC];
  logic sh_hold, ch_sel, set_valid;
  sample_t samples [N_CH];
  sample_t ana [N_CH];
  logic [9:0] ain [N_ADC];
  int checks = 0, failures = 0;
  int last_set = -1, nsets = 0, cyc = 0;

  eu_acq_control dut (.*);
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar k = 0; k < N_ADC; k++) begin : g_adc
    assign ain[k] = ana[2*k + int'(ch_sel)];
    adc_model #(.CONV_CYCLES(8 + k)) u_adc (
      .clk, .start(adc_start[k]), .ain(ain[k]), .done(adc_done[k]), .data(adc_data[k])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode: taken over at the start of a set, stable until the set is handed on
  always @(posedge clk) begin
    if (rst_n) begin
      if (sh_hold && !hold_q)
        check(tri_sel == tri_req_q, "mode taken over at set start");
      else if (sh_hold || set_valid)
        check(tri_sel == tri_q, "mode stable during a set");
      if (tri_sel != tri_q) n_mode_changes++;
    end
    tri_q     <= tri_sel;
    tri_req_q <= tripole;
    hold_q    <= sh_hold;
  end
  always @(negedge clk) if ($urandom_range(0, 150) == 0) tripole = ~tripole;

  // starts only while holding
  always @(posedge clk) if (rst_n && |adc_start) check(sh_hold, "start outside hold");

  always @(posedge clk) if (set_valid) begin
    for (int c = 0; c < N_CH; c++)
      check(samples[c] == ana[c], $sformatf("ch %0d: %0d expected %0d", c, samples[c], ana[c]));
    if (last_set >= 0) check(cyc - last_set == 90, $sformatf("set spacing %0d", cyc - last_set));
    last_set = cyc;
    nsets++;
  end

  // new analogue values after each set
  always @(negedge clk) if (!sh_hold && !set_valid) foreach (ana[c]) if ($urandom_range(0, 30) == 0) ana[c] = 10'($urandom);

  initial begin
    foreach (ana[c]) ana[c] = 10'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(nsets == 0 && !sh_hold, "idle while run low");
    run = 1;
    repeat (90 * 40) @(negedge clk);
    run = 0;
    repeat (200) @(negedge clk);
    check(nsets >= 39 && nsets <= 41, $sformatf("%0d sets in 40 frames", nsets));
    check(n_mode_changes >= 4, $sformatf("%0d tri/dipole mode changes", n_mode_changes));
    begin
      int n0;
      n0 = nsets;
      repeat (300) @(negedge clk);
      check(nsets == n0, "no sets after run low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
