// tb_eu_digital: the electrode unit's digital part with five ADC models.
// Decodes the DDR line independently and checks each frame against the codes
// the ADCs converted, the frame spacing of 90 link cycles (33.3 kS/s per
// channel at a 3 MHz link clock) and that the line never toggles while a
// conversion is in progress.
module tb_eu_digital;
  import vsr_pkg::*;
  logic clk = 0, rst_n = 1, run = 0, tripole = 1;
  logic tri_sel;
  logic [N_ADC-1:0] adc_start, adc_done;
  sample_t adc_data [N_ADC];
  logic sh_hold, ch_sel, tx_busy, dout;
  sample_t ana [N_CH];
  logic [9:0] ain [N_ADC];
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [N_CH-1:0][9:0] conv_q [$];
  int start_cyc [$];

  eu_digital dut (.*);
  initial #1 rst_n = 0;
  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar k = 0; k < N_ADC; k++) begin : g_adc
    assign ain[k] = ana[2*k + int'(ch_sel)];
    adc_model #(.CONV_CYCLES(12)) u_adc (
      .clk, .start(adc_start[k]), .ain(ain[k]), .done(adc_done[k]), .data(adc_data[k])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // remember what was converted: codes are frozen while holding
  logic hold_q = 0;
  logic [N_CH-1:0][9:0] snap = '0;
  always @(posedge clk) begin
    hold_q <= sh_hold;
    if (sh_hold) foreach (ana[c]) snap[c] <= ana[c];
    if (hold_q && !sh_hold) conv_q.push_back(snap);
    if (sh_hold) check(dout == 0, "line quiet during conversion");
  end
  always @(negedge clk) if (!sh_hold) foreach (ana[c]) if ($urandom_range(0, 20) == 0) ana[c] = 10'($urandom);

  // independent DDR frame decoder
  logic bitq [$];
  always @(posedge clk) begin #5 bitq.push_back(dout); end
  always @(negedge clk) begin #5 bitq.push_back(dout); end

  int nframes = 0;
  always @(posedge clk) begin
    while (bitq.size() > 0 && bitq[0] == 0) void'(bitq.pop_front());
    if (bitq.size() >= FRAME_BITS) begin
      logic [N_CH-1:0][9:0] exp_s;
      start_cyc.push_back(cyc);
      void'(bitq.pop_front());
      check(conv_q.size() > 0, "frame without conversion");
      exp_s = (conv_q.size() > 0) ? conv_q.pop_front() : '0;
      for (int c = 0; c < N_CH; c++) begin
        logic [9:0] v;
        logic par;
        for (int b = 0; b < 10; b++) v[b] = bitq.pop_front();
        par = bitq.pop_front();
        check(v == exp_s[c] && par == ^v, $sformatf("frame %0d ch %0d: %0d expected %0d", nframes, c, v, exp_s[c]));
      end
      nframes++;
    end
  end

  initial begin
    foreach (ana[c]) ana[c] = 10'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    repeat (90 * 30) @(negedge clk);
    run = 0;
    repeat (200) @(negedge clk);
    check(nframes >= 29, $sformatf("%0d frames", nframes));
    check(tri_sel, "tripole request reaches the tri/dipole select");
    for (int i = 1; i < start_cyc.size(); i++)
      check(start_cyc[i] - start_cyc[i-1] == 90, $sformatf("frame spacing %0d", start_cyc[i] - start_cyc[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
