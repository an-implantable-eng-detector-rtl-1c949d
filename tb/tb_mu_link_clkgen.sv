// tb_mu_link_clkgen: checks the link clock period (DIV system cycles), its
// 50 % duty cycle, and that each period has exactly one high-phase and one
// low-phase strobe, each falling where the receiver's one-cycle-delayed copy
// of the line is a quarter period into the matching phase.
module tb_mu_link_clkgen;
  logic clk = 0, rst_n = 1, link_clk, stb_hi, stb_lo;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, high_cnt = 0, n_hi = 0, n_lo = 0;
  logic lc_q1 = 0, lc_q2 = 0;   // link clock seen through the receiver's register

  mu_link_clkgen dut (.*);
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

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

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    lc_q1 <= link_clk;
    lc_q2 <= lc_q1;
    if (link_clk) high_cnt <= high_cnt + 1;
    // the strobe samples the line value that the receiver registered at the
    // previous edge, i.e. the link clock level two edges ago
    if (stb_hi) begin n_hi <= n_hi + 1; check(lc_q2 == 1, "stb_hi samples the high phase"); end
    if (stb_lo) begin n_lo <= n_lo + 1; check(lc_q2 == 0, "stb_lo samples the low phase"); end
  end

  always @(posedge link_clk) if (rst_n) begin
    if (last_rise >= 0) check(cyc - last_rise == 16, $sformatf("period %0d", cyc - last_rise));
    last_rise = cyc;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (16 * 100) @(negedge clk);
    check(n_hi >= 99 && n_hi <= 101 && n_lo >= 99 && n_lo <= 101, $sformatf("strobes %0d %0d", n_hi, n_lo));
    check(high_cnt >= 790 && high_cnt <= 810, $sformatf("duty: high %0d of 1600", high_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
