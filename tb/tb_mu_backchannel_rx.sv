// tb_mu_backchannel_rx: drives three cable lines with independently built
// frames (bit period 8 system cycles, strobe in the middle of each bit),
// some with a corrupted parity bit, and switches the cable select between
// frames.  Checks every delivered word, channel number, parity flag,
// set_done, the error counter, and that idle gaps of random length and
// traffic on unselected cables are ignored.
module tb_mu_backchannel_rx;
  import vsr_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [2:0] din = 0;
  logic [1:0] sel = 0;
  logic stb_hi = 0, stb_lo = 0;
  logic s_valid, parity_err, set_done;
  logic [3:0] s_ch;
  sample_t s_data;
  logic [15:0] err_count;
  int checks = 0, failures = 0;
  int exp_data [$], exp_ch [$], exp_perr [$];
  int n_perr = 0, n_sets = 0;

  mu_backchannel_rx dut (.*);
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (s_valid) begin
    check(exp_data.size() > 0, "unexpected word");
    if (exp_data.size() > 0) begin
      int d, c, pe;
      d = exp_data.pop_front(); c = exp_ch.pop_front(); pe = exp_perr.pop_front();
      check(int'(s_data) == d && int'(s_ch) == c && int'(parity_err) == pe,
            $sformatf("word ch %0d data %0d perr %0d, expected ch %0d data %0d perr %0d",
                      s_ch, s_data, parity_err, c, d, pe));
      check(set_done == (c == 9), "set_done on the tenth word only");
      if (set_done) n_sets++;
    end
  end

  // one bit on all three lines: the selected one carries b, others noise
  task automatic send_bit(input logic b, input bit hi_phase);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      din = 3'($urandom);
      din[sel] = b;
      stb_hi = (i == 4) && hi_phase;
      stb_lo = (i == 4) && !hi_phase;
    end
  endtask

  bit phase = 1;
  task automatic send(input logic b);
    send_bit(b, phase);
    phase = !phase;
  endtask

  initial begin : main
    sample_t v;
    logic p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 120; f++) begin
      sel = 2'($urandom_range(0, 2));
      repeat ($urandom_range(0, 6)) send(1'b0);
      send(1'b1);                              // start bit
      for (int c = 0; c < N_CH; c++) begin
        bit bad;
        v = 10'($urandom);
        bad = ($urandom_range(0, 9) == 0);
        p = (^v) ^ bad;
        exp_data.push_back(int'(v)); exp_ch.push_back(c); exp_perr.push_back(int'(bad));
        if (bad) n_perr++;
        for (int b = 0; b < 10; b++) send(v[b]);
        send(p);
      end
      repeat (2) send(1'b0);
    end
    repeat (20) @(negedge clk);
    check(exp_data.size() == 0, $sformatf("%0d words not delivered", exp_data.size()));
    check(n_sets == 120, $sformatf("%0d sets", n_sets));
    check(int'(err_count) == n_perr && n_perr > 0, $sformatf("err_count %0d expected %0d", err_count, n_perr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
