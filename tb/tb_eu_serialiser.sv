// tb_eu_serialiser: loads random sample sets, samples the DDR line in the
// middle of each clock phase and decodes the frame independently: start bit,
// ten LSB-first samples each followed by even parity, 56 link cycles per
// frame, line low when idle, loads during a frame ignored.
module tb_eu_serialiser;
  import vsr_pkg::*;
  logic clk = 0, rst_n = 1, load = 0, busy, dout;
  sample_t samples [N_CH];
  logic bits [$];
  int checks = 0, failures = 0;

  eu_serialiser dut (.*);
  initial #1 rst_n = 0;
  always #10 clk = ~clk;
  // mid-phase sampling
  always @(posedge clk) begin #5 bits.push_back(dout); end
  always @(negedge clk) begin #5 bits.push_back(dout); end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    sample_t sent [N_CH];
    int busy_cycles;
    foreach (samples[c]) samples[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int f = 0; f < 200; f++) begin
      foreach (samples[c]) samples[c] = 10'($urandom);
      sent = samples;
      @(negedge clk);
      bits.delete();
      load = 1;
      @(negedge clk);
      load = 0;
      // a second load during the frame must be ignored
      foreach (samples[c]) samples[c] = 10'($urandom);
      load = (f % 3 == 0);
      busy_cycles = 0;
      while (busy) begin @(negedge clk); load = 0; busy_cycles++; end
      repeat (4) @(negedge clk);
      check(busy_cycles == 56, $sformatf("busy %0d cycles", busy_cycles));
      // find the start bit
      while (bits.size() > 0 && bits[0] == 0) void'(bits.pop_front());
      check(bits.size() >= FRAME_BITS, "frame present");
      if (bits.size() >= FRAME_BITS) begin
        void'(bits.pop_front());
        for (int c = 0; c < N_CH; c++) begin
          logic [9:0] v;
          logic par;
          for (int b = 0; b < 10; b++) v[b] = bits.pop_front();
          par = bits.pop_front();
          check(v == sent[c], $sformatf("frame %0d ch %0d: %h expected %h", f, c, v, sent[c]));
          check(par == ^v, "parity bit");
        end
        foreach (bits[i]) check(bits[i] == 0, "line idle low after frame");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
