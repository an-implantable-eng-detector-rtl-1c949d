// tb_spu_sample_mem: random traffic on both ports of the SPU data memory,
// compared with an array model: port A writes, port B asynchronous reads and
// writes, port B winning a same-address collision.
module tb_spu_sample_mem;
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [9:0] a_addr = 0, b_addr = 0;
  logic [15:0] a_wdata = 0, b_wdata = 0, b_rdata;
  logic [15:0] model [1024];
  int checks = 0, failures = 0;

  spu_sample_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through port A
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 10'(i); a_wdata = 16'($urandom);
      model[i] = a_wdata;
    end
    @(negedge clk);
    a_we = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      // check the asynchronous read of the current address
      b_addr = 10'($urandom_range(0, 1023));
      #1;
      checks++;
      if (b_rdata !== model[b_addr]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", b_addr, b_rdata, model[b_addr]);
      end
      a_we = 1'($urandom);
      b_we = 1'($urandom);
      a_addr = ($urandom_range(0, 7) == 0) ? b_addr : 10'($urandom);
      a_wdata = 16'($urandom);
      b_wdata = 16'($urandom);
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
    end
    @(negedge clk);
    a_we = 0; b_we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
