// tb_spu_imem: checks that the program memory stores words written through
// the load port and returns them one cycle after the read address, and that
// the output holds while rd_en is low.
module tb_spu_imem;
  import vsr_pkg::*;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [9:0] wr_addr = 0, rd_addr = 0;
  instr_t wr_data = '0, rd_data;
  instr_t ref_mem [1024];
  int checks = 0, failures = 0;

  spu_imem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(i);
      wr_data = instr_t'(29'($urandom));
      ref_mem[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 2000; t++) begin
      int a;
      a = int'($urandom_range(0, 1023));
      @(negedge clk);
      rd_en = 1; rd_addr = 10'(a);
      @(negedge clk);
      rd_en = 0; rd_addr = 10'(a ^ 1);
      checks++;
      if (rd_data !== ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", a, rd_data, ref_mem[a]);
      end
      @(negedge clk);
      checks++;
      if (rd_data !== ref_mem[a]) begin
        failures++;
        $display("FAIL hold addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
