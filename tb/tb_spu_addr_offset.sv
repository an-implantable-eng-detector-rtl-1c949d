// tb_spu_addr_offset: checks sample-relative addressing.  A "sample" stored
// at channel c before a set_done must afterwards be found at program address
// c, and after k further set_done pulses at c + 32*k, with wrap-around of
// the 1024-word memory.
module tb_spu_addr_offset;
  logic clk = 0, rst_n = 1, set_done = 0;
  logic [9:0] proc_vaddr = 0, proc_paddr, sample_paddr, base;
  logic [3:0] sample_ch = 0;
  int checks = 0, failures = 0;
  int phys_of [int];     // id -> physical word where it was stored
  int set_of  [int];     // id -> set number when stored

  spu_addr_offset dut (.*);
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int nset;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (base !== 0) failures++;
    nset = 0;
    for (int s = 0; s < 80; s++) begin
      // store channel positions of this set
      for (int c = 0; c < 10; c++) begin
        @(negedge clk);
        sample_ch = 4'(c);
        #1;
        phys_of[s * 10 + c] = int'(sample_paddr);
      end
      set_done = 1;
      @(negedge clk);
      set_done = 0;
      nset++;
      // every sample of the last 31 sets must be at c + 32*age
      for (int old = (s > 30 ? s - 30 : 0); old <= s; old++) begin
        int age, c;
        age = s - old;
        c = int'($urandom_range(0, 9));
        proc_vaddr = 10'(c + 32 * age);
        #1;
        checks++;
        if (int'(proc_paddr) != phys_of[old * 10 + c]) begin
          failures++;
          $display("FAIL set %0d ch %0d age %0d: paddr %0d stored at %0d", old, c, age,
                   proc_paddr, phys_of[old * 10 + c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
