// tb_spu_sequencer: runs the sequencer against programs of random length L
// (the testbench raises halt when instruction L-1 executes).  Checks that
// the executed instruction indices are exactly 0..L-1 in order, that the run
// lasts L+1 cycles, that the ring counter is one-hot and rotates once per
// start (bit 0 on the first run) and that a start during a run sets overrun.
module tb_spu_sequencer;
  logic clk = 0, rst_n = 1, start = 0, halt;
  logic fetch_en, ex_valid, running, overrun;
  logic [9:0] pc;
  logic [15:0] ring;
  int checks = 0, failures = 0;
  int L = 5;
  int fetched = -1, executed [$];

  spu_sequencer dut (.*);
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  // index of the instruction in the execute stage = address fetched last cycle
  always @(posedge clk) fetched <= fetch_en ? int'(pc) : -1;
  assign halt = ex_valid && (fetched == L - 1);
  always @(posedge clk) if (ex_valid) executed.push_back(fetched);

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
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!running && !ex_valid && !overrun, "idle after reset");
    for (int r = 0; r < 40; r++) begin
      L = int'($urandom_range(1, 60));
      executed.delete();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      check(ring == 16'(1) << (r % 16), $sformatf("run %0d ring %h", r, ring));
      cyc = 0;
      while (running) begin @(negedge clk); cyc++; end
      check(cyc == L + 1, $sformatf("run %0d: %0d cycles, expected %0d", r, cyc, L + 1));
      check(executed.size() == L, $sformatf("run %0d: %0d executed, expected %0d", r, executed.size(), L));
      foreach (executed[i]) check(executed[i] == i, $sformatf("run %0d: slot %0d executed %0d", r, i, executed[i]));
      repeat (3) @(negedge clk);
      check(!ex_valid, "nothing executes while halted");
    end
    check(!overrun, "no overrun yet");
    L = 50;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    start = 1;
    @(negedge clk); start = 0;
    check(overrun, "overrun after start during a run");
    while (running) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
