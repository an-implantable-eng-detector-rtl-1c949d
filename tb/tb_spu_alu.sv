// tb_spu_alu: random instruction stream on the execute stage, compared with
// an integer model of the instruction set: accumulator after every cycle,
// write-back enable and data, halt, and masked output data and tag.
module tb_spu_alu;
  import vsr_pkg::*;
  logic clk = 0, rst_n = 1, ex_valid = 0;
  instr_t instr = '0;
  logic [15:0] mem_rdata = 0, ring = 16'h0001;
  logic mem_we, halt, out_valid;
  logic [15:0] mem_wdata, out_data;
  logic [9:0] out_tag;
  logic signed [31:0] acc;
  longint macc = 0;
  int checks = 0, failures = 0;
  int seen [8] = '{default: 0};

  spu_alu dut (.*);
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  function automatic longint w32(longint v);
    logic [63:0] u = 64'(v);
    return longint'($signed(u[31:0]));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint p, nxt;
    bit exp_out;
    logic [15:0] exp_word;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50000; t++) begin
      @(negedge clk);
      ex_valid = ($urandom_range(0, 7) != 0);
      instr.op = opcode_e'($urandom_range(0, 7));
      instr.k = ($urandom_range(0, 3) == 0) ? 16'($urandom_range(0, 64)) : 16'($urandom);
      instr.field = 10'($urandom);
      mem_rdata = ($urandom_range(0, 3) == 0) ? 16'($urandom_range(0, 2000)) : 16'($urandom);
      ring = 16'(1) << $urandom_range(0, 15);
      #1;
      p = longint'($signed(mem_rdata)) * longint'($signed(instr.k));
      nxt = macc;
      exp_out = 0;
      exp_word = 16'(macc >>> FRAC);
      if (ex_valid) begin
        seen[instr.op]++;
        case (instr.op)
          OP_READ:   nxt = w32(macc + p);
          OP_MAX:    if (p > macc) nxt = p;
          OP_ABS:    if (macc < 0) nxt = w32(-macc);
          OP_CMP:    nxt = (macc > (longint'($signed(instr.k)) * 32768)) ? longint'(instr.field) * 32768 : 0;
          OP_OUTPUT: exp_out = (ring & instr.k) != 0;
          default:   ;
        endcase
      end
      check(mem_we == (ex_valid && instr.op == OP_WRITE), "mem_we");
      if (mem_we) check(mem_wdata == exp_word, $sformatf("write data %h expected %h", mem_wdata, exp_word));
      check(halt == (ex_valid && instr.op == OP_HALT), "halt");
      @(posedge clk);
      #1;
      macc = nxt;
      check(longint'(acc) == macc, $sformatf("t=%0d op %s acc %0d expected %0d", t, instr.op.name(), acc, macc));
      check(out_valid == exp_out, "out_valid");
      if (exp_out) check(out_data == exp_word && out_tag == instr.field, "output data/tag");
      // keep the accumulator from sticking at large values
      if ($urandom_range(0, 15) == 0) begin
        @(negedge clk);
        ex_valid = 1; instr.op = OP_CMP; instr.k = 16'h7FFF; instr.field = 10'($urandom_range(0, 3));
        @(posedge clk);
        #1;
        macc = (macc > 64'sd32767 * 32768) ? longint'(instr.field) * 32768 : 0;
      end
    end
    foreach (seen[i]) check(seen[i] > 100, $sformatf("opcode %0d exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
