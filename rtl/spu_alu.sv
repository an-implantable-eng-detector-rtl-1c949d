// spu_alu: execute stage of the signal processing unit - the arithmetic
// unit and its single 32-bit accumulator.
//
// For the instruction in the execute stage (valid when ex_valid) with
// 16-bit constant k and 10-bit field f, and the data memory word m at
// address f (already offset by the sample-relative base, read in the same
// cycle):
//   READ    acc <- acc + m*k
//   MAX     acc <- m*k if m*k > acc
//   WRITE   mem[f] <- acc >>> FRAC (truncated to the memory word)
//   ABS     acc <- |acc|
//   CMP     acc <- (acc > k <<< FRAC) ? f << FRAC : 0
//   OUTPUT  out <- acc >>> FRAC (truncated), only if (ring & k) != 0
//   HALT    tell the sequencer to stop
//   NOP     nothing
// m and k are signed; k is read as a Q1.15 fraction, so acc carries FRAC
// fraction bits and WRITE/OUTPUT/CMP work in memory-word units.  Arithmetic
// wraps.  The instruction list, the 32-bit accumulator, the 16-bit constant
// and the ring mask follow the document; the Q1.15 scaling, the strict
// comparisons, signedness and the output tag (the field of the OUTPUT
// instruction, to label the result) are this design's choices.
// Timing: acc, out_* update at the clock edge ending the execute cycle;
// mem_we/mem_wdata/halt are combinational for that cycle.
// Only the low 16 bits of the shifted accumulator are used: WRITE and
// OUTPUT truncate by definition, so the upper bits are left unread.
module spu_alu
  import vsr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ex_valid,
  input  instr_t               instr,
  input  logic [WORD_W-1:0]    mem_rdata,
  input  logic [RING_W-1:0]    ring,
  output logic                 mem_we,
  output logic [WORD_W-1:0]    mem_wdata,
  output logic                 halt,
  output logic                 out_valid,
  output logic [WORD_W-1:0]    out_data,
  output logic [FIELD_W-1:0]   out_tag,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] prod, thresh, acc_next;
  logic signed [ACC_W-1:0] acc_shifted;
  logic                    out_fire;

  assign prod        = ACC_W'($signed(mem_rdata)) * ACC_W'($signed(instr.k));
  assign thresh      = ACC_W'($signed(instr.k)) <<< FRAC;
  assign acc_shifted = acc >>> FRAC;

  always_comb begin
    acc_next  = acc;
    mem_we    = 1'b0;
    halt      = 1'b0;
    out_fire  = 1'b0;
    if (ex_valid) begin
      unique case (instr.op)
        OP_READ:   acc_next = acc + prod;
        OP_MAX:    if (prod > acc) acc_next = prod;
        OP_WRITE:  mem_we = 1'b1;
        OP_ABS:    if (acc < 0) acc_next = -acc;
        OP_CMP:    acc_next = (acc > thresh) ? (ACC_W'(instr.field) << FRAC) : '0;
        OP_OUTPUT: out_fire = |(ring & instr.k);
        OP_HALT:   halt = 1'b1;
        default:   ;
      endcase
    end
  end

  assign mem_wdata = acc_shifted[WORD_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_tag   <= '0;
    end else begin
      acc       <= acc_next;
      out_valid <= out_fire;
      if (out_fire) begin
        out_data <= acc_shifted[WORD_W-1:0];
        out_tag  <= instr.field;
      end
    end
  end

endmodule
