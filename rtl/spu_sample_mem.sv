// spu_sample_mem: data memory of the signal processing unit (the delay-line
// memory).
//
// DEPTH words of WORD_W bits with two ports.  Port A is write-only and is
// used to store incoming ADC samples as they are de-serialised.  Port B
// serves the processor: an asynchronous read (the execute stage reads and
// uses the operand in the same cycle) and a synchronous write for WRITE
// instructions.  If both ports write the same word in one cycle, port B
// wins.  The two ports follow the document's block diagram; the 1024-word
// depth follows from its 10-bit address field; the word width and the read
// timing are this design's choices.
module spu_sample_mem #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WORD_W = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A: sample loading
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [WORD_W-1:0] a_wdata,
  // port B: processor
  input  logic [ADDR_W-1:0] b_addr,
  output logic [WORD_W-1:0] b_rdata,
  input  logic              b_we,
  input  logic [WORD_W-1:0] b_wdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && !(b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

  assign b_rdata = mem[b_addr];

endmodule
