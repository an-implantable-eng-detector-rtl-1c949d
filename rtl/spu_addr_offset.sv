// spu_addr_offset: sample-relative addressing of the SPU data memory.
//
// A base register points at the physical word that programs see as address
// 0.  Every time a complete sample set has been received (set_done) the base
// moves back by one block of BLOCK words, so the word that was address 0 is
// now seen as address BLOCK: the previous sample of channel c is always at
// c + BLOCK, the one before at c + 2*BLOCK, and so on.  Adding the base
// ignores the carry, which turns the memory into a circular buffer.
// Incoming samples of channel c are written to the block that will become
// the current one, i.e. physical base - BLOCK + c (seen by the running
// program as the oldest block).  The mechanism and the 32-word block follow
// the document; reset of the base to 0 is this design's choice.
// Timing: proc_paddr is combinational; the base changes one cycle after
// set_done.
module spu_addr_offset #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned BLOCK  = 32,
  parameter int unsigned N_CH   = 10,
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int unsigned CH_W   = $clog2(N_CH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              set_done,     // a full sample set has been stored
  input  logic [ADDR_W-1:0] proc_vaddr,   // program (relative) address
  output logic [ADDR_W-1:0] proc_paddr,   // physical address
  input  logic [CH_W-1:0]   sample_ch,    // channel of an incoming sample
  output logic [ADDR_W-1:0] sample_paddr, // where it is stored
  output logic [ADDR_W-1:0] base
);

  localparam logic [ADDR_W-1:0] BLOCK_A = ADDR_W'(BLOCK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        base <= '0;
    else if (set_done) base <= base - BLOCK_A;
  end

  assign proc_paddr   = base + proc_vaddr;
  assign sample_paddr = base - BLOCK_A + ADDR_W'(sample_ch);

endmodule
