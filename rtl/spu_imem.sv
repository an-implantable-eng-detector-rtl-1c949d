// spu_imem: program memory of the signal processing unit.
//
// Holds DEPTH instruction words of INSTR_W (29) bits.  A simple write port
// loads the program; the read port is synchronous: the word addressed by
// rd_addr in one cycle appears on rd_data in the next, which makes the
// memory the fetch stage of the two-stage SPU pipeline.  The document gives
// the 29-bit instruction format and says the program memory exists; the depth
// (1024, enough for the 30 interpolated delay-and-add outputs it mentions)
// and the load port are this design's choices.
module spu_imem
  import vsr_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic               clk,
  // load port
  input  logic               wr_en,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  instr_t             wr_data,
  // fetch port
  input  logic               rd_en,
  input  logic [ADDR_W-1:0]  rd_addr,
  output instr_t             rd_data
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
