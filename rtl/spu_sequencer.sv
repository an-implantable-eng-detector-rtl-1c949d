// spu_sequencer: program sequencing of the signal processing unit.
//
// The SPU runs the same straight-line program (no branches) once for every
// sample set.  start (a complete set has been stored) resets the program
// counter to 0 and lets it run; every cycle the instruction at pc is fetched
// from the synchronous program memory (stage 1) while the one fetched in the
// previous cycle executes (stage 2).  On restart the execute stage gets a
// bubble (a NOP) while the first instruction is fetched.  When a HALT
// executes the sequencer stops fetching and waits for the next start.
//
// The sequencer also owns the one-hot RING_W-bit ring counter used to mask
// OUTPUT instructions: it rotates by one position on every start, so that an
// OUTPUT whose mask has a 1 every fourth bit fires on every fourth sample
// set.  It resets so that the first program run sees bit 0.  A start that
// arrives while the program is still running restarts it anyway and sets
// the sticky overrun flag.
// Linear execution, HALT, the two-stage pipeline and the ring counter follow
// the document; reset values, the bubble and overrun handling are this
// design's choices.
module spu_sequencer #(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned RING_W     = 16,
  parameter int unsigned PC_W       = $clog2(IMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,     // complete sample set stored
  input  logic              halt,      // HALT in the execute stage
  output logic              fetch_en,  // program memory read enable
  output logic [PC_W-1:0]   pc,        // program memory read address
  output logic              ex_valid,  // execute stage holds a real instruction
  output logic [RING_W-1:0] ring,      // one-hot output mask ring
  output logic              running,
  output logic              overrun    // sticky: set arrived while running
);

  assign fetch_en = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      running  <= 1'b0;
      ex_valid <= 1'b0;
      ring     <= RING_W'(1) << (RING_W - 1);
      overrun  <= 1'b0;
    end else if (start) begin
      pc       <= '0;
      running  <= 1'b1;
      ex_valid <= 1'b0;
      ring     <= {ring[RING_W-2:0], ring[RING_W-1]};
      if (running) overrun <= 1'b1;
    end else if (running) begin
      if (halt) begin
        running  <= 1'b0;
        ex_valid <= 1'b0;
      end else begin
        pc       <= pc + 1'b1;
        ex_valid <= 1'b1;
      end
    end else begin
      ex_valid <= 1'b0;
    end
  end

endmodule
