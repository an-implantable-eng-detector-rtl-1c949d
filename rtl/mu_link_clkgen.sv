// mu_link_clkgen: link clock generator of the monitoring unit (MU).
//
// The MU supplies the clock of the electrode unit over the cable.  This
// block divides the MU system clock by DIV (even, at least 4) into the link
// clock (high for the first DIV/2 system cycles of a period) and produces
// two one-cycle strobes at the middle of the high and of the low phase, at
// which the MU samples the double-data-rate back channel.  With a 48 MHz
// system clock and DIV = 16 the link clock is 3 MHz, giving the 6 Mbit/s
// DDR rate of the document; the division scheme and mid-phase sampling are
// this design's choices.  link_clk is a register output.
module mu_link_clkgen #(
  parameter int unsigned DIV = 16,
  parameter int unsigned CW  = $clog2(DIV)
) (
  input  logic clk,       // MU system clock
  input  logic rst_n,
  output logic link_clk,
  output logic stb_hi,    // sample the bit sent in the high phase
  output logic stb_lo     // sample the bit sent in the low phase
);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      link_clk <= 1'b0;
    end else begin
      cnt      <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      link_clk <= (cnt < CW'(DIV / 2));
    end
  end

  // link_clk is high after the edges at cnt = 0 .. DIV/2-1.  With the one
  // register stage in the receiver these strobes sample a quarter period
  // into each phase.
  assign stb_hi = (cnt == CW'(DIV / 4 + 1));
  assign stb_lo = (cnt == CW'(3 * DIV / 4 + 1));

endmodule
