// eu_serialiser: serialiser and DDR back-channel driver of the electrode
// unit.
//
// On load it forms one frame from the ten samples: a start bit '1', then
// for channel 0..9 the ten sample bits LSB first followed by the sample's
// parity bit (111 bits, padded with a '0' to 56 bit pairs).  It then sends
// two bits per link-clock cycle: the first bit of a pair while the link
// clock is high, the second while it is low (double data rate), i.e.
// 6 Mbit/s from a 3 MHz link clock.  The line rests at '0' between frames.
// busy is high from the cycle after load until the last pair is on the line;
// a load while busy is ignored.
// The frame layout, LSB-first order, per-sample parity and DDR signalling
// follow the document; even parity, the idle level and the pad bit are this
// design's choices.
module eu_serialiser
  import vsr_pkg::*;
(
  input  logic    clk,      // link clock
  input  logic    rst_n,
  input  logic    load,
  input  sample_t samples [N_CH],
  output logic    busy,
  output logic    dout      // DDR back-channel data
);

  localparam int unsigned PAIRS = (FRAME_BITS + 1) / 2;   // 56
  localparam int unsigned CW    = $clog2(PAIRS + 1);

  logic [2*PAIRS-1:0] sreg;
  logic [CW-1:0]      left;
  logic               q_hi, q_lo;
  logic [2*PAIRS-1:0] frame;

  always_comb begin
    frame    = '0;
    frame[0] = 1'b1;
    for (int c = 0; c < N_CH; c++) begin
      frame[1 + c*WORD_BITS +: SAMPLE_W]   = samples[c];
      frame[1 + c*WORD_BITS + SAMPLE_W]    = even_parity(samples[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      left <= '0;
      q_hi <= 1'b0;
      q_lo <= 1'b0;
    end else if (left != '0) begin
      q_hi <= sreg[0];
      q_lo <= sreg[1];
      sreg <= sreg >> 2;
      left <= left - 1'b1;
    end else begin
      q_hi <= 1'b0;
      q_lo <= 1'b0;
      if (load) begin
        sreg <= frame;
        left <= CW'(PAIRS);
      end
    end
  end

  assign busy = (left != '0);
  // first bit of the pair in the high phase, second in the low phase
  assign dout = clk ? q_hi : q_lo;

endmodule
