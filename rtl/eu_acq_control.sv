// eu_acq_control: data acquisition control of the electrode unit (EU).
//
// Once every FRAME_CYCLES link-clock cycles (while run is high) it takes one
// sample set of the ten dipole channels with the five ADCs: the
// sample-and-hold stages are put in hold, the channel multiplexers select
// the even channel of each pair and all ADCs are started; when every ADC has
// reported done its result is latched, the multiplexers switch to the odd
// channel and the ADCs are started again.  After the second round the hold
// is released and set_valid hands the ten samples to the serialiser, so no
// bit is transmitted while a conversion is running.  ADC k converts channels
// 2k and 2k+1.
//
// The tri/dipole multiplexers are also controlled from here: the requested
// mode (tripole) is taken over into tri_sel only when a new set starts, so
// both conversion rounds of a set and its frame always carry one kind of
// signal.  Dipole mode (tri_sel = 0) after reset.
//
// The states form a one-hot token that moves one place per step, in the
// spirit of the EU's token-driven, low-noise register clocking.  With the
// 3 MHz link clock (6 Mbit/s DDR) and FRAME_CYCLES = 90 a set is taken every
// 30 us: 33.3 kS/s per channel and 66.7 kS/s per ADC, the rates the EU is
// specified for.  Five interleaved 10-bit ADCs, ten channels, hold-then-send
// follow the document; the ADC start/done handshake, the channel pairing and
// the frame timer are this design's choices.
// Timing: adc_start is a one-cycle pulse; adc_done[k] is a one-cycle pulse
// with adc_data[k] valid in the same cycle.
module eu_acq_control
  import vsr_pkg::*;
#(
  parameter int unsigned FRAME_CYCLES = 90
) (
  input  logic             clk,        // link clock
  input  logic             rst_n,
  input  logic             run,        // acquisition enabled (MU command)
  input  logic             tripole,    // requested mode: 1 tripole, 0 dipole
  // ADC interface
  output logic [N_ADC-1:0] adc_start,
  input  logic [N_ADC-1:0] adc_done,
  input  sample_t          adc_data [N_ADC],
  // analogue front-end controls
  output logic             sh_hold,    // sample-and-hold in hold
  output logic             ch_sel,     // 0: even channels, 1: odd channels
  output logic             tri_sel,    // tri/dipole multiplexer select
  // sample set to the serialiser
  output sample_t          samples [N_CH],
  output logic             set_valid
);

  typedef enum logic [5:0] {
    S_IDLE  = 6'b000001,
    S_HOLD  = 6'b000010,
    S_CONV0 = 6'b000100,
    S_NEXT  = 6'b001000,
    S_CONV1 = 6'b010000,
    S_DONE  = 6'b100000
  } state_e;

  localparam int unsigned TW = $clog2(FRAME_CYCLES);

  state_e           state;
  logic [TW-1:0]    timer;
  logic [N_ADC-1:0] got;
  logic             all_done;

  assign all_done = &(got | adc_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) timer <= '0;
    else if (!run || timer == TW'(FRAME_CYCLES - 1)) timer <= '0;
    else timer <= timer + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      got     <= '0;
      tri_sel <= 1'b0;
      for (int c = 0; c < N_CH; c++) samples[c] <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (run && timer == '0) begin
          state   <= S_HOLD;
          tri_sel <= tripole;
        end
        S_HOLD:  begin got <= '0; state <= S_CONV0; end
        S_CONV0: begin
          for (int k = 0; k < N_ADC; k++)
            if (adc_done[k]) samples[2*k] <= adc_data[k];
          got <= got | adc_done;
          if (all_done) state <= S_NEXT;
        end
        S_NEXT:  begin got <= '0; state <= S_CONV1; end
        S_CONV1: begin
          for (int k = 0; k < N_ADC; k++)
            if (adc_done[k]) samples[2*k+1] <= adc_data[k];
          got <= got | adc_done;
          if (all_done) state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign sh_hold   = state inside {S_HOLD, S_CONV0, S_NEXT, S_CONV1};
  assign ch_sel    = state inside {S_NEXT, S_CONV1};
  assign adc_start = (state inside {S_HOLD, S_NEXT}) ? '1 : '0;
  assign set_valid = (state == S_DONE);

endmodule
