// eu_digital: digital part of the electrode unit.
//
// Acquisition control (eu_acq_control) takes a ten-channel sample set with
// the five ADCs once per frame and hands it to the serialiser
// (eu_serialiser), which sends it back to the monitoring unit on the DDR
// data line.  Everything runs on the link clock received from the MU.  The
// ADCs, sample-and-holds and channel multiplexers are analogue/library
// parts outside this module: their controls and results are ports.  The
// run and tripole inputs stand for the commands that the MU sends over the
// four-level command line, whose decoding is not part of this design.
module eu_digital
  import vsr_pkg::*;
#(
  parameter int unsigned FRAME_CYCLES = 90
) (
  input  logic             clk,        // link clock from the MU
  input  logic             rst_n,
  input  logic             run,
  input  logic             tripole,    // requested tri/dipole mode
  output logic [N_ADC-1:0] adc_start,
  input  logic [N_ADC-1:0] adc_done,
  input  sample_t          adc_data [N_ADC],
  output logic             sh_hold,
  output logic             ch_sel,
  output logic             tri_sel,
  output logic             tx_busy,
  output logic             dout
);

  sample_t samples [N_CH];
  logic    set_valid;

  eu_acq_control #(.FRAME_CYCLES(FRAME_CYCLES)) u_acq (
    .clk, .rst_n, .run, .tripole, .adc_start, .adc_done, .adc_data,
    .sh_hold, .ch_sel, .tri_sel, .samples, .set_valid
  );

  eu_serialiser u_ser (
    .clk, .rst_n, .load(set_valid), .samples, .busy(tx_busy), .dout
  );

endmodule
