// eng_vsr_top: digital system of the implantable velocity-selective ENG
// recorder - one electrode unit (EU), its cable back channel and the
// monitoring unit (MU) with its VSR signal processing unit (SPU).
//
// The MU divides its system clock into the link clock that it sends to the
// EU (mu_link_clkgen).  The EU (eu_digital), clocked by it, samples its ten
// channels every FRAME_CYCLES link cycles with five ADCs and returns each
// sample set as a 111-bit frame on the DDR data line.  The MU selects one
// cable (N_EU inputs; the other cables arrive on ext_dout), de-serialises
// the frame (mu_backchannel_rx) and feeds the SPU (spu), which stores the
// samples in its circular sample memory and runs its program once per set,
// producing the sub-sampled velocity-channel results on out_*.
//
// Analogue and library parts are outside: the ADC handshake, the
// sample-and-hold, channel-mux and tri/dipole-mux controls are ports; run
// and tripole stand for the acquisition and mode commands that the MU sends
// on the four-level command line, whose encoding is not part of this design; the program is loaded through
// prog_*.
// The serialiser's busy flag is not needed at this level (the frame timer
// keeps frames apart) and is left unread.
module eng_vsr_top
  import vsr_pkg::*;
#(
  parameter int unsigned N_EU         = 3,
  parameter int unsigned LINK_DIV     = 16,
  parameter int unsigned FRAME_CYCLES = 90,
  parameter int unsigned DMEM_DEPTH   = 1024,
  parameter int unsigned IMEM_DEPTH   = 1024,
  parameter int unsigned BLOCK        = 32,
  parameter int unsigned SEL_W        = (N_EU > 1) ? $clog2(N_EU) : 1,
  parameter int unsigned PC_W         = $clog2(IMEM_DEPTH)
) (
  input  logic               clk,          // MU system clock
  input  logic               rst_n,
  input  logic               run,          // start/stop acquisition
  input  logic               tripole,      // EU sends tripole (1) or dipole (0) signals
  // EU analogue/library interface
  output logic [N_ADC-1:0]   adc_start,
  input  logic [N_ADC-1:0]   adc_done,
  input  sample_t            adc_data [N_ADC],
  output logic               sh_hold,
  output logic               ch_sel,
  output logic               tri_sel,      // tri/dipole multiplexer select
  output logic               link_clk,
  output logic               eu_dout,
  // other cables into the MU multiplexer
  input  logic [N_EU-1:0]    ext_dout,     // bit 0 unused (own EU)
  input  logic [SEL_W-1:0]   cable_sel,
  // SPU program load
  input  logic               prog_we,
  input  logic [PC_W-1:0]    prog_addr,
  input  instr_t             prog_data,
  // results and status
  output logic               out_valid,
  output logic [WORD_W-1:0]  out_data,
  output logic [FIELD_W-1:0] out_tag,
  output logic               set_done,
  output logic               parity_err,
  output logic [15:0]        err_count,
  output logic               spu_running,
  output logic               spu_overrun
);

  localparam int unsigned CH_W = $clog2(N_CH);

  logic            stb_hi, stb_lo, tx_busy;
  logic            s_valid;
  logic [CH_W-1:0] s_ch;
  sample_t         s_data;
  logic [N_EU-1:0] din;

  mu_link_clkgen #(.DIV(LINK_DIV)) u_clkgen (
    .clk, .rst_n, .link_clk, .stb_hi, .stb_lo
  );

  eu_digital #(.FRAME_CYCLES(FRAME_CYCLES)) u_eu (
    .clk(link_clk), .rst_n, .run, .tripole, .adc_start, .adc_done, .adc_data,
    .sh_hold, .ch_sel, .tri_sel, .tx_busy, .dout(eu_dout)
  );

  always_comb begin
    din    = ext_dout;
    din[0] = eu_dout;
  end

  mu_backchannel_rx #(.N_EU(N_EU)) u_rx (
    .clk, .rst_n, .din, .sel(cable_sel), .stb_hi, .stb_lo,
    .s_valid, .s_ch, .s_data, .parity_err, .set_done, .err_count
  );

  spu #(.DMEM_DEPTH(DMEM_DEPTH), .IMEM_DEPTH(IMEM_DEPTH), .BLOCK(BLOCK)) u_spu (
    .clk, .rst_n, .s_valid, .s_ch, .s_data, .set_done,
    .prog_we, .prog_addr, .prog_data,
    .out_valid, .out_data, .out_tag, .running(spu_running), .overrun(spu_overrun)
  );

endmodule
