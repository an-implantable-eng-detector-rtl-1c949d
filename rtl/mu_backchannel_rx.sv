// mu_backchannel_rx: back-channel receiver of the monitoring unit - the
// cable multiplexer and the serial-in/parallel-out register feeding the
// signal processing unit.
//
// sel picks one of N_EU electrode-unit data lines.  The line is registered
// once in the system clock domain and a bit is taken at each mid-phase
// strobe from mu_link_clkgen, so two bits per link clock.  While idle the
// receiver waits for a '1' (start bit); it then shifts in ten words of ten
// sample bits (LSB first) and a parity bit.  Each completed word is
// delivered at once (s_valid with channel number s_ch), with parity_err set
// if its even parity does not hold; set_done accompanies the tenth word.
// Samples with bad parity are still delivered and counted (saturating
// err_count), which is this design's choice, as is the single-register
// input sampling; the frame format follows the document.
module mu_backchannel_rx
  import vsr_pkg::*;
#(
  parameter int unsigned N_EU  = 3,
  parameter int unsigned SEL_W = (N_EU > 1) ? $clog2(N_EU) : 1,
  parameter int unsigned CH_W  = $clog2(N_CH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_EU-1:0]  din,       // DDR data lines of the cables
  input  logic [SEL_W-1:0] sel,       // cable selected
  input  logic             stb_hi,
  input  logic             stb_lo,
  output logic             s_valid,
  output logic [CH_W-1:0]  s_ch,
  output sample_t          s_data,
  output logic             parity_err,
  output logic             set_done,
  output logic [15:0]      err_count
);

  logic              din_q, bit_stb, active;
  logic [3:0]        bitn;        // 0..9 data, 10 parity
  logic [CH_W-1:0]   ch;
  sample_t           word;

  assign bit_stb = stb_hi | stb_lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) din_q <= 1'b0;
    else        din_q <= din[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      bitn       <= '0;
      ch         <= '0;
      word       <= '0;
      s_valid    <= 1'b0;
      s_ch       <= '0;
      s_data     <= '0;
      parity_err <= 1'b0;
      set_done   <= 1'b0;
      err_count  <= '0;
    end else begin
      s_valid    <= 1'b0;
      parity_err <= 1'b0;
      set_done   <= 1'b0;
      if (bit_stb) begin
        if (!active) begin
          if (din_q) begin
            active <= 1'b1;
            bitn   <= '0;
            ch     <= '0;
          end
        end else if (bitn < 4'(SAMPLE_W)) begin
          word[bitn] <= din_q;
          bitn       <= bitn + 1'b1;
        end else begin
          s_valid <= 1'b1;
          s_ch    <= ch;
          s_data  <= word;
          if (din_q != even_parity(word)) begin
            parity_err <= 1'b1;
            if (err_count != '1) err_count <= err_count + 1'b1;
          end
          bitn <= '0;
          if (ch == CH_W'(N_CH - 1)) begin
            set_done <= 1'b1;
            active   <= 1'b0;
          end else begin
            ch <= ch + 1'b1;
          end
        end
      end
    end
  end

endmodule
