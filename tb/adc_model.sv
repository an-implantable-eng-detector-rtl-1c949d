// adc_model: behavioural model of one 10-bit library ADC of the electrode
// unit, for testbenches only.  On a start pulse it takes the code presented
// on ain (the testbench's stand-in for the held analogue voltage) and
// CONV_CYCLES clock cycles later pulses done for one cycle with the code on
// data.  Starts during a conversion are ignored.
module adc_model #(
  parameter int CONV_CYCLES = 12
) (
  input  logic       clk,
  input  logic       start,
  input  logic [9:0] ain,
  output logic       done,
  output logic [9:0] data
);
  int cnt = 0;
  logic [9:0] held = '0;

  initial begin
    done = 0;
    data = '0;
  end

  always @(posedge clk) begin
    done <= 1'b0;
    if (cnt == 0 && start) begin
      held <= ain;
      cnt  <= CONV_CYCLES;
    end else if (cnt > 1) begin
      cnt <= cnt - 1;
    end else if (cnt == 1) begin
      cnt  <= 0;
      done <= 1'b1;
      data <= held;
    end
  end
endmodule
