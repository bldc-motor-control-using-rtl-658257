// Direction and stop decision from the 10-bit potentiometer reading.
//
// The potentiometer is read as a signed set-point around its centre:
//   adc <  STOP_LO        clockwise        (dir = DIR_CW, adc[9] = 0)
//   STOP_LO..STOP_HI      stop: all gates off (stop_flag = 1)
//   adc >  STOP_HI        counterclockwise (dir = DIR_CCW, adc[9] = 1)
// With the defaults 511 and 512 the stop band is the two codes around
// mid-scale, the band the original controller decodes. dir is the MSB of the
// ADC value and is combinational; stop_flag is registered on the system
// clock, one cycle after the ADC value changes, as in the original. The
// synchronous reset (stop_flag = 1 out of reset, so the motor is not driven
// before the first ADC sample) is this design's choice.
module direction_select #(
  parameter int unsigned STOP_LO = 511,   // lowest code of the stop band
  parameter int unsigned STOP_HI = 512    // highest code of the stop band
) (
  input  logic                        clk,
  input  logic                        rst,        // synchronous, active high
  input  logic [bldc_pkg::ADC_W-1:0]  adc,
  output logic                        stop_flag,
  output bldc_pkg::dir_e              dir
);
  import bldc_pkg::*;

  always_ff @(posedge clk) begin
    if (rst) stop_flag <= 1'b1;
    else     stop_flag <= (adc >= ADC_W'(STOP_LO)) && (adc <= ADC_W'(STOP_HI));
  end

  assign dir = dir_e'(adc[ADC_W-1]);

endmodule
