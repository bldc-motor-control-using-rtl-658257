// Hall-sensor BLDC motor controller: top level.
//
// One potentiometer sets both speed and direction. Its voltage is read
// continuously through an MCP3008 ADC (spi_adc). The 10-bit reading is split:
// its MSB gives the direction and the two codes at mid-scale stop the motor
// (direction_select), and bits [8:1] are the duty reference of a ~20 kHz PWM
// (pwm_gen). The commutation logic picks, from the three hall sensors, which
// inverter leg switches to the positive rail (high-side gate, PWM-chopped) and
// which to the negative rail (low-side gate, on), following the six-step
// tables. Turning the potentiometer from the centre towards either end raises
// the duty from 1/256 to 256/256 in that direction.
//
// Ports: clk (50 MHz), rst (synchronous, active high), hall[2:0] = {C,B,A}
// from the motor, the four SPI pins of the ADC, and the six gate signals
// high_side/low_side[2:0] (bit 0 = phase A) for the MOSFET drivers.
//
// Timing: a new ADC value every 180 us (SPI clock 100 kHz); the PWM period is
// 2560 clocks (19.53 kHz). A hall change reaches the gate outputs after 3
// clocks (2-stage synchroniser + output register); a new ADC value after 1-2
// clocks.
//
// The block structure, widths, SPI rate, PWM rate and commutation tables are
// the original controller's. The hall synchroniser, the registered gate
// outputs (which keep combinational glitches away from the gate drivers) and
// the reset pin are additions of this design.
module control_top #(
  parameter int unsigned SCLK_DIV_N = 250,     // SPI clock = clk / (2*250) = 100 kHz
  parameter int unsigned PWM_DIV_N  = 5,       // PWM step  = clk / (2*5)   = 5 MHz
  parameter logic [3:0]  ADC_CTRL   = 4'b1000  // single-ended channel 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  bldc_pkg::hall_t      hall,
  input  logic                 miso,
  output logic                 mosi,
  output logic                 spiclk,
  output logic                 cs,
  output bldc_pkg::gates_t     high_side,
  output bldc_pkg::gates_t     low_side
);
  import bldc_pkg::*;

  logic [ADC_W-1:0] adc_value;
  logic             stop_flag;
  dir_e             dir;
  pwm_pair_t        pwm;
  hall_t            hall_meta, hall_sync;
  gates_t           high_next, low_next;

  spi_adc #(
    .SCLK_DIV_N (SCLK_DIV_N),
    .CTRL       (ADC_CTRL)
  ) u_adc (
    .clk      (clk),
    .rst      (rst),
    .enable   (1'b1),
    .sclk     (spiclk),
    .cs       (cs),
    .mosi     (mosi),
    .miso     (miso),
    .done     (),
    .data_out (adc_value)
  );

  pwm_gen #(
    .CNT_W     (PWM_W),
    .CLK_DIV_N (PWM_DIV_N)
  ) u_pwm (
    .clk          (clk),
    .rst          (rst),
    .duty_ref     (adc_value[PWM_W:1]),
    .pwm          (pwm),
    .count        (),
    .period_start ()
  );

  direction_select u_dir (
    .clk       (clk),
    .rst       (rst),
    .adc       (adc_value),
    .stop_flag (stop_flag),
    .dir       (dir)
  );

  // Two-flop synchroniser for the asynchronous hall inputs.
  always_ff @(posedge clk) begin
    if (rst) begin
      hall_meta <= '0;
      hall_sync <= '0;
    end else begin
      hall_meta <= hall;
      hall_sync <= hall_meta;
    end
  end

  commutation u_comm (
    .hall      (hall_sync),
    .dir       (dir),
    .stop      (stop_flag),
    .pwm       (pwm),
    .high_side (high_next),
    .low_side  (low_next)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      high_side <= '0;
      low_side  <= '0;
    end else begin
      high_side <= high_next;
      low_side  <= low_next;
    end
  end

endmodule
