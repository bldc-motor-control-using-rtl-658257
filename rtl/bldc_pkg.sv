// Shared types and constants of the hall-sensor BLDC controller.
//
// The hall code is carried as a 3-bit vector with bit 0 = sensor A,
// bit 1 = sensor B and bit 2 = sensor C; gate vectors use the same order
// (bit 0 = phase A, bit 1 = phase B, bit 2 = phase C). The ADC result is
// 10 bits wide and the PWM counter 8 bits, as in the original controller.
// The direction encoding (0 = clockwise, 1 = counterclockwise) follows the
// MSB of the ADC value, which selects the direction.
package bldc_pkg;

  localparam int unsigned ADC_W   = 10;  // MCP3008 resolution
  localparam int unsigned PWM_W   = 8;   // PWM counter / duty reference width
  localparam int unsigned NPHASE  = 3;

  typedef logic [NPHASE-1:0] hall_t;     // {C, B, A}
  typedef logic [NPHASE-1:0] gates_t;    // {phase C, phase B, phase A}

  typedef enum logic {
    DIR_CW  = 1'b0,                      // clockwise, lower half of the pot
    DIR_CCW = 1'b1                       // counterclockwise, upper half
  } dir_e;

  // The two comparator outputs of the PWM generator.
  typedef struct packed {
    logic ge;                            // counter >= reference (used for CW)
    logic le;                            // counter <= reference (used for CCW)
  } pwm_pair_t;

endpackage
