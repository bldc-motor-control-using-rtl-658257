// Six-step commutation logic for a three-phase BLDC motor with hall sensors.
//
// For each valid hall pattern one phase is driven to the positive rail
// (high-side gate) and one to the negative rail (low-side gate); the third
// floats. The high-side gate is chopped by the PWM signal, the low-side gate
// is held on for the whole 60-degree step. Clockwise (hall bits A, B, C):
//     A B C   +    -          counterclockwise swaps + and -:
//     0 0 1   C    B              0 0 1   B    C
//     0 1 1   C    A              0 1 1   A    C
//     0 1 0   B    A              0 1 0   A    B
//     1 1 0   B    C              1 1 0   C    B
//     1 0 0   A    C              1 0 0   C    A
//     1 0 1   A    B              1 0 1   B    A
// Clockwise uses the PWM output pwm.ge, counterclockwise pwm.le. The hall
// codes 000 and 111 cannot occur on a healthy sensor set and switch all gates
// off, as does stop. The block is purely combinational; gate vectors have
// bit 0 = phase A. The tables and the PWM selection follow the original
// controller; deriving the counterclockwise table by swapping the rails is
// this implementation's way of writing it.
module commutation (
  input  bldc_pkg::hall_t      hall,       // {C, B, A}
  input  bldc_pkg::dir_e       dir,
  input  logic                 stop,
  input  bldc_pkg::pwm_pair_t  pwm,
  output bldc_pkg::gates_t     high_side,  // {C, B, A}
  output bldc_pkg::gates_t     low_side    // {C, B, A}
);
  import bldc_pkg::*;

  gates_t pos_cw, neg_cw;   // one-hot phase on + and - for clockwise
  logic   chop;

  always_comb begin
    unique case (hall)
      //  {C,B,A}          + phase          - phase
      3'b100: begin pos_cw = 3'b100; neg_cw = 3'b010; end  // A0 B0 C1
      3'b110: begin pos_cw = 3'b100; neg_cw = 3'b001; end  // A0 B1 C1
      3'b010: begin pos_cw = 3'b010; neg_cw = 3'b001; end  // A0 B1 C0
      3'b011: begin pos_cw = 3'b010; neg_cw = 3'b100; end  // A1 B1 C0
      3'b001: begin pos_cw = 3'b001; neg_cw = 3'b100; end  // A1 B0 C0
      3'b101: begin pos_cw = 3'b001; neg_cw = 3'b010; end  // A1 B0 C1
      default: begin pos_cw = 3'b000; neg_cw = 3'b000; end // 000, 111: invalid
    endcase
  end

  assign chop = (dir == DIR_CW) ? pwm.ge : pwm.le;

  always_comb begin
    if (stop) begin
      high_side = '0;
      low_side  = '0;
    end else if (dir == DIR_CW) begin
      high_side = pos_cw & {NPHASE{chop}};
      low_side  = neg_cw;
    end else begin
      high_side = neg_cw & {NPHASE{chop}};
      low_side  = pos_cw;
    end
  end

  // A phase is never driven high and low at the same time.
  always_comb begin
    assert ((high_side & low_side) == '0)
      else $error("commutation: shoot-through on a phase leg");
  end

endmodule
