// PWM generator: free-running 8-bit counter compared with a duty reference.
//
// The counter advances once per rising edge of a divided clock
// (CLK_DIV_N = 5: one step every 10 system clocks, 5 MHz at 50 MHz) and wraps
// from 255 to 0, so one PWM period is 256 steps = 2560 system clocks,
// 19.53 kHz at 50 MHz (the "about 20 kHz" of the original controller). Two
// comparator outputs are produced, as in the original:
//   pwm.le = (count <= duty_ref)  high for duty_ref+1 of 256 steps
//   pwm.ge = (count >= duty_ref)  high for 256-duty_ref of 256 steps
// The controller uses pwm.ge for clockwise and pwm.le for counterclockwise
// rotation, so that the duty rises as the potentiometer moves away from its
// centre in either direction. The outputs are combinational from the counter
// register and the reference; the reference is used as it arrives (no
// per-period shadow register), as in the original. The counter's enable
// strobe instead of a divided clock and the synchronous reset are this
// design's choices.
module pwm_gen #(
  parameter int unsigned CNT_W     = bldc_pkg::PWM_W, // counter width (8)
  parameter int unsigned CLK_DIV_N = 5                // prescaler half period
) (
  input  logic                 clk,
  input  logic                 rst,        // synchronous, active high
  input  logic [CNT_W-1:0]     duty_ref,
  output bldc_pkg::pwm_pair_t  pwm,
  output logic [CNT_W-1:0]     count,      // PWM counter, for observation
  output logic                 period_start // one-cycle pulse when count wraps to 0
);

  logic step_en;
  logic unused_div_clk, unused_div_fall;

  clk_div #(.N(CLK_DIV_N)) u_prescaler (
    .clk     (clk),
    .rst     (rst),
    .clk_out (unused_div_clk),
    .rise_en (step_en),
    .fall_en (unused_div_fall)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      count        <= '0;
      period_start <= 1'b0;
    end else begin
      period_start <= step_en && (count == '1);
      if (step_en) count <= count + 1'b1;   // wraps 2^CNT_W-1 -> 0
    end
  end

  assign pwm.le = (count <= duty_ref);
  assign pwm.ge = (count >= duty_ref);

endmodule
