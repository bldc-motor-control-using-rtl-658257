// Clock divider / strobe generator.
//
// A counter runs on the system clock and toggles clk_out every N cycles, so
// clk_out is a square wave of period 2*N system clocks (N = 250 gives
// 100 kHz from 50 MHz, the SPI clock of the ADC interface; N = 5 gives the
// 5 MHz PWM count rate). The toggle-every-N behaviour is the original
// design's; instead of clocking other logic with clk_out, this version also
// gives two one-cycle strobes so that all logic stays on the system clock:
//   rise_en is high in the cycle whose closing clk edge takes clk_out 0->1,
//   fall_en is high in the cycle whose closing clk edge takes clk_out 1->0.
// rst is synchronous and active high; it clears the counter and clk_out.
module clk_div #(
  parameter int unsigned N = 250,                 // input cycles per half period
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic clk,
  input  logic rst,
  output logic clk_out,
  output logic rise_en,
  output logic fall_en
);

  logic [W-1:0] cnt;
  logic         wrap;

  assign wrap    = (cnt == W'(N - 1));
  assign rise_en = wrap & ~clk_out;
  assign fall_en = wrap &  clk_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (wrap) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt     <= cnt + 1'b1;
    end
  end

  initial assert (N >= 1) else $error("clk_div: N must be at least 1");

endmodule
