// Self-checking testbench for clk_div: checks the toggle period of clk_out
// (2*N system clocks) and that rise_en / fall_en are single-cycle strobes in
// the cycle right before clk_out goes high / low. Runs N = 3 and the SPI
// divider N = 250 side by side.
module clk_div_tb;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  always #10 clk = ~clk;   // 50 MHz

  logic o3, r3, f3, o250, r250, f250;
  clk_div #(.N(3))   dut3   (.clk, .rst, .clk_out(o3),   .rise_en(r3),   .fall_en(f3));
  clk_div #(.N(250)) dut250 (.clk, .rst, .clk_out(o250), .rise_en(r250), .fall_en(f250));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Reference: independent cycle counters per instance.
  int  n3 = 0, n250 = 0;          // cycles since reset release

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      // expected level: clk_out = floor(n / N) mod 2, n = cycles already clocked
      check(o3   == 1'((n3 / 3) % 2),     "N=3 clk_out level");
      check(o250 == 1'((n250 / 250) % 2), "N=250 clk_out level");
      check(r3   == ((n3 % 3 == 2)   && ((n3 / 3) % 2 == 0)),   "N=3 rise_en");
      check(f3   == ((n3 % 3 == 2)   && ((n3 / 3) % 2 == 1)),   "N=3 fall_en");
      check(r250 == ((n250 % 250 == 249) && ((n250 / 250) % 2 == 0)), "N=250 rise_en");
      check(f250 == ((n250 % 250 == 249) && ((n250 / 250) % 2 == 1)), "N=250 fall_en");
      n3   <= n3 + 1;
      n250 <= n250 + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
