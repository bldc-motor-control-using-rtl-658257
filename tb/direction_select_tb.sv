// Self-checking testbench for direction_select: sweeps all 1024 ADC codes
// and checks that the direction is clockwise below mid-scale and
// counterclockwise above it, and that stop_flag is set one clock later for
// exactly the codes 511 and 512. Also checks stop_flag is set out of reset.
module direction_select_tb;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  logic [9:0]      adc;
  logic            stop_flag;
  bldc_pkg::dir_e  dir;

  direction_select dut (.clk, .rst, .adc, .stop_flag, .dir);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int stops = 0;
  initial begin
    adc = 10'd100;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(stop_flag == 1'b1, "stopped out of reset");
    rst = 1'b0;
    for (int v = 0; v < 1024; v++) begin
      adc = 10'(v);
      #1;
      check(dir == ((v < 512) ? bldc_pkg::DIR_CW : bldc_pkg::DIR_CCW),
            $sformatf("direction for %0d", v));
      @(posedge clk);
      @(negedge clk);
      check(stop_flag == (v == 511 || v == 512), $sformatf("stop flag for %0d", v));
      if (stop_flag) stops++;
    end
    check(stops == 2, "two stop codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
