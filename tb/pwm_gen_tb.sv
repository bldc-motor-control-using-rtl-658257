// Self-checking testbench for pwm_gen at its default sizes (8-bit counter,
// one step per 10 system clocks). For a set of duty references it counts, over
// one PWM period, the clocks during which each comparator output is high and
// compares them with (ref+1)*10 for pwm.le and (256-ref)*10 for pwm.ge. It
// also checks the period (2560 clocks, 19.53 kHz at 50 MHz) from the
// spacing of period_start, and that the counter steps every 10 clocks.
module pwm_gen_tb;
  localparam int unsigned DIV    = 5;
  localparam int unsigned STEP   = 2 * DIV;
  localparam int unsigned PERIOD = 256 * STEP;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  longint cycle = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0]          duty_ref;
  bldc_pkg::pwm_pair_t pwm;
  logic [7:0]          count;
  logic                period_start;

  pwm_gen dut (.clk, .rst, .duty_ref, .pwm, .count, .period_start);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  longint last_start = -1;
  always @(posedge clk) begin
    if (!rst && period_start) begin
      if (last_start >= 0) check(cycle - last_start == PERIOD, "PWM period of 2560 clocks");
      last_start <= cycle;
    end
  end

  task automatic measure(input logic [7:0] d);
    int le_hi, ge_hi;
    logic [7:0] prev;
    int same;
    duty_ref = d;
    @(posedge clk iff period_start);
    le_hi = 0; ge_hi = 0; same = 0; prev = count;
    repeat (PERIOD) begin
      @(negedge clk);
      if (pwm.le) le_hi++;
      if (pwm.ge) ge_hi++;
      check(pwm.le == (count <= d) && pwm.ge == (count >= d), "comparator outputs");
    end
    check(le_hi == (int'(d) + 1) * STEP,
          $sformatf("ref %0d: le high %0d clocks, expected %0d", d, le_hi, (int'(d) + 1) * STEP));
    check(ge_hi == (256 - int'(d)) * STEP,
          $sformatf("ref %0d: ge high %0d clocks, expected %0d", d, ge_hi, (256 - int'(d)) * STEP));
  endtask

  // counter steps exactly every STEP clocks
  longint last_step = -1;
  logic [7:0] last_count;
  always @(posedge clk) begin
    last_count <= count;
    if (!rst && cycle > 4 && count != last_count) begin
      check(count == 8'(last_count + 1), "counter increments by one");
      if (last_step >= 0) check(cycle - last_step == STEP, "counter step every 10 clocks");
      last_step <= cycle;
    end
  end

  initial begin
    duty_ref = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    measure(8'd0);
    measure(8'd255);
    measure(8'd127);
    measure(8'd1);
    for (int i = 0; i < 6; i++) measure(8'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
