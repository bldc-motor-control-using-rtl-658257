// Self-checking testbench for spi_adc against a behavioural MCP3008 model.
// At the default SPI divider (100 kHz SCLK from 50 MHz) it runs 40 frames
// with random conversion values and checks: each result equals the value the
// ADC model sampled, the command bits sent (start + SGL/DIFF + channel) equal
// CTRL, done comes every 18 SCLK periods (9000 system clocks), SCLK has a
// period of 500 clocks, CS is high for exactly one SCLK period per frame, and
// no frame is started while enable is low.
module spi_adc_tb;
  localparam int unsigned N     = 250;
  localparam int unsigned FRAME = 18 * 2 * N;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic enable = 1'b0;
  int   checks = 0, failures = 0;
  longint cycle = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic       sclk, cs, mosi, miso, done;
  logic [9:0] data_out;
  logic [9:0] value;
  logic [3:0] cmd;
  int unsigned frames;

  spi_adc #(.SCLK_DIV_N(N), .CTRL(4'b1011)) dut (
    .clk, .rst, .enable, .sclk, .cs, .mosi, .miso, .done, .data_out
  );

  mcp3008_model adc (
    .cs, .sclk, .din(mosi), .dout(miso), .value, .cmd, .frames
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // SCLK period and CS-high time measured in system clocks
  longint last_sclk_rise = -1, cs_rise = -1, last_done = -1;
  int     done_count = 0;
  always @(posedge clk) begin
    if (!rst && enable) begin
      if (done) begin
        if (last_done >= 0) check(cycle - last_done == FRAME, "done spacing of 18 SCLK periods");
        last_done <= cycle;
        done_count <= done_count + 1;
      end
    end
  end
  always @(posedge sclk) begin
    if (last_sclk_rise >= 0) check(cycle - last_sclk_rise == 2 * N, "SCLK period");
    last_sclk_rise = cycle;
  end
  always @(posedge cs) cs_rise = cycle;
  always @(negedge cs) if (cs_rise >= 0 && done_count > 0) check(cycle - cs_rise == 2 * N, "CS high for one SCLK period");

  logic [9:0] expect_q[$];
  initial begin
    value = 10'h2a5;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    // enable low: no frame may start
    repeat (4 * FRAME) @(posedge clk);
    check(adc.frames == 0 && cs == 1'b1, "idle while enable is low");
    enable <= 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(posedge done);
      @(negedge clk);
      check(data_out == value, $sformatf("data_out %0d expected %0d", data_out, value));
      check(cmd == 4'b1011, "command bits SGL/DIFF, D2..D0");
      value = 10'($urandom_range(0, 1023));
      if (i == 5)  value = 10'h000;
      if (i == 6)  value = 10'h3ff;
    end
    repeat (3) @(posedge clk);
    check(done_count == 40 && adc.frames == 40, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * FRAME) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
