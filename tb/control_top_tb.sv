// End-to-end testbench of control_top at its default parameters (50 MHz
// clock, 100 kHz SPI clock, 19.53 kHz PWM), with a behavioural MCP3008 model
// on the SPI pins and the hall code driven directly.
//
// For a series of potentiometer readings covering both directions, both ends
// of the range and the stop band, the test waits for two ADC frames, then
// walks the hall sensors through the six-step sequence (plus the invalid codes
// 000 and 111). At each step it checks over one full PWM period that the
// low-side gate of the expected phase is steadily on, that the high-side gate
// of the expected phase is on for the expected number of clocks
// (10 per duty step; CW duty = 256 - adc[8:1], CCW duty = adc[8:1] + 1 of
// 256), that all other gates stay off, and that no leg ever has both gates
// on. It also checks the 3-clock hall-to-gate latency. The mechanisms
// exercised are counted and each must occur at least once: ADC conversions,
// clockwise steps, counterclockwise steps, direction reversals, stop band,
// invalid hall codes and full (100 %) duty.
module control_top_tb;
  import bldc_pkg::*;

  localparam int unsigned STEP   = 10;          // clocks per PWM count
  localparam int unsigned PERIOD = 256 * STEP;  // clocks per PWM period

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  longint cycle = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  hall_t  hall;
  logic   miso, mosi, spiclk, cs;
  gates_t high_side, low_side;
  logic [9:0]  pot;
  logic [3:0]  adc_cmd;
  int unsigned adc_frames;

  control_top dut (
    .clk, .rst, .hall, .miso, .mosi, .spiclk, .cs, .high_side, .low_side
  );

  mcp3008_model adc (
    .cs, .sclk(spiclk), .din(mosi), .dout(miso), .value(pot), .cmd(adc_cmd), .frames(adc_frames)
  );

  // Six-step tables: hall A, B, C then phase A, B, C ('+', '-', 'o' = off)
  string cw_tab [6] = '{"001o-+", "011-o+", "010-+o", "110o+-", "100+o-", "101+-o"};
  string ccw_tab[6] = '{"001o+-", "011+o-", "010+-o", "110o-+", "100-o+", "101-+o"};

  int n_conv = 0, n_cw = 0, n_ccw = 0, n_reverse = 0, n_stop = 0, n_invalid = 0, n_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // no leg may ever conduct through both switches
  always @(posedge clk) if (!rst) check((high_side & low_side) == '0, "shoot-through");

  function automatic hall_t row_hall(input string row);
    return {row[2] == "1", row[1] == "1", row[0] == "1"};
  endfunction

  // Apply one hall code and check one PWM period of gate activity.
  task automatic step(input hall_t h, input gates_t exp_pos, input gates_t exp_neg,
                      input int exp_on);
    int hi_cnt [3];
    gates_t lo_seen;
    gates_t lo_before;
    @(negedge clk);
    lo_before = low_side;
    hall = h;
    // hall -> gates: two synchroniser stages and the output register
    repeat (2) @(posedge clk);
    @(negedge clk);
    if (exp_neg != lo_before) check(low_side == lo_before, "gates before 3rd clock");
    @(posedge clk);
    @(negedge clk);
    check(low_side == exp_neg, $sformatf("hall %b: low side %b, expected %b", h, low_side, exp_neg));
    hi_cnt = '{0, 0, 0};
    lo_seen = '0;
    repeat (PERIOD) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) if (high_side[p]) hi_cnt[p]++;
      check(low_side == exp_neg, "low side steady during the step");
    end
    for (int p = 0; p < 3; p++) begin
      int want = exp_pos[p] ? exp_on * STEP : 0;
      check(hi_cnt[p] == want,
            $sformatf("hall %b phase %0d: high side on %0d clocks, expected %0d", h, p, hi_cnt[p], want));
    end
  endtask

  dir_e last_dir = DIR_CW;
  bit   have_dir = 0;

  task automatic run_setpoint(input logic [9:0] v);
    int unsigned f0;
    bit   stop;
    dir_e d;
    int   on;
    logic [7:0] ref8;
    pot = v;
    // the value is sampled inside a frame; two complete frames make sure it is in
    f0 = adc_frames;
    wait (adc_frames >= f0 + 2);
    repeat (3) @(posedge clk);
    check(dut.u_adc.data_out == v, $sformatf("ADC reading %0d, expected %0d", dut.u_adc.data_out, v));
    n_conv += 2;
    ref8 = v[8:1];
    stop = (v == 10'd511 || v == 10'd512);
    d    = v[9] ? DIR_CCW : DIR_CW;
    on   = (d == DIR_CW) ? 256 - int'(ref8) : int'(ref8) + 1;
    if (stop) n_stop++;
    else begin
      if (have_dir && d != last_dir) n_reverse++;
      last_dir = d;
      have_dir = 1;
      if (on == 256) n_full++;
    end
    for (int r = 0; r < 6; r++) begin
      string  row;
      gates_t pos, neg;
      row = (d == DIR_CW) ? cw_tab[r] : ccw_tab[r];
      pos = '0;
      neg = '0;
      for (int p = 0; p < 3; p++) begin
        if (row[3 + p] == "+") pos[p] = 1'b1;
        if (row[3 + p] == "-") neg[p] = 1'b1;
      end
      if (stop) begin
        pos = '0;
        neg = '0;
      end
      step(row_hall(row), pos, neg, on);
      if (!stop) begin
        if (d == DIR_CW) n_cw++;
        else n_ccw++;
      end
    end
    // invalid hall codes switch everything off
    step(3'b000, '0, '0, 0);
    step(3'b111, '0, '0, 0);
    n_invalid += 2;
  endtask

  initial begin
    hall = 3'b001;
    pot  = 10'd0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(high_side == '0 && low_side == '0, "all gates off after reset");
    run_setpoint(10'd100);    // CW, duty 206/256
    run_setpoint(10'd0);      // CW, full duty
    run_setpoint(10'd511);    // stop band
    run_setpoint(10'd700);    // CCW, duty 95/256 (reversal)
    run_setpoint(10'd1023);   // CCW, full duty
    run_setpoint(10'd512);    // stop band
    run_setpoint(10'd513);    // CCW, minimum duty 1/256
    run_setpoint(10'd510);    // CW, minimum duty 1/256 (reversal)
    run_setpoint(10'($urandom_range(0, 510)));
    run_setpoint(10'($urandom_range(513, 1023)));
    check(adc_cmd == 4'b1000, "ADC command: single-ended channel 0");
    $display("mechanisms: conversions=%0d cw_steps=%0d ccw_steps=%0d reversals=%0d stop=%0d invalid_hall=%0d full_duty=%0d",
             n_conv, n_cw, n_ccw, n_reverse, n_stop, n_invalid, n_full);
    check(n_conv > 0,    "ADC conversions happened");
    check(n_cw > 0,      "clockwise steps happened");
    check(n_ccw > 0,     "counterclockwise steps happened");
    check(n_reverse > 0, "direction reversal happened");
    check(n_stop > 0,    "stop band happened");
    check(n_invalid > 0, "invalid hall codes happened");
    check(n_full > 0,    "full duty happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
