// Self-checking testbench for commutation. The expected outputs come from
// the six-step tables written here as text, one row per hall pattern in the
// order A, B, C followed by the state of phases A, B, C ('+', '-' or 'o' for
// off). Every combination of hall code, direction, stop and the two PWM
// outputs is applied; invalid hall codes 000 and 111 must switch all gates off.
module commutation_tb;
  import bldc_pkg::*;

  int checks = 0, failures = 0;

  hall_t     hall;
  dir_e      dir;
  logic      stop;
  pwm_pair_t pwm;
  gates_t    high_side, low_side;

  commutation dut (.hall, .dir, .stop, .pwm, .high_side, .low_side);

  // "ABC pA pB pC"
  string cw_tab [6] = '{"001o-+", "011-o+", "010-+o", "110o+-", "100+o-", "101+-o"};
  string ccw_tab[6] = '{"001o+-", "011+o-", "010+-o", "110o-+", "100-o+", "101-+o"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void expected(input hall_t h, input dir_e d, input logic st,
                                   input pwm_pair_t p, output gates_t hi, output gates_t lo);
    string row;
    logic  chop;
    hi = '0;
    lo = '0;
    if (st) return;
    chop = (d == DIR_CW) ? p.ge : p.le;
    for (int r = 0; r < 6; r++) begin
      row = (d == DIR_CW) ? cw_tab[r] : ccw_tab[r];
      // row[0..2] = A, B, C; hall bit 0 = A
      if (row[0] == (h[0] ? "1" : "0") && row[1] == (h[1] ? "1" : "0") &&
          row[2] == (h[2] ? "1" : "0")) begin
        for (int ph = 0; ph < 3; ph++) begin
          if (row[3 + ph] == "+") hi[ph] = chop;
          if (row[3 + ph] == "-") lo[ph] = 1'b1;
        end
      end
    end
  endfunction

  initial begin
    gates_t ehi, elo;
    int on_steps = 0;
    for (int h = 0; h < 8; h++)
      for (int d = 0; d < 2; d++)
        for (int s = 0; s < 2; s++)
          for (int p = 0; p < 4; p++) begin
            hall = hall_t'(h);
            dir  = dir_e'(d);
            stop = 1'(s);
            pwm  = pwm_pair_t'(p);
            #1;
            expected(hall, dir, stop, pwm, ehi, elo);
            check(high_side == ehi && low_side == elo,
                  $sformatf("hall=%b dir=%0d stop=%0d pwm=%b: hi=%b lo=%b, expected hi=%b lo=%b",
                            hall, d, s, pwm, high_side, low_side, ehi, elo));
            if (elo != '0) on_steps++;
          end
    check(on_steps == 6 * 2 * 4, "six driven steps per direction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
