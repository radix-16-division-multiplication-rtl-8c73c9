// sel_unit_tb: checks the digit selection network against the interval
// tables of the multiplicative normalization.
//
// For every truncated remainder R^ in the reachable range the selected digit
// S must satisfy a(S) <= 64 R^ <= b(S) in step 1, with a and b taken from the interval
// table of step 1 (S = -3..9, R in [-3/8, 1/4)); in step 2 it must equal the
// digit of the step-2 selection table (S = -10..10);
// from step 3 on the digit must satisfy (-2S-1) <= 32 R^ <= (-2S+1). The
// additive rule must round 16 R^ to the nearest digit (|32 R^ - 2S| <= 1), the
// exponential rule additionally keeps S1 >= -2 and S2 >= -9. The start rules
// are checked on all 7-bit operand prefixes.
//
// No ports; sweeps every reachable 7-bit remainder, with a watchdog and a TB_RESULT
// line at the end. The interval bounds are the original method's selection tables;
// the digit bound |S| <= 10 and the exponential clamps are checked as well.
module sel_unit_tb;
  import cp_pkg::*;

  logic [6:0] r;
  logic [1:0] k;
  sel_mode_e  mode;
  logic       init;
  sdigit_t    s;
  int checks = 0, failures = 0;

  sel_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Interval tables: index S + 10, bounds on 64 R.
  int a1[21] = '{0, 0, 0, 0, 0, 0, 0, 12, 7, 2, -2, -6, -9, -12, -14, -17, -19, -21, -23, -24, -26};
  int b1[21] = '{0, 0, 0, 0, 0, 0, 0, 18, 12, 7, 3, -2, -5, -8, -11, -14, -16, -18, -20, -22, -23};
  // Step 2 selection table: lowest 64 R^ of each digit S = -10..10 (the
  // digit for 64 R^ = v is the S whose range holds v); R^ >= -41/64.
  int lo2[21] = '{39, 35, 31, 27, 22, 18, 14, 10, 6, 2, -2, -6, -10, -14, -18, -21, -25, -29, -33, -37, -41};

  function automatic int dv(sdigit_t d);
    return d.neg ? -int'(d.mag) : int'(d.mag);
  endfunction

  task automatic chk(input bit ok, input string what, input int v);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: 64R=%0d S=%0d", what, v, dv(s));
    end
  endtask

  initial begin
    init = 1'b0;
    // Multiplicative normalization.
    mode = SEL_MULT;
    for (int v = -24; v < 16; v++) begin
      r = 7'(v); k = 2'd1; #1;
      chk(dv(s) >= -3 && dv(s) <= 9 && a1[dv(s) + 10] <= v && v <= b1[dv(s) + 10], "step 1", v);
    end
    for (int v = -42; v <= 42; v++) begin
      int e2;
      e2 = 10;
      for (int i = 20; i >= 0; i--) if (v >= lo2[i]) e2 = i - 10;
      r = 7'(v); k = 2'd2; #1;
      if (v >= -41) chk(dv(s) == e2, "step 2", v);
      k = 2'd3; #1;
      chk(-4 * dv(s) - 2 <= v && v <= -4 * dv(s) + 2, "step 3+", v);
    end
    // Additive normalization (five bits used) and exponential restrictions.
    for (int v = -42; v <= 42; v++) begin
      r = 7'(v);
      mode = SEL_ADD; k = 2'd3; #1;
      chk((v >>> 1) - 2 * dv(s) <= 1 && 2 * dv(s) - (v >>> 1) <= 1, "additive", v);
      mode = SEL_EXP; k = 2'd1; #1;
      chk(dv(s) >= -2 && ((v >>> 1) - 2 * dv(s) <= 1 || dv(s) == -2), "exp step 1", v);
      k = 2'd2; #1;
      chk(dv(s) >= -9 && ((v >>> 1) - 2 * dv(s) <= 1 || dv(s) == -9), "exp step 2", v);
    end
    // Start rules, on operand prefixes (sign, six fraction bits).
    init = 1'b1;
    for (int v = 32; v < 64; v++) begin   // X0 in [1/2, 1)
      r = 7'(v); mode = SEL_MULT; #1;
      chk(dv(s) == ((v < 40) ? 1 : 0), "S0 division/logarithm", v);
      mode = SEL_ADD; #1;
      chk(dv(s) == 1, "S0 multiplication", v);
    end
    mode = SEL_ADD;
    for (int v = -64; v <= -32; v++) begin  // X0 in [-1, -1/2]: S0 = -1
      r = 7'(v); #1;
      chk(dv(s) == -1, "S0 multiplication, negative X0", v);
    end
    mode = SEL_EXP;
    for (int v = -44; v <= 0; v++) begin  // X0 in (-ln 2, 0]
      r = 7'(v); #1;
      chk(dv(s) == ((v >= -8) ? 0 : (v >= -24) ? 1 : 2), "M0 index", v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
