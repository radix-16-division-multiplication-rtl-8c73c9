// cp_serial_tb: self-checking testbench of the single-unit serial engine at
// its default size (M = 12 radix-16 digits, 60-bit words, 52 fraction bits).
//
// Runs the four operations on the worked examples (checking the digit
// sequence S_k of each step, sampled in the first cycle of the step), on
// corner operands and on random operands, including negative divisors,
// negative multipliers and exponential arguments outside (-ln 2, 0], and
// compares every result with the double-precision value of Y0/X0, Y0*X0,
// ln X0 + Ex ln 2 and exp X (result * 2^res_exp). Each operation must keep
// busy for 2(M+1) cycles, 2(M+4) for the logarithm, with the step counter
// advancing every second cycle.
//
// No ports; clocked, with a watchdog and a TB_RESULT line at the end. The
// worked examples are the original method's; the two-cycle step count
// follows from sharing one unit; random operands and tolerances are this
// bench's choice.
module cp_serial_tb;
  import cp_pkg::*;

  localparam int M  = 12;
  localparam int FW = 4 * M + 4;
  localparam int W  = 8 + FW;
  localparam real SCALE = 2.0 ** FW;
  localparam real LN2 = 0.69314718055994530942;
  localparam real TOL = 2.0 ** -46;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  op_e  op = OP_DIV;
  logic [W-1:0] x_in = '0, y_in = '0, result;
  logic signed [7:0] ex = '0;
  logic signed [8:0] res_exp;
  logic busy, done;
  sdigit_t s_digit;
  logic [3:0] k_step;

  int checks = 0, failures = 0;

  cp_serial #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] to_fix(real r);
    return W'(longint'(r * SCALE));
  endfunction

  function automatic real to_real(logic [W-1:0] v);
    return real'(longint'(signed'(v))) / SCALE;
  endfunction

  function automatic int dval(sdigit_t d);
    return d.neg ? -int'(d.mag) : int'(d.mag);
  endfunction

  function automatic real rand_frac();
    longint unsigned v;
    v = {16'h0, 1'b1, 15'($urandom), 32'($urandom)};
    return real'(v) / (2.0 ** 48);
  endfunction

  int digits[0:M];

  // Digit register in the first cycle of each main step.
  always @(posedge clk)
    if (busy && !dut.ph && !dut.exl_unused) digits[k_step] = dval(s_digit);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input op_e o, input real x, input real y, input int e, output real res);
    int cyc, k_prev, k_ok;
    @(negedge clk);
    op = o; x_in = to_fix(x); y_in = to_fix(y); ex = 8'(e); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0; k_ok = 1; k_prev = 0;
    while (!done) begin
      if (busy) begin
        // step counter: k = cyc / 2 during the main steps
        if (cyc < 2 * (M + 1) && int'(k_step) != cyc / 2) k_ok = 0;
        cyc++;
      end
      @(negedge clk);
    end
    chk(cyc == 2 * ((o == OP_LOG) ? M + 4 : M + 1), $sformatf("cycles op=%s: %0d", o.name(), cyc));
    chk(k_ok == 1, $sformatf("step counter op=%s", o.name()));
    res = to_real(result);
    if (o == OP_EXP) res = res * (2.0 ** res_exp);
  endtask

  task automatic check_val(input string what, input real got, input real exp_v, input real tol);
    real d;
    d = got - exp_v;
    chk(d <= tol && d >= -tol, $sformatf("%s: got %.17f expected %.17f", what, got, exp_v));
  endtask

  task automatic check_digits(input string what, input int exp_d[], input bit mag_only);
    foreach (exp_d[i]) begin
      int got;
      got = mag_only ? ((digits[i] < 0) ? -digits[i] : digits[i]) : digits[i];
      chk(got == exp_d[i], $sformatf("%s digit %0d: got %0d expected %0d", what, i, digits[i], exp_d[i]));
    end
  endtask

  initial begin
    real r, x, y, z;
    int  e;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Worked examples.
    x = 11911823.0 / 16777216.0;
    y = 0.59314718055994;
    run(OP_DIV, x, y, 0, r);
    check_val("div example", r, y / x, TOL);
    check_digits("div example", '{0, 7, -5, -3, 3, -4, 1, 6, -7, 8, -4}, 1'b0);
    run(OP_LOG, y, 0.0, 0, r);
    check_val("log example", r, $ln(y), TOL);
    check_digits("log example", '{1, -2, -9, -6, -3, -2, -6, -2, 7, 2, 4, 6, 1}, 1'b0);
    run(OP_MUL, x, y, 0, r);
    check_val("mul example", r, x * y, TOL);
    check_digits("mul example", '{1, 5, 6, 4, 3, 7, 1, 0, 0, 0, 0, 0}, 1'b1);
    run(OP_EXP, -0.1, 0.0, 0, r);
    check_val("exp example", r, $exp(-0.1), TOL);
    check_digits("exp example", '{0, 2, 9, 4, 3, 2, 1, 5, 4, 0, 4, 2}, 1'b1);

    // Corner operands.
    foreach (x_c[i]) begin
      run(OP_DIV, x_c[i], 0.75, 0, r);  check_val("div corner", r, 0.75 / x_c[i], TOL);
      run(OP_DIV, -x_c[i], 0.75, 0, r); check_val("div corner negative", r, -0.75 / x_c[i], TOL);
      run(OP_MUL, x_c[i], 0.9, 0, r);   check_val("mul corner", r, 0.9 * x_c[i], TOL);
      run(OP_MUL, -x_c[i], 0.9, 0, r);  check_val("mul corner negative", r, -0.9 * x_c[i], TOL);
      run(OP_LOG, x_c[i], 0.0, -128, r); check_val("log corner", r, $ln(x_c[i]) - 128 * LN2, 2.0 ** -44);
      run(OP_LOG, x_c[i], 0.0, 127, r);  check_val("log corner", r, $ln(x_c[i]) + 127 * LN2, 2.0 ** -44);
    end
    foreach (z_c[i]) begin
      run(OP_EXP, z_c[i], 0.0, 0, r); check_val("exp corner", r, $exp(z_c[i]), TOL);
    end

    // Random operands.
    for (int i = 0; i < 200; i++) begin
      x = rand_frac(); y = ($urandom_range(1) != 0) ? rand_frac() : -rand_frac();
      e = int'($urandom_range(255)) - 128;
      run(OP_DIV, x, y, 0, r);  check_val("div", r, y / x, TOL);
      run(OP_DIV, -x, y, 0, r); check_val("div negative divisor", r, -y / x, TOL);
      run(OP_MUL, x, y, 0, r);  check_val("mul", r, x * y, TOL);
      run(OP_MUL, -x, y, 0, r); check_val("mul negative multiplier", r, -x * y, TOL);
      run(OP_LOG, x, 0.0, e, r); check_val("log", r, $ln(x) + e * LN2, 2.0 ** -44);
      z = -(rand_frac() - 0.5) * 2.0 * (LN2 - 2.0 ** -40);
      run(OP_EXP, z, 0.0, 0, r); check_val("exp", r, $exp(z), TOL);
      z = (rand_frac() - 0.75) * 160.0;
      run(OP_EXP, z, 0.0, 0, r); check_val("exp wide (relative)", r / $exp(z), 1.0, 2.0 ** -42);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real x_c[] = '{0.5, 0.5 + 2.0 ** -48, 0.625 - 2.0 ** -48, 0.625, 1.0 - 2.0 ** -48, 0.75};
  real z_c[] = '{0.0, -2.0 ** -48, -0.125, -0.375, -0.6875, -0.69, -(LN2 - 2.0 ** -40)};
endmodule
