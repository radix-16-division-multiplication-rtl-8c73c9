// cp_top_tb: end-to-end self-checking testbench of the two-unit engine at its
// default size (M = 12 radix-16 digits, 60-bit words with 52 fraction bits).
//
// Runs the four operations on the worked examples (checking the digit
// sequences S_k step by step) and on random operands, comparing every result
// with the double-precision value of Y0/X0, Y0*X0, ln X0 + Ex ln 2 and exp X
// (result * 2^res_exp; arguments up to |X| = 80 exercise the range reduction),
// and checks the cycle count of each operation (M+1 step cycles, M+4 for the
// logarithm). It counts how often each mechanism occurs (both start rules of
// the multiplicative normalization, the simplified recursion, the ROM bypass of
// the logarithm, the Ex*ln 2 steps, the three exponential start factors, the
// restricted first digit of the exponential, digits of magnitude 10, a
// non-zero binary exponent from the range reduction, divisions on the
// single-adder pipelined divider, which must also take 2M+3 cycles and give
// the same quotient as the two-unit engine, negative divisors, negative
// multipliers with S0 = -1, operations on the single-unit serial engine,
// which must take 2(M+1) cycles, 2(M+4) for the logarithm, and give exactly
// the two-unit engine's result) and counts a failure for any that never happened.
//
// No ports; runs the top at its default parameters, with a watchdog and a
// TB_RESULT line at the end. The worked examples and the step counts are the
// original method's; random operands and tolerances are this bench's choice.
module cp_top_tb;
  import cp_pkg::*;

  localparam int M  = 12;
  localparam int FW = 4 * M + 4;
  localparam int W  = 8 + FW;
  localparam int KS = (M + 4) / 2;
  localparam int K1 = (8 * M + 26) / 16;
  localparam real SCALE = 2.0 ** FW;
  localparam real LN2 = 0.69314718055994530942;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  op_e  op = OP_DIV;
  logic [W-1:0] x_in = '0, y_in = '0, result;
  logic signed [7:0] ex = '0;
  logic signed [8:0] res_exp;
  logic pd_start = 1'b0, pd_busy, pd_done;
  logic [W-1:0] pd_x_in = '0, pd_y_in = '0, pd_result;
  sdigit_t pd_s_digit;
  logic [$clog2(2 * M + 4)-1:0] pd_period;
  logic sr_start = 1'b0, sr_busy, sr_done;
  op_e  sr_op = OP_DIV;
  logic [W-1:0] sr_x_in = '0, sr_y_in = '0, sr_result;
  logic signed [7:0] sr_ex = '0;
  logic signed [8:0] sr_res_exp;
  sdigit_t sr_s_digit;
  logic [3:0] sr_k_step;
  logic busy, done;
  sdigit_t s_digit;
  logic [3:0] k_step;

  int checks = 0, failures = 0;
  int n_s0_one = 0, n_s0_zero = 0, n_simple = 0, n_rom_bypass = 0, n_exl = 0;
  int n_m0[3] = '{0, 0, 0};
  int n_clamp = 0, n_mag10 = 0, n_neg = 0, n_iexp = 0, n_pipe = 0, n_negdiv = 0, n_negmul = 0,
      n_serial = 0;

  cp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // Random fraction in [1/2, 1) with 4M = 48 significant bits.
  function automatic real rand_frac();
    longint unsigned v;
    v = {16'h0, 1'b1, 15'($urandom), 32'($urandom)};
    return real'(v) / (2.0 ** 48);
  endfunction

  int  digits[0:M];
  int  busy_cycles;

  // Digit register sampled during each main step (k = 0..M).
  always @(posedge clk)
    if (busy && !dut.exl) digits[k_step] = dval(s_digit);

  task automatic run(input op_e o, input real x, input real y, input int e,
                     output real res);
    int cyc;
    real x0;
    @(negedge clk);
    op = o; x_in = to_fix(x); y_in = to_fix(y); ex = 8'(e); start = 1'b1;
    #1 x0 = to_real(dut.x_op);          // reduced exponential argument
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    busy_cycles = cyc;
    res = to_real(result);
    if (o == OP_EXP) res = res * (2.0 ** res_exp);
    // cycle count: M+1 steps, three more for the logarithm
    checks++;
    if (cyc != ((o == OP_LOG) ? M + 4 : M + 1)) begin
      failures++;
      $display("FAIL cycles op=%s: %0d", o.name(), cyc);
    end
    // mechanism counters
    for (int k = 0; k <= M; k++) begin
      if (digits[k] == 10 || digits[k] == -10) n_mag10++;
      if (digits[k] < 0) n_neg++;
    end
    if (o == OP_DIV || o == OP_LOG) begin
      if (digits[0] == 1) n_s0_one++; else n_s0_zero++;
      n_simple += M + 1 - KS;
    end
    if (o == OP_LOG) begin
      n_rom_bypass += M + 1 - K1;
      if (e != 0) n_exl++;
    end
    if (o == OP_EXP) begin
      n_m0[digits[0]]++;
      if (x0 < -0.6875 && digits[1] == -2) n_clamp++;
      if (res_exp != 0) n_iexp++;
    end
  endtask

  // One division on the single-adder pipelined divider: 2M+3 cycles.
  task automatic run_pd(input real x, input real y, output real res);
    int cyc;
    @(negedge clk);
    pd_x_in = to_fix(x); pd_y_in = to_fix(y); pd_start = 1'b1;
    @(negedge clk);
    pd_start = 1'b0;
    cyc = 0;
    while (!pd_done) begin
      if (pd_busy) cyc++;
      @(negedge clk);
    end
    res = to_real(pd_result);
    checks++;
    if (cyc != 2 * M + 3) begin
      failures++;
      $display("FAIL pipelined divider cycles: %0d", cyc);
    end
    n_pipe++;
  endtask

  task automatic check_val(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (got - exp_v > tol || exp_v - got > tol) begin
      failures++;
      $display("FAIL %s: got %.17f expected %.17f (diff %e)", what, got, exp_v, got - exp_v);
    end
  endtask

  task automatic check_digits(input string what, input int exp_d[], input bit mag_only);
    for (int k = 0; k < exp_d.size(); k++) begin
      int g;
      g = mag_only ? ((digits[k] < 0) ? -digits[k] : digits[k]) : digits[k];
      checks++;
      if (g != exp_d[k]) begin
        failures++;
        $display("FAIL %s digit S%0d: got %0d expected %0d", what, k, digits[k], exp_d[k]);
      end
    end
  endtask

  // The same operation on the single-unit serial engine, which must take
  // 2(M+1) cycles (2(M+4) for the logarithm) and give exactly the result of
  // the two-unit engine's last run.
  task automatic run_sr(input op_e o, input real x, input real y, input int e);
    int cyc;
    logic [W-1:0] ref_res;
    ref_res = result;
    @(negedge clk);
    sr_op = o; sr_x_in = to_fix(x); sr_y_in = to_fix(y); sr_ex = 8'(e); sr_start = 1'b1;
    @(negedge clk);
    sr_start = 1'b0;
    cyc = 0;
    while (!sr_done) begin
      if (sr_busy) cyc++;
      @(negedge clk);
    end
    checks++;
    if (cyc != 2 * ((o == OP_LOG) ? M + 4 : M + 1)) begin
      failures++;
      $display("FAIL serial cycles op=%s: %0d", o.name(), cyc);
    end
    checks++;
    if (sr_result != ref_res || sr_res_exp != res_exp) begin
      failures++;
      $display("FAIL serial and two-unit results differ op=%s: %h %h", o.name(), sr_result, ref_res);
    end
    n_serial++;
  endtask

  localparam real TOL = 2.0 ** -46;   // four units of 16^-12

  initial begin
    real r, x, y, z;
    int  e;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Worked examples.
    x = 11911823.0 / 16777216.0;  // 0.70999997854232...
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
      run(OP_MUL, x_c[i], 0.9, 0, r);   check_val("mul corner", r, 0.9 * x_c[i], TOL);
      run(OP_LOG, x_c[i], 0.0, -128, r); check_val("log corner", r, $ln(x_c[i]) - 128 * LN2, 2.0 ** -44);
      run(OP_LOG, x_c[i], 0.0, 127, r);  check_val("log corner", r, $ln(x_c[i]) + 127 * LN2, 2.0 ** -44);
    end
    foreach (z_c[i]) begin
      run(OP_EXP, z_c[i], 0.0, 0, r); check_val("exp corner", r, $exp(z_c[i]), TOL);
    end

    // Random operands.
    for (int i = 0; i < 400; i++) begin
      x = rand_frac(); y = rand_frac(); e = int'($urandom_range(255)) - 128;
      run(OP_DIV, x, y, 0, r); check_val("div", r, y / x, TOL);
      run(OP_MUL, x, y, 0, r); check_val("mul", r, x * y, TOL);
      run(OP_LOG, x, 0.0, e, r); check_val("log", r, $ln(x) + e * LN2, 2.0 ** -44);
      z = -(rand_frac() - 0.5) * 2.0 * (LN2 - 2.0 ** -40);
      run(OP_EXP, z, 0.0, 0, r); check_val("exp", r, $exp(z), TOL);
    end

    // Arguments outside (-ln 2, 0]: range reduction e^X = 2^I e^X0.
    run(OP_EXP, 0.1, 0.0, 0, r); check_val("exp 0.1", r, $exp(0.1), TOL);
    run(OP_EXP, 1.0, 0.0, 0, r); check_val("exp 1", r, $exp(1.0), 2.0 * TOL);
    run(OP_EXP, -1.0, 0.0, 0, r); check_val("exp -1", r, $exp(-1.0), TOL);
    for (int i = 0; i < 200; i++) begin
      z = (rand_frac() - 0.75) * 160.0;
      run(OP_EXP, z, 0.0, 0, r);
      check_val("exp wide (relative)", r / $exp(z), 1.0, 2.0 ** -42);
    end

    // Negative divisors, X0 in (-1, -1/2], and dividends of either sign.
    for (int i = 0; i < 100; i++) begin
      x = -rand_frac(); y = ($urandom_range(1) != 0) ? rand_frac() : -rand_frac();
      run(OP_DIV, x, y, 0, r); check_val("div negative divisor", r, y / x, TOL);
      n_negdiv++;
    end
    run(OP_DIV, -0.5, 0.75, 0, r); check_val("div -1/2", r, -1.5, TOL);
    // Negative multipliers, X0 in [-1, -1/2] (S0 = -1), multiplicands of either sign.
    for (int i = 0; i < 100; i++) begin
      x = -rand_frac(); y = ($urandom_range(1) != 0) ? rand_frac() : -rand_frac();
      run(OP_MUL, x, y, 0, r); check_val("mul negative multiplier", r, x * y, TOL);
      if (digits[0] == -1) n_negmul++;
    end
    run(OP_MUL, -1.0, 0.75, 0, r); check_val("mul -1", r, -0.75, TOL);
    run(OP_MUL, -0.5, -0.75, 0, r); check_val("mul -1/2", r, 0.375, TOL);
    run(OP_DIV, -0.625, 0.75, 0, r); check_val("div -5/8", r, -1.2, TOL);

    // The single-adder pipelined divider against the two-unit engine.
    for (int i = 0; i < 100; i++) begin
      real r2;
      x = (i % 4 == 3) ? -rand_frac() : rand_frac(); y = rand_frac();
      run_pd(x, y, r); check_val("pipelined div", r, y / x, TOL);
      run(OP_DIV, x, y, 0, r2);
      checks++;
      if (r != r2) begin
        failures++;
        $display("FAIL pipelined and two-unit quotients differ: %.17f %.17f", r, r2);
      end
    end

    // The single-unit serial engine against the two-unit engine.
    for (int i = 0; i < 100; i++) begin
      x = (i % 4 == 3) ? -rand_frac() : rand_frac();
      y = ($urandom_range(1) != 0) ? rand_frac() : -rand_frac();
      e = int'($urandom_range(255)) - 128;
      run(OP_DIV, x, y, 0, r); run_sr(OP_DIV, x, y, 0);
      run(OP_MUL, x, y, 0, r); run_sr(OP_MUL, x, y, 0);
      x = rand_frac();
      run(OP_LOG, x, 0.0, e, r); run_sr(OP_LOG, x, 0.0, e);
      z = (rand_frac() - 0.75) * 160.0;
      run(OP_EXP, z, 0.0, 0, r); run_sr(OP_EXP, z, 0.0, 0);
    end

    $display("mechanisms: serial operations %0d", n_serial);
    $display("mechanisms: S0=1 %0d, S0=0 %0d, simplified steps %0d, ROM bypass steps %0d, Ex steps %0d",
             n_s0_one, n_s0_zero, n_simple, n_rom_bypass, n_exl);
    $display("mechanisms: M0 index 0/1/2 %0d/%0d/%0d, S1 restricted %0d, |S|=10 %0d, negative digits %0d, I != 0 %0d, pipelined divisions %0d, negative divisors %0d, S0 = -1 %0d",
             n_m0[0], n_m0[1], n_m0[2], n_clamp, n_mag10, n_neg, n_iexp, n_pipe, n_negdiv, n_negmul);
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real x_c[] = '{0.5, 0.5 + 2.0 ** -48, 0.625 - 2.0 ** -48, 0.625, 1.0 - 2.0 ** -48, 0.75};
  real z_c[] = '{0.0, -2.0 ** -48, -0.125, -0.125 - 2.0 ** -48, -0.375, -0.375 - 2.0 ** -48,
                 -0.6875, -0.69, -(LN2 - 2.0 ** -40)};
  int  mech[15];
  always_comb mech = '{n_s0_one, n_s0_zero, n_simple, n_rom_bypass, n_exl,
                       n_m0[0], n_m0[1], n_m0[2], n_clamp, n_mag10, n_iexp, n_pipe, n_negdiv,
                       n_negmul, n_serial};
endmodule
