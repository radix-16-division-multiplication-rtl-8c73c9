// cp_pipe_div_tb: self-checking testbench of the single-adder pipelined
// divider at its default size (M = 12 digits, 60-bit words).
//
// Divides the worked example (checking the digit sequence S0..S10 taken from
// the digit register) and random operands in [1/2, 1) as well as negative
// divisors in (-1, -1/2], comparing the quotient
// with the double-precision Y0/X0 within 2^-46, and checks that each division
// takes 2M+3 periods (clock cycles). It also checks the period schedule of the
// pipelined scheme on the way: the new digit S(k) appears in period 2k+1.
//
// No ports; clocked, with a watchdog and a TB_RESULT line at the end. The
// worked-example digits and the 2M+3 periods are the original method's; the random
// operands and the tolerance (2^-46, four units of 16^-12) are this bench's.
module cp_pipe_div_tb;
  import cp_pkg::*;

  localparam int M  = 12;
  localparam int FW = 4 * M + 4;
  localparam int W  = 8 + FW;
  localparam real SCALE = 2.0 ** FW;
  localparam real TOL = 2.0 ** -46;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [W-1:0] x_in = '0, y_in = '0, result;
  logic busy, done;
  sdigit_t s_digit;
  logic [$clog2(2 * M + 4)-1:0] period;
  int checks = 0, failures = 0;
  int digits[0:M + 1];

  cp_pipe_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] to_fix(real v);
    return W'(longint'(v * SCALE));
  endfunction

  function automatic real to_real(logic [W-1:0] v);
    return real'(longint'(signed'(v))) / SCALE;
  endfunction

  function automatic real rand_frac();
    longint unsigned v;
    v = {16'h0, 1'b1, 15'($urandom), 32'($urandom)};
    return real'(v) / (2.0 ** 48);
  endfunction

  // S(k) is valid in period 2k+1 (S0 from the load on).
  always @(negedge clk)
    if (busy && period[0]) digits[(int'(period) - 1) / 2] = int'(digit_value(s_digit));

  task automatic run(input real x, input real y, output real q);
    int cyc;
    @(negedge clk);
    x_in = to_fix(x); y_in = to_fix(y); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    q = to_real(result);
    checks++;
    if (cyc != 2 * M + 3) begin
      failures++;
      $display("FAIL periods: %0d", cyc);
    end
  endtask

  task automatic check_val(input string what, input real got, input real exp_v);
    checks++;
    if (got - exp_v > TOL || exp_v - got > TOL) begin
      failures++;
      $display("FAIL %s: got %.17f expected %.17f", what, got, exp_v);
    end
  endtask

  int ex_d[11] = '{0, 7, -5, -3, 3, -4, 1, 6, -7, 8, -4};
  real x_c[] = '{0.5, 0.5 + 2.0 ** -48, 0.625 - 2.0 ** -48, 0.625, 1.0 - 2.0 ** -48, 0.75};

  initial begin
    real q, x, y;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    x = 11911823.0 / 16777216.0;
    y = 0.59314718055994;
    run(x, y, q);
    check_val("example", q, y / x);
    foreach (ex_d[k]) begin
      checks++;
      if (digits[k] != ex_d[k]) begin
        failures++;
        $display("FAIL example digit S%0d: got %0d expected %0d", k, digits[k], ex_d[k]);
      end
    end
    foreach (x_c[i]) foreach (x_c[j]) begin
      run(x_c[i], x_c[j], q); check_val("corner", q, x_c[j] / x_c[i]);
    end
    for (int i = 0; i < 1000; i++) begin
      x = rand_frac(); y = rand_frac();
      run(x, y, q); check_val("random", q, y / x);
    end
    // negative divisors in (-1, -1/2], dividends of either sign
    for (int i = 0; i < 300; i++) begin
      x = -rand_frac(); y = ($urandom_range(1) != 0) ? rand_frac() : -rand_frac();
      run(x, y, q); check_val("negative divisor", q, y / x);
    end
    run(-0.5, 0.75, q); check_val("divisor -1/2", q, -1.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
