// exp_prep_tb: self-checking testbench of the exponential range reduction.
//
// Drives corner and random arguments X with |X| < 88 and checks, against
// double-precision arithmetic, that the exponent I equals the integer part of
// X log2(e) (plus one for positive X), that X0 lies in (-ln 2, 0] and that
// I ln 2 + X0 reproduces X. The block is combinational; a small clock only
// paces the stimulus and drives the watchdog.
//
// No ports; a TB_RESULT line and a watchdog as in the other benches. The
// reduction formulas are the original method's; the tolerances are this bench's.
module exp_prep_tb;
  localparam int IW = 8;
  localparam int FW = 52;
  localparam int W  = IW + FW;
  localparam real SCALE = 2.0 ** FW;
  localparam real LN2   = 0.69314718055994530942;
  localparam real LOG2E = 1.44269504088896340736;

  logic clk = 1'b0;
  logic [W-1:0] x = '0, x0;
  logic signed [8:0] i_exp;
  int checks = 0, failures = 0;

  exp_prep #(.IW(IW), .FW(FW)) dut (.x(x), .x0(x0), .i_exp(i_exp));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic check(input real xv);
    real n, xr, x0r, err;
    int  i_ref;
    x = to_fix(xv);
    @(negedge clk);
    xr  = to_real(x);
    n   = xr * LOG2E;
    i_ref = (n < 0.0) ? -int'($floor(-n)) : int'($floor(n));
    if (xr > 0.0) i_ref++;
    x0r = to_real(x0);
    // exponent (a rounding step away near an integer N is allowed)
    checks++;
    if (int'(i_exp) != i_ref &&
        !(($floor(n) != $floor(n + 2.0 ** -40) || $floor(n) != $floor(n - 2.0 ** -40)) &&
          (int'(i_exp) == i_ref + 1 || int'(i_exp) == i_ref - 1))) begin
      failures++;
      $display("FAIL exponent: X=%f I=%0d expected %0d", xr, i_exp, i_ref);
    end
    // reduced argument range
    checks++;
    if (x0r > 2.0 ** -40 || x0r <= -LN2 - 2.0 ** -40) begin
      failures++;
      $display("FAIL range: X=%f X0=%.15f", xr, x0r);
    end
    // reconstruction
    err = real'(i_exp) * LN2 + x0r - xr;
    checks++;
    if (err > 2.0 ** -44 || err < -(2.0 ** -44)) begin
      failures++;
      $display("FAIL reconstruction: X=%f I=%0d X0=%.15f", xr, i_exp, x0r);
    end
  endtask

  real corners[] = '{0.0, 2.0 ** -52, -2.0 ** -52, 0.1, -0.1, 0.5, -0.5, 0.69, -0.69,
                     1.0, -1.0, 2.0, -2.0, 10.0, -10.0, 87.9, -87.9};

  initial begin
    foreach (corners[i]) check(corners[i]);
    for (int i = 0; i < 3000; i++) begin
      real v;
      v = (real'($urandom) / 4294967296.0 - 0.5) * 175.0;
      check(v);
    end
    for (int i = 0; i < 1000; i++) begin
      real v;
      v = (real'($urandom) / 4294967296.0 - 0.5) * 4.0;
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
