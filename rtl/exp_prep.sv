// exp_prep: range reduction ahead of the exponential (preparatory operations).
//
// Writes e^X = 2^I * e^X0 with X0 in (-ln 2, 0]:
//     N  = X * log2(e)
//     I  = [N] + 1 if X > 0, else [N]     ([N]: integer part, towards zero)
//     F  = N - I                          (in (-1, 0])
//     X0 = F * ln 2
// I becomes the binary exponent of the result and X0 the argument of the
// continued-product exponential. The two constant multiplications are written
// as plain fixed-point products and the block is combinational (one
// multiplier after the other); sharing the engine's own multiplication for
// them would be an alternative. |X| must stay below 88 so that I fits nine
// bits. Only bits FW..FW+W-1 of each double-width product are kept: the low
// FW bits are the truncated rounding part and the top IW bits are sign copies
// for |X| < 88, so the lint tool's report of unused product bits is expected.
//
// Source: the reduction and its formulas are the original method's; the fixed-point
// multipliers, the 9-bit exponent and the combinational form are own choices.
//
// Ports: x (IW+FW-bit two's complement, FW fraction bits), x0 (same format),
// i_exp (signed 9-bit exponent I).
module exp_prep #(
  parameter int unsigned IW = 8,
  parameter int unsigned FW = 52,
  localparam int unsigned W = IW + FW
) (
  input  logic [W-1:0]        x,
  output logic [W-1:0]        x0,
  output logic signed [8:0]   i_exp
);
  // log2(e) and ln 2 rounded to FW fraction bits.
  localparam logic signed [W-1:0] LOG2E = W'(longint'(1.4426950408889634074 * (2.0 ** FW)));
  localparam logic signed [W-1:0] LN2   = W'(longint'(0.6931471805599453094 * (2.0 ** FW)));

  logic signed [2*W-1:0] p1, p2;
  logic signed [W-1:0]   n, n_mag, f;
  logic signed [W-1:0]   ipart;
  logic signed [W-1:0]   i_full;

  always_comb begin
    p1     = signed'(x) * LOG2E;
    n      = p1[FW +: W];
    n_mag  = n[W-1] ? -n : n;
    ipart  = (n_mag >>> FW);                 // |[N]|
    if (n[W-1]) ipart = -ipart;               // [N], towards zero
    i_full = (!x[W-1] && x != '0) ? ipart + 1 : ipart;
    f      = n - (i_full <<< FW);
    p2     = f * LN2;
    x0     = p2[FW +: W];
    i_exp  = i_full[8:0];
  end
endmodule
