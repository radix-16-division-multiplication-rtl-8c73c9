// log_rom: read-only memory of the precomputed constants.
//
// Holds, as W-bit two's complement words with FW fraction bits:
//   ln(1 + S * 16^-k) for k = 0..K1-1 and S = -10..10 (k = 0 only uses S = 0, 1;
//     S = 1 gives ln 2), used by the logarithm (result unit) and by the
//     exponential (normalization unit);
//   the word 1.0, shifted and multiplied by S_k for k >= K1, where
//     ln(1 + S*16^-k) = S*16^-k to the working precision;
//   the exponential start factors M0 in {1, e^-1/4, e^-17/32} and their
//     logarithms {0, -1/4, -17/32}.
// K1 = ceil((5.5 + 4M)/8) is the first step from which the logarithm is
// replaced by its argument (7 for M = 12). The words are computed at
// elaboration from the real-valued functions ln and exp (ln(1+a) by its power
// series for |a| <= 10/256, rounded to the nearest FW-bit fraction), so the
// ROM is a constant table, read combinationally (asynchronous read).
// Valid for W <= 64.
//
// Ports: kind (which constant), k (step), s (digit; for M0/ln M0 its magnitude
// is the index), word.
//
// Follows the original method: the constants ln(1 + S 16^-k) up to K1, the
// replacement by S 16^-k after it, ln 2 for the exponent, and the exponential
// start factors. Own choices: a full K1 x 21 table (words never read are zero)
// instead of a packed one, storing +ln (the sign comes from the
// select-complement network), and holding M0 and ln M0 in the same memory.
module log_rom
  import cp_pkg::*;
#(
  parameter int unsigned M   = 12,
  parameter int unsigned IW  = 8,
  parameter int unsigned FW  = 4 * M + 4,
  localparam int unsigned W  = IW + FW,
  localparam int unsigned K1 = (8 * M + 26) / 16
) (
  input  rom_kind_e  kind,
  input  logic [3:0] k,
  input  sdigit_t    s,
  output logic [W-1:0] word
);
  localparam int unsigned NS = 21;  // digits -10..10

  typedef logic [W-1:0] tab_t [K1*NS];

  function automatic real ln1p(real a);
    real sum, p;
    if (a > 0.04 || a < -0.04) return $ln(1.0 + a);
    sum = 0.0;
    p   = a;
    for (int n = 1; n <= 14; n++) begin
      sum = sum + ((n % 2 == 1) ? p : -p) / n;
      p   = p * a;
    end
    return sum;
  endfunction

  function automatic logic [W-1:0] to_fix(real v);
    return W'(longint'(v * (2.0 ** FW)));
  endfunction

  function automatic tab_t build_ln();
    tab_t t;
    for (int kk = 0; kk < K1; kk++)
      for (int ss = -10; ss <= 10; ss++)
        if (kk == 0 && (ss < 0 || ss > 1)) t[kk*NS + ss + 10] = '0;
        else t[kk*NS + ss + 10] = to_fix(ln1p(ss * (16.0 ** (-kk))));
    return t;
  endfunction

  localparam tab_t LN_TAB = build_ln();
  localparam logic [W-1:0] ONE_W  = W'(1) << FW;
  localparam logic [W-1:0] M0_1   = to_fix($exp(-0.25));
  localparam logic [W-1:0] M0_2   = to_fix($exp(-17.0 / 32.0));
  localparam logic [W-1:0] LNM0_1 = to_fix(-0.25);
  localparam logic [W-1:0] LNM0_2 = to_fix(-17.0 / 32.0);

  logic signed [5:0] sv;
  int unsigned       idx;

  always_comb begin
    sv   = digit_value(s);
    idx  = (k < 4'(K1)) ? (32'(k) * NS + 32'(sv + 6'sd10)) : 0;
    word = '0;
    unique case (kind)
      ROM_LN:   word = LN_TAB[idx];
      ROM_ONE:  word = ONE_W;
      ROM_LN2:  word = LN_TAB[1 + 10];
      ROM_M0:   word = (s.mag == 4'd0) ? ONE_W : (s.mag == 4'd1) ? M0_1 : M0_2;
      ROM_LNM0: word = (s.mag == 4'd0) ? '0    : (s.mag == 4'd1) ? LNM0_1 : LNM0_2;
      default:  word = '0;
    endcase
  end
endmodule
