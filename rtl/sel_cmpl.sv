// sel_cmpl: select-complement network feeding one level of the adder.
//
// Level 1 (LEVEL = 1) selects 0, 1 or 2 times its input, level 2 (LEVEL = 2)
// selects 0, 4 or 8 times its input; either may complement the selection. The
// complement is the bit inversion, and cin = 1 asks the adder for the +1 that
// completes the two's complement negation. Two such networks, one per adder
// level, form any digit multiple -10..10 (see cp_pkg::split_digit).
// Purely combinational.
//
// Ports: din (W bits), ctl (multiple index and complement), dout, cin.
//
// The two sets of multiples are the original method's; complementing by inversion
// with a carry-in is this design's choice.
module sel_cmpl
  import cp_pkg::*;
#(
  parameter int unsigned W     = 60,
  parameter int unsigned LEVEL = 1
) (
  input  logic [W-1:0] din,
  input  sc_ctl_t      ctl,
  output logic [W-1:0] dout,
  output logic         cin
);
  localparam int unsigned SH = (LEVEL == 1) ? 0 : 2;

  logic [W-1:0] mult;

  always_comb begin
    unique case (ctl.sel)
      2'd1:    mult = din << SH;         // x1 or x4
      2'd2:    mult = din << (SH + 1);   // x2 or x8
      default: mult = '0;
    endcase
    dout = ctl.neg ? ~mult : mult;
    cin  = ctl.neg;
  end
endmodule
