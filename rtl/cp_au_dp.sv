// cp_au_dp: combinational datapath of one arithmetic unit.
//
// Computes next = main + S * shift(src, shamt) + intc * 2^FW for a register
// value q: main is q or 16 q (4-bit wiring shift), src is q or the auxiliary
// word, shift() is the two-level barrel switch, S * (.) is formed by the
// level-1 ({0,+-1,+-2}) and level-2 ({0,+-4,+-8}) select-complement networks
// feeding two cascaded adders, with the complement carries entering the same
// adders, and intc is a small integer at the units position.
//
// Ports: q (register value), ctl (au_ctl_t routing), aux, nxt. Purely
// combinational. The shifter, the two sets of multiples and the two adder
// levels follow the original method; the adders are written as plain
// additions (the carry scheme is this design's choice).
module cp_au_dp
  import cp_pkg::*;
#(
  parameter int unsigned IW  = 8,
  parameter int unsigned FW  = 52,
  localparam int unsigned W  = IW + FW
) (
  input  logic [W-1:0] q,
  input  au_ctl_t      ctl,
  input  logic [W-1:0] aux,
  output logic [W-1:0] nxt
);
  logic [W-1:0] main_op, sh_in, sh_out, m1, m2, int_op, sum1;
  logic         c1, c2;
  sc_pair_t     sc;

  assign main_op = ctl.x16 ? (q << 4) : q;
  assign sh_in   = ctl.aux ? aux : q;
  assign sc      = split_digit(ctl.digit);
  assign int_op  = {IW'(ctl.intc), {FW{1'b0}}};

  shift_net #(.W(W), .SHW(6)) u_shift (.din(sh_in), .shamt(ctl.shamt), .dout(sh_out));

  sel_cmpl #(.W(W), .LEVEL(1)) u_sc1 (.din(sh_out), .ctl(sc.lvl1), .dout(m1), .cin(c1));
  sel_cmpl #(.W(W), .LEVEL(2)) u_sc2 (.din(sh_out), .ctl(sc.lvl2), .dout(m2), .cin(c2));

  // Level-1 adder (also takes the small integer term), then level-2 adder.
  assign sum1 = main_op + m1 + int_op + W'(c1);
  assign nxt  = sum1 + m2 + W'(c2);
endmodule
