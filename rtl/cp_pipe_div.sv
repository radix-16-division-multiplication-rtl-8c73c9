// cp_pipe_div: radix-16 continued-product divider built around ONE shared
// adder, shifting network and multiple-formation network, pipelined over the
// two halves of the word (the single-unit alternative to the two-unit engine).
//
// Q = Y0 / X0 is formed by the two coupled recursions of the divider
//     R(k+1) = 16 R(k) + S(k) + 16^-(k-1) S(k) R(k)   (normalization, R1 = X0 + S0 X0 - 1)
//     Q(k+1) = Q(k) + 16^-k S(k) Q(k)                 (result, Q0 = Y0)
// but instead of two arithmetic units both recursions take turns in one
// adder that is cut in the middle: a right half AS' (low H bits) and a left
// half AS'' (high H bits) joined by the carry register C. Each period (one
// clock) the right half starts one recursion while the left half finishes the
// other one, one period behind:
//     period 2k+1: AS' forms R'(k+1)   AS'' forms Q''(k)
//     period 2k+2: AS' forms Q'(k+1)   AS'' forms R''(k+1), then S(k+1) is selected
// Period 1 has no left-half work and period 2M+3 no right-half work, so the
// quotient Q(M+1) is in register A = {A'', A'} after 2M+3 periods.
//
// Registers (named as in the single-adder scheme):
//   A = {A'', A'}  adder outputs; B = {B'', B'}  operands; each half written
//                  only when its half of the adder is active, B taking A's
//                  previous contents (the two recursions alternate)
//   C              carries out of the right half, one per cascaded adder level
//   L              left half of the shifting network output, kept for AS''
//                  one period later, plus the three bits below it that the
//                  x2/x4/x8 multiples move across the cut
//   D              top digit of R'(k), needed to form 16 R''(k) one period later
//   S, S_left      digit register and the digit the left half uses (the one
//                  the right half used in the period before)
// The shifting network input is B in period 1 and {A'', B'} afterwards
// ("path a"); the unshifted main operand comes straight from B ("path b"),
// times 16 (a 4-bit wiring shift) when R is formed for k >= 1. As in the
// two-unit engine the product term of the normalization is dropped from
// k = KS = (M+4)/2 on (R(k+1) = 16 R(k) + S(k)).
//
// Interface: start (one cycle, accepted when idle) with x_in = X0 in [1/2, 1)
// or (-1, -1/2] (a negative divisor is normalized as -X0 while the dividend
// is negated) and y_in = Y0, in the same IW.FW two's complement format as the two-unit
// engine; busy for the 2M+3 periods; done pulses one cycle after the last
// period with the quotient on result. The first digit S0 comes from the start
// rule (S0 = 1 if X0 < 5/8) while the operands are loaded.
//
// Follows the original method: the half split, the one-period skew, C, L, paths a/b,
// the extra 4-bit register, the 2m+3 periods and the result in A. Own choices:
// C holds one carry per adder level (two bits), L is three bits wider than a
// half, the left half keeps its own copy of the digit, the simplified
// recursion from k = KS, start/busy/done and the reset.
module cp_pipe_div
  import cp_pkg::*;
#(
  parameter int unsigned M  = 12,
  parameter int unsigned IW = 8,
  parameter int unsigned FW = 4 * M + 4,
  localparam int unsigned W  = IW + FW,
  localparam int unsigned H  = W / 2,
  localparam int unsigned PW = $clog2(2 * M + 4)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] x_in,
  input  logic [W-1:0] y_in,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result,
  output sdigit_t      s_digit,
  output logic [PW-1:0] period
);
  localparam int unsigned KS = (M + 4) / 2;

  // ---------------------------------------------------------------- state
  logic [H-1:0] a_hi, a_lo, b_hi, b_lo, l_q;
  logic [2:0]   l3_q;
  logic [3:0]   d_q;
  logic [1:0]   c_q;
  sdigit_t      s_q, s_left, s_init, s_sel;
  logic         run;

  // ---------------------------------------------------------- step decode
  logic        odd, right_on, left_on;
  int          k;          // recursion index handled by the right half
  int          kl;         // recursion index handled by the left half
  logic [1:0]  sel_k;

  always_comb begin
    odd      = period[0];
    right_on = run && (period <= PW'(2 * M + 2));
    left_on  = run && (period >= PW'(2));
    k        = odd ? (int'(period) - 1) / 2 : int'(period) / 2 - 1;
    kl       = odd ? (int'(period) - 3) / 2 : int'(period) / 2 - 1;
    sel_k    = (kl >= 2) ? 2'd3 : 2'(kl + 1);
  end

  // ---------------------------------------------------- shifting network
  logic [W-1:0]            sn_in, sn_out;
  logic signed [5:0]       shamt;
  sdigit_t                 d_right;

  always_comb begin
    sn_in = (period == PW'(1)) ? {b_hi, b_lo} : {a_hi, b_lo};   // path a after period 1
    if (odd) begin                      // R(k+1)
      shamt   = (k == 0) ? 6'sd0 : 6'(k - 1);
      d_right = (k >= KS) ? DIGIT_ZERO : s_q;
    end else begin                      // Q(k+1)
      shamt   = 6'(k);
      d_right = s_q;
    end
  end

  shift_net #(.W(W), .SHW(6)) u_sn (.din(sn_in), .shamt(shamt), .dout(sn_out));

  // --------------------------------------------- multiple formation, AS'
  sc_pair_t      sp_r, sp_l;
  logic [H-1:0]  mr1, mr2;
  logic          cr1, cr2;
  logic [H+2:0]  ml1, ml2;
  logic          cl1_unused, cl2_unused;

  assign sp_r = split_digit(d_right);
  assign sp_l = split_digit(s_left);

  sel_cmpl #(.W(H), .LEVEL(1)) u_mr1 (.din(sn_out[H-1:0]), .ctl(sp_r.lvl1), .dout(mr1), .cin(cr1));
  sel_cmpl #(.W(H), .LEVEL(2)) u_mr2 (.din(sn_out[H-1:0]), .ctl(sp_r.lvl2), .dout(mr2), .cin(cr2));

  // Left-half multiples from the latch; the complement carry enters on the right only.
  sel_cmpl #(.W(H + 3), .LEVEL(1)) u_ml1 (.din({l_q, l3_q}), .ctl(sp_l.lvl1), .dout(ml1), .cin(cl1_unused));
  sel_cmpl #(.W(H + 3), .LEVEL(2)) u_ml2 (.din({l_q, l3_q}), .ctl(sp_l.lvl2), .dout(ml2), .cin(cl2_unused));

  // ------------------------------------------------------ split adders
  logic [H-1:0] main_r, main_l, intc_l;
  logic [H:0]   s1_r, s2_r;
  logic [H-1:0] s1_l, s2_l;
  logic signed [5:0] intc;

  always_comb begin
    // right half, main operand over path b
    main_r = (odd && k != 0) ? (b_lo << 4) : b_lo;
    s1_r   = {1'b0, main_r} + {1'b0, mr1} + (H + 1)'(cr1);
    s2_r   = {1'b0, s1_r[H-1:0]} + {1'b0, mr2} + (H + 1)'(cr2);
    // left half: R''(kl+1) in even periods, Q''(kl+1) in odd ones
    if (!odd) begin
      main_l = (kl == 0) ? b_hi : {b_hi[H-5:0], d_q};
      intc   = (kl == 0) ? -6'sd1 : digit_value(s_q);
    end else begin
      main_l = b_hi;
      intc   = 6'sd0;
    end
    intc_l = {IW'(intc), {(H - IW){1'b0}}};   // units position of the word
    s1_l   = main_l + ml1[H+2:3] + intc_l + H'(c_q[0]);
    s2_l   = s1_l + ml2[H+2:3] + H'(c_q[1]);
  end

  // ---------------------------------------------------------- selection
  // A negative divisor is normalized as -X0, the dividend negated with it.
  logic         x_neg;
  logic [W-1:0] x_abs;
  assign x_neg = x_in[W-1];
  assign x_abs = x_neg ? -x_in : x_in;

  sel_unit u_sel0 (.r({x_abs[W-1], x_abs[FW-1 -: 6]}), .k(2'd1), .mode(SEL_MULT), .init(1'b1), .s(s_init));
  sel_unit u_sel  (.r({s2_l[H-1], s2_l[FW-H-1 -: 6]}), .k(sel_k), .mode(SEL_MULT), .init(1'b0), .s(s_sel));

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a_hi, a_lo, b_hi, b_lo} <= '0;
      l_q    <= '0;
      l3_q   <= '0;
      d_q    <= '0;
      c_q    <= '0;
      s_q    <= DIGIT_ZERO;
      s_left <= DIGIT_ZERO;
      run    <= 1'b0;
      period <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          {b_hi, b_lo} <= x_abs;
          {a_hi, a_lo} <= x_neg ? -y_in : y_in;
          s_q    <= s_init;
          run    <= 1'b1;
          period <= PW'(1);
        end
      end else begin
        if (right_on) begin
          a_lo   <= s2_r[H-1:0];
          b_lo   <= a_lo;
          c_q    <= {s2_r[H], s1_r[H]};
          l_q    <= sn_out[W-1:H];
          l3_q   <= sn_out[H-1 -: 3];
          s_left <= d_right;
          if (odd) d_q <= b_lo[H-1 -: 4];
        end
        if (left_on) begin
          a_hi <= s2_l;
          b_hi <= a_hi;
          if (!odd) s_q <= s_sel;
        end
        if (period == PW'(2 * M + 3)) begin
          run    <= 1'b0;
          period <= '0;
          done   <= 1'b1;
        end else begin
          period <= period + 1'b1;
        end
      end
    end
  end

  assign busy    = run;
  assign result  = {a_hi, a_lo};
  assign s_digit = s_q;
endmodule
