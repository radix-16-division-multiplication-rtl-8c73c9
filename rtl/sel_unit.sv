// sel_unit: digit selection network of the normalization unit (network TU and
// the start-step rules).
//
// The digit is chosen from the truncated scaled remainder R^ = -r0 + sum
// r_i 2^-i, i = 1..6 (sign and six fraction bits), by modified rounding:
//     T = r1..r6 (r0 = 0) or their complement (r0 = 1),
//     |S| = floor((T + U) * 16), U a step-dependent rounding constant.
// Multiplicative normalization (division, logarithm): sign(S) = not sign(R),
//     step 1: u3 = r0 r2', u4 = r0 r4'(r2' + r3'), u5 = r0 + r3' r4', u6 = r3' r4
//     step 2: u5 = r0 + r1'(r2' + r3') + r6,  u6 = r0 (r1' + r2'(r3' + r4'))
//     step >= 3: U = 1/32.
// Additive normalization (multiplication, exponent steps of the logarithm):
//     five bits of T, U = 1/32, sign(S) = sign(R).
// Exponential: as additive, restricted to S1 >= -2 in step 1 and S2 >= -9 in
//     step 2 (the restricted digit sets of the exponential).
// Start step (init = 1), read from the operand X0 in the same bit positions:
//     SEL_MULT: S0 = 1 if X0 < 5/8 else 0;  SEL_ADD: S0 = 1 with the sign of X0;
//     SEL_EXP: index of M0 (0: X0 >= -1/8, 1: -3/8 <= X0 < -1/8, 2: else).
// Combinational; the result is stored in the five-bit digit register.
//
// Ports: r (r0..r6, r[6] = r0), k (step index, saturating at 3), mode, init, s.
//
// The rounding rule, the rounding constants of steps 1 and 2 and the start
// rules follow the original method. The step-2 term u6 above was rebuilt from the
// step-2 interval table, and the exponential clamps implement the original method's
// restricted digit sets for steps 1 and 2; the encoding of ports is this
// design's choice.
module sel_unit
  import cp_pkg::*;
(
  input  logic [6:0]  r,      // {r0, r1, r2, r3, r4, r5, r6}
  input  logic [1:0]  k,      // 1, 2 or 3 (= 3 and above)
  input  sel_mode_e   mode,
  input  logic        init,
  output sdigit_t     s
);
  logic       r0, r1, r2, r3, r4, r6;
  logic [5:0] t6, u6v;
  logic [4:0] t5;
  logic [6:0] sum6;
  logic [5:0] sum5;
  logic       u3, u4, u5, u6;
  logic [3:0] mag;

  always_comb begin
    r0 = r[6]; r1 = r[5]; r2 = r[4]; r3 = r[3]; r4 = r[2]; r6 = r[0];
    t6 = r0 ? ~r[5:0] : r[5:0];
    t5 = r0 ? ~r[5:1] : r[5:1];
    u3 = 1'b0; u4 = 1'b0; u5 = 1'b1; u6 = 1'b0;
    if (k == 2'd1) begin
      u3 = r0 & ~r2;
      u4 = r0 & ~r4 & (~r2 | ~r3);
      u5 = r0 | (~r3 & ~r4);
      u6 = ~r3 & r4;
    end else if (k == 2'd2) begin
      u5 = r0 | (~r1 & (~r2 | ~r3)) | r6;
      u6 = r0 & (~r1 | (~r2 & (~r3 | ~r4)));
    end
    u6v  = {2'b00, u3, u4, u5, u6};
    sum6 = {1'b0, t6} + {1'b0, u6v};
    sum5 = {1'b0, t5} + 6'd1;
    s    = DIGIT_ZERO;
    if (init) begin
      unique case (mode)
        SEL_MULT: s.mag = (r1 & ~r2 & ~r3) ? 4'd1 : 4'd0;
        SEL_ADD:  begin s.mag = 4'd1; s.neg = r0; end   // S0 = +-1, sign of X0
        default: begin
          if (~r0 | (r1 & r2 & r3))        s.mag = 4'd0;
          else if (r1 & (r2 | r3))         s.mag = 4'd1;
          else                             s.mag = 4'd2;
        end
      endcase
    end else if (mode == SEL_MULT) begin
      s.mag = sum6[5:2];
      s.neg = ~r0;
    end else begin
      mag = sum5[4:1];
      if (mode == SEL_EXP && r0) begin
        if (k == 2'd1 && mag > 4'd2) mag = 4'd2;
        if (k == 2'd2 && mag > 4'd9) mag = 4'd9;
      end
      s.mag = mag;
      s.neg = r0;
    end
  end
endmodule
