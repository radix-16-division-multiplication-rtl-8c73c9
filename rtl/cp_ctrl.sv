// cp_ctrl: sequencer of the two-unit continued-product engine.
//
// Synchronous control, one recursion step per clock cycle. A start pulse in
// IDLE loads the operands (load = 1) and enters RUN, which performs the steps
// k = 0..M of the chosen algorithm; for the logarithm it then performs three
// more steps (phase EXL, j = 0..2) forming Ex * ln 2 by additive normalization
// of Ex/256 in the normalization unit, while the result unit keeps
// accumulating. done pulses for one cycle after the last step; busy is high
// from the cycle after start until that pulse.
//
// For every step the controller routes the operands of both arithmetic units
// (struct au_ctl_t), addresses the ROM and tells the selection network which
// rule and which step index to use for the next digit:
//   DIV/LOG, AU1 (multiplicative normalization of X0):
//     k = 0:        R1 = X0 + S0*X0 - 1
//     0 < k < KS:   R(k+1) = 16 R(k) + S(k) + 16^-(k-1) S(k) R(k)
//     k >= KS:      R(k+1) = 16 R(k) + S(k)            (KS = ceil((M+3)/2))
//   DIV, AU2: Q(k+1) = Q(k) + 16^-k S(k) Q(k)
//   LOG, AU2: L(k+1) = L(k) - ln(1 + S(k) 16^-k) (ROM), k < K1;
//             L(k+1) = L(k) - S(k) 16^-k, k >= K1
//   MUL, AU1: R1 = X0 - 1, R(k+1) = 16 R(k) - S(k);  AU2: P(k+1) = P(k) + Y0 S(k) 16^-k
//   EXP, AU1: R1 = X0 - ln M0 (ROM); R(k+1) = 16 R(k) - 16^k ln(1 + S(k) 16^-k), k < K1;
//             R(k+1) = 16 R(k) - S(k), k >= K1
//   EXP, AU2: E1 = M0 (loaded at start), E(k+1) = E(k) + 16^-k S(k) E(k)
//   EXL j, AU1: R = 16 R - S (R starts at Ex/256, S0 = 0); AU2: L = L + S(j) 16^(2-j) ln 2
//
// adv = 1 advances one step per cycle (two-unit engine); the serial engine
// holds each step for two cycles by raising adv every second cycle.
//
// Ports: start/op from the user, adv, s (digit register), AU and ROM controls,
// selection controls, load strobes, busy, done, k (step index).
//
// Follows the original method: the recursions, one step per basic cycle, the
// simplified recursion from KS, the ROM replacement from K1 and the three
// steps of the Ex ln 2 product. Own choices: the original method leaves the control
// out, so the state machine, the start/busy/done handshake, loading Ex/256 into
// AU1 during the last main step and the asynchronous reset are this design's.
module cp_ctrl
  import cp_pkg::*;
#(
  parameter int unsigned M  = 12,
  localparam int unsigned KW = $clog2(M + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  op_e         op,
  input  logic        adv,        // advance to the next step (1 = every cycle)
  input  sdigit_t     s,          // digit register S
  output op_e         op_q,       // operation in progress
  output logic        load,       // load operands (start accepted)
  output logic        load_ex,    // reload AU1 with Ex/256, clear S
  output logic        step,       // both units take their next value
  output au_ctl_t     au1,
  output au_ctl_t     au2,
  output logic        au2_aux_y,  // AU2 auxiliary word is the multiplicand register
  output rom_kind_e   rom_kind,
  output logic [3:0]  rom_k,
  output sel_mode_e   sel_mode,
  output logic [1:0]  sel_k,      // step index of the digit being selected
  output logic        busy,
  output logic        done,
  output logic        exl,        // in the Ex * ln 2 phase
  output logic [KW-1:0] k
);
  localparam int unsigned KS = (M + 4) / 2;         // simplified recursion from here
  localparam int unsigned K1 = (8 * M + 26) / 16;   // ROM replaced by S*16^-k from here

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_EXL} state_e;
  state_e state;
  logic   last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      op_q  <= OP_DIV;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_RUN;
          op_q  <= op;
          k     <= '0;
        end
        ST_RUN: if (adv) begin
          k <= k + 1'b1;
          if (k == KW'(M)) begin
            k <= '0;
            if (op_q == OP_LOG) state <= ST_EXL;
            else begin
              state <= ST_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: if (adv) begin  // ST_EXL
          k <= k + 1'b1;
          if (k == KW'(2)) begin
            k     <= '0;
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  function automatic au_ctl_t mk(logic x16, logic aux, int sh, sdigit_t d, logic signed [5:0] ic);
    au_ctl_t c;
    c.x16 = x16; c.aux = aux; c.shamt = 6'(sh); c.digit = d; c.intc = ic;
    return c;
  endfunction

  always_comb begin
    logic signed [5:0] sv;
    int                kk;
    sv        = digit_value(s);
    kk        = int'(k);
    busy      = (state != ST_IDLE);
    exl       = (state == ST_EXL);
    load      = (state == ST_IDLE) && start;
    step      = (state != ST_IDLE);
    last      = (state == ST_RUN) && (k == KW'(M));
    load_ex   = last && (op_q == OP_LOG);
    au1       = mk(1'b0, 1'b0, 0, DIGIT_ZERO, 6'sd0);
    au2       = mk(1'b0, 1'b0, 0, DIGIT_ZERO, 6'sd0);
    au2_aux_y = 1'b0;
    rom_kind  = ROM_M0;      // in IDLE: start factor for the exponential
    rom_k     = 4'(k);
    sel_mode  = SEL_MULT;
    sel_k     = (kk >= 2) ? 2'd3 : 2'(kk + 1);
    if (state == ST_RUN) begin
      unique case (op_q)
        OP_DIV, OP_LOG: begin
          sel_mode = SEL_MULT;
          if (kk == 0)      au1 = mk(1'b0, 1'b0, 0, s, -6'sd1);
          else if (kk < KS) au1 = mk(1'b1, 1'b0, kk - 1, s, sv);
          else              au1 = mk(1'b1, 1'b0, 0, DIGIT_ZERO, sv);
          if (op_q == OP_DIV) au2 = mk(1'b0, 1'b0, kk, s, 6'sd0);
          else if (kk < K1) begin
            au2      = mk(1'b0, 1'b1, 0, DIGIT_NEG_ONE, 6'sd0);
            rom_kind = ROM_LN;
          end else begin
            au2      = mk(1'b0, 1'b1, kk, neg_digit(s), 6'sd0);
            rom_kind = ROM_ONE;
          end
        end
        OP_MUL: begin
          sel_mode  = SEL_ADD;
          au1       = mk(kk != 0, 1'b0, 0, DIGIT_ZERO, -sv);
          au2       = mk(1'b0, 1'b1, kk, s, 6'sd0);
          au2_aux_y = 1'b1;
        end
        default: begin  // OP_EXP
          sel_mode = SEL_EXP;
          if (kk == 0) begin
            au1      = mk(1'b0, 1'b1, 0, DIGIT_NEG_ONE, 6'sd0);
            rom_kind = ROM_LNM0;
          end else if (kk < K1) begin
            au1      = mk(1'b1, 1'b1, -kk, DIGIT_NEG_ONE, 6'sd0);
            rom_kind = ROM_LN;
          end else
            au1      = mk(1'b1, 1'b0, 0, DIGIT_ZERO, -sv);
          if (kk != 0) au2 = mk(1'b0, 1'b0, kk, s, 6'sd0);
        end
      endcase
    end else if (state == ST_EXL) begin
      sel_mode = SEL_ADD;
      au1      = mk(kk != 0, 1'b0, 0, DIGIT_ZERO, -sv);
      au2      = mk(1'b0, 1'b1, kk - 2, s, 6'sd0);
      rom_kind = ROM_LN2;
    end
  end

  // The engine accepts start only when idle.
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $warning("cp_ctrl: start ignored while busy");
endmodule
