// cp_top: radix-16 continued-product arithmetic engine with two arithmetic units.
//
// Computes, on fixed-point fractions, the quotient Y0/X0, the product Y0*X0,
// the natural logarithm ln X0 + Ex*ln 2 and the exponential e^X0, four bits of
// result per clock cycle, by splitting each operation into two processes:
//   AU1 (normalization unit) drives X0 towards 1 (multiplicative
//       normalization: division, logarithm), towards 0 by subtracting digits
//       (additive normalization: multiplication) or towards 0 by subtracting
//       ln(1 + S*16^-k) (exponential). After every step the selection network
//       rounds the scaled remainder to the next digit S(k) in -10..10 and
//       stores it in the five-bit sign-magnitude register S.
//   AU2 (result unit) applies the same digits to the other operand:
//       Q = Y0 * prod(1 + S(k) 16^-k), P = Y0 * sum S(k) 16^-k,
//       L = -sum ln(1 + S(k) 16^-k), E = prod(1 + S(k) 16^-k).
// A constant ROM feeds AU2 (logarithm) or AU1 (exponential). The exponential
// argument first passes the range reduction (exp_prep).
//
// Number format: every word is W = IW + FW bits, two's complement, FW fraction
// bits (IW = 8, FW = 4M + 4 = 52 for M = 12 radix-16 digits; the four extra
// fraction bits are the guard digit of the logarithm). Operands:
//   DIV, MUL: x_in = X0, y_in = Y0, both in [1/2, 1); a divisor may also be
//             negative, X0 in (-1, -1/2]: it is normalized as -X0 while the
//             result unit starts from -Y0;
//   LOG:      x_in = X0 in [1/2, 1), ex = Ex (signed 8-bit exponent);
//   EXP:      x_in = X, |X| < 88; the range reduction computes I and
//             X0 = (X log2 e - I) ln 2 in (-ln 2, 0], the result is e^X0 and
//             res_exp = I, so that e^X = result * 2^res_exp.
// Timing: assert start for one cycle with op and operands while busy is low.
// The operation takes M+1 cycles (M+4 for the logarithm); done pulses for one
// cycle and result then holds the value until the next start. s_digit and
// k_step show the digit register and the step counter.
//
// Beside the engine, and independent of it, sits the single-adder pipelined
// divider (cp_pipe_div) with its own pd_* ports: pd_start with pd_x_in = X0
// and pd_y_in = Y0 while pd_busy is low; pd_done pulses after 2M+3 cycles
// with Y0/X0 on pd_result. Likewise the single-unit serial engine
// (cp_serial) has its own sr_* ports, the same operands and results as the
// engine, and 2(M+1) cycles per operation (2(M+4) for the logarithm).
//
// Source: the two-unit organization, the recursions, the digit set, the
// selection rules, the ROM contents and the step counts are the original method's;
// the word format, the handshake, the reset (asynchronous, active low), the
// routing of the Ex ln 2 steps and the 9-bit exponent output are own choices.
module cp_top
  import cp_pkg::*;
#(
  parameter int unsigned M  = 12,
  parameter int unsigned IW = 8,
  parameter int unsigned FW = 4 * M + 4,
  localparam int unsigned W  = IW + FW,
  localparam int unsigned KW = $clog2(M + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  op_e                 op,
  input  logic [W-1:0]        x_in,
  input  logic [W-1:0]        y_in,
  input  logic signed [7:0]   ex,
  output logic                busy,
  output logic                done,
  output logic [W-1:0]        result,
  output logic signed [8:0]   res_exp,
  output sdigit_t             s_digit,
  output logic [KW-1:0]       k_step,
  // single-adder pipelined divider
  input  logic                pd_start,
  input  logic [W-1:0]        pd_x_in,
  input  logic [W-1:0]        pd_y_in,
  output logic                pd_busy,
  output logic                pd_done,
  output logic [W-1:0]        pd_result,
  output sdigit_t             pd_s_digit,
  output logic [$clog2(2 * M + 4)-1:0] pd_period,
  // single-unit serial engine
  input  logic                sr_start,
  input  op_e                 sr_op,
  input  logic [W-1:0]        sr_x_in,
  input  logic [W-1:0]        sr_y_in,
  input  logic signed [7:0]   sr_ex,
  output logic                sr_busy,
  output logic                sr_done,
  output logic [W-1:0]        sr_result,
  output logic signed [8:0]   sr_res_exp,
  output sdigit_t             sr_s_digit,
  output logic [KW-1:0]       sr_k_step
);
  op_e          op_q;
  logic         load, load_ex, step, au2_aux_y, exl;
  au_ctl_t      au1_ctl, au2_ctl;
  rom_kind_e    rom_kind;
  logic [3:0]   rom_k;
  sel_mode_e    sel_mode;
  logic [1:0]   sel_k;
  sdigit_t      s_q, s_sel, s_init, rom_s;
  logic [W-1:0] r_q, r_nxt, a_q, a_nxt, rom_word, y_q, au2_aux, au1_load, au2_load;
  logic [6:0]   sel_bits;
  logic signed [7:0] ex_q;
  logic [W-1:0] x_op, x0_prep;
  logic signed [8:0] i_prep;
  logic x_neg;

  // Range reduction of the exponential argument: e^X = 2^I e^X0.
  exp_prep #(.IW(IW), .FW(FW)) u_prep (.x(x_in), .x0(x0_prep), .i_exp(i_prep));
  // A negative divisor is normalized as -X0 and the dividend negated with it.
  assign x_neg = (op == OP_DIV) && x_in[W-1];
  assign x_op  = (op == OP_EXP) ? x0_prep : (x_neg ? -x_in : x_in);

  cp_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .op, .adv(1'b1), .s(s_q), .op_q, .load, .load_ex, .step,
    .au1(au1_ctl), .au2(au2_ctl), .au2_aux_y, .rom_kind, .rom_k,
    .sel_mode, .sel_k, .busy, .done, .exl, .k(k_step)
  );

  // Selection network: the start-step rule reads X0, the step rule reads the
  // AU1 adder output (the next scaled remainder).
  assign sel_bits = {r_nxt[W-1], r_nxt[FW-1 -: 6]};

  sel_unit u_sel_init (
    .r({x_op[W-1], x_op[FW-1 -: 6]}), .k(2'd1), .mode(start_mode(op)), .init(1'b1), .s(s_init)
  );

  sel_unit u_sel (
    .r(sel_bits), .k(sel_k), .mode(sel_mode), .init(1'b0), .s(s_sel)
  );

  function automatic sel_mode_e start_mode(op_e o);
    unique case (o)
      OP_MUL:  return SEL_ADD;
      OP_EXP:  return SEL_EXP;
      default: return SEL_MULT;
    endcase
  endfunction

  // Digit register S, multiplicand register Y0 and exponent register Ex.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= DIGIT_ZERO;
      y_q     <= '0;
      ex_q    <= '0;
      res_exp <= '0;
    end else if (load) begin
      s_q     <= s_init;
      y_q     <= y_in;
      ex_q    <= ex;
      res_exp <= (op == OP_EXP) ? i_prep : 9'sd0;
    end else if (load_ex) s_q <= DIGIT_ZERO;
    else if (step)        s_q <= s_sel;
  end

  assign rom_s = busy ? s_q : s_init;

  log_rom #(.M(M), .IW(IW), .FW(FW)) u_rom (
    .kind(rom_kind), .k(rom_k), .s(rom_s), .word(rom_word)
  );

  assign au1_load = load ? x_op : {{(IW){ex_q[7]}}, ex_q, {(FW - 8){1'b0}}};  // Ex / 256
  always_comb begin
    unique case (op)
      OP_DIV:  au2_load = x_neg ? -y_in : y_in;
      OP_EXP:  au2_load = rom_word;
      default: au2_load = '0;
    endcase
  end
  assign au2_aux = au2_aux_y ? y_q : rom_word;

  // AU1: normalization unit.
  cp_au #(.IW(IW), .FW(FW)) u_au1 (
    .clk, .rst_n, .load(load | load_ex), .load_val(au1_load), .step,
    .ctl(au1_ctl), .aux(rom_word), .q(r_q), .nxt(r_nxt)
  );

  // AU2: result evaluation unit.
  cp_au #(.IW(IW), .FW(FW)) u_au2 (
    .clk, .rst_n, .load, .load_val(au2_load), .step,
    .ctl(au2_ctl), .aux(au2_aux), .q(a_q), .nxt(a_nxt)
  );

  assign result  = a_q;
  assign s_digit = s_q;

  cp_pipe_div #(.M(M), .IW(IW), .FW(FW)) u_pipe_div (
    .clk, .rst_n, .start(pd_start), .x_in(pd_x_in), .y_in(pd_y_in),
    .busy(pd_busy), .done(pd_done), .result(pd_result), .s_digit(pd_s_digit), .period(pd_period)
  );

  cp_serial #(.M(M), .IW(IW), .FW(FW)) u_serial (
    .clk, .rst_n, .start(sr_start), .op(sr_op), .x_in(sr_x_in), .y_in(sr_y_in), .ex(sr_ex),
    .busy(sr_busy), .done(sr_done), .result(sr_result), .res_exp(sr_res_exp),
    .s_digit(sr_s_digit), .k_step(sr_k_step)
  );
endmodule
