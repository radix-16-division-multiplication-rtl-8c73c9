// cp_serial: the continued-product engine with ONE arithmetic unit used by
// both processes in series (the low-cost alternative to the two-unit engine).
//
// Same operations, operands, number format and results as cp_top's engine
// (Y0/X0, Y0*X0, ln X0 + Ex ln 2, e^X with the range reduction), but a single
// shifting network, select-complement pair and adder pair (cp_au_dp) serves
// both the normalization register R and the result register A. Every step k
// takes two cycles:
//     cycle 1: the unit works for the result evaluation, A <- A-step with S(k)
//     cycle 2: the unit works for the normalization,     R <- R-step with S(k),
//              and the selection of S(k+1) from the new R is written into S
// so the result process always runs before the normalization overwrites the
// digit, and only the current digit needs to be kept. The sequencer is the
// same cp_ctrl, advanced every second cycle.
//
// Interface: start (one cycle, while busy is low) with op, x_in, y_in, ex as
// for cp_top; busy; done pulses one cycle after the last step, with result
// (and res_exp for the exponential) valid until the next start.
// Timing: 2(M+1) cycles, 2(M+4) for the logarithm.
//
// Follows the original method: one unit used by both processes in series,
// alternating so that only the current digit is needed. Own choices: the
// order (result step first), the two-cycle step, the reuse of the two-unit
// sequencer, the handshake and the reset.
module cp_serial
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
  output logic [KW-1:0]       k_step
);
  op_e          op_q_unused;
  logic         load, load_ex, step_unused, au2_aux_y, exl_unused;
  au_ctl_t      au1_ctl, au2_ctl, ctl;
  rom_kind_e    rom_kind;
  logic [3:0]   rom_k;
  sel_mode_e    sel_mode;
  logic [1:0]   sel_k;
  sdigit_t      s_q, s_init, s_sel, rom_s;
  logic [W-1:0] r_q, a_q, y_q, rom_word, au2_aux, dp_q, dp_aux, nxt, a_init, x_op, x0_prep;
  logic signed [7:0] ex_q;
  logic signed [8:0] i_prep;
  logic         ph, x_neg;

  // Range reduction of the exponential argument, negative divisors.
  exp_prep #(.IW(IW), .FW(FW)) u_prep (.x(x_in), .x0(x0_prep), .i_exp(i_prep));
  assign x_neg = (op == OP_DIV) && x_in[W-1];
  assign x_op  = (op == OP_EXP) ? x0_prep : (x_neg ? -x_in : x_in);

  // Sequencer, one step every second cycle.
  cp_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .op, .adv(ph), .s(s_q), .op_q(op_q_unused), .load, .load_ex, .step(step_unused),
    .au1(au1_ctl), .au2(au2_ctl), .au2_aux_y, .rom_kind, .rom_k,
    .sel_mode, .sel_k, .busy, .done, .exl(exl_unused), .k(k_step)
  );

  // The shared unit: result step in the first cycle, normalization in the second.
  assign ctl    = ph ? au1_ctl : au2_ctl;
  assign dp_q   = ph ? r_q : a_q;
  assign dp_aux = ph ? rom_word : au2_aux;

  cp_au_dp #(.IW(IW), .FW(FW)) u_dp (.q(dp_q), .ctl, .aux(dp_aux), .nxt);

  sel_unit u_sel_init (
    .r({x_op[W-1], x_op[FW-1 -: 6]}), .k(2'd1), .mode(start_mode(op)), .init(1'b1), .s(s_init)
  );
  sel_unit u_sel (
    .r({nxt[W-1], nxt[FW-1 -: 6]}), .k(sel_k), .mode(sel_mode), .init(1'b0), .s(s_sel)
  );

  function automatic sel_mode_e start_mode(op_e o);
    unique case (o)
      OP_MUL:  return SEL_ADD;
      OP_EXP:  return SEL_EXP;
      default: return SEL_MULT;
    endcase
  endfunction

  assign rom_s = busy ? s_q : s_init;

  log_rom #(.M(M), .IW(IW), .FW(FW)) u_rom (
    .kind(rom_kind), .k(rom_k), .s(rom_s), .word(rom_word)
  );

  assign au2_aux = au2_aux_y ? y_q : rom_word;

  always_comb begin
    unique case (op)
      OP_DIV:  a_init = x_neg ? -y_in : y_in;
      OP_EXP:  a_init = rom_word;
      default: a_init = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q     <= '0;
      a_q     <= '0;
      s_q     <= DIGIT_ZERO;
      y_q     <= '0;
      ex_q    <= '0;
      res_exp <= '0;
      ph      <= 1'b0;
    end else if (load) begin
      r_q     <= x_op;
      a_q     <= a_init;
      s_q     <= s_init;
      y_q     <= y_in;
      ex_q    <= ex;
      res_exp <= (op == OP_EXP) ? i_prep : 9'sd0;
      ph      <= 1'b0;
    end else if (busy) begin
      ph <= ~ph;
      if (!ph) a_q <= nxt;
      else if (load_ex) begin
        r_q <= {{(IW){ex_q[7]}}, ex_q, {(FW - 8){1'b0}}};   // Ex / 256
        s_q <= DIGIT_ZERO;
      end else begin
        r_q <= nxt;
        s_q <= s_sel;
      end
    end
  end

  assign result  = a_q;
  assign s_digit = s_q;
endmodule
