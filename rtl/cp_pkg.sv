// cp_pkg: types and helper functions shared by the radix-16 continued-product
// arithmetic engine.
//
// A continued-product digit S_k lies in {-10..10} and is held in sign and
// magnitude form (five bits: one sign bit, four magnitude bits), as the digit
// register of the normalization unit does. The adder of each arithmetic unit
// forms S_k times an operand in two levels: level 1 adds {0,+-1,+-2} times the
// operand and level 2 adds {0,+-4,+-8} times it. split_digit() gives the pair
// of sub-multiples for a digit (for example 7 = 8 - 1, 3 = 4 - 1).
//
// The digit set, the two sets of multiples and the five-bit sign-magnitude
// digit register follow the original method; the decomposition of 3, 5, 6, 7, 9, 10
// into the two levels and the type layout are this design's choice.
package cp_pkg;

  // Operation requested from the engine.
  typedef enum logic [1:0] {
    OP_DIV = 2'd0,   // Q = Y0 / X0            (Algorithm D)
    OP_MUL = 2'd1,   // P = Y0 * X0            (Algorithm M)
    OP_LOG = 2'd2,   // L = ln X0 + Ex * ln 2  (Algorithm L)
    OP_EXP = 2'd3    // E = exp(X0)            (Algorithm E)
  } op_e;

  // Digit selection rule applied by the selection network.
  typedef enum logic [1:0] {
    SEL_MULT = 2'd0, // multiplicative normalization, step-dependent rounding
    SEL_ADD  = 2'd1, // additive normalization, plain rounding
    SEL_EXP  = 2'd2  // plain rounding with the restricted sets of steps 1 and 2
  } sel_mode_e;

  // Word requested from the constant ROM.
  typedef enum logic [2:0] {
    ROM_LN   = 3'd0, // ln(1 + S * 16^-k), k < k1
    ROM_ONE  = 3'd1, // 1.0 (log steps k >= k1: the term S * 16^-k)
    ROM_LN2  = 3'd2, // ln 2 (term Ex * ln 2)
    ROM_M0   = 3'd3, // exponential start factor M0, index S0 = 0, 1, 2
    ROM_LNM0 = 3'd4  // ln M0 = 0, -1/4, -17/32
  } rom_kind_e;

  // Sign and magnitude digit.
  typedef struct packed {
    logic       neg;
    logic [3:0] mag;
  } sdigit_t;

  // Choice made by one select-complement network: multiple index 0, 1 or 2
  // (times 0, 1, 2 on level 1 and times 0, 4, 8 on level 2) and complement.
  typedef struct packed {
    logic       neg;
    logic [1:0] sel;
  } sc_ctl_t;

  typedef struct packed {
    sc_ctl_t lvl1;
    sc_ctl_t lvl2;
  } sc_pair_t;

  // Split a digit of magnitude 0..10 over the two adder levels.
  function automatic sc_pair_t split_digit(sdigit_t d);
    sc_pair_t p;
    logic l1_neg;
    l1_neg = 1'b0;
    unique case (d.mag)
      4'd0:    begin p.lvl1.sel = 2'd0; p.lvl2.sel = 2'd0; end
      4'd1:    begin p.lvl1.sel = 2'd1; p.lvl2.sel = 2'd0; end
      4'd2:    begin p.lvl1.sel = 2'd2; p.lvl2.sel = 2'd0; end
      4'd3:    begin p.lvl1.sel = 2'd1; p.lvl2.sel = 2'd1; l1_neg = 1'b1; end
      4'd4:    begin p.lvl1.sel = 2'd0; p.lvl2.sel = 2'd1; end
      4'd5:    begin p.lvl1.sel = 2'd1; p.lvl2.sel = 2'd1; end
      4'd6:    begin p.lvl1.sel = 2'd2; p.lvl2.sel = 2'd1; end
      4'd7:    begin p.lvl1.sel = 2'd1; p.lvl2.sel = 2'd2; l1_neg = 1'b1; end
      4'd8:    begin p.lvl1.sel = 2'd0; p.lvl2.sel = 2'd2; end
      4'd9:    begin p.lvl1.sel = 2'd1; p.lvl2.sel = 2'd2; end
      4'd10:   begin p.lvl1.sel = 2'd2; p.lvl2.sel = 2'd2; end
      default: begin p.lvl1.sel = 2'd0; p.lvl2.sel = 2'd0; end
    endcase
    p.lvl1.neg = d.neg ^ l1_neg;
    p.lvl2.neg = d.neg;
    return p;
  endfunction

  // Operand routing of one arithmetic unit for one step:
  //   next = (x16 ? 16*reg : reg) + digit * shift(aux ? aux_word : reg, shamt) + intc
  typedef struct packed {
    logic              x16;    // main operand is sixteen times the register
    logic              aux;    // shift the auxiliary word instead of the register
    logic signed [5:0] shamt;  // radix-16 digits, positive = right
    sdigit_t           digit;  // multiplier -10..10
    logic signed [5:0] intc;   // integer added at weight 1
  } au_ctl_t;

  // Digit negation (sign flip).
  function automatic sdigit_t neg_digit(sdigit_t d);
    return '{neg: ~d.neg, mag: d.mag};
  endfunction

  // Digit value as a small two's complement integer.
  function automatic logic signed [5:0] digit_value(sdigit_t d);
    logic signed [5:0] v;
    v = signed'({2'b00, d.mag});
    return d.neg ? -v : v;
  endfunction

  localparam sdigit_t DIGIT_ZERO    = '{neg: 1'b0, mag: 4'd0};
  localparam sdigit_t DIGIT_ONE     = '{neg: 1'b0, mag: 4'd1};
  localparam sdigit_t DIGIT_NEG_ONE = '{neg: 1'b1, mag: 4'd1};

endpackage
