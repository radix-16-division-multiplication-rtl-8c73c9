// cp_au: one arithmetic unit of the continued-product engine.
//
// Holds a W-bit two's complement register (IW integer bits including the sign,
// FW fraction bits) and computes, in one cycle,
//     next = main + S * shift(src, shamt) + intc
// where main is the register or sixteen times the register, src is the
// register or an auxiliary word (multiplicand register or ROM constant),
// shift() is the radix-16 shifting network, S is a digit in -10..10 formed by
// two select-complement networks ({0,+-1,+-2} and {0,+-4,+-8}) and two cascaded
// adders, and intc is a small integer added at the units position (the "+S_k"
// or "-S_k" of the remainder recursions and the "-1" of the first step).
// The same unit serves as normalization unit (AU1) and result evaluation unit
// (AU2); the control decides the operand routing per step.
//
// Timing: the register loads load_val when load is high, else takes next when
// step is high, on the rising clock edge; next is combinational from the
// register and the control inputs. Reset clears the register. The
// combinational part is the helper cp_au_dp, which the serial engine shares
// between its two registers.
//
// Follows the original method: the register, the shifting network, the two
// select-complement networks with their sets of multiples and the two cascaded
// adders. Own choices: one unit type for both AU1 and AU2 with a routing
// struct, the 4-bit wiring shift for 16R, the small-integer addend, the
// complement by inversion plus carry-in, and the asynchronous reset.
module cp_au
  import cp_pkg::*;
#(
  parameter int unsigned IW  = 8,
  parameter int unsigned FW  = 52,
  localparam int unsigned W  = IW + FW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [W-1:0]          load_val,
  input  logic                  step,
  input  au_ctl_t               ctl,        // operand routing of this step
  input  logic [W-1:0]          aux,        // auxiliary word
  output logic [W-1:0]          q,          // register
  output logic [W-1:0]          nxt         // adder output
);
  // Shifting network, select-complement networks and the two adders.
  cp_au_dp #(.IW(IW), .FW(FW)) u_dp (.q, .ctl, .aux, .nxt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= load_val;
    else if (step) q <= nxt;
  end

  // A digit outside -10..10 has no two-level decomposition.
  a_digit_range: assert property (@(posedge clk) disable iff (!rst_n) step |-> ctl.digit.mag <= 4'd10)
    else $error("cp_au: digit magnitude %0d > 10", ctl.digit.mag);
endmodule
