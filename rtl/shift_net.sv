// shift_net: shifting network of an arithmetic unit, a two-level barrel switch.
//
// Shifts a W-bit two's complement fixed-point word by a signed number of
// radix-16 digits. The count is in two's complement: a positive count shifts
// right (divides by 16^count, sign filled), a negative count shifts left.
// Following the barrel-switch organisation, the count is split into a coarse
// part (multiples of four digits, sixteen bit positions, either direction) on
// level 1 and a fine part (0..3 digits, always to the right) on level 2, so the
// same paths serve both directions. Level 1 works on a word widened by twelve
// bits so that a coarse left shift followed by a fine right shift gives the
// same low W bits as the direct left shift. Purely combinational.
//
// Ports: din (W bits), shamt (SHW-bit signed digit count), dout (W bits).
// The level split (16-bit and 4-bit displacements) is this design's choice for
// the default width; any signed count in range is accepted.
module shift_net #(
  parameter int unsigned W   = 60,
  parameter int unsigned SHW = 6
) (
  input  logic [W-1:0]          din,
  input  logic signed [SHW-1:0] shamt,
  output logic [W-1:0]          dout
);
  localparam int unsigned WE = W + 12;

  logic signed [SHW-1:0] coarse;   // shamt / 4, rounded towards minus infinity
  logic [1:0]            fine;     // shamt mod 4
  logic signed [WE-1:0]  ext, lvl1, lvl2;

  always_comb begin
    coarse = shamt >>> 2;
    fine   = shamt[1:0];
    ext    = WE'(signed'(din));
    if (coarse >= 0) lvl1 = ext >>> (16 * coarse);
    else             lvl1 = ext <<  (16 * (-coarse));
    lvl2 = lvl1 >>> (4 * fine);
    dout = lvl2[W-1:0];
  end
endmodule
