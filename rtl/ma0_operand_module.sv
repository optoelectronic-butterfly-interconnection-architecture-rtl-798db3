// ma0_operand_module: operand module Ma0, the first light-emitting plane.
//
// Ma0 presents the two N-digit MSD operands to the first butterfly stage:
// digit i of X on rails A/B/C and digit i of Y on rails a/b/c of position i.
// Subtraction X - Y is done as the addition X + (-Y): with sub = 1 every
// subtrahend digit is complemented (1 becomes -1, -1 becomes 1, 0 stays 0),
// which in SPLE is just a swap of the A-side and C-side rails of Y.
//
// Interface: x, y are N SPLE digits (index 0 = least significant), sub
// selects subtraction; xo, yo go to Ma1.
// Timing: combinational.
// Subtraction by digit complement follows the design; placing the
// complement in Ma0 (rather than at the operand source) is this design's
// choice.
module ma0_operand_module
  import msd_pkg::*;
#(
  parameter int unsigned N = 3   // operand digits
) (
  input  sple_t x   [N],
  input  sple_t y   [N],
  input  logic  sub,
  output sple_t xo  [N],
  output sple_t yo  [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      xo[i] = x[i];
      yo[i] = sub ? sple_negate(y[i]) : y[i];
    end
  end

endmodule
