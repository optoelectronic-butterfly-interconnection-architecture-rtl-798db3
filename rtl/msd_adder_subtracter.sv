// msd_adder_subtracter: fully parallel modified signed-digit adder and
// subtracter.
//
// Operands and result are MSD numbers: every digit is 1, 0 or -1, so a value
// has many representations and addition can be done without a carry chain.
// Three fixed steps, each a 3x3 truth table per digit position, turn X and Y
// into the sum Z:
//   step 1 (Ma1):  X_i + Y_i   = 2*T(i+1)  + W_i
//   step 2 (Ma2):  W_i + T_i   = 2*T'(i+1) + W'_i
//   step 3 (Ma3):  Z_i = W'_i + T'_i
// Between steps the transfer digits move up one position (the bit-level
// butterfly), so Z_i depends only on operand digits i, i-1 and i-2 and the
// logic depth does not grow with N.  Ma0 presents the operands and, for
// subtraction, complements every subtrahend digit (X - Y = X + (-Y)).
// Every digit travels in space-position-logic encoding (see msd_pkg): three
// rails of which one is lit, and every table cell is the AND of one X-side
// and one Y-side rail, formed by the nine-element detector_array.
//
// Interface: x, y: N SPLE digits, index 0 least significant; sub = 1 gives
// X - Y, 0 gives X + Y; z: N+1 result digits.  The result is exact for all
// legal inputs: |X +/- Y| < 2^(N+1).
// Timing: purely combinational, three table levels deep for any N.
// The three steps, their tables, the module partition Ma0..Ma3 and the
// complement subtraction follow the design; N = 3 is the size of its worked
// examples.  Treating the optical interconnect as wiring and the ordering of
// the result digits are this design's choices.
module msd_adder_subtracter
  import msd_pkg::*;
#(
  parameter int unsigned N = 3   // operand digits
) (
  input  sple_t x   [N],
  input  sple_t y   [N],
  input  logic  sub,
  output sple_t z   [N+1]
);

  sple_t xo [N], yo [N];          // Ma0 -> Ma1 (BN1)
  sple_t w  [N+1], t  [N+1];      // Ma1 -> Ma2 (BN2)
  sple_t w2 [N+1], t2 [N+1];      // Ma2 -> Ma3 (BN3)
  sple_t t_top;                   // transfer out of the top position, always 0

  ma0_operand_module #(.N(N)) u_ma0 (.x(x), .y(y), .sub(sub), .xo(xo), .yo(yo));
  ma1_step1          #(.N(N)) u_ma1 (.x(xo), .y(yo), .w(w), .t(t));
  ma2_step2        #(.M(N+1)) u_ma2 (.w(w), .t(t), .w2(w2), .t2(t2), .t_top(t_top));
  ma3_step3        #(.M(N+1)) u_ma3 (.w2(w2), .t2(t2), .s(z));

  // The top position enters step 2 with W = 0, so it can never send a
  // transfer out: the N+1 result digits hold the whole sum.
  logic inputs_legal;
  always_comb begin
    inputs_legal = 1'b1;
    for (int i = 0; i < N; i++)
      inputs_legal &= sple_legal(x[i]) & sple_legal(y[i]);
  end

  always_comb begin
    if (inputs_legal)
      a_no_overflow: assert (t_top == SPLE_ZERO)
        else $error("MSD result overflowed its N+1 digits");
  end

endmodule
