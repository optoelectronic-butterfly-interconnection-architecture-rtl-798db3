// ma1_step1: switch module Ma1, first step of carry-free MSD addition.
//
// For every digit i, X_i + Y_i = 2*T(i+1) + W_i with
//   T(i+1) =  1 if X_i+Y_i >= 1,  0 if = 0,  -1 if <= -1
//   W_i    = -1 if X_i+Y_i == 1,  1 if = -1,  0 otherwise.
// Each digit owns a detector_array; the element that lights selects one cell
// of the 3x3 truth table, and each output rail is the OR of the elements
// whose cell holds that value (a detecting element driving its LEDs):
//   T rails a/b/c :  a = G1|G2|G4,  b = G3|G5|G7,  c = G6|G8|G9
//   W rails A/B/C :  A = G6|G8,     B = G1|G3|G5|G7|G9,  C = G2|G4
// The bit-level butterfly then moves T(i+1) up one position, so output
// position i carries the pair (W_i, T_i) that the second step adds.
// Position 0 receives no transfer (T_0 = 0) and position N has no weight
// digit (W_N = 0), so both outputs are N+1 positions wide.
//
// Interface: x, y: N SPLE digits from Ma0; w, t: N+1 SPLE digits to Ma2,
// w on the A/B/C side, t on the a/b/c side.
// Timing: combinational, depth independent of N.
// Equations, tables and detector numbering follow the design; the mask
// representation of the tables is this design's own.
module ma1_step1
  import msd_pkg::*;
#(
  parameter int unsigned N = 3   // operand digits
) (
  input  sple_t x [N],
  input  sple_t y [N],
  output sple_t w [N+1],
  output sple_t t [N+1]
);

  // Truth tables as detector masks: bit k-1 set = element G_k drives the rail.
  localparam logic [8:0] T_POS  = 9'b0_0000_1011;  // G1 G2 G4
  localparam logic [8:0] T_ZERO = 9'b0_0101_0100;  // G3 G5 G7
  localparam logic [8:0] T_NEG  = 9'b1_1010_0000;  // G6 G8 G9
  localparam logic [8:0] W_POS  = 9'b0_1010_0000;  // G6 G8
  localparam logic [8:0] W_ZERO = 9'b1_0101_0101;  // G1 G3 G5 G7 G9
  localparam logic [8:0] W_NEG  = 9'b0_0000_1010;  // G2 G4

  logic [8:0] g [N];

  for (genvar i = 0; i < N; i++) begin : g_digit
    detector_array u_det (.xr(x[i]), .yr(y[i]), .g(g[i]));
  end

  always_comb begin
    t[0] = SPLE_ZERO;
    w[N] = SPLE_ZERO;
    for (int i = 0; i < N; i++) begin
      w[i]   = '{pos: |(g[i] & W_POS), zero: |(g[i] & W_ZERO), neg: |(g[i] & W_NEG)};
      t[i+1] = '{pos: |(g[i] & T_POS), zero: |(g[i] & T_ZERO), neg: |(g[i] & T_NEG)};
    end
  end

endmodule
