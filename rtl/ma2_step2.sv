// ma2_step2: switch module Ma2, second step of carry-free MSD addition.
//
// For every position i, W_i + T_i = 2*T'(i+1) + W'_i with
//   W'_i    =  1 if W_i+T_i == 1,  -1 if == -1,  0 otherwise
//   T'(i+1) =  1 if W_i+T_i == 2,  -1 if == -2,  0 otherwise.
// W_i arrives on the A/B/C rails and T_i on the a/b/c rails of the position's
// detector_array; the output rails are ORs of detecting elements:
//   T' rails a/b/c :  a = G1,  b = G2..G8,  c = G9
//   W' rails A/B/C :  A = G2|G4,  B = G1|G3|G5|G7|G9,  C = G6|G8
// The bit-level butterfly moves T'(i+1) up one position, so output position
// i carries (W'_i, T'_i) for the third step; position 0 gets T'_0 = 0.
// The transfer out of the top position has nowhere to go and is brought out
// as t_top.  In the full adder the top position holds W = 0, so
// |W + T| <= 1 there and t_top is always 0.
//
// Interface: w, t: M SPLE positions from Ma1; w2, t2: M positions to Ma3;
// t_top: the transfer out of position M-1.
// Timing: combinational, depth independent of M.
// Equations, tables and detector numbering follow the design; the t_top
// port is this design's own.
module ma2_step2
  import msd_pkg::*;
#(
  parameter int unsigned M = 4   // result positions (operand digits + 1)
) (
  input  sple_t w  [M],
  input  sple_t t  [M],
  output sple_t w2 [M],
  output sple_t t2 [M],
  output sple_t t_top
);

  localparam logic [8:0] T_POS  = 9'b0_0000_0001;  // G1
  localparam logic [8:0] T_ZERO = 9'b0_1111_1110;  // G2..G8
  localparam logic [8:0] T_NEG  = 9'b1_0000_0000;  // G9
  localparam logic [8:0] W_POS  = 9'b0_0000_1010;  // G2 G4
  localparam logic [8:0] W_ZERO = 9'b1_0101_0101;  // G1 G3 G5 G7 G9
  localparam logic [8:0] W_NEG  = 9'b0_1010_0000;  // G6 G8

  logic [8:0] g [M];
  sple_t      tn [M+1];   // T' by destination position

  for (genvar i = 0; i < M; i++) begin : g_pos
    detector_array u_det (.xr(w[i]), .yr(t[i]), .g(g[i]));
  end

  always_comb begin
    tn[0] = SPLE_ZERO;
    for (int i = 0; i < M; i++) begin
      w2[i]   = '{pos: |(g[i] & W_POS), zero: |(g[i] & W_ZERO), neg: |(g[i] & W_NEG)};
      tn[i+1] = '{pos: |(g[i] & T_POS), zero: |(g[i] & T_ZERO), neg: |(g[i] & T_NEG)};
    end
    for (int i = 0; i < M; i++) t2[i] = tn[i];
    t_top = tn[M];
  end

endmodule
