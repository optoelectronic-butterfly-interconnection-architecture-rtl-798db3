// ma3_step3: switch module Ma3, third and last step of MSD addition.
//
// For every position i the sum digit is S_i = W'_i + T'_i, limited to one
// digit:  S_i = 1 if W'_i+T'_i >= 1,  0 if == 0,  -1 if <= -1.
// (After the first two steps W'_i and T'_i are never both 1 or both -1, so
// the limit never cuts off a real value.)  W'_i arrives on the A/B/C rails
// and T'_i on the a/b/c rails of the position's detector_array, and
//   S rails a/b/c :  a = G1|G2|G4,  b = G3|G5|G7,  c = G6|G8|G9
// No transfer leaves this step: each S_i depends only on position i.
//
// Interface: w2, t2: M SPLE positions from Ma2; s: the M result digits.
// Timing: combinational.
// Equation, table and detector numbering follow the design.
module ma3_step3
  import msd_pkg::*;
#(
  parameter int unsigned M = 4   // result positions (operand digits + 1)
) (
  input  sple_t w2 [M],
  input  sple_t t2 [M],
  output sple_t s  [M]
);

  localparam logic [8:0] S_POS  = 9'b0_0000_1011;  // G1 G2 G4
  localparam logic [8:0] S_ZERO = 9'b0_0101_0100;  // G3 G5 G7
  localparam logic [8:0] S_NEG  = 9'b1_1010_0000;  // G6 G8 G9

  logic [8:0] g [M];

  for (genvar i = 0; i < M; i++) begin : g_pos
    detector_array u_det (.xr(w2[i]), .yr(t2[i]), .g(g[i]));
  end

  always_comb begin
    for (int i = 0; i < M; i++)
      s[i] = '{pos: |(g[i] & S_POS), zero: |(g[i] & S_ZERO), neg: |(g[i] & S_NEG)};
  end

endmodule
