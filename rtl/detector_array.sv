// detector_array: the unitary detecting array of one MSD digit position.
//
// Nine detecting elements G1..G9 sit where the trimmed butterfly brings one
// X-side light (rails A, B, C of the first digit) together with one Y-side
// light (rails a, b, c of the second digit).  An element responds only when
// both of its lights are on, so each is a two-input AND:
//   G(3r + c + 1) = X rail r  AND  Y rail c,   r, c in {0,1,2} = {A,B,C}/{a,b,c}
// i.e. G1 = A.a, G2 = A.b, G3 = A.c, G4 = B.a, ... G9 = C.c.  With legal
// one-hot inputs exactly one element is lit, and it names the row/column of
// whichever truth table (step 1, 2 or 3) the surrounding module implements.
// Because every truth table of the three steps has this 3x3 form, the same
// array serves all of them.
//
// Interface: xr, yr are SPLE digits; g[k-1] is element G_k.
// Timing: purely combinational.
// The element numbering and the AND function follow the design; realising
// the optical pairing as the index mapping above is this design's choice.
module detector_array
  import msd_pkg::*;
(
  input  sple_t      xr,
  input  sple_t      yr,
  output logic [8:0] g
);

  always_comb begin
    for (int unsigned r = 0; r < 3; r++)
      for (int unsigned c = 0; c < 3; c++)
        g[3*r + c] = rail(xr, r) & rail(yr, c);
  end

endmodule
