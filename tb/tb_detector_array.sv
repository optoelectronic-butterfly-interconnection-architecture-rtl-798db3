// tb_detector_array: exhaustive check of the nine-element detecting array.
// Drives all 64 combinations of the six rails (legal one-hot digits and
// illegal ones alike) and compares every element with an explicit list:
// G1 = A.a, G2 = A.b, G3 = A.c, G4 = B.a, ... G9 = C.c.  For the nine legal
// digit pairs it also checks that exactly one element lights.
module tb_detector_array;
  import msd_pkg::*;

  sple_t      xr, yr;
  logic [8:0] g;
  int checks = 0, failures = 0;

  detector_array dut (.xr(xr), .yr(yr), .g(g));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic A, B, C, a, b, c;
    logic [8:0] exp_g;
    for (int v = 0; v < 64; v++) begin
      {A, B, C, a, b, c} = 6'(v);
      xr = '{pos: A, zero: B, neg: C};
      yr = '{pos: a, zero: b, neg: c};
      #1;
      exp_g = {C & c, C & b, C & a, B & c, B & b, B & a, A & c, A & b, A & a};
      checks++;
      if (g !== exp_g) begin
        failures++;
        $display("FAIL rails ABC=%b%b%b abc=%b%b%b: g=%b expected %b", A, B, C, a, b, c, g, exp_g);
      end
      if (sple_legal(xr) && sple_legal(yr)) begin
        checks++;
        if ($countones(g) != 1) begin
          failures++;
          $display("FAIL legal digits light %0d elements", $countones(g));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
