// tb_ma2_step2: exhaustive check of the second MSD step over 4 positions.
// Every position gets every (W, T) digit pair (9^4 patterns).  Expected
// digits come from W+T = 2T' + W' (T' = +-1 only for a sum of +-2); the test
// checks W'_i, the shifted T'_(i+1) (T'_0 = 0, top transfer on t_top) and
// that the represented value is unchanged.
module tb_ma2_step2;
  import msd_pkg::*;

  localparam int unsigned M = 4;
  sple_t w [M], t [M], w2 [M], t2 [M], t_top;
  int checks = 0, failures = 0;

  ma2_step2 dut (.w(w), .t(t), .w2(w2), .t2(t2), .t_top(t_top));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dw [M], dt [M], code, s, etn [M+1], ewn, vin, vout;
    for (int p = 0; p < 6561; p++) begin
      vin = 0;
      for (int i = 0; i < M; i++) begin
        code = p; for (int k = 0; k < 2 * i; k++) code /= 3;
        dw[i] = (code % 3) - 1;
        dt[i] = ((code / 3) % 3) - 1;
        w[i] = sple_encode(dw[i]);
        t[i] = sple_encode(dt[i]);
        vin += (dw[i] + dt[i]) * (1 << i);
      end
      #1;
      etn[0] = 0;
      for (int i = 0; i < M; i++) begin
        s = dw[i] + dt[i];
        etn[i+1] = (s == 2) ? 1 : (s == -2) ? -1 : 0;
        ewn = s - 2 * etn[i+1];
        checks++;
        if (!sple_legal(w2[i]) || sple_value(w2[i]) != ewn) begin
          failures++;
          $display("FAIL pos %0d W=%0d T=%0d: W'=%b expected %0d", i, dw[i], dt[i], w2[i], ewn);
        end
      end
      for (int i = 0; i < M; i++) begin
        checks++;
        if (!sple_legal(t2[i]) || sple_value(t2[i]) != etn[i]) begin
          failures++;
          $display("FAIL pos %0d: T'=%b expected %0d", i, t2[i], etn[i]);
        end
      end
      checks++;
      if (!sple_legal(t_top) || sple_value(t_top) != etn[M]) begin
        failures++;
        $display("FAIL t_top=%b expected %0d", t_top, etn[M]);
      end
      vout = sple_value(t_top) * (1 << M);
      for (int i = 0; i < M; i++) vout += (sple_value(w2[i]) + sple_value(t2[i])) * (1 << i);
      checks++;
      if (vout != vin) begin
        failures++;
        $display("FAIL value %0d became %0d", vin, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
