// tb_ma3_step3: exhaustive check of the third MSD step over 4 positions.
// Every position gets every (W', T') digit pair (9^4 patterns) and the sum
// digit must be W'+T' limited to the range -1..1, with a legal one-hot code.
module tb_ma3_step3;
  import msd_pkg::*;

  localparam int unsigned M = 4;
  sple_t w2 [M], t2 [M], s [M];
  int checks = 0, failures = 0;

  ma3_step3 dut (.w2(w2), .t2(t2), .s(s));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dw [M], dt [M], code, sum, es;
    for (int p = 0; p < 6561; p++) begin
      for (int i = 0; i < M; i++) begin
        code = p; for (int k = 0; k < 2 * i; k++) code /= 3;
        dw[i] = (code % 3) - 1;
        dt[i] = ((code / 3) % 3) - 1;
        w2[i] = sple_encode(dw[i]);
        t2[i] = sple_encode(dt[i]);
      end
      #1;
      for (int i = 0; i < M; i++) begin
        sum = dw[i] + dt[i];
        es  = (sum >= 1) ? 1 : (sum <= -1) ? -1 : 0;
        checks++;
        if (!sple_legal(s[i]) || sple_value(s[i]) != es) begin
          failures++;
          $display("FAIL pos %0d W'=%0d T'=%0d: S=%b expected %0d", i, dw[i], dt[i], s[i], es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
