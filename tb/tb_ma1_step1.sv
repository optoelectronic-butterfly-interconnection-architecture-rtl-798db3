// tb_ma1_step1: exhaustive check of the first MSD step for 3-digit operands.
// For all 729 operand pairs it computes the expected weight and transfer of
// every digit arithmetically (T = sign of X_i+Y_i, W = X_i+Y_i - 2T), checks
// each output digit and its one-hot code, checks that the transfer lands one
// position up (T_0 = 0, W_N = 0) and that sum(2^i (W_i + T_i)) equals X + Y.
module tb_ma1_step1;
  import msd_pkg::*;

  localparam int unsigned N = 3;
  sple_t x [N], y [N], w [N+1], t [N+1];
  int checks = 0, failures = 0;

  ma1_step1 dut (.x(x), .y(y), .w(w), .t(t));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dx [N], dy [N], code, s, et, ew, vx, vy, vout;
    for (int px = 0; px < 27; px++)
      for (int py = 0; py < 27; py++) begin
        vx = 0; vy = 0;
        for (int i = 0; i < N; i++) begin
          code = px; for (int k = 0; k < i; k++) code /= 3; dx[i] = (code % 3) - 1;
          code = py; for (int k = 0; k < i; k++) code /= 3; dy[i] = (code % 3) - 1;
          x[i] = sple_encode(dx[i]);
          y[i] = sple_encode(dy[i]);
          vx += dx[i] * (1 << i);
          vy += dy[i] * (1 << i);
        end
        #1;
        for (int i = 0; i < N; i++) begin
          s  = dx[i] + dy[i];
          et = (s >= 1) ? 1 : (s <= -1) ? -1 : 0;
          ew = s - 2 * et;
          checks++;
          if (!sple_legal(w[i]) || !sple_legal(t[i+1]) ||
              sple_value(w[i]) != ew || sple_value(t[i+1]) != et) begin
            failures++;
            $display("FAIL digit %0d x=%0d y=%0d: W=%b T=%b expected %0d %0d", i, dx[i], dy[i], w[i], t[i+1], ew, et);
          end
        end
        checks++;
        if (t[0] !== SPLE_ZERO || w[N] !== SPLE_ZERO) begin
          failures++;
          $display("FAIL end positions T0=%b WN=%b", t[0], w[N]);
        end
        vout = 0;
        for (int i = 0; i <= N; i++) vout += (sple_value(w[i]) + sple_value(t[i])) * (1 << i);
        checks++;
        if (vout != vx + vy) begin
          failures++;
          $display("FAIL value %0d + %0d gives %0d", vx, vy, vout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
