// tb_ma0_operand_module: exhaustive check of the operand module for 3-digit
// operands.  For every X, Y (27 x 27 digit patterns) and both modes it checks
// that X passes unchanged and that each Y digit is passed (sub = 0) or
// negated (sub = 1), as a value and as a legal one-hot code.
module tb_ma0_operand_module;
  import msd_pkg::*;

  localparam int unsigned N = 3;
  sple_t x [N], y [N], xo [N], yo [N];
  logic  sub;
  int checks = 0, failures = 0;

  ma0_operand_module dut (.x(x), .y(y), .sub(sub), .xo(xo), .yo(yo));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dx [N], dy [N], code;
    for (int s = 0; s < 2; s++)
      for (int px = 0; px < 27; px++)
        for (int py = 0; py < 27; py++) begin
          sub = s[0];
          for (int i = 0; i < N; i++) begin
            code  = px; for (int k = 0; k < i; k++) code /= 3; dx[i] = (code % 3) - 1;
            code  = py; for (int k = 0; k < i; k++) code /= 3; dy[i] = (code % 3) - 1;
            x[i] = sple_encode(dx[i]);
            y[i] = sple_encode(dy[i]);
          end
          #1;
          for (int i = 0; i < N; i++) begin
            checks++;
            if (xo[i] !== x[i] || !sple_legal(yo[i]) ||
                sple_value(yo[i]) != (s != 0 ? -dy[i] : dy[i])) begin
              failures++;
              $display("FAIL sub=%0d digit %0d: x=%0d y=%0d -> xo=%b yo=%b", s, i, dx[i], dy[i], xo[i], yo[i]);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
