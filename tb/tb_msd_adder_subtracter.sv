// tb_msd_adder_subtracter: end-to-end test of the MSD adder/subtracter at its
// default size (3-digit operands, 4-digit result).
//  * the two worked examples: 6 + 5 = (1 1 0 -1) and 7 - 5 = (0 1 -1 0),
//    compared digit by digit;
//  * every pair of 3-digit MSD operands (27 x 27 digit patterns, i.e. every
//    representation of every value -7..7), added and subtracted; the result
//    value must equal X + Y or X - Y and every digit must be one-hot;
//  * locality: changing operand digit j never changes result digit i for
//    i < j or i > j + 2 (the sum digit depends on digits i, i-1, i-2 only).
// It counts how often each mechanism occurs and fails if one never does:
// addition, subtraction, a non-zero first-step transfer, a non-zero
// second-step transfer, a result that needs the extra top digit, and a
// negative result.  The adder is combinational: each result is sampled one
// time unit after the operands change.
module tb_msd_adder_subtracter;
  import msd_pkg::*;

  localparam int unsigned N = 3;
  sple_t x [N], y [N], z [N+1];
  logic  sub;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_t1 = 0, n_t2 = 0, n_top = 0, n_neg = 0, n_local = 0;

  msd_adder_subtracter dut (.x(x), .y(y), .sub(sub), .z(z));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int z_value();
    int v = 0;
    for (int i = 0; i <= N; i++) v += sple_value(z[i]) * (1 << i);
    return v;
  endfunction

  task automatic apply(input int dx [N], input int dy [N], input logic s);
    for (int i = 0; i < N; i++) begin
      x[i] = sple_encode(dx[i]);
      y[i] = sple_encode(dy[i]);
    end
    sub = s;
    #1;
  endtask

  // Drive one operation and check its value; count mechanisms.
  task automatic run_op(input int dx [N], input int dy [N], input logic s);
    int vx = 0, vy = 0, expv, got;
    logic legal = 1'b1;
    apply(dx, dy, s);
    for (int i = 0; i < N; i++) begin
      vx += dx[i] * (1 << i);
      vy += dy[i] * (1 << i);
    end
    expv = s ? vx - vy : vx + vy;
    got  = z_value();
    for (int i = 0; i <= N; i++) legal &= sple_legal(z[i]);
    checks++;
    if (!legal || got != expv) begin
      failures++;
      $display("FAIL %0d %s %0d: got %0d (legal=%0d)", vx, s ? "-" : "+", vy, got, legal);
    end
    if (s) n_sub++; else n_add++;
    for (int i = 0; i <= N; i++) begin
      if (dut.t[i]  != SPLE_ZERO) n_t1++;
      if (dut.t2[i] != SPLE_ZERO) n_t2++;
    end
    if (z[N] != SPLE_ZERO) n_top++;
    if (got < 0) n_neg++;
  endtask

  task automatic check_digits(input string name, input int expd [N+1]);
    for (int i = 0; i <= N; i++) begin
      checks++;
      if (!sple_legal(z[i]) || sple_value(z[i]) != expd[i]) begin
        failures++;
        $display("FAIL %s: digit %0d is %b, expected %0d", name, i, z[i], expd[i]);
      end
    end
  endtask

  initial begin
    int dx [N], dy [N], dx2 [N], code;
    sple_t zref [N+1];

    // 6 + 5: (1 1 0) + (1 0 1) = (1 1 0 -1); digit arrays are LSB first.
    run_op('{0, 1, 1}, '{1, 0, 1}, 1'b0);
    check_digits("6+5", '{-1, 0, 1, 1});
    // 7 - 5: (1 1 1) - (1 0 1) = (0 1 -1 0).
    run_op('{1, 1, 1}, '{1, 0, 1}, 1'b1);
    check_digits("7-5", '{0, -1, 1, 0});

    for (int s = 0; s < 2; s++)
      for (int px = 0; px < 27; px++)
        for (int py = 0; py < 27; py++) begin
          for (int i = 0; i < N; i++) begin
            code = px; for (int k = 0; k < i; k++) code /= 3; dx[i] = (code % 3) - 1;
            code = py; for (int k = 0; k < i; k++) code /= 3; dy[i] = (code % 3) - 1;
          end
          run_op(dx, dy, s[0]);
          // Locality: perturb digit 0 of X; digit N (= 3 > 0 + 2) must hold.
          zref = z;
          dx2 = dx;
          dx2[0] = (dx[0] == 1) ? -1 : dx[0] + 1;
          apply(dx2, dy, s[0]);
          checks++;
          n_local++;
          if (z[N] != zref[N]) begin
            failures++;
            $display("FAIL locality: top digit changed by digit 0");
          end
        end

    $display("mechanisms: add=%0d sub=%0d step1_transfer=%0d step2_transfer=%0d top_digit=%0d negative=%0d locality=%0d",
             n_add, n_sub, n_t1, n_t2, n_top, n_neg, n_local);
    if (n_add == 0 || n_sub == 0 || n_t1 == 0 || n_t2 == 0 || n_top == 0 || n_neg == 0 || n_local == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
