// tb_msd_wide: random test of a 16-digit MSD adder/subtracter.
// Operands are random MSD digit strings (every representation, not only
// binary ones), added or subtracted at random; the result value must be
// exact and every digit one-hot.  The carry-free property is checked
// directly: after changing one random operand digit j, every result digit
// i with i < j or i > j + 2 must be unchanged.
module tb_msd_wide;
  import msd_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned OPS = 20000;
  sple_t x [N], y [N], z [N+1];
  logic  sub;
  int checks = 0, failures = 0, n_sub = 0, n_add = 0;

  msd_adder_subtracter #(.N(N)) dut (.x(x), .y(y), .sub(sub), .z(z));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint z_value();
    longint v = 0;
    for (int i = 0; i <= N; i++) v += longint'(sple_value(z[i])) * (longint'(1) << i);
    return v;
  endfunction

  initial begin
    int dx [N], dy [N];
    longint vx, vy, expv, got;
    logic legal;
    sple_t zref [N+1];
    int j;
    logic on_y;
    for (int op = 0; op < OPS; op++) begin
      vx = 0; vy = 0;
      for (int i = 0; i < N; i++) begin
        dx[i] = int'($urandom_range(2)) - 1;
        dy[i] = int'($urandom_range(2)) - 1;
        x[i] = sple_encode(dx[i]);
        y[i] = sple_encode(dy[i]);
        vx += longint'(dx[i]) * (longint'(1) << i);
        vy += longint'(dy[i]) * (longint'(1) << i);
      end
      sub = 1'($urandom_range(1));
      if (sub) n_sub++; else n_add++;
      #1;
      expv = sub ? vx - vy : vx + vy;
      got = z_value();
      legal = 1'b1;
      for (int i = 0; i <= N; i++) legal &= sple_legal(z[i]);
      checks++;
      if (!legal || got != expv) begin
        failures++;
        $display("FAIL %0d %s %0d: got %0d legal=%0d", vx, sub ? "-" : "+", vy, got, legal);
      end
      // Locality of one changed digit.
      zref = z;
      j = int'($urandom_range(N - 1));
      on_y = 1'($urandom_range(1));
      if (on_y) y[j] = sple_encode(dy[j] == 1 ? -1 : dy[j] + 1);
      else      x[j] = sple_encode(dx[j] == 1 ? -1 : dx[j] + 1);
      #1;
      for (int i = 0; i <= N; i++)
        if (i < j || i > j + 2) begin
          checks++;
          if (z[i] != zref[i]) begin
            failures++;
            $display("FAIL locality: digit %0d changed after operand digit %0d", i, j);
          end
        end
    end
    if (n_add == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
