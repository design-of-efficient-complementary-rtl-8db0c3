// tb_mbe_multiplier: end-to-end test of the Booth multiplier at its default
// size (N = 8, no parameter override): all 65536 pairs of signed operands,
// each product compared with x*y computed here in 32-bit arithmetic.
// The multiplier is combinational, so every product is checked in the same
// time step its operands are applied (zero clock cycles of latency).
// It checks the modelled second-step delay of the array's wiring rule
// (mbe_pkg::array_delay), 5 XOR delays for N = 8
// against 6 for a conventionally wired array. It also counts, from the operands, how often each mechanism of the design
// was exercised, and fails if one never was:
//   the Booth digits +1, -1, +2, -2, 0 and -0 (group 111) in every row
//   (row 0, whose x[-1] is 0, only +1, -1, -2 and 0),
//   a row whose negate (row LSB) bit is set, a negative row (sign
//   correction bit 0), and a product that wraps the full 2N-bit range
//   (-2^(N-1) * -2^(N-1)).
module tb_mbe_multiplier;
  localparam int unsigned N = 8;
  localparam int unsigned R = N / 2;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;
  // seen[i][k]: row i used digit k (0:+1 1:-1 2:+2 3:-2 4:0 5:-0)
  int             seen [R][6];
  int             negate_rows = 0, negative_rows = 0, extreme = 0;

  mbe_multiplier dut (.x(x), .y(y), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i, k]) seen[i][k] = 0;
    for (int vx = 0; vx < (1 << N); vx++) begin
      for (int vy = 0; vy < (1 << N); vy++) begin
        int          exp;
        logic [N:0]  xx;
        x = N'(vx);
        y = N'(vy);
        exp = int'($signed(x)) * int'($signed(y));
        #1;
        checks++;
        if (p !== (2*N)'(exp)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d * %0d = %0d, got %0d", $signed(x), $signed(y), exp, $signed(p));
        end
        xx = {x, 1'b0};
        for (int i = 0; i < R; i++) begin
          logic [2:0] g;
          int         d;
          g = xx[2*i +: 3];
          d = -2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
          case (d)
            1:  seen[i][0]++;
            -1: seen[i][1]++;
            2:  seen[i][2]++;
            -2: seen[i][3]++;
            default: if (g == 3'b111) seen[i][5]++; else seen[i][4]++;
          endcase
          if (d < 0) negate_rows++;
          if (d * int'($signed(y)) < 0) negative_rows++;
        end
        if (x == {1'b1, (N-1)'(0)} && y == {1'b1, (N-1)'(0)}) extreme++;
      end
    end
    foreach (seen[i, k]) begin
      // Row 0 has x[-1] = 0, so it can never form +2 (011) or -0 (111).
      if (i == 0 && (k == 2 || k == 5)) continue;
      checks++;
      if (seen[i][k] == 0) begin
        failures++;
        $display("FAIL row %0d never used digit class %0d", i, k);
      end
    end
    checks++;
    if (mbe_pkg::array_delay(N) != 5) begin
      failures++;
      $display("FAIL array delay %0dT, expected 5T", mbe_pkg::array_delay(N));
    end
    checks++; if (negate_rows == 0)   begin failures++; $display("FAIL no negate bit"); end
    checks++; if (negative_rows == 0) begin failures++; $display("FAIL no negative row"); end
    checks++; if (extreme == 0)       begin failures++; $display("FAIL no full-range product"); end
    for (int i = 0; i < R; i++)
      $display("row %0d digits +1:%0d -1:%0d +2:%0d -2:%0d 0:%0d -0:%0d", i,
               seen[i][0], seen[i][1], seen[i][2], seen[i][3], seen[i][4], seen[i][5]);
    $display("negate bits %0d, negative rows %0d, full-range products %0d",
             negate_rows, negative_rows, extreme);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
