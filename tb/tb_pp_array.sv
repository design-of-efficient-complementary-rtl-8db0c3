// tb_pp_array: carry-save array for N = 8 (four Booth rows) fed with random
// rows. Expected: sum_v + carry_v = sum over i of (signed(pp_i) + neg_i)*4^i
// modulo 2^16, with sc_i = ~pp_i[N] as the row generator supplies it.
// Also checks the modelled delay of the array's interconnection rule,
// mbe_pkg::array_delay(N),
// against (3N-4)/4 (in XOR delays T) and its saving of (N-4)/4 against the
// (N/2-1)*2 of a conventionally wired array.
// Also counts how often the sum and carry vectors both carry information,
// and fails if the array never produced a non-zero carry vector.
module tb_pp_array;
  localparam int unsigned N = 8;
  localparam int unsigned R = N / 2;
  localparam int unsigned W = 2 * N;

  logic [R-1:0][N:0] pp;
  logic [R-1:0]      sc, neg;
  logic [W-1:0]      sum_v, carry_v;
  int                checks = 0, failures = 0, carries = 0;

  pp_array #(.N(N)) dut (.pp(pp), .sc(sc), .neg(neg), .sum_v(sum_v), .carry_v(carry_v));

  task automatic apply();
    longint       acc;
    logic [W-1:0] exp, got;
    acc = 0;
    for (int i = 0; i < R; i++) begin
      sc[i] = ~pp[i][N];
      acc += (longint'($signed(pp[i])) + longint'(neg[i])) * (longint'(1) << (2*i));
    end
    exp = W'(acc);
    #1;
    got = sum_v + carry_v;
    checks++;
    if (carry_v != '0) carries++;
    if (got !== exp) begin
      failures++;
      $display("FAIL pp=%h neg=%b: %h != %h", pp, neg, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pp = '1; neg = '1; apply();
    pp = '0; neg = '0; apply();
    for (int i = 0; i < R; i++) pp[i] = {1'b1, N'(0)};
    neg = '0; apply();
    for (int k = 0; k < 5000; k++) begin
      for (int i = 0; i < R; i++) pp[i] = (N+1)'($urandom);
      neg = R'($urandom);
      apply();
    end
    checks++;
    if (mbe_pkg::array_delay(N) != (3*N-4)/4 || (N/2-1)*2 - mbe_pkg::array_delay(N) != (N-4)/4) begin
      failures++;
      $display("FAIL array delay %0dT, expected %0dT", mbe_pkg::array_delay(N), (3*N-4)/4);
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL carry vector never non-zero");
    end
    $display("carry vector non-zero in %0d of %0d cases", carries, checks - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
