// tb_pp_row: one Booth partial-product row, N = 8, exhaustive over the
// eight multiplier groups and all 256 multiplicands. Checks that
// signed(pp) + neg_lsb equals d * y with d = -2*x_hi + x_mid + x_lo worked out
// here, and that sc is the inverted row sign.
module tb_pp_row;
  localparam int unsigned N = 8;

  logic         x_hi, x_mid, x_lo, sc, neg_lsb;
  logic [N-1:0] y;
  logic [N:0]   pp;
  int           checks = 0, failures = 0;

  pp_row #(.N(N)) dut (
    .x_hi(x_hi), .x_mid(x_mid), .x_lo(x_lo), .y(y),
    .pp(pp), .sc(sc), .neg_lsb(neg_lsb)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      for (int v = 0; v < 256; v++) begin
        int d, exp, got;
        {x_hi, x_mid, x_lo} = 3'(g);
        y = N'(v);
        d   = -2 * int'(x_hi) + int'(x_mid) + int'(x_lo);
        exp = d * int'($signed(y));
        #1;
        got = int'($signed(pp)) + int'(neg_lsb);
        checks++;
        if (got != exp) begin
          failures++;
          $display("FAIL group=%b y=%0d pp=%b neg=%b: %0d != %0d", 3'(g), $signed(y), pp, neg_lsb, got, exp);
        end
        checks++;
        if (sc !== ~pp[N]) begin
          failures++;
          $display("FAIL sc group=%b y=%0d", 3'(g), $signed(y));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
