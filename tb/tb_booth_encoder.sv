// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder.
// For each of the eight groups {x[2i+1], x[2i], x[2i-1]} the Booth digit
// d = -2*x[2i+1] + x[2i] + x[2i-1] is computed here, and the controls are
// checked against what the digit requires: Neg = sign of the group, X1_b low
// exactly when |d| = 1, and (Z | X2_b) low exactly when |d| = 2.
module tb_booth_encoder;
  import mbe_pkg::*;

  logic        x_hi, x_mid, x_lo;
  booth_ctrl_t ctrl;
  int          checks = 0, failures = 0;

  booth_encoder dut (.x_hi(x_hi), .x_mid(x_mid), .x_lo(x_lo), .ctrl(ctrl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s group=%b%b%b ctrl=%b", what, x_hi, x_mid, x_lo, ctrl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int d, mag;
      {x_hi, x_mid, x_lo} = 3'(g);
      d   = -2 * int'(x_hi) + int'(x_mid) + int'(x_lo);
      mag = (d < 0) ? -d : d;
      #1;
      check(ctrl.neg == x_hi, "neg");
      check(ctrl.x1_b == (mag != 1), "x1_b");
      check((ctrl.z | ctrl.x2_b) == (mag != 2), "2x select");
      check(ctrl.z == (x_hi == x_mid), "z");
      check(ctrl.x2_b == (x_mid != x_lo), "x2_b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
