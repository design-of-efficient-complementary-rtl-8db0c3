// tb_booth_decoder_bit: exhaustive check of one Booth decoder bit.
// For every multiplier group (controls worked out here from the group) and
// every pair y[j], y[j-1], the expected bit of d*Y in one's complement is:
// d=0 or -0: 0; +1: y[j]; -1: ~y[j]; +2: y[j-1]; -2: ~y[j-1].
module tb_booth_decoder_bit;
  import mbe_pkg::*;

  logic        y_j, y_jm1, ppt;
  booth_ctrl_t ctrl;
  int          checks = 0, failures = 0;

  booth_decoder_bit dut (.y_j(y_j), .y_jm1(y_jm1), .ctrl(ctrl), .ppt(ppt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      for (int yy = 0; yy < 4; yy++) begin
        bit h, m, l, exp;
        int d;
        {h, m, l}    = 3'(g);
        {y_j, y_jm1} = 2'(yy);
        ctrl.neg  = h;
        ctrl.x1_b = ~(l ^ m);
        ctrl.z    = ~(h ^ m);
        ctrl.x2_b = l ^ m;
        d = -2 * int'(h) + int'(m) + int'(l);
        case (d)
          1:       exp = y_j;
          -1:      exp = ~y_j;
          2:       exp = y_jm1;
          -2:      exp = ~y_jm1;
          default: exp = 1'b0;
        endcase
        #1;
        checks++;
        if (ppt !== exp) begin
          failures++;
          $display("FAIL group=%b y_j=%b y_jm1=%b ppt=%b exp=%b", 3'(g), y_j, y_jm1, ppt, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
