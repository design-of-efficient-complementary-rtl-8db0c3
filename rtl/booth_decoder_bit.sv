// booth_decoder_bit: one bit of a radix-4 Booth partial product.
//
// Selects bit j of {0, +Y, -Y, +2Y, -2Y} (the negative cases in one's
// complement; the +1 that completes the two's complement is the row's separate
// negate bit). Structure, after the Yeh-Jen decoder:
//   a    = XNOR(y[j],   Neg) OR X1_b        -- path for 1*Y
//   b    = XNOR(y[j-1], Neg) OR Z OR X2_b   -- path for 2*Y
//   ppt  = NAND(a, b)
// i.e. ppt = (X1 & (y[j]^Neg)) | (2X & (y[j-1]^Neg)).
// For the group 111 (digit -0) neither path is enabled and ppt is 0.
//
// Interface: y_j, y_jm1 = multiplicand bits y[j], y[j-1]; ctrl from the
// row's booth_encoder; ppt out. Timing: combinational, three gate levels.
module booth_decoder_bit
  import mbe_pkg::*;
(
  input  logic        y_j,
  input  logic        y_jm1,
  input  booth_ctrl_t ctrl,
  output logic        ppt
);

  logic sel1_n;  // low when bit j of +-1*Y is selected and is 1
  logic sel2_n;  // low when bit j of +-2*Y is selected and is 1

  always_comb begin
    sel1_n = ~(y_j ^ ctrl.neg) | ctrl.x1_b;
    sel2_n = ~(y_jm1 ^ ctrl.neg) | ctrl.z | ctrl.x2_b;
    ppt    = ~(sel1_n & sel2_n);
  end

endmodule
