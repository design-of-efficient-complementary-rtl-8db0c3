// pp_row: one partial-product row of the radix-4 modified Booth multiplier.
//
// A booth_encoder turns the multiplier group {x[2i+1], x[2i], x[2i-1]} into
// the controls Neg, X1_b, Z, X2_b, and N+1 booth_decoder_bit cells pick bit j
// of d*Y (d in {-2,-1,0,+1,+2}, negative values in one's complement) from
// y[j] and y[j-1], with y[-1] = 0 and y[N] = y[N-1] (sign extension of the
// multiplicand, needed because 2*Y is one bit wider than Y).
// Two extra outputs complete the row:
//   neg_lsb - the "row LSB term": +1 at the row's least significant column
//             that turns the one's complement into the two's complement.
//             It is Neg gated off for the group 111: that group is the
//             digit -0, its decoded bits are all zero, and adding Neg there
//             would be wrong. The gating is this design's reading.
//   sc      - the sign-correction bit ~pp[N], which the array places at the
//             top of the row instead of a run of sign-extension bits.
// The value of the row is  signed(pp) + neg_lsb = d * signed(y).
//
// Interface: x_hi, x_mid, x_lo, y [N-1:0] in; pp [N:0], sc, neg_lsb out.
// Timing: combinational (encoder, then decoder).
module pp_row
  import mbe_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         x_hi,
  input  logic         x_mid,
  input  logic         x_lo,
  input  logic [N-1:0] y,
  output logic [N:0]   pp,
  output logic         sc,
  output logic         neg_lsb
);

  booth_ctrl_t ctrl;
  logic [N+1:0] yx;  // yx[j+1] = y[j]; yx[0] = y[-1] = 0; yx[N+1] = y[N] = y[N-1]

  assign yx = {y[N-1], y, 1'b0};

  booth_encoder u_enc (
    .x_hi (x_hi),
    .x_mid(x_mid),
    .x_lo (x_lo),
    .ctrl (ctrl)
  );

  for (genvar j = 0; j <= N; j++) begin : g_bit
    booth_decoder_bit u_dec (
      .y_j  (yx[j+1]),
      .y_jm1(yx[j]),
      .ctrl (ctrl),
      .ppt  (pp[j])
    );
  end

  assign sc      = ~pp[N];
  assign neg_lsb = ctrl.neg & ~(x_mid & x_lo);

endmodule
