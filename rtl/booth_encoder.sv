// booth_encoder: radix-4 modified Booth encoder for one multiplier group.
//
// The multiplier X is scanned in overlapping groups {x[2i+1], x[2i], x[2i-1]}
// (x[-1] = 0), each standing for one digit of {-2,-1,0,+1,+2}. Following the
// Yeh-Jen (Wen-Chang) encoder the group is turned into four lines:
//   Neg  = x[2i+1]                    (wire)
//   X1_b = XNOR(x[2i-1], x[2i])       (low  -> select 1*Y)
//   Z    = XNOR(x[2i+1], x[2i])       (high -> 2*Y not possible)
//   X2_b = XOR (x[2i-1], x[2i])       (high -> 2*Y not possible)
// so that 2*Y is selected exactly when Z and X2_b are both low.
// The gate types are the ones of the published encoder; the packing into
// mbe_pkg::booth_ctrl_t is this design's choice.
//
// Interface: x_hi = x[2i+1], x_mid = x[2i], x_lo = x[2i-1]; ctrl out.
// Timing: purely combinational, one XOR/XNOR level.
module booth_encoder
  import mbe_pkg::*;
(
  input  logic        x_hi,
  input  logic        x_mid,
  input  logic        x_lo,
  output booth_ctrl_t ctrl
);

  always_comb begin
    ctrl.neg  = x_hi;
    ctrl.x1_b = ~(x_lo ^ x_mid);
    ctrl.z    = ~(x_hi ^ x_mid);
    ctrl.x2_b = x_lo ^ x_mid;
  end

endmodule
