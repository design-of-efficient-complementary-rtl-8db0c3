// mbe_multiplier: signed N x N radix-4 modified Booth (MBE) array multiplier.
//
// p = x * y in two's complement, p being 2N bits wide. The multiplier x is
// Booth-recoded into R = N/2 digits in {-2,-1,0,+1,+2}, halving the number of
// partial-product rows against a plain array. Three stages, all
// combinational:
//   1. Partial-product generator: R pp_row instances (Booth encoder plus one
//      decoder bit per column), each giving an (N+1)-bit row, its
//      sign-correction bit and its negate bit.
//   2. Partial-product array (pp_array): R-1 levels of full adders in a
//      regular linear array, in which every other level takes the late
//      partial sum on a full adder's fast carry-in pin.
//   3. Final adder: a 2N-bit ripple-carry adder of the array's sum and carry.
// The three-stage structure, the Booth encoder/decoder, the sign correction
// and the negate bit follow the proposed design; the 8-bit default is its
// implemented size. No register, reset or clock: the design is not
// pipelined, and the caller registers x, y and p as it needs.
//
// Interface: x [N-1:0] multiplier, y [N-1:0] multiplicand (both signed);
// p [2N-1:0] product. N must be even and at least 4.
module mbe_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned R = N / 2;

  logic [R-1:0][N:0] pp;
  logic [R-1:0]      sc;
  logic [R-1:0]      neg;
  logic [N:0]        xx;   // xx[k+1] = x[k], xx[0] = x[-1] = 0

  assign xx = {x, 1'b0};

  for (genvar i = 0; i < R; i++) begin : g_row
    pp_row #(.N(N)) u_row (
      .x_hi   (xx[2*i+2]),
      .x_mid  (xx[2*i+1]),
      .x_lo   (xx[2*i]),
      .y      (y),
      .pp     (pp[i]),
      .sc     (sc[i]),
      .neg_lsb(neg[i])
    );
  end

  logic [2*N-1:0] sum_v, carry_v;
  logic           co_unused;

  pp_array #(.N(N)) u_array (
    .pp     (pp),
    .sc     (sc),
    .neg    (neg),
    .sum_v  (sum_v),
    .carry_v(carry_v)
  );

  ripple_carry_adder #(.WIDTH(2*N)) u_rca (
    .a (sum_v),
    .b (carry_v),
    .ci(1'b0),
    .s (p),
    .co(co_unused)
  );

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("mbe_multiplier: N must be even and at least 4");
  end

endmodule
