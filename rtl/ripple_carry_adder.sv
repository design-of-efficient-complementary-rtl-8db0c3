// ripple_carry_adder: WIDTH-bit carry-propagate adder built from a chain of
// full_adder cells; it adds the final sum and carry vectors that leave the
// partial-product array.
//
// Bit i takes a[i], b[i] and the carry of bit i-1 (ci for bit 0); the carry
// of the top bit is co. The multiplier only keeps the low WIDTH bits (the
// product is taken modulo 2^WIDTH), so co is left for the user.
//
// Interface: a, b [WIDTH-1:0], ci in; s [WIDTH-1:0], co out.
// Timing: combinational, WIDTH carry stages.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  logic [WIDTH:0] c;

  assign c[0] = ci;
  assign co   = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

endmodule
