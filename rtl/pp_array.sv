// pp_array: linear carry-save full-adder array of the Booth multiplier.
//
// Inputs are the R = N/2 Booth rows (row i weighted by 4^i), their
// sign-correction bits and their negate (row LSB) bits. The rows are laid
// into 2N-bit vectors with the usual sign-extension-free layout:
//   row 0    : pp0[N:0] at columns 0..N, then s0 at N+1 and ~s0 at N+2
//   row i>0  : pp_i[N-1:0] at columns 2i..2i+N-1, ~s_i at 2i+N, 1 at 2i+N+1
// (s_i = pp_i[N]); all negate bits form one more vector, neg_i at column 2i.
// These R+1 vectors are reduced to two by R-1 levels of full adders (3:2
// counters), one level per Booth row after the first two, as in a classic
// array multiplier: level 1 adds rows 0 and 1 and the negate vector, level k
// adds row k to the sum and carry of level k-1.
//
// Interconnection for delay: with the delay model this array is built for,
// a full adder's path from a or b to sum costs 2T and from cin to sum T
// (T = one XOR delay). In a conventional array the partial sum from the
// level above enters a or b at every level, (N/2-1)*2T in all. Here the
// levels alternate: at every even level (2, 4, ...) the partial sum from
// above enters the fast cin pin and the Booth row and the carries take a
// and b; odd levels keep the conventional pinning (partial sum on a, row on
// b, carries on cin). Counting T per cin level and 2T per a/b level gives
// (3N-4)/4 * T, a saving of (N-4)/4 * T, e.g. 5T against 6T for N = 8 and
// 23T against 30T for N = 32. The pinning changes no logic. The level rule
// is mbe_pkg::sum_on_cin(), and mbe_pkg::array_delay(N) counts the delay of
// this wiring under the model; it is a count, not a timing analysis.
// Carries out of column 2N-1 are dropped (product mod 2^2N). The vector
// layout and the use of a full 2N-bit width per level are this design's
// own; constant inputs of the unused cells fold away in synthesis.
//
// Interface: pp [R-1:0][N:0], sc [R-1:0], neg [R-1:0] in;
// sum_v, carry_v [2N-1:0] out with sum_v + carry_v = sum of the rows.
// Timing: combinational, R-1 full-adder levels.
module pp_array
  import mbe_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N/2-1:0][N:0] pp,
  input  logic [N/2-1:0]      sc,
  input  logic [N/2-1:0]      neg,
  output logic [2*N-1:0]      sum_v,
  output logic [2*N-1:0]      carry_v
);

  localparam int unsigned R = N / 2;
  localparam int unsigned W = 2 * N;

  // Bit matrix: one W-bit vector per Booth row, plus the negate vector.
  logic [R-1:0][W-1:0] rv;
  logic [W-1:0]        negv;

  always_comb begin
    rv   = '0;
    negv = '0;
    rv[0][N:0] = pp[0];
    rv[0][N+1] = pp[0][N];
    rv[0][N+2] = sc[0];
    for (int unsigned i = 1; i < R; i++) begin
      for (int unsigned j = 0; j < N; j++) rv[i][2*i+j] = pp[i][j];
      rv[i][2*i+N] = sc[i];
      if (2*i+N+1 < W) rv[i][2*i+N+1] = 1'b1;
    end
    for (int unsigned i = 0; i < R; i++) negv[2*i] = neg[i];
  end

  // Level outputs: s[k] and c[k] (carry already moved one column up).
  logic [R-1:0][W-1:0] s;
  logic [R-1:0][W:0]   co;
  logic [R-1:0][W-1:0] c;

  for (genvar k = 1; k < R; k++) begin : g_lvl
    for (genvar b = 0; b < W; b++) begin : g_col
      if (k == 1) begin : g_first
        full_adder u_fa (
          .a   (rv[0][b]),
          .b   (rv[1][b]),
          .cin (negv[b]),
          .sum (s[k][b]),
          .cout(co[k][b+1])
        );
      end else if (sum_on_cin(k)) begin : g_fast
        full_adder u_fa (
          .a   (rv[k][b]),
          .b   (c[k-1][b]),
          .cin (s[k-1][b]),
          .sum (s[k][b]),
          .cout(co[k][b+1])
        );
      end else begin : g_plain
        full_adder u_fa (
          .a   (s[k-1][b]),
          .b   (rv[k][b]),
          .cin (c[k-1][b]),
          .sum (s[k][b]),
          .cout(co[k][b+1])
        );
      end
    end
    assign co[k][0] = 1'b0;
    assign c[k]     = co[k][W-1:0];
  end

  // Level 0 does not exist; give its slots a defined value.
  assign s[0]  = '0;
  assign c[0]  = '0;
  assign co[0] = '0;

  assign sum_v   = s[R-1];
  assign carry_v = c[R-1];

endmodule
