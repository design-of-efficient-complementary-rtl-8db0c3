// full_adder: 1-bit full adder cell of the partial-product array and of the
// final carry-propagate adder.
//
// Written in the XOR-then-multiplexer form of small pass-transistor adders:
//   h    = a ^ b
//   sum  = h ? ~cin : cin
//   cout = h ? cin  : a
// This form gives the delay model the array is optimised for: a or b reach
// sum through two XOR-like stages (2T) while cin reaches it through one (T),
// so cin is the "fast" pin. Only the logic function is modelled here; the
// transistor-level complementary pass-transistor circuit, including its
// level-restoring output inverters, is not. The mux decomposition is this
// design's own choice.
//
// Interface: a, b, cin in; sum, cout out. Timing: combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic h;

  always_comb begin
    h    = a ^ b;
    sum  = h ? ~cin : cin;
    cout = h ? cin : a;
  end

endmodule
