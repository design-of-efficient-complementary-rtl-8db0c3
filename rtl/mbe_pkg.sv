// mbe_pkg: types shared by the radix-4 modified Booth (MBE) multiplier.
//
// booth_ctrl_t bundles the four control lines that the Booth encoder of one
// multiplier group drives into every decoder bit of its partial-product row.
// The three active-low/level lines (x1_b, z, x2_b) and neg follow the encoder
// scheme of Yeh and Jen that the multiplier is built on; the field order is
// this design's own choice.
//
// sum_on_cin() and array_delay() describe the interconnection of the
// full-adder array (see pp_array): which levels take the partial sum from
// the level above on the fast cin pin, and the delay of the array in XOR
// delays T that this wiring gives under the model "a or b to sum = 2T,
// cin to sum = T". pp_array wires its cells with sum_on_cin(), so
// array_delay() counts the wiring actually built.
package mbe_pkg;

  typedef struct packed {
    logic neg;   // Neg  = x[2i+1]: row is negative (invert the multiplicand bits)
    logic x1_b;  // X1_b = ~(x[2i] ^ x[2i-1]): low when the row selects 1*Y
    logic z;     // Z    = ~(x[2i+1] ^ x[2i]): high when the row cannot select 2*Y
    logic x2_b;  // X2_b = x[2i] ^ x[2i-1]: high when the row cannot select 2*Y
  } booth_ctrl_t;

  // Level k (k >= 2) of the full-adder array takes the partial sum from the
  // level above on the cin pin; level 1 and odd levels take it on a.
  function automatic bit sum_on_cin(input int unsigned k);
    return (k >= 2) && (k % 2 == 0);
  endfunction

  // Modelled delay, in T, of the array of an n-bit multiplier (n/2-1
  // levels): 2T for a level whose partial sum enters a or b, T for a cin
  // level. Equals (3n-4)/4 for even n >= 4.
  function automatic int unsigned array_delay(input int unsigned n);
    int unsigned t = 0;
    for (int unsigned k = 1; k < n / 2; k++) t += sum_on_cin(k) ? 1 : 2;
    return t;
  endfunction

endpackage
