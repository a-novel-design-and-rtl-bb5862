// rev_pkg: types and constants shared by the reversible BCD adder.
//
// A BCD digit is a 4-bit code 0..9. Each gate-level block brings out its
// garbage outputs (gate outputs that feed nothing) on a port of its own, so
// that the garbage count of the circuit can be read off the port widths;
// the widths are collected here. The counts follow from the gate netlists in
// hng_rca4 and bcd_digit_adder.
package rev_pkg;

  typedef logic [3:0] bcd_digit_t;

  // Two garbage outputs (P and Q) per HNG gate, four HNG gates.
  localparam int unsigned RCA4_GARBAGE  = 8;

  // One BCD digit: two 4-bit adders (8 + 8), the carry-out of the second
  // adder (1), MAS gate of the OR stage (2), Toffoli gate (2), MAS gate of
  // the carry stage (3).
  localparam int unsigned DIGIT_GARBAGE = 2 * RCA4_GARBAGE + 1 + 2 + 2 + 3;

endpackage
