// bcd_2digit_reversible_adder: two-digit (packed BCD, 00..99) adder built
// from reversible gates, the top of the design.
//
// Each digit is a bcd_digit_adder (binary HNG ripple add, MAS/Toffoli
// correction detect, add 6). The digits are chained by their decimal carry:
// the low digit's correction signal k0, which is 1 exactly when the low digit
// sum is 10 or more, is the carry into the high digit's first adder.
// cout_2digit is the high digit's decimal carry, so
//     {cout_2digit, bcd_2digit_sum} = bcd_2digit_a + bcd_2digit_b + cin_2digit
// in decimal (largest result 199). The digit count is a parameter; its default
// is the two digits of the published design. Port names are those of the
// published simulation.
//
// The published schematic computes both digits' corrections side by side
// from the binary carry of the low digit; this design instead passes the
// decimal carry from digit to digit, because the side-by-side form gives a
// wrong high digit whenever the high binary sum is 9 and the low digit
// generates its carry only in its second stage (for example 45 + 55).
//
// Combinational, no clock: the critical path runs through both ripple adders
// of every digit. `garbage` brings out every unused gate output, DIGIT_GARBAGE
// per digit, low digit in the low bits.
//
// Beside the adder, and not connected to it, the top also holds the one-gate
// MAS full adder (mas_full_adder) with its own fa_* ports, so that the second
// circuit built from the MAS gate can be used from the same top.
module bcd_2digit_reversible_adder
  import rev_pkg::*;
#(
  parameter int unsigned DIGITS = 2
) (
  input  logic [4*DIGITS-1:0]             bcd_2digit_a,
  input  logic [4*DIGITS-1:0]             bcd_2digit_b,
  input  logic                            cin_2digit,
  output logic [4*DIGITS-1:0]             bcd_2digit_sum,
  output logic                            cout_2digit,
  output logic [DIGITS*DIGIT_GARBAGE-1:0] garbage,
  // Stand-alone one-gate MAS full adder.
  input  logic                            fa_a,
  input  logic                            fa_b,
  input  logic                            fa_cin,
  output logic                            fa_sum,
  output logic                            fa_cout,
  output logic [2:0]                      fa_garbage
);
  logic [DIGITS:0] c;   // decimal carries between digits
  assign c[0] = cin_2digit;

  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    bcd_digit_adder u_digit (
      .a       (bcd_2digit_a[4*d +: 4]),
      .b       (bcd_2digit_b[4*d +: 4]),
      .cin     (c[d]),
      .sum     (bcd_2digit_sum[4*d +: 4]),
      .cout    (c[d+1]),
      .garbage (garbage[DIGIT_GARBAGE*d +: DIGIT_GARBAGE])
    );
  end

  assign cout_2digit = c[DIGITS];

  mas_full_adder u_mas_fa (
    .a (fa_a), .b (fa_b), .cin (fa_cin),
    .sum (fa_sum), .cout (fa_cout), .garbage (fa_garbage)
  );
endmodule
