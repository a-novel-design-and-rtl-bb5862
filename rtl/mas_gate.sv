// mas_gate: 5x5 MAS gate.
//
//   P = A
//   Q = A xor B xor C
//   R = (A xor B)C xor AB xor D
//   S = A'B' xor E'
//   T = C'D' xor E'
//
// Uses: with D = 0, Q and R are the sum and carry of A + B + C (a one-gate
// full adder). With E = 0, S = A or B and T = C or D, which the BCD adder
// uses to detect when a digit needs the +6 correction. Purely combinational.
//
// The output equations are the published ones. Written out, they map the 32
// input patterns onto 24 distinct output patterns, so the gate as specified
// is not a bijection; that does not affect any of the uses above.
module mas_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  logic axb;
  assign axb = a ^ b;
  assign p   = a;
  assign q   = axb ^ c;
  assign r   = (axb & c) ^ (a & b) ^ d;
  assign s   = (~a & ~b) ^ ~e;
  assign t   = (~c & ~d) ^ ~e;
endmodule
