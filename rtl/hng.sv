// hng: 4x4 HNG reversible gate.
//
// P = A, Q = B, R = A xor B xor C, S = (A xor B)C xor AB xor D.
// With D = 0 the gate is a full adder: A and B are the operand bits, C the
// carry in, R the sum and S the carry out; P and Q are garbage. Purely
// combinational. The equations are those of the gate as published.
module hng (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;
  assign axb = a ^ b;
  assign p   = a;
  assign q   = b;
  assign r   = axb ^ c;
  assign s   = (axb & c) ^ (a & b) ^ d;
endmodule
