// tg: 3x3 Toffoli gate.
//
// The two control inputs pass through (P = A, Q = B); the target is inverted
// when both controls are 1: R = (A and B) xor C. With C = 0 the gate is an AND
// gate with two garbage outputs. Purely combinational. The equations are
// those of the gate as published.
module tg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
