// hnfg: 4x4 HNFG reversible gate, two Feynman gates side by side.
//
// P = A, Q = A xor C, R = B, S = B xor D. With C = D = 0 it copies A and B
// once each, which is its use in the BCD adder. Purely combinational. The
// equations are those of the gate as published.
module hnfg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ c;
  assign r = b;
  assign s = b ^ d;
endmodule
