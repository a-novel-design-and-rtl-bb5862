// mas_full_adder: a full adder built from a single MAS gate.
//
// The operand bits drive A and B, the carry in drives C, and D is tied to 0,
// so Q = a xor b xor cin is the sum and R = majority(a, b, cin) is the carry
// out. E is tied to 0 here; the gate's P, S and T outputs are brought out as
// garbage (P = a, S = a or b, T = cin). Combinational, no clock. The choice
// of constant on E is this design's own.
module mas_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [2:0] garbage
);
  mas_gate u_mas (
    .a (a), .b (b), .c (cin), .d (1'b0), .e (1'b0),
    .p (garbage[0]), .q (sum), .r (cout), .s (garbage[1]), .t (garbage[2])
  );
endmodule
