// bcd_digit_adder: one-digit BCD adder built only from reversible gates.
//
// Stage 1: an HNG ripple-carry adder forms the binary sum s = a + b + cin
// (0..19) with carry c4. The digit needs the +6 correction when
//     k = c4 or s3(s2 or s1),
// i.e. when the binary sum is 10 or more. Stage 2, a second HNG ripple-carry
// adder, adds {0, k, k, 0} to s[3:0], and k is the decimal carry out.
//
// Correction logic (each signal used once, as reversible logic demands):
//   HNFG  (s2, s3, 0, 0)   -> two copies of s2 and of s3
//   MAS_or(s1, s2, s3, 0, 0) -> P = s1 (goes on to stage 2), S = s1 or s2,
//                               T = s3 (a copy, E = 0 makes T = C or D)
//   TG    (s3, s1 or s2, 0)  -> R = x = s3(s1 or s2)
//   MAS_k (x, c4, 0, 0, 0)   -> S = x or c4 = k, Q = x xor c4 = k too,
//                               because x and c4 are never 1 together
//                               (c4 = 1 means s <= 19, so s3 = 0)
//   FG    (k, 0)             -> the two k bits for stage 2
// The MAS_k Q output is the decimal carry out. 13 gates in all. The first
// stage, the MAS-based correction and the second stage follow the published
// design; the way each copy is made and which gate output carries which
// signal is this design's own.
//
// Interface: a, b are BCD digits (0..9), cin the carry from the digit below.
// For other input codes the outputs are the circuit's response but not a BCD
// sum. `garbage` brings out the DIGIT_GARBAGE unused gate outputs.
// Combinational; the longest path runs through both ripple adders.
module bcd_digit_adder
  import rev_pkg::*;
(
  input  bcd_digit_t               a,
  input  bcd_digit_t               b,
  input  logic                     cin,
  output bcd_digit_t               sum,
  output logic                     cout,
  output logic [DIGIT_GARBAGE-1:0] garbage
);
  logic [3:0] s;              // stage-1 binary sum
  logic       c4;             // stage-1 carry out
  logic       s1_p;           // s1 after passing through MAS_or
  logic       s2_a, s2_b;     // copies of s2
  logic       s3_a, s3_b;     // copies of s3
  logic       s3_t;           // s3 from MAS_or T
  logic       or12;           // s1 or s2
  logic       x;              // s3 and (s1 or s2)
  logic       k_q, k_s;       // correction / decimal carry from MAS_k
  logic       k_1, k_2;       // correction bits for stage 2
  logic       cout2;          // stage-2 carry out (garbage)

  logic [RCA4_GARBAGE-1:0] g_rca1, g_rca2;
  logic [1:0]              g_or;
  logic [1:0]              g_tg;
  logic [2:0]              g_k;

  hng_rca4 u_rca1 (
    .a (a), .b (b), .cin (cin), .sum (s), .cout (c4), .garbage (g_rca1)
  );

  hnfg u_copy (
    .a (s[2]), .b (s[3]), .c (1'b0), .d (1'b0),
    .p (s2_a), .q (s2_b), .r (s3_a), .s (s3_b)
  );

  mas_gate u_mas_or (
    .a (s[1]), .b (s2_a), .c (s3_a), .d (1'b0), .e (1'b0),
    .p (s1_p), .q (g_or[0]), .r (g_or[1]), .s (or12), .t (s3_t)
  );

  tg u_tg (
    .a (s3_t), .b (or12), .c (1'b0),
    .p (g_tg[0]), .q (g_tg[1]), .r (x)
  );

  mas_gate u_mas_k (
    .a (x), .b (c4), .c (1'b0), .d (1'b0), .e (1'b0),
    .p (g_k[0]), .q (k_q), .r (g_k[1]), .s (k_s), .t (g_k[2])
  );

  fg u_fg_k (
    .a (k_s), .b (1'b0), .p (k_1), .q (k_2)
  );

  hng_rca4 u_rca2 (
    .a   ({s3_b, s2_b, s1_p, s[0]}),
    .b   ({1'b0, k_2, k_1, 1'b0}),
    .cin (1'b0),
    .sum (sum), .cout (cout2), .garbage (g_rca2)
  );

  assign cout    = k_q;
  assign garbage = {g_k, g_tg, g_or, cout2, g_rca2, g_rca1};
endmodule
