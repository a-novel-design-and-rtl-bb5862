// hng_rca4: 4-bit reversible ripple-carry adder of four HNG gates.
//
// Bit i uses one HNG gate with A = a[i], B = b[i], C = carry into bit i and
// D = 0: its R output is sum bit i and its S output the carry into bit i+1.
// The P and Q outputs of every gate (copies of a[i] and b[i]) are garbage,
// eight bits in all, brought out on `garbage` as {Q3,P3,...,Q0,P0}.
// Combinational; the carry ripples through four gates. The structure is the
// published one.
module hng_rca4
  import rev_pkg::*;
(
  input  logic [3:0]              a,
  input  logic [3:0]              b,
  input  logic                    cin,
  output logic [3:0]              sum,
  output logic                    cout,
  output logic [RCA4_GARBAGE-1:0] garbage
);
  logic [4:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    hng u_hng (
      .a (a[i]), .b (b[i]), .c (c[i]), .d (1'b0),
      .p (garbage[2*i]), .q (garbage[2*i+1]), .r (sum[i]), .s (c[i+1])
    );
  end

  assign cout = c[4];
endmodule
