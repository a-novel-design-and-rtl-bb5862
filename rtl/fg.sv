// fg: 2x2 Feynman gate (controlled NOT).
//
// P = A, Q = A xor B. With B tied to 0 both outputs carry A, which is how a
// reversible circuit makes a second copy of a signal (fan-out is not allowed
// in reversible logic). Purely combinational, no clock. The equations are
// those of the gate as published.
module fg (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
