// feynman_gate: the 2-input, 2-output reversible Feynman (controlled-NOT)
// gate, P = A and Q = A xor B.
//
// Output P copies A, so it serves as a fan-out copy; output Q is an XOR of
// the two inputs and serves as a controlled inverter of B. The mapping is a
// bijection on {A,B}. The equations are the standard Feynman gate as used in
// the source design. Purely combinational, no clock, no state.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule : feynman_gate
