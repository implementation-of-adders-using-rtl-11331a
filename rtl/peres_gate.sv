// peres_gate: the 3-input, 3-output reversible Peres gate,
// P = A, Q = A xor B, R = (A and B) xor C.
//
// With C tied to 0 it yields the half-adder pair at once: Q = A xor B
// (sum or propagate) and R = A and B (carry or generate). The mapping is a
// bijection on {A,B,C}. The equations are the standard Peres gate as used in
// the source design. Purely combinational, no clock, no state.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule : peres_gate
