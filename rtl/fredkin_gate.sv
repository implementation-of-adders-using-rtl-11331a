// fredkin_gate: the 3-input, 3-output reversible Fredkin (controlled swap)
// gate, P = A, Q = A'.B xor A.C, R = A'.C xor A.B.
//
// A is the control: with A = 0 the data inputs pass straight through
// (Q = B, R = C), with A = 1 they are swapped (Q = C, R = B). It is used as a
// 2:1 multiplexer with A as the select line, and with C tied to 0 as an AND
// gate, R = A.B. The control is passed on unchanged at P, so a chain of
// multiplexers can share one select signal without fan-out. The equations
// are the standard Fredkin gate as used in the source design. Purely
// combinational, no clock, no state.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule : fredkin_gate
