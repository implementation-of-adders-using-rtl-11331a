// sss_gate: the 4-input, 4-output reversible SSS gate,
// P = A, Q = A xor B xor D, R = A xor B, S = (A xor B).D xor (A.B xor C).
//
// With C tied to 0 the gate is a complete full adder: operands on A and B,
// carry in on D, sum on Q and carry out on S. R then gives the propagate
// signal A xor B, which the carry skip adder uses. Each output is the XOR of
// one fresh term with a function of the inputs before it, so the mapping is
// a bijection on {A,B,C,D}. The equations, and the full-adder use with C = 0,
// are those of the source design. Purely combinational, no clock, no state.
module sss_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic prop;

  assign prop = a ^ b;
  assign p    = a;
  assign q    = prop ^ d;
  assign r    = prop;
  assign s    = (prop & d) ^ ((a & b) ^ c);
endmodule : sss_gate
