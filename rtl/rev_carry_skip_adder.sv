// rev_carry_skip_adder: 4-bit reversible carry skip adder.
//
// Four SSS gates form a ripple carry adder; their R outputs are the
// propagate bits p[i] = a[i] xor b[i]. Three Fredkin gates with C = 0 act as
// AND gates in a two-level tree: F2 forms p0.p1, F1 forms p2.p3 and F3 ANDs
// the two into the block propagate P. A fourth Fredkin gate F4 is a 2:1
// multiplexer with P on its select input: when every bit propagates (P = 1)
// the carry in skips the block and becomes the carry out, otherwise the
// ripple carry of the last SSS gate is used. The skip carry is what a
// following 4-bit block would take as its carry in.
//
// Gate counts, the AND tree and the use of F4 as the skip multiplexer
// follow the source design. Which data input of F4 receives which carry is
// this design's choice, made so that the carry leaves on F4's R output
// (R = P ? cin : ripple carry). The carry in is a port here; the source
// design ties it to 0.
//
// Ports: a, b, cin in; sum, cout (skip carry) and block_prop (P) out.
// Purely combinational.
module rev_carry_skip_adder
  import rev_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  input  logic     cin,
  output operand_t sum,
  output logic     cout,
  output logic     block_prop
);
  operand_t prop;         // R0..R3
  operand_t carry;        // S0..S3
  logic     rca_cout;
  logic     r4, r5, r6;   // F2, F1, F3 AND outputs

  sss_ripple_adder #(.WIDTH(ADDER_WIDTH)) u_rca (
    .a     (a),
    .b     (b),
    .cin   (cin),
    .sum   (sum),
    .prop  (prop),
    .carry (carry),
    .cout  (rca_cout)
  );

  // F2: R4 = R0 . R1
  fredkin_gate u_f2 (.a(prop[0]), .b(prop[1]), .c(1'b0), .p(), .q(), .r(r4));
  // F1: R5 = R2 . R3
  fredkin_gate u_f1 (.a(prop[2]), .b(prop[3]), .c(1'b0), .p(), .q(), .r(r5));
  // F3: R6 = R5 . R4, the block propagate
  fredkin_gate u_f3 (.a(r5), .b(r4), .c(1'b0), .p(), .q(), .r(r6));
  // F4: skip multiplexer, R7 = R6 ? cin : S3
  fredkin_gate u_f4 (.a(r6), .b(cin), .c(rca_cout), .p(), .q(), .r(cout));

  assign block_prop = r6;
endmodule : rev_carry_skip_adder
