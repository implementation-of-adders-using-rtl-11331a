// rev_carry_save_adder: 4-bit reversible adder of Peres and SSS gates,
// called a carry save adder by its designers.
//
// Bit 0 is one SSS full adder (C = 0, carry in on D). Bits 1 to 3 each start
// with a Peres gate P1..P3 (C = 0) that splits the operand pair into a
// propagate bit p = a xor b (Q output) and a generate bit g = a.b (R
// output). The carries are then assembled from these:
//   P4  (A = c1, B = p1, C = 0):             Q = sum1,  R = c1.p1
//   S2  (A = g1, B = c1.p1, C = 0, D = p2):  Q = sum2,  S = c2.p2
//   S3  (A = g2, B = c2.p2, C = 0, D = p3):  Q = sum3,  S = c3.p3
//   P5  (A = c3.p3, B = g3, C = 0):          Q = carry out
// Because g and p of one bit are never both 1, g1 and c1.p1 are never both 1,
// so their XOR inside the SSS gate is the carry c2 = g1 + c1.p1; the same holds
// at every later bit, and at P5 where c4 = g3 xor c3.p3.
//
// The gate set and the signals between the gates follow the source design.
// Which of A, B and D of S2 and S3 receives which signal is this design's
// choice; the result is the same for any assignment, because an SSS gate
// with C = 0 is a symmetric full adder.
//
// Ports: a, b, cin in; sum, cout out. Purely combinational.
module rev_carry_save_adder
  import rev_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  input  logic     cin,
  output operand_t sum,
  output logic     cout
);
  logic c1;                 // carry of S1
  logic p1, p2, p3;         // propagate, Q of P1..P3
  logic g1, g2, g3;         // generate, R of P1..P3
  logic c1p1, c2p2, c3p3;   // propagated carry terms

  sss_gate    u_s1 (.a(a[0]), .b(b[0]), .c(1'b0), .d(cin), .p(), .q(sum[0]), .r(), .s(c1));

  peres_gate  u_p1 (.a(a[1]), .b(b[1]), .c(1'b0), .p(), .q(p1), .r(g1));
  peres_gate  u_p2 (.a(a[2]), .b(b[2]), .c(1'b0), .p(), .q(p2), .r(g2));
  peres_gate  u_p3 (.a(a[3]), .b(b[3]), .c(1'b0), .p(), .q(p3), .r(g3));

  peres_gate  u_p4 (.a(c1), .b(p1), .c(1'b0), .p(), .q(sum[1]), .r(c1p1));
  sss_gate    u_s2 (.a(g1), .b(c1p1), .c(1'b0), .d(p2), .p(), .q(sum[2]), .r(), .s(c2p2));
  sss_gate    u_s3 (.a(g2), .b(c2p2), .c(1'b0), .d(p3), .p(), .q(sum[3]), .r(), .s(c3p3));
  peres_gate  u_p5 (.a(c3p3), .b(g3), .c(1'b0), .p(), .q(cout), .r());
endmodule : rev_carry_save_adder
