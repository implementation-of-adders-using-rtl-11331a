// rev_carry_select_adder: 4-bit reversible carry select adder.
//
// Two SSS ripple carry adders (eight SSS gates) add the same operands at
// the same time, one with a carry in of 0 and one with a carry in of 1.
// Five Fredkin gates then act as 2:1 multiplexers controlled by the real
// carry in: four pick the sum bits, one picks the carry out. The select
// signal is handed from one multiplexer to the next through each Fredkin
// gate's P output (P8, P9, P10, P11), so it is never fanned out.
//
// The two adders, the five Fredkin multiplexers and the P-output chain of
// the select line follow the source design. This design multiplexes the
// sum outputs (Q) of the two adders, and puts the carry-in-1 result on the
// B input and the carry-in-0 result on the C input of every multiplexer, so
// that R = cin ? (result with carry 1) : (result with carry 0). The
// multiplexers are plain Fredkin gates.
//
// Ports: a, b, cin in; sum, cout out. Purely combinational; the delay is one
// 4-bit ripple plus the multiplexer, independent of when cin arrives
// relative to the operands.
module rev_carry_select_adder
  import rev_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  input  logic     cin,
  output operand_t sum,
  output logic     cout
);
  operand_t sum0, sum1;       // Q0..Q3 (carry in 0), Q4..Q7 (carry in 1)
  operand_t prop0, prop1;
  operand_t carry0, carry1;
  logic     cout0, cout1;     // S3, S7
  logic [ADDER_WIDTH:0] sel;  // Cin, P8, P9, P10, P11

  sss_ripple_adder #(.WIDTH(ADDER_WIDTH)) u_rca0 (
    .a     (a),
    .b     (b),
    .cin   (1'b0),
    .sum   (sum0),
    .prop  (prop0),
    .carry (carry0),
    .cout  (cout0)
  );

  sss_ripple_adder #(.WIDTH(ADDER_WIDTH)) u_rca1 (
    .a     (a),
    .b     (b),
    .cin   (1'b1),
    .sum   (sum1),
    .prop  (prop1),
    .carry (carry1),
    .cout  (cout1)
  );

  assign sel[0] = cin;

  for (genvar i = 0; i < ADDER_WIDTH; i++) begin : g_sum_mux
    fredkin_gate u_mux (
      .a (sel[i]),
      .b (sum1[i]),
      .c (sum0[i]),
      .p (sel[i+1]),
      .q (),
      .r (sum[i])
    );
  end

  fredkin_gate u_carry_mux (
    .a (sel[ADDER_WIDTH]),
    .b (cout1),
    .c (cout0),
    .p (),
    .q (),
    .r (cout)
  );
endmodule : rev_carry_select_adder
