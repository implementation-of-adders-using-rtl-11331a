// rev_add_sub: WIDTH-bit reversible adder/subtractor (default 4 bits).
//
// One Feynman gate per bit has the mode line F on its A input and operand
// bit b[i] on its B input, so its Q output is b[i] xor F: b passes unchanged
// when F = 0 and is inverted when F = 1. The inverted or plain operand
// enters an SSS ripple adder together with a. The carry into bit 0 is F
// itself, so F = 1 adds the ones' complement of b plus one and computes
// a - b in two's complement; F = 0 computes a + b.
//
// The Feynman-gate front end, the SSS ripple adder and taking the carry in
// from F follow the source design. The P outputs of the Feynman gates (copies
// of F) and of the SSS gates, and the SSS R outputs, are garbage and are not
// brought out.
//
// Ports: a, b operands; f mode (0 add, 1 subtract); result (sum or
// difference); cout the final carry (for subtraction, 1 means no borrow,
// a >= b unsigned). Purely combinational.
module rev_add_sub #(
  parameter int unsigned WIDTH = rev_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             f,
  output logic [WIDTH-1:0] result,
  output logic             cout
);
  logic [WIDTH-1:0] b_mod;   // H outputs of the Feynman gates
  logic [WIDTH-1:0] prop;
  logic [WIDTH-1:0] carry;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fg
    feynman_gate u_fg (
      .a (f),
      .b (b[i]),
      .p (),
      .q (b_mod[i])
    );
  end

  sss_ripple_adder #(.WIDTH(WIDTH)) u_rca (
    .a     (a),
    .b     (b_mod),
    .cin   (f),
    .sum   (result),
    .prop  (prop),
    .carry (carry),
    .cout  (cout)
  );
endmodule : rev_add_sub
