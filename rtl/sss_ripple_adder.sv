// sss_ripple_adder: WIDTH-bit ripple carry adder built from a chain of
// reversible SSS gates.
//
// Stage i is one SSS gate with A = a[i], B = b[i], C = 0 and D = the carry
// of stage i-1 (cin for stage 0). Its Q output is sum bit i, its S output
// is the carry to the next stage and its R output is the propagate bit
// a[i] xor b[i]. The P outputs are garbage (copies of a) and are not
// brought out. The chain follows the source design; making it a module of
// its own with a WIDTH parameter (default 4) is this design's choice.
//
// Ports: a, b, cin in; sum, prop (per-bit propagate), carry (per-stage
// carry out, carry[WIDTH-1] is the final carry) and cout out.
// Purely combinational: the carry ripples through WIDTH gates.
module sss_ripple_adder #(
  parameter int unsigned WIDTH = rev_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] prop,
  output logic [WIDTH-1:0] carry,
  output logic             cout
);
  logic [WIDTH:0] c_chain;

  assign c_chain[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    sss_gate u_sss (
      .a (a[i]),
      .b (b[i]),
      .c (1'b0),
      .d (c_chain[i]),
      .p (),
      .q (sum[i]),
      .r (prop[i]),
      .s (c_chain[i+1])
    );
  end

  assign carry = c_chain[WIDTH:1];
  assign cout  = c_chain[WIDTH];
endmodule : sss_ripple_adder
