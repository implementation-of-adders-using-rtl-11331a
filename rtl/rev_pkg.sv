// rev_pkg: constants shared by the reversible adders.
//
// ADDER_WIDTH is the operand width of all four adders (4 bits, as in the
// source design). The carry skip, carry select and carry save adders are
// wired gate by gate for exactly this width; the ripple adder and the
// adder/subtractor take it as the default of a WIDTH parameter.
package rev_pkg;
  localparam int unsigned ADDER_WIDTH = 4;
  typedef logic [ADDER_WIDTH-1:0] operand_t;
endpackage : rev_pkg
