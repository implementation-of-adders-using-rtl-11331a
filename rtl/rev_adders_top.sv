// rev_adders_top: the four 4-bit reversible adders side by side.
//
// The design consists of four independent adders, all built from reversible
// gates (Feynman, Peres, Fredkin and the four-line SSS full-adder gate):
//   add/sub     - Feynman gates invert b under the mode line, SSS ripple adder
//   carry skip  - SSS ripple adder with a Fredkin propagate tree and skip mux
//   carry select- two SSS ripple adders (carry in 0 and 1) and Fredkin muxes
//   carry save  - Peres gates for propagate/generate, SSS and Peres carry logic
// They share no signals; each has its own operands and results brought out
// with a prefix (as_, skip_, sel_, save_); placing them in one top level is
// this design's choice. Everything is combinational, so
// the results are valid one propagation delay after the inputs change.
module rev_adders_top
  import rev_pkg::*;
(
  // adder/subtractor
  input  operand_t as_a,
  input  operand_t as_b,
  input  logic     as_f,        // 0: a + b, 1: a - b
  output operand_t as_result,
  output logic     as_cout,
  // carry skip adder
  input  operand_t skip_a,
  input  operand_t skip_b,
  input  logic     skip_cin,
  output operand_t skip_sum,
  output logic     skip_cout,
  output logic     skip_prop,   // block propagate (carry skipped)
  // carry select adder
  input  operand_t sel_a,
  input  operand_t sel_b,
  input  logic     sel_cin,
  output operand_t sel_sum,
  output logic     sel_cout,
  // carry save adder
  input  operand_t save_a,
  input  operand_t save_b,
  input  logic     save_cin,
  output operand_t save_sum,
  output logic     save_cout
);
  rev_add_sub #(.WIDTH(ADDER_WIDTH)) u_add_sub (
    .a      (as_a),
    .b      (as_b),
    .f      (as_f),
    .result (as_result),
    .cout   (as_cout)
  );

  rev_carry_skip_adder u_skip (
    .a          (skip_a),
    .b          (skip_b),
    .cin        (skip_cin),
    .sum        (skip_sum),
    .cout       (skip_cout),
    .block_prop (skip_prop)
  );

  rev_carry_select_adder u_select (
    .a    (sel_a),
    .b    (sel_b),
    .cin  (sel_cin),
    .sum  (sel_sum),
    .cout (sel_cout)
  );

  rev_carry_save_adder u_save (
    .a    (save_a),
    .b    (save_b),
    .cin  (save_cin),
    .sum  (save_sum),
    .cout (save_cout)
  );
endmodule : rev_adders_top
