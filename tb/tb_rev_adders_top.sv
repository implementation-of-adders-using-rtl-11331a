// tb_rev_adders_top: end-to-end self-checking test of the four reversible
// adders in the top level, at its default parameters.
//
// Phase 1 applies every combination of two 4-bit operands and a carry/mode
// bit to all four adders at once. Phase 2 applies independent random
// operands to each adder. All results are compared with integer arithmetic.
// The test counts each mechanism of the design - addition and subtraction
// modes, a subtraction borrow, the carry skip path, both selections of the
// carry select adder and a carry out of every adder - and counts a failure
// for one that never occurred. A time watchdog ends a hung run with a failure.
module tb_rev_adders_top;
  import rev_pkg::*;

  localparam int unsigned W = ADDER_WIDTH;

  operand_t as_a, as_b, as_result;
  logic     as_f, as_cout;
  operand_t skip_a, skip_b, skip_sum;
  logic     skip_cin, skip_cout, skip_prop;
  operand_t sel_a, sel_b, sel_sum;
  logic     sel_cin, sel_cout;
  operand_t save_a, save_b, save_sum;
  logic     save_cin, save_cout;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_borrow = 0, n_as_carry = 0;
  int n_skip = 0, n_skip_carry = 0, n_ripple_carry = 0;
  int n_sel0 = 0, n_sel1 = 0, n_sel_carry = 0;
  int n_save_carry = 0;

  rev_adders_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic expect_seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL never exercised: %s", what);
    end
  endtask

  // Compare all four adders against integer arithmetic and count mechanisms.
  task automatic check_all();
    int t;
    // adder/subtractor
    if (!as_f) begin
      t = int'(as_a) + int'(as_b);
      check({as_cout, as_result} == (W + 1)'(t), "add/sub: addition");
      n_add++;
      if (as_cout) n_as_carry++;
    end else begin
      t = int'(as_a) - int'(as_b);
      check(as_result == W'(t) && as_cout == (as_a >= as_b), "add/sub: subtraction");
      n_sub++;
      if (as_a < as_b) n_borrow++;
    end
    // carry skip
    t = int'(skip_a) + int'(skip_b) + int'(skip_cin);
    check({skip_cout, skip_sum} == (W + 1)'(t), "carry skip: sum");
    check(skip_prop == ((skip_a ^ skip_b) == '1), "carry skip: propagate");
    if (skip_prop) n_skip++;
    if (skip_prop && skip_cout) n_skip_carry++;
    if (!skip_prop && skip_cout) n_ripple_carry++;
    // carry select
    t = int'(sel_a) + int'(sel_b) + int'(sel_cin);
    check({sel_cout, sel_sum} == (W + 1)'(t), "carry select: sum");
    if (sel_cin) n_sel1++; else n_sel0++;
    if (sel_cout) n_sel_carry++;
    // carry save
    t = int'(save_a) + int'(save_b) + int'(save_cin);
    check({save_cout, save_sum} == (W + 1)'(t), "carry save: sum");
    if (save_cout) n_save_carry++;
  endtask

  initial begin
    // Phase 1: exhaustive, the same vector on every adder.
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      logic [2*W:0] vec;
      vec = (2 * W + 1)'(v);
      {as_f, as_a, as_b}           = vec;
      {skip_cin, skip_a, skip_b}   = vec;
      {sel_cin, sel_a, sel_b}      = vec;
      {save_cin, save_a, save_b}   = vec;
      #1;
      check_all();
    end
    // Phase 2: independent random vectors on each adder.
    for (int n = 0; n < 4000; n++) begin
      {as_f, as_a, as_b}         = (2 * W + 1)'($urandom);
      {skip_cin, skip_a, skip_b} = (2 * W + 1)'($urandom);
      {sel_cin, sel_a, sel_b}    = (2 * W + 1)'($urandom);
      {save_cin, save_a, save_b} = (2 * W + 1)'($urandom);
      #1;
      check_all();
    end
    expect_seen(n_add, "add/sub in addition mode");
    expect_seen(n_sub, "add/sub in subtraction mode");
    expect_seen(n_borrow, "add/sub borrow");
    expect_seen(n_as_carry, "add/sub carry out");
    expect_seen(n_skip, "carry skip path taken");
    expect_seen(n_skip_carry, "skipped carry of 1");
    expect_seen(n_ripple_carry, "carry generated inside the skip block");
    expect_seen(n_sel0, "carry select: carry-in-0 result chosen");
    expect_seen(n_sel1, "carry select: carry-in-1 result chosen");
    expect_seen(n_sel_carry, "carry select carry out");
    expect_seen(n_save_carry, "carry save carry out");
    $display("add=%0d sub=%0d borrow=%0d as_carry=%0d skip=%0d skip_carry=%0d ripple_carry=%0d",
             n_add, n_sub, n_borrow, n_as_carry, n_skip, n_skip_carry, n_ripple_carry);
    $display("sel0=%0d sel1=%0d sel_carry=%0d save_carry=%0d",
             n_sel0, n_sel1, n_sel_carry, n_save_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_rev_adders_top
