// tb_rev_add_sub: exhaustive self-checking test of the reversible
// adder/subtractor at its default width of 4 bits. For every a, b and mode
// F: with F = 0 {cout,result} must equal a + b; with F = 1 result must equal
// a - b modulo 16 and cout must be 1 exactly when a >= b (no borrow). Counts
// how often each mode, a borrow and an add overflow occurred and fails if
// any never did. A time watchdog ends a hung run with a failure.
module tb_rev_add_sub;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, result;
  logic         f, cout;
  int           checks = 0, failures = 0;
  int           n_add = 0, n_sub = 0, n_borrow = 0, n_ovf = 0;

  rev_add_sub dut (.a(a), .b(b), .f(f), .result(result), .cout(cout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d f=%0b result=%0d cout=%0b", what, a, b, f, result, cout);
    end
  endtask

  task automatic expect_seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL never exercised: %s", what);
    end
  endtask

  initial begin
    int expected;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {f, a, b} = (2 * W + 1)'(v);
      #1;
      if (!f) begin
        n_add++;
        expected = int'(a) + int'(b);
        check(result == W'(expected), "sum");
        check(cout == (expected >= (1 << W)), "add carry");
        if (expected >= (1 << W)) n_ovf++;
      end else begin
        n_sub++;
        expected = int'(a) - int'(b);
        check(result == W'(expected), "difference");
        check(cout == (a >= b), "no-borrow carry");
        if (a < b) n_borrow++;
      end
    end
    expect_seen(n_add, "addition");
    expect_seen(n_sub, "subtraction");
    expect_seen(n_ovf, "addition carry out");
    expect_seen(n_borrow, "subtraction borrow");
    $display("add=%0d sub=%0d carry=%0d borrow=%0d", n_add, n_sub, n_ovf, n_borrow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_rev_add_sub
