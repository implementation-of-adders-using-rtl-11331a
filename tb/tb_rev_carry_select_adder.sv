// tb_rev_carry_select_adder: exhaustive self-checking test of the 4-bit
// reversible carry select adder. For every a, b and cin, {cout,sum} must
// equal a + b + cin. Counts the selections of the carry-in-0 and carry-in-1
// results, and the cases where the two candidate results differ so that the
// selection matters, and fails if one never happened.
module tb_rev_carry_select_adder;
  import rev_pkg::*;

  operand_t a, b, sum;
  logic     cin, cout;
  int       checks = 0, failures = 0;
  int       n_sel0 = 0, n_sel1 = 0, n_carry_differs = 0;

  rev_carry_select_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d cin=%0b sum=%0d cout=%0b", what, a, b, cin, sum, cout);
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
    int total;
    for (int v = 0; v < (1 << (2 * ADDER_WIDTH + 1)); v++) begin
      {a, b, cin} = (2 * ADDER_WIDTH + 1)'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      check(sum == ADDER_WIDTH'(total), "sum");
      check(cout == (total >= (1 << ADDER_WIDTH)), "carry out");
      if (cin) n_sel1++; else n_sel0++;
      if ((int'(a) + int'(b)) == (1 << ADDER_WIDTH) - 1) n_carry_differs++;
    end
    expect_seen(n_sel0, "carry-in-0 result selected");
    expect_seen(n_sel1, "carry-in-1 result selected");
    expect_seen(n_carry_differs, "candidate carries differ");
    $display("sel0=%0d sel1=%0d carry_differs=%0d", n_sel0, n_sel1, n_carry_differs);
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
endmodule : tb_rev_carry_select_adder
