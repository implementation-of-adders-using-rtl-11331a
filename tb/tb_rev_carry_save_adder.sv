// tb_rev_carry_save_adder: exhaustive self-checking test of the 4-bit
// reversible Peres/SSS adder. For every a, b and cin, {cout,sum} must equal
// a + b + cin. Counts the cases where a carry is propagated all the way from
// cin through every bit and where a carry leaves the top bit, and fails if
// one never happened.
module tb_rev_carry_save_adder;
  import rev_pkg::*;

  operand_t a, b, sum;
  logic     cin, cout;
  int       checks = 0, failures = 0;
  int       n_full_prop = 0, n_cout = 0;

  rev_carry_save_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

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
      if (cin && (a ^ b) == '1) n_full_prop++;
      if (cout) n_cout++;
    end
    expect_seen(n_full_prop, "carry propagated from cin through all bits");
    expect_seen(n_cout, "carry out");
    $display("full_prop=%0d cout=%0d", n_full_prop, n_cout);
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
endmodule : tb_rev_carry_save_adder
