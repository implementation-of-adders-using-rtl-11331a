// tb_rev_carry_skip_adder: exhaustive self-checking test of the 4-bit
// reversible carry skip adder. For every a, b and cin, {cout,sum} must equal
// a + b + cin and block_prop must be 1 exactly when every bit pair differs.
// Counts how often the carry took the skip path with cin = 1 and cin = 0 and
// how often the ripple path produced a carry, and fails if one never did.
module tb_rev_carry_skip_adder;
  import rev_pkg::*;

  operand_t a, b, sum;
  logic     cin, cout, block_prop;
  int       checks = 0, failures = 0;
  int       n_skip1 = 0, n_skip0 = 0, n_ripple_carry = 0;

  rev_carry_skip_adder dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .block_prop(block_prop)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d cin=%0b sum=%0d cout=%0b P=%0b", what, a, b, cin, sum, cout, block_prop);
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
      check(block_prop == ((a ^ b) == '1), "block propagate");
      if (block_prop && cin)  n_skip1++;
      if (block_prop && !cin) n_skip0++;
      if (!block_prop && cout) n_ripple_carry++;
    end
    expect_seen(n_skip1, "carry 1 skipped");
    expect_seen(n_skip0, "carry 0 skipped");
    expect_seen(n_ripple_carry, "carry generated inside the block");
    $display("skip1=%0d skip0=%0d ripple_carry=%0d", n_skip1, n_skip0, n_ripple_carry);
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
endmodule : tb_rev_carry_skip_adder
