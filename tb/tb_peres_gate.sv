// tb_peres_gate: exhaustive self-checking test of the Peres gate.
// All eight input vectors are applied. P must copy A, Q must be 1 when A and
// B differ, and R must be C inverted when A and B are both 1. With C = 0 the
// pair {R,Q} must equal the half-adder result A + B. Outputs must be unique.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abc=%0b%0b%0b pqr=%0b%0b%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P = A");
      check(q == (a != b), "Q = A xor B");
      check(r == ((a && b) ? !c : c), "R = AB xor C");
      if (!c) check(2'({r, q}) == 2'(a) + 2'(b), "half adder");
      check(!seen[{p, q, r}], "outputs unique");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_peres_gate
