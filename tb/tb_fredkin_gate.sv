// tb_fredkin_gate: exhaustive self-checking test of the Fredkin gate.
// All eight input vectors are applied. P must copy A; with A = 0 the data
// inputs must pass straight (Q = B, R = C), with A = 1 they must be swapped.
// With C = 0, R must be the AND of A and B. Outputs must be unique and the
// number of ones must be conserved (a property of controlled swap).
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      if (a) check({q, r} == {c, b}, "swap when A = 1");
      else   check({q, r} == {b, c}, "pass when A = 0");
      if (!c) check(r == (a && b), "AND with C = 0");
      check($countones({p, q, r}) == $countones({a, b, c}), "ones conserved");
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
endmodule : tb_fredkin_gate
