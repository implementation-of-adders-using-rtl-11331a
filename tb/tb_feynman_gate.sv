// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
// All four input pairs are applied; P must copy A and Q must be B inverted
// exactly when A is 1. The output pairs must also be all distinct
// (reversibility). A time watchdog ends the run with a failure if it hangs.
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  bit   seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b p=%0b q=%0b", what, a, b, p, q);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(p == a, "P = A");
      check(q == (a ? !b : b), "Q = controlled NOT");
      check(!seen[{p, q}], "outputs unique");
      seen[{p, q}] = 1'b1;
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
endmodule : tb_feynman_gate
