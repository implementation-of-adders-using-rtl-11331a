// tb_sss_gate: exhaustive self-checking test of the SSS gate.
// All sixteen input vectors are applied. P must copy A, R must be 1 when A
// and B differ, and Q must be the parity of A, B and D. S must be the
// majority of A, B and D, inverted when C is 1; so with C = 0 the pair
// {S,Q} equals the full-adder result A + B + D. Outputs must be unique.
module tb_sss_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  bit   seen [16];
  bit   maj;

  sss_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcd=%0b%0b%0b%0b pqrs=%0b%0b%0b%0b", what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      maj = (int'(a) + int'(b) + int'(d)) >= 2;
      check(p == a, "P = A");
      check(r == (a != b), "R = A xor B");
      check(q == ((int'(a) + int'(b) + int'(d)) % 2 == 1), "Q = parity");
      check(s == (c ? !maj : maj), "S = majority xor C");
      if (!c) check(2'({s, q}) == 2'(a) + 2'(b) + 2'(d), "full adder");
      check(!seen[{p, q, r, s}], "outputs unique");
      seen[{p, q, r, s}] = 1'b1;
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
endmodule : tb_sss_gate
