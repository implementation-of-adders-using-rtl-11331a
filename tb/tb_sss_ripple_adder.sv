// tb_sss_ripple_adder: self-checking test of the SSS ripple carry adder.
// The 4-bit default instance is tested exhaustively (all a, b, cin). Sum and
// carry out are compared with integer addition, each stage carry with the
// carry out of the low i+1 bits, and the propagate bits with a xor b. An
// 8-bit instance is tested with random operands to exercise the WIDTH
// parameter. A time watchdog ends a hung run with a failure.
module tb_sss_ripple_adder;
  localparam int unsigned W  = 4;
  localparam int unsigned W8 = 8;

  logic [W-1:0]  a, b, sum, prop, carry;
  logic          cin, cout;
  logic [W8-1:0] a8, b8, sum8, prop8, carry8;
  logic          cin8, cout8;
  int            checks = 0, failures = 0;
  int            full_ripple = 0;

  sss_ripple_adder dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .prop(prop), .carry(carry), .cout(cout)
  );

  sss_ripple_adder #(.WIDTH(W8)) dut8 (
    .a(a8), .b(b8), .cin(cin8), .sum(sum8), .prop(prop8), .carry(carry8), .cout(cout8)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d cin=%0b sum=%0d cout=%0b", what, a, b, cin, sum, cout);
    end
  endtask

  initial begin
    int total, low;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {a, b, cin} = (2 * W + 1)'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      check(sum == W'(total), "sum");
      check(cout == (total >= (1 << W)), "cout");
      check(prop == (a ^ b), "propagate");
      for (int i = 0; i < W; i++) begin
        low = int'(a & W'((1 << (i + 1)) - 1)) + int'(b & W'((1 << (i + 1)) - 1)) + int'(cin);
        check(carry[i] == ((low >> (i + 1)) & 1), "stage carry");
      end
      if (cin && (a ^ b) == '1) full_ripple++;
    end
    for (int n = 0; n < 2000; n++) begin
      a8 = W8'($urandom); b8 = W8'($urandom); cin8 = 1'($urandom);
      #1;
      total = int'(a8) + int'(b8) + int'(cin8);
      checks++;
      if ({cout8, sum8} != (W8 + 1)'(total) || prop8 != (a8 ^ b8)) begin
        failures++;
        $display("FAIL 8-bit: a=%0d b=%0d cin=%0b sum=%0d cout=%0b", a8, b8, cin8, sum8, cout8);
      end
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL no carry rippled through all stages");
    end
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
endmodule : tb_sss_ripple_adder
