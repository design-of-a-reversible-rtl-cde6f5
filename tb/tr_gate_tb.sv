// tr_gate_tb: exhaustive check of the TR gate. The expected outputs are
// worked out from integer arithmetic (p = a, q = (a+b) mod 2, r = 1 exactly
// when "a > b" differs from c) and the gate is checked to be a bijection on
// its eight input patterns.
module tr_gate_tb;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  bit [7:0] seen;

  tr_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> %0b%0b%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(p == a, "p");
      check(q == ((int'(a) + int'(b)) % 2 == 1), "q");
      check(r == ((int'(a) > int'(b)) != c), "r");
      check(!seen[{p, q, r}], "bijection");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
