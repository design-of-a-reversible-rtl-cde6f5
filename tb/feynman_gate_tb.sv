// feynman_gate_tb: exhaustive check of the Feynman gate. For all four input
// pairs the outputs are compared with p = a and q = a xor b worked out here,
// the copy (b = 0) and complement (b = 1) uses are checked by name, and the
// gate is checked to be a bijection (four distinct output pairs).
module feynman_gate_tb;
  int checks = 0, failures = 0;
  logic a, b, p, q;
  bit [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b p=%0b q=%0b", what, a, b, p, q);
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
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check(p == a, "p");
      check(q == ((a + b) % 2 == 1), "q");
      if (b == 1'b0) check(p == q, "copy");
      else           check(q == !p, "complement");
      check(!seen[{p, q}], "bijection");
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
