// modified_fredkin_gate_tb: exhaustive check of the Modified Fredkin gate as
// a multiplexer. For all eight inputs: p repeats u, q is x when u = 1 and y
// when u = 0, r is the other data input, and the eight output patterns are
// distinct (the gate is reversible). The number of ones is also checked to
// be conserved, as a swap must.
module modified_fredkin_gate_tb;
  int checks = 0, failures = 0;
  logic u, x, y, p, q, r;
  bit [7:0] seen;
  logic exp_q, exp_r;

  modified_fredkin_gate dut (.u(u), .x(x), .y(y), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: u=%0b x=%0b y=%0b -> %0b%0b%0b", what, u, x, y, p, q, r);
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
      {u, x, y} = 3'(i);
      #1;
      if (u) begin exp_q = x; exp_r = y; end
      else   begin exp_q = y; exp_r = x; end
      check(p == u, "p");
      check(q == exp_q, "q (mux)");
      check(r == exp_r, "r");
      check(int'(p) + int'(q) + int'(r) == int'(u) + int'(x) + int'(y), "ones conserved");
      check(!seen[{p, q, r}], "bijection");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
