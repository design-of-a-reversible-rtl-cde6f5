// tr_full_subtractor_tb: exhaustive check of the two-TR-gate full
// subtractor. The expected difference and borrow come from the integer
// a - b - c (borrow when it is negative, difference its value mod 2); the
// garbage outputs must repeat b and c, and the full output word must be
// distinct for all eight inputs (no information is lost).
module tr_full_subtractor_tb;
  int checks = 0, failures = 0;
  logic a, b, c, diff, bout, g_b, g_c;
  bit [15:0] seen;
  int s;

  tr_full_subtractor dut (.a(a), .b(b), .c(c), .diff(diff), .bout(bout),
                          .g_b(g_b), .g_c(g_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %0b-%0b-%0b -> diff=%0b bout=%0b", what, a, b, c, diff, bout);
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
      s = int'(a) - int'(b) - int'(c);
      check(bout == (s < 0), "borrow");
      check(diff == ((s + 4) % 2 == 1), "difference");
      check(g_b == b && g_c == c, "garbage copies");
      check(!seen[{diff, bout, g_b, g_c}], "bijection");
      seen[{diff, bout, g_b, g_c}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
