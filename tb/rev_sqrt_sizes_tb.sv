// rev_sqrt_sizes_tb: checks that the generated square-root array is right
// for other even radicand widths than the default 6: 2, 4, 8 and 10 bits,
// each exhaustively (every radicand), against an integer square root worked
// out here by search. It also checks the cell and Feynman-gate counts of
// each size against a direct count of the row widths (2, then k+2 cells).
module rev_sqrt_sizes_tb;
  import rev_sqrt_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0]  n2;  logic [0:0] q2;
  logic [3:0]  n4;  logic [1:0] q4;
  logic [7:0]  n8;  logic [3:0] q8;
  logic [9:0]  n10; logic [4:0] q10;

  rev_sqrt #(.N(2))  dut2  (.radicand(n2),  .root(q2));
  rev_sqrt #(.N(4))  dut4  (.radicand(n4),  .root(q4));
  rev_sqrt #(.N(8))  dut8  (.radicand(n8),  .root(q8));
  rev_sqrt #(.N(10)) dut10 (.radicand(n10), .root(q10));

  function automatic int isqrt(int n);
    int q = 0;
    while ((q + 1) * (q + 1) <= n) q++;
    return q;
  endfunction

  task automatic check(input bit ok, input string what, input int n, input int got);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: radicand=%0d got=%0d expected=%0d", what, n, got, isqrt(n));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1024; n++) begin
      n2 = 2'(n); n4 = 4'(n); n8 = 8'(n); n10 = 10'(n);
      #1;
      if (n < 4)   check(int'(q2) == isqrt(n), "N=2", n, int'(q2));
      if (n < 16)  check(int'(q4) == isqrt(n), "N=4", n, int'(q4));
      if (n < 256) check(int'(q8) == isqrt(n), "N=8", n, int'(q8));
      check(int'(q10) == isqrt(n), "N=10", n, int'(q10));
    end
    // Row widths 2, 4, 5, 6, 7: cells = 2 + sum(k+2).
    check(num_mrcsm(2) == 2,   "cells N=2", 0, num_mrcsm(2));
    check(num_mrcsm(4) == 6,   "cells N=4", 0, num_mrcsm(4));
    check(num_mrcsm(8) == 17,  "cells N=8", 0, num_mrcsm(8));
    check(num_mrcsm(10) == 24, "cells N=10", 0, num_mrcsm(10));
    // N=8: rows 1..3 need 1 + (w-1) + (4-k) gates, row 4 one gate: 5+6+6+1.
    check(num_feynman(8) == 18, "Feynman gates N=8", 0, num_feynman(8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
