// rev_sqrt_tb: end-to-end test of the 6-bit reversible square root at its
// default size. Every radicand 0..63 is applied; the root must equal the
// integer square root worked out here by search (largest q with q*q <= n).
// For each of the three rows the test counts how often the row ended with a
// borrow (the remainder was restored and the root bit is 0) and how often it
// kept the difference (root bit 1), and counts a failure for a row where
// either never happened. It also checks the gate counts and quantum cost of
// the default array: 11 MRCSM cells, 10 Feynman gates, cost 131. The design
// is combinational, so each radicand is held for 1 time unit.
module rev_sqrt_tb;
  import rev_sqrt_pkg::*;

  localparam int unsigned N = 6;
  localparam int unsigned R = N / 2;

  int checks = 0, failures = 0;
  logic [N-1:0] radicand;
  logic [R-1:0] root;
  int restored [1:R];
  int kept     [1:R];
  logic [R:1] row_borrow;
  int exp_root;

  rev_sqrt dut (.radicand(radicand), .root(root));

  // Final borrow of each row, read from the array.
  assign row_borrow[1] = dut.g_row[1].c[2];
  assign row_borrow[2] = dut.g_row[2].c[4];
  assign row_borrow[3] = dut.g_row[3].c[5];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: radicand=%0d root=%0d expected=%0d", what, radicand, root, exp_root);
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
    for (int k = 1; k <= int'(R); k++) begin
      restored[k] = 0;
      kept[k] = 0;
    end
    for (int n = 0; n < (1 << N); n++) begin
      radicand = N'(n);
      #1;
      exp_root = 0;
      while ((exp_root + 1) * (exp_root + 1) <= n) exp_root++;
      check(int'(root) == exp_root, "root");
      for (int k = 1; k <= int'(R); k++) begin
        // Row k decides root bit R-k; a borrow means that bit is 0.
        check(row_borrow[k] == !root[R-k], "row borrow vs root bit");
        if (row_borrow[k]) restored[k]++;
        else               kept[k]++;
      end
    end
    for (int k = 1; k <= int'(R); k++) begin
      $display("row %0d: restored %0d times, kept the difference %0d times", k, restored[k], kept[k]);
      check(restored[k] > 0, "row restored at least once");
      check(kept[k] > 0, "row kept the difference at least once");
    end
    check(num_mrcsm(N) == 11, "MRCSM count");
    check(num_feynman(N) == 10, "Feynman gate count");
    check(quantum_cost(N) == 131, "quantum cost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
