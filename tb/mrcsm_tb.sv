// mrcsm_tb: exhaustive check of the MRCSM cell over its 16 inputs. The
// expected borrow and difference come from the integer a - b - c; the cell
// output d must be a when the restore select u is 1 and the difference bit
// when u is 0; the borrow must not depend on u; the six outputs (d, bout and
// the four garbage bits) must be distinct for all 16 inputs, since the cell
// is reversible with its two constant inputs.
module mrcsm_tb;
  int checks = 0, failures = 0;
  logic a, b, c, u, d, bout;
  logic [3:0] g;
  bit [63:0] seen;
  int s;
  logic diff;

  mrcsm dut (.a(a), .b(b), .c(c), .u(u), .d(d), .bout(bout), .g(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b u=%0b -> d=%0b bout=%0b", what, a, b, c, u, d, bout);
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
    for (int i = 0; i < 16; i++) begin
      {a, b, c, u} = 4'(i);
      #1;
      s = int'(a) - int'(b) - int'(c);
      diff = ((s + 4) % 2 == 1);
      check(bout == (s < 0), "borrow");
      check(d == (u ? a : diff), u ? "restore" : "difference");
      check(!seen[{d, bout, g}], "bijection");
      seen[{d, bout, g}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
