// tr_full_subtractor: reversible full subtractor built from two TR gates,
// quantum cost 6.
//
// Computes a - b - c (c is the borrow in):
//   diff = a ^ b ^ c
//   bout = ~a&b | b&c | ~a&c
//
// Gate 1 is tr_gate(b, a, 0): its q output is a^b and its r output ~a&b.
// Gate 2 is tr_gate(c, a^b, ~a&b): its q output is a^b^c, and its r output
// c&~(a^b) ^ ~a&b, which equals the borrow because the two terms are never
// 1 together. One constant 0 input is used; g_b and g_c (copies of b and c)
// are garbage outputs. The wiring of the two gates is this design's own; the
// description fixes only that two TR gates form the subtractor and the
// borrow equation. Combinational.
module tr_full_subtractor (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic diff,
  output logic bout,
  output logic g_b,   // garbage: copy of b
  output logic g_c    // garbage: copy of c
);
  logic a_xor_b, na_and_b;

  tr_gate u_tr1 (.a(b), .b(a), .c(1'b0), .p(g_b), .q(a_xor_b), .r(na_and_b));
  tr_gate u_tr2 (.a(c), .b(a_xor_b), .c(na_and_b), .p(g_c), .q(diff), .r(bout));
endmodule
