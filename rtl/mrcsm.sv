// mrcsm: Modified Reversible Controlled-Subtract-Multiplex cell, the one
// building block of the square-root array. Quantum cost 11 (Feynman 1,
// two-TR-gate subtractor 6, Modified Fredkin 4).
//
// Inputs: a (minuend bit, a bit of the partial remainder), b (subtrahend
// bit, a bit of the trial value {root so far, 0, 1}), c (borrow in from the
// cell to the right) and u (restore select: the row's final borrow). The
// two constant inputs (both 0) are internal.
//
//   d1   = a ^ b ^ c                 difference bit
//   bout = ~a&b | b&c | ~a&c         borrow out, to the next cell left
//   d    = u ? a : d1                next remainder bit
//
// Inside: a Feynman gate copies a (one copy to the subtractor, one to the
// multiplexer), the full subtractor forms d1 and bout, and the Modified
// Fredkin gate picks d. bout does not depend on u, so a row can feed its
// final borrow back to all its cells' u inputs without a loop. The four
// garbage outputs are copies of b, c and u and the unselected multiplexer
// input. Combinational.
module mrcsm (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic u,
  output logic d,
  output logic bout,
  output logic [3:0] g   // garbage outputs G1..G4
);
  logic a_sub, a_mux, d1;

  feynman_gate          u_fg  (.a(a), .b(1'b0), .p(a_sub), .q(a_mux));
  tr_full_subtractor    u_sub (.a(a_sub), .b(b), .c(c), .diff(d1), .bout(bout),
                               .g_b(g[0]), .g_c(g[1]));
  modified_fredkin_gate u_mfg (.u(u), .x(a_mux), .y(d1), .p(g[2]), .q(d), .r(g[3]));
endmodule
