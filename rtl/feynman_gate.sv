// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate, quantum cost 1.
//
//   p = a          (control passes through)
//   q = a ^ b      (target)
//
// With b tied to 0 the gate copies a (p = q = a); with b tied to 1 it gives
// the true and complement forms of a (p = a, q = ~a). The square-root array
// uses it for both. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
