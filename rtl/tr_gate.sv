// tr_gate: 3x3 reversible TR gate.
//
//   p = a
//   q = a ^ b
//   r = (a & ~b) ^ c
//
// The mapping is a bijection on 3 bits. With c = 0 the r output is the
// "a and not b" term a subtractor's borrow needs, which is why two of these
// gates make a full subtractor (tr_full_subtractor). The gate equations are
// the standard TR gate definition; only its name and its use in the
// subtractor are taken from the description of this design. Combinational.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
