// modified_fredkin_gate: 3x3 reversible controlled swap used as a 2:1
// multiplexer, quantum cost 4 in this design's cost accounting.
//
//   p = u                  (select passes through)
//   q = u ? x : y          (multiplexer output)
//   r = u ? y : x          (the other input, a garbage output in use)
//
// In the MRCSM cell x is the copied minuend (the "restore" value) and y the
// fresh difference, so q is the next remainder bit: u = 1 keeps the old
// value, u = 0 takes the difference. Only the multiplexing role and the
// cost are given for this gate; the r output is this design's choice of the
// second output that keeps the mapping a bijection. Combinational.
module modified_fredkin_gate (
  input  logic u,
  input  logic x,
  input  logic y,
  output logic p,
  output logic q,
  output logic r
);
  assign p = u;
  assign q = u ? x : y;
  assign r = u ? y : x;
endmodule
