// fg_fanout: K copies of one signal made with a chain of K-1 Feynman gates.
//
// Reversible logic allows no plain fan-out, so every signal used more than
// once is copied by Feynman gates with their target input tied to 0. Gate j
// passes the running copy to y[j] and hands a fresh copy (x ^ 0) to gate
// j+1; the last copy is y[K-1]. With K = 1 there is no gate and y[0] = x.
// Combinational.
module fg_fanout #(
  parameter int unsigned K = 2
) (
  input  logic         x,
  output logic [K-1:0] y
);
  logic [K-1:0] chain;

  assign chain[0] = x;
  for (genvar j = 0; j < int'(K) - 1; j++) begin : g_fg
    feynman_gate u_fg (.a(chain[j]), .b(1'b0), .p(y[j]), .q(chain[j+1]));
  end
  assign y[K-1] = chain[K-1];
endmodule
