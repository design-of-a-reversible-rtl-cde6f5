// rev_sqrt: reversible unsigned integer square root, N-bit radicand
// (default 6), N/2-bit root, built as a combinational array of Modified
// Reversible Controlled-Subtract-Multiplex (MRCSM) cells and Feynman gates.
//
// Algorithm (restoring square root that only ever appends the digits "01"):
// row 1 computes {n[N-1], n[N-2]} - 01. Each later row k shifts in the next
// bit pair and computes {remainder, pair} - {root so far, 0, 1}. If the row
// ends without a borrow the new root bit is 1 and the difference becomes the
// remainder; if it ends with a borrow the root bit is 0 and the previous
// value is kept (restored). Row k produces root bit R-k, R = N/2.
//
// Structure. Row 1 is 2 cells wide, row k > 1 is k+2 cells wide (its
// remainder input is k bits, its trial value {root, 0, 1} k+1 bits and one
// 0 on top). Borrows ripple right to left through the row's cells; the
// row's final borrow drives every cell's select input u, so a cell outputs
// its old minuend bit (restore) when the row went negative and the
// difference bit otherwise. Per row, one Feynman gate with its target tied
// to 1 gives the borrow and its complement; the complement is the root bit.
// Feynman-gate chains copy the borrow to the row's cells and the root bit to
// every later row and to the output. The last row's remainder is not used,
// so its cells' select inputs are tied to 0 and its borrow is not copied.
// For N = 6: rows of 2, 4 and 5 cells (11 MRCSM), 10 Feynman gates outside
// the cells, quantum cost 11*11 + 10 = 131.
//
// Interface: radicand in, root = floor(sqrt(radicand)) out. No clock: the
// result is valid one combinational settling time after the input changes.
// The array organisation, the cell and the gate counts follow the described
// design; the exact order of the Feynman-gate copies and the generalisation
// to other even N are this design's own. Garbage outputs stay internal.
module rev_sqrt
  import rev_sqrt_pkg::*;
#(
  parameter int unsigned N = 6          // radicand width, even
) (
  input  logic [N-1:0]   radicand,
  output logic [N/2-1:0] root
);
  localparam int unsigned R  = N / 2;   // rows = root bits
  localparam int unsigned DW = R + 2;   // widest row

  // Remainder outputs and root-bit copies of every row, zero-extended so
  // that later rows can pick up what they need.
  logic [R:1][DW-1:0] rem_all;
  logic [R:1][R-1:0]  rootcp_all;

  for (genvar k = 1; k <= int'(R); k++) begin : g_row
    localparam int unsigned W = row_width(k);

    logic [W-1:0]      a;        // minuend bits
    logic [W-1:0]      b;        // subtrahend bits
    logic [W:0]        c;        // borrow chain, c[0] = 0
    logic [W-1:0]      u;        // restore selects
    logic [W-1:0]      d;        // next remainder bits
    logic [W-1:0][3:0] g;        // garbage of the cells
    logic              borrow_cp, root_bit;
    logic [R-k:0]      root_cp;  // copies for rows k+1..R, then the output

    // Minuend: next radicand bit pair below the previous remainder.
    assign a[1:0] = radicand[2*(R-k) +: 2];
    if (k > 1) begin : g_rem_in
      assign a[W-1:2] = rem_all[k-1][k-1:0];
    end

    // Subtrahend: {0, root so far, 0, 1}. Root bit R-m comes from row m;
    // row m hands its copy number k-m-1 to row k.
    assign b[0] = 1'b1;
    assign b[1] = 1'b0;
    if (k > 1) begin : g_trial
      for (genvar j = 2; j <= k; j++) begin : g_q
        assign b[j] = rootcp_all[k-j+1][j-2];
      end
      assign b[W-1] = 1'b0;
    end

    assign c[0] = 1'b0;
    for (genvar j = 0; j < int'(W); j++) begin : g_cell
      mrcsm u_cell (.a(a[j]), .b(b[j]), .c(c[j]), .u(u[j]),
                    .d(d[j]), .bout(c[j+1]), .g(g[j]));
    end

    // True and complement form of the row's borrow: root bit = ~borrow.
    feynman_gate u_fg_cmp (.a(c[W]), .b(1'b1), .p(borrow_cp), .q(root_bit));

    if (k < R) begin : g_sel
      fg_fanout #(.K(W)) u_sel_cp (.x(borrow_cp), .y(u));
    end else begin : g_sel_last
      assign u = '0;
    end

    fg_fanout #(.K(R-k+1)) u_root_cp (.x(root_bit), .y(root_cp));

    assign rem_all[k]    = DW'(d);
    assign rootcp_all[k] = R'(root_cp);
    assign root[R-k]     = root_cp[R-k];
  end

  initial begin
    assert (N >= 2 && N % 2 == 0)
      else $error("rev_sqrt: N must be even and at least 2");
  end
endmodule
