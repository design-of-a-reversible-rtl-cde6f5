// rev_sqrt_pkg: shared constants and sizing functions of the reversible
// square-root array.
//
// The array takes an unsigned radicand of N bits (N even) and computes
// R = N/2 root bits, one per row of Modified Reversible Controlled-Subtract-
// Multiplex (MRCSM) cells. Row 1 subtracts "01" from the top bit pair and is
// two cells wide; every later row k subtracts {partial root, 0, 1} from
// {previous remainder, next bit pair} and is k+2 cells wide. For N = 6 this
// gives rows of 2, 4 and 5 cells: 11 MRCSM cells in all.
//
// Quantum costs per gate follow the values quoted for this design: Feynman
// gate 1, the two-TR-gate full subtractor 6, the Modified Fredkin gate 4, so
// one MRCSM cell costs 1 + 6 + 4 = 11. The Feynman-gate count of the array
// follows from the fan-out scheme of rev_sqrt (one complementing gate per
// row, copies of each row's borrow for its cells, copies of each root bit for
// the later rows and the output); for N = 6 it is 10 and the total cost 131.
package rev_sqrt_pkg;

  localparam int unsigned QC_FEYNMAN  = 1;
  localparam int unsigned QC_TR_SUB   = 6;   // two TR gates wired as a full subtractor
  localparam int unsigned QC_MFREDKIN = 4;
  localparam int unsigned QC_MRCSM    = QC_FEYNMAN + QC_TR_SUB + QC_MFREDKIN;

  // Number of MRCSM cells in row k (1-based) of the array.
  function automatic int unsigned row_width(int unsigned k);
    return (k == 1) ? 2 : k + 2;
  endfunction

  // MRCSM cells in the whole array for an n-bit radicand.
  function automatic int unsigned num_mrcsm(int unsigned n);
    int unsigned s = 0;
    for (int unsigned k = 1; k <= n / 2; k++) s += row_width(k);
    return s;
  endfunction

  // Feynman gates outside the cells for an n-bit radicand. Row k has one
  // gate making the true and complement forms of its borrow, row_width(k)-1
  // gates copying the borrow to the cells' select inputs (not in the last
  // row, whose remainder is not used), and R-k gates copying the root bit
  // to the R-k later rows and the output.
  function automatic int unsigned num_feynman(int unsigned n);
    int unsigned r = n / 2;
    int unsigned s = 0;
    for (int unsigned k = 1; k <= r; k++) begin
      s += 1;
      if (k < r) s += row_width(k) - 1;
      s += r - k;
    end
    return s;
  endfunction

  function automatic int unsigned quantum_cost(int unsigned n);
    return num_mrcsm(n) * QC_MRCSM + num_feynman(n) * QC_FEYNMAN;
  endfunction

endpackage
