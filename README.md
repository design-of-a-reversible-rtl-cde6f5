# Reversible 6-bit unsigned square root

A combinational circuit that computes `root = floor(sqrt(radicand))` for a
6-bit unsigned radicand, built only from reversible gates: Feynman (CNOT)
gates, TR gates and a Fredkin-style controlled swap. In a reversible gate no
input combination is lost. The gate maps inputs to outputs one-to-one, and
plain fan-out is not allowed. So every signal used twice is copied by a gate,
and outputs nobody needs are left as "garbage". The circuit's cost is
counted in *quantum cost*: the number of elementary quantum gates behind each
reversible gate. The design is an array of 11 identical
cells and 10 Feynman gates, with quantum cost 131.

The RTL models the logic function of every reversible gate exactly, and the
netlist of gates is kept in the module hierarchy. Simulating or synthesising it
gives an ordinary (irreversible) circuit with the same function and the same
gate structure.

## The algorithm: restoring square root that appends only "01"

The root is found one bit per step, most significant first, taking the
radicand two bits at a time (for an even width N there are N/2 steps):

1. Step 1: subtract `01` from the top bit pair `{n5, n4}`.
2. Step k > 1: append the next bit pair to the remainder and subtract the
   trial value `{root so far, 0, 1}`, i.e. `4*root + 1`.
3. If the subtraction does not borrow, the new root bit is 1 and the
   difference becomes the remainder. If it borrows, the root bit is 0 and
   the value before the subtraction is kept (the remainder is *restored*).

Only the digits `01` are ever appended, and the only operation is a subtract,
so each step is one row of identical subtract-or-keep cells.

Worked example, radicand 45 = `10 11 01`:

| row | minuend               | trial value          | result      | root bit |
|-----|-----------------------|----------------------|-------------|----------|
| 1   | `10` = 2              | `01` = 1             | 1, no borrow | 1       |
| 2   | `01 11` = 7           | `0 1 01` = 5         | 2, no borrow | 1       |
| 3   | `010 01` = 9          | `0 11 01` = 13       | borrow, keep 9 | 0     |

Root `110` = 6, and 6² = 36 ≤ 45 < 49. The last row's value, 9, is the
remainder 45 − 36. It is not brought out (see below).

## The MRCSM cell (`mrcsm`)

Each cell is a one-bit *controlled subtract-multiplex*. Its inputs are a
minuend bit `a`, a subtrahend bit `b`, a borrow-in `c` and a select `u`:

    d1   = a ^ b ^ c                  difference
    bout = ~a&b | b&c | ~a&c          borrow out
    d    = u ? a : d1                 next remainder bit

It is made of four reversible gates, with two constant-0 inputs:

| gate | module | role | quantum cost |
|------|--------|------|--------------|
| Feynman, target 0 | `feynman_gate` | two copies of `a` (one for the subtractor, one for the multiplexer) | 1 |
| two TR gates | `tr_full_subtractor` (2 × `tr_gate`) | full subtractor → `d1`, `bout` | 6 |
| modified Fredkin | `modified_fredkin_gate` | multiplexer → `d` | 4 |

The total is 11. The full subtractor uses `TR(b, a, 0)` to form `a^b` and `~a&b`. Then
`TR(c, a^b, ~a&b)` gives `a^b^c` and `c&~(a^b) ^ ~a&b`, which is the borrow
because its two terms are never 1 at the same time. The four garbage outputs
`g[3:0]` are the pass-through copies of `b`, `c` and `u` and the multiplexer
input that was not selected.

`bout` does not depend on `u`. That is what lets a row feed its own final
borrow back to the select of every cell in the same row without forming a
loop.

### Select polarity

`u = 1` means "restore": the cell outputs its old minuend bit `a`. Each row's
`u` is that row's final borrow, and the root bit is the complement of that
borrow. This is the only polarity for which the arithmetic is correct. One
way of writing the cell equation, `D = U·a + U'·(a−b−c)`, makes it look as if
`U` were the root bit. It is not: read that way, it would keep the difference
after a negative result.

## The array (`rev_sqrt`)

Row k has enough cells for its minuend. That is 2 cells in row 1 and k+2
cells in row k > 1, so for N = 6 the rows have 2, 4 and 5 cells. Bit 0 is
the rightmost cell, and borrows ripple from right to left.

| row | cells | minuend `a` (MSB..LSB) | subtrahend `b` (MSB..LSB) | output |
|-----|-------|------------------------|---------------------------|--------|
| 1 | 2 | `n5 n4`                  | `0 1`            | `root[2]` = ~borrow |
| 2 | 4 | `r1[1:0] n3 n2`          | `0 root[2] 0 1`  | `root[1]` = ~borrow |
| 3 | 5 | `r2[2:0] n1 n0`          | `0 root[2] root[1] 0 1` | `root[0]` = ~borrow |

`rK` is the `d` vector of row K. The remainder after row k−1 is less than
2^k, so only its low k bits go on to row k. The top `d` bit of row 2 is
always 0 and is unused.

### Feynman gates outside the cells

| purpose | row 1 | row 2 | row 3 |
|---------|-------|-------|-------|
| borrow → borrow and root bit (`feynman_gate`, target 1) | 1 | 1 | 1 |
| copies of the borrow for the cells' `u` (`fg_fanout`) | 1 | 3 | – |
| copies of the root bit for later rows and the output (`fg_fanout`) | 2 | 1 | – |

That makes 10 gates. The whole design has 11 × 4 + 10 = 54 gates, with
quantum cost 11 × 11 + 10 = 131. `rev_sqrt_pkg` computes these counts for any
width (`num_mrcsm`, `num_feynman`, `quantum_cost`).

The last row's remainder is not an output. That is why its borrow is not
copied, and why its cells' `u` inputs are tied to 0: those cells always output
the raw difference, which is garbage. Inside the array the following outputs
are unused: 44 garbage outputs of the cells, the top remainder bit of row 2,
row 3's five `d` bits, and the spare copy of row 3's borrow. That is 51 in
all. The usual count for this design is 46, with fewer of these lines
counted.

## How far it can be trusted

These parts come from the design description: the algorithm, the cell's
composition and its cost, the gate counts, the row sizes they imply, and the
total cost of 131. The following were reconstructed or chosen here:

- The internal wiring of the two TR gates. It is a standard arrangement that
  meets the borrow equation above.
- The Modified Fredkin gate's second and third outputs. Only its multiplexer
  output and its cost of 4 are specified. A controlled swap is used.
- The exact arrangement of the Feynman copy chains. It is made to give the
  stated count of 10.
- The `N` parameter. The array is generated for any even width, with rows of
  2 then k+2 cells. Only N = 6 is the described design. N = 2, 4, 8 and 10
  are tested exhaustively.
- Odd radicand widths are not supported. For those the algorithm starts with
  a single bit instead of a pair.

The circuit is purely combinational: no clock, no registers, no reset. A
figure for power on an FPGA is sometimes quoted for this design, but that is
a property of a vendor tool and device, not of this RTL.

## Files

| file | content |
|------|---------|
| `rtl/rev_sqrt_pkg.sv` | gate costs, row width and gate-count functions |
| `rtl/feynman_gate.sv`, `rtl/tr_gate.sv`, `rtl/modified_fredkin_gate.sv` | the three reversible gates |
| `rtl/tr_full_subtractor.sv` | full subtractor from two TR gates |
| `rtl/mrcsm.sv` | the controlled subtract-multiplex cell |
| `rtl/fg_fanout.sv` | K copies of a signal from K−1 Feynman gates |
| `rtl/rev_sqrt.sv` | the top: `radicand[N-1:0]` in, `root[N/2-1:0]` out, `N = 6` |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `rev_sqrt_sizes_tb` |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. For example,
to run the full-size test from the repository root:

    verilator --binary --timing --assert --top-module rev_sqrt_tb \
      -y rtl +libext+.sv rtl/rev_sqrt_pkg.sv tb/rev_sqrt_tb.sv
    ./obj_dir/Vrev_sqrt_tb

- `rev_sqrt_tb` tries all 64 radicands against an integer square root. For
  each row it counts how often the row restored and how often it kept the
  difference, and it fails if a row never did one or the other. It also
  checks the counts of 11 cells, 10 Feynman gates and cost 131.
- `rev_sqrt_sizes_tb` runs every radicand through arrays with N = 2, 4, 8 and 10.
- The gate and cell testbenches try every input. Besides the function, they
  check that the outputs are distinct for all inputs, i.e. that the gate is
  reversible.

The tests need no data files. To try another width, instantiate
`rev_sqrt #(.N(8))`; `N` must be even.
