# Built-in 2-D Hamming product code for SRAM-FPGA configuration bits

Radiation can flip single bits in the configuration SRAM of an FPGA, and in
space several bits per frame can be hit before the next repair. A plain
single-error-correcting code per frame gives up as soon as one frame holds
two errors. This design arranges the configuration bits as a square window
and protects **every row and every column** with a small Hamming code. That
is a 2-D Hamming product code (2-D HPC). A bit that one direction cannot
repair is often easy to repair from the other direction, so alternating
row and column passes of single-error correction can repair many errors per
window. No external golden copy of the bitstream is needed.

The default configuration is a 7 x 7 window: 49 data bits, 4 check bits per
row and 4 per column. Window size, check-bit count and pass limit are
parameters. The RTL has also been run at 32 x 32 (a 1 Kb frame) and
64 x 64.

The design follows the paper "Implementation of Soft Error-Resilient Built-In
2d Hamming Product Code Using Verilog" (Patil, Hegade, Lele). The paper gives
the 7 x 7 window, the parity matrix, the row-then-column correction and
the top-level signal names. The 2-D buffer, the clocked iterative
controller, its stopping rules and the status outputs are this design's own.
The last section lists every departure.

## The line code

Each line (a row or a column) of N data bits gets R check bits. The code is
set by a parity matrix with N columns of R bits. The check bits of a line
are the XOR of the matrix columns at the positions where the line holds a 1.
The default 7 x 4 matrix, with position 0 first, is:

| position | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| column | 1001 | 1010 | 1011 | 1000 | 0100 | 0010 | 0001 |

A line of all ones therefore has check bits `0111`. If position 2 of that
line flips to 0, its check bits become `1100`.

To check a line, the decoder recomputes its check bits and XORs them with
the stored ones. The result is the **syndrome**:

* A zero syndrome means the line is consistent.
* If the syndrome equals column j, bit j is wrong and is inverted. In the
  example above the syndrome is `0111 ^ 1100 = 1011`, which is column 2.
* A non-zero syndrome that matches no column cannot be repaired within the
  line. The line is left unchanged and flagged.

Two errors in one line XOR two columns together. The result is either no
column at all (detected, not repaired), or by chance a third column. In
that case the row pass *inverts a bit that was correct*. For example,
`1010 ^ 0010 = 1000` turns errors at positions 1 and 5 into a wrong
"repair" at position 3. The pass in the other direction then sees three
columns with one error each and repairs all three. Iterating relies on this.

The matrix is a port (`parity`), not a constant. Any matrix with N distinct
non-zero columns works. `hpc_pkg::HPC_H_DEFAULT` holds the default matrix.

## Window layout

The window arrives as a row-major bit stream `[0:N*N-1]`, in which bit r*N+c
is row r, column c. All vectors use ascending ranges, so a bit string
written left to right starts at position 0. Column j of the window is read
top to bottom: row i is position i of that column. The encoder produces
`row_chk[i]` for every row and `col_chk[j]` for every column, 2*N*R check
bits in all (56 for 7 x 7). The same matrix is used in both directions.

## Two correctors

The top, `sevenbihamming`, feeds the same received window to two
correctors.

**One iteration, combinational** (`hpc_decoder`): a row pass corrects one
bit per row and gives `sec_corrected_mat`. A column pass on that result
corrects one bit per column and gives `sec_modified`. `err_det` and `col_err`
show which bits each pass inverted. `detect` is set if any row or column of
the received window fails its check. `hpc_fail` is set if the result still
fails a check. Nothing is clocked: the outputs follow the inputs.

**Iterative scrub, clocked** (`hpc_frame_buffer` + `hpc_iter_ctrl`):

1. A one-cycle `start` copies the received window and the check bits into
   the 2-D buffer.
2. The buffer reads and writes whole lines in either direction. A single
   line corrector therefore serves both the row and the column passes.
3. The controller visits one line per clock: rows 0..N-1, then columns
   0..N-1, then rows again, and so on. Each repaired line is written back
   in the cycle it is read.
4. `col_first` makes the first pass a column pass.

When to stop is the subtle part:

* **success**: a row pass and a column pass in a row both found every line
  consistent. One clean pass is not enough. Three errors in one row can
  cancel to a zero syndrome (positions 0, 3 and 6: `1001^1000^0001 = 0000`),
  and only the column pass sees them.
* **uncorrectable**: two passes in a row detected errors but could repair
  none, so nothing can change any more. The run also gives up once
  `MAX_HALF_PASSES` passes (default 8) have been spent.

A clean window therefore takes 2 passes. A run always takes exactly
`half_passes * N` cycles from the `start` edge to the first cycle with
`done` high. A 7 x 7 window finishes in 14 to 56 cycles. While the run is
busy, `start` is ignored.

`frame_dirty` marks each row that was changed. These are the frames that
have to be written back into configuration memory. Rows that were not
changed need no reconfiguration, so the system is interrupted only for the
frames that are actually bad. `corrections` counts the repaired lines.

## What it can and cannot repair

* Any single error, and any two errors, are always repaired, already by
  one iteration (the decoder testbench tries every pair of positions).
* Errors on the four corners of a rectangle (two rows x two columns) are
  not repaired. Each row and each column holds two errors, so a pass can
  at best flag the line. At worst it "repairs" a third, correct bit. The
  run then ends as uncorrectable.
* With many errors the decoder can also converge on a *different*
  consistent window. This is a silent miscorrection, and the code cannot
  tell it apart from success. In the 7 x 7 test with 1 to 10 random errors,
  this happened in about one window in fifteen.
* The check bits are assumed error-free: they are stored and read, but
  never corrected. With the default matrix, data positions 3 to 6 have the
  same syndromes as single check-bit errors. A flipped check bit would
  therefore be "repaired" as a data error. A design that must survive
  check-bit upsets needs a matrix whose data columns all have at least two
  ones, plus a rule for telling data errors from check-bit errors.

Measured with the testbenches, using random data and random error positions
and with the check bits kept error-free:

| window | check bits / line | errors | one iteration | iterative |
|---|---|---|---|---|
| 32 x 32 | 6 | 10 | 186 / 200 | 199 / 200 |
| 64 x 64 | 7 | 4 | 50 / 50 | 50 / 50 |

A third run hits a 32 x 32 window with ten errors spread uniformly over the
data and check bits (1024 + 384 bits). The data came back intact in 194 of
200 windows. The controller, however, reported success in only 10 of them.
A line whose stored check bit is wrong keeps a non-zero syndrome that no
pass can clear, so the run ends as uncorrectable even though the data is
right. Where the check bits sit in upset-prone SRAM, `uncorrectable` alone
does not mean the data is bad.

All three runs used the first N R-bit values with at least two ones as the
parity matrix. The paper reports about 95 % (one iteration) and 99 % (many
iterations) for ten errors in a 32 x 32 window. Those figures come from a
million samples that include check-bit errors, so they are not directly
comparable.

## Modules

| file | role |
|---|---|
| `rtl/hpc_pkg.sv` | default sizes, default parity matrix, pass direction enum |
| `rtl/hamming_enc.sv` | check bits of one line (AND with matrix columns, XOR) |
| `rtl/hamming_sec.sv` | syndrome and single-error correction of one line |
| `rtl/hpc_encoder.sv` | row and column check bits of a window |
| `rtl/hpc_decoder.sv` | one combinational iteration (row pass, column pass) |
| `rtl/hpc_frame_buffer.sv` | 2-D buffer with row/column line access |
| `rtl/hpc_iter_ctrl.sv` | iterative pass controller and stopping rules |
| `rtl/sevenbihamming.sv` | top |

Parameters of the top: `N` (window side, default 7), `R` (check bits per
line, default 4) and `MAX_HALF_PASSES` (default 8). Choose R so that the
matrix can hold N distinct non-zero columns. N <= 2^R - 1 is required, and
N <= 2^R - R - 1 keeps room for check-bit patterns. For 32 x 32 use R = 6;
for 64 x 64 use R = 7.

The configuration memory itself is not part of the RTL. The read-back
window enters on `bitstream_rec`, the original on `bitstream`, and
`frame_dirty` together with `scrub_window` is what a reconfiguration port
would consume. In the test setup the check bits come from encoding
`bitstream`. In a deployed scrubber they would be stored alongside the
frames when the FPGA is configured.

The area after coarse synthesis at the default size is about 1,500
word-level cells and 138 flip-flops. Most of the cells are the
combinational one-iteration path. A scrubber that needs only the iterative
path can leave the `hpc_decoder` outputs unconnected.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=<n> failures=<m>`. `tb/hpc_ref_pkg.sv` is an independent
reference model: it computes check bits one check bit at a time and models
correction one pass at a time. The testbenches compare the RTL with it.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
    rtl/hpc_pkg.sv tb/hpc_ref_pkg.sv tb/tb_sevenbihamming.sv \
    --top-module tb_sevenbihamming -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_hamming_enc` | check bits `0111`, `1100`, `0110` for the reference lines; random lines |
| `tb_hamming_sec` | every single error found and repaired; double errors as modelled |
| `tb_hpc_encoder` | row/column check bits of random windows |
| `tb_hpc_decoder` | reference 49-bit case (errors at row 1 col 2, row 2 col 6), row miscorrection repaired by columns, rectangle, random |
| `tb_hpc_frame_buffer` | row/column reads and writes against a shadow copy |
| `tb_hpc_iter_ctrl` | clean, double-in-row, multi-pass, column-first, rectangle, 400 random windows, exact cycle counts |
| `tb_sevenbihamming` | whole design at default parameters; counts every mechanism (detect, row fix, column fix, one-iteration failure, multi-pass success, column first, give-up, clean, start while busy) |
| `tb_hpc_large_window` | 32 x 32 with ten errors and 64 x 64 with four, success rates |

`tb_hpc_large_window` needs about two minutes to build and under a minute to
run. All the others finish within seconds.

Verilator prints `ASCRANGE` warnings for the ascending ranges, and
`UNUSEDSIGNAL` warnings for corrector outputs that a given instance does
not need. Neither warning affects the circuit.

## Departures from the paper and own choices

* The paper's top has additional one-bit inputs (`con_sig`, `ex_sig`,
  `parity_in`, `parity_sig`, `replace`, `set`, `temp`) whose function it
  does not give. They look like debug signals and are left out.
* The paper prints only the row parity matrix. Using the same matrix for
  the columns is a choice.
* `sec_corrected_mat` is taken to be the row-pass result and `sec_modified`
  the result after the column pass.
* The paper names a 2-D SRAM buffer but does not describe its organisation.
  Here it is a register array with one line-read and one line-write port,
  each usable by row or by column.
* The clocked iterative path, one line per cycle, the stopping rules,
  `col_first`, `frame_dirty` and the counters are all this design's own.
  They implement the multi-iteration correction the paper describes: "1.5
  iterations" is row, column, row, and the equivalent correction starts
  from the columns.
* Check bits are not protected (see above), although the paper's error-rate
  figures include check-bit errors.
* Resets are synchronous and active high. The one-iteration path has no
  clock.
