# Adaptive WiMAX deinterleaver address generator

An IEEE 802.16e receiver must undo the transmitter's bit interleaver before FEC
decoding. The deinterleaver writes a block of N_cbps coded bits into a buffer and reads
it back in a permuted order, and that order depends on the modulation (QPSK, 16-QAM,
64-QAM) and on the block size. The standard defines the order with two permutations
that contain floor functions. Evaluated directly, they need dividers. Precomputed, they
need one address table per mode and block size.

This RTL produces the read addresses with no division and no table. Each address is the
previous address plus a small signed increment. The increment is always a multiple of
the row count d (d = 16 for 802.16e). It is chosen from the position in the block by a
few 2-bit phase counters. The generator delivers one address per clock. It switches
between QPSK, 16-QAM and 64-QAM at block boundaries, which is what adaptive modulation
needs.

## The address sequence

View the block as a matrix with d = 16 rows and C = N_cbps/d columns. Position p of
the received stream (p = 0 … N_cbps-1) lies in row `j = p / C` and column `i = p mod C`.
Let s = N_cpc/2 be the group size: 1 for QPSK, 2 for 16-QAM, 3 for 64-QAM. The
standard's deinterleaver gives

    m = s*floor(p/s) + (p + floor(d*p/N)) mod s
    k = d*m - (N-1)*floor(d*m/N)

When C is a multiple of s, this reduces to

    k = j + d * col(i, j),    col(i, j) = s*floor(i/s) + ((i mod s) + (j mod s)) mod s

In words: row j is read one column at a time, and inside every group of s columns the
column order is rotated by the row phase `rho = j mod s`. For N_cbps = 96 (six columns),
the first four rows are:

| row | QPSK               | 16-QAM             | 64-QAM             |
|-----|--------------------|--------------------|--------------------|
| 0   | 0 16 32 48 64 80   | 0 16 32 48 64 80   | 0 16 32 48 64 80   |
| 1   | 1 17 33 49 65 81   | 17 1 49 33 81 65   | 17 33 1 65 81 49   |
| 2   | 2 18 34 50 66 82   | 2 18 34 50 66 82   | 34 2 18 82 50 66   |
| 3   | 3 19 35 51 67 83   | 19 3 51 35 83 67   | 3 19 35 51 67 83   |

## How the increments are chosen

Inside a row, the change from one address to the next is `d * (col(i+1) - col(i))`.
Only a handful of values occur. Let `t = i mod s` be the column phase and `rho` the row
phase:

| scheme | rho | t = 0 | t = 1 | t = 2 |
|--------|-----|-------|-------|-------|
| QPSK   | 0   | +d    |       |       |
| 16-QAM | 0   | +d    | +d    |       |
| 16-QAM | 1   | −d    | +3d   |       |
| 64-QAM | 0   | +d    | +d    | +d    |
| 64-QAM | 1   | +d    | −2d   | +4d   |
| 64-QAM | 2   | −2d   | +d    | +4d   |

The step at `t = s-1` crosses into the next group of columns. That is where +3d and +4d
come from. A row with phase rho starts at column rho, so its first address is
`j + d*rho`. The complete set of increments is {+d, −d, +3d, −2d, +4d}.

Column and row phases come from counters that wrap at s, so t and rho never need a
modulo. The generator is exact only when C is a multiple of s. That holds for every
802.16e block size. The 16-QAM and 64-QAM blocks reject, at elaboration, any column
limit that breaks it.

## Structure

```
 mastermode, cr ──► block latch (mode, code rate of the running block)
                          │
      ┌───────────────────┼────────────────────┐
      ▼                   ▼                    ▼
  qpsk_block         qam16_block          qam64_block    code-rate mux → last column
      │ step, row_off     │                    │          (t, rho) → increment
      └─────────┬─────────┴────────────────────┘          rho_next → next-row offset
                ▼
           kn_update   master-mode select, then kn ← kn + step, or j+1 + row_off at a row end
                ▲
 column_counter (i, t = i mod s, wrap at last column)
 row_counter    (j, rho = j mod s, wrap at d-1)
```

| file | role |
|------|------|
| `rtl/wimax_deint_pkg.sv` | mode enum (0 QPSK, 1 16-QAM, 2 64-QAM), widths, mode → s |
| `rtl/column_counter.sv` | column index i, compared against (N_cbps/d)-1, plus the column phase t |
| `rtl/row_counter.sv` | row index j, compared against d-1, plus the row phase rho and rho_next |
| `rtl/qpsk_block.sv` | 8-way code-rate mux; increment is always +d |
| `rtl/qam16_block.sv` | 4-way code-rate mux; increments +d, −d, +3d; row offset d·rho_next |
| `rtl/qam64_block.sv` | 4-way code-rate mux; increments +d, −2d, +4d; row offset d·rho_next |
| `rtl/kn_update.sv` | selects the active scheme's increment and offset; holds the address register |
| `rtl/wimax_deint_addr_gen.sv` | top level: block sequencing and the wiring above |

All three scheme blocks run in parallel on the shared phases, and the master mode picks
one of them. The datapath holds one 10-bit adder, two small counters with comparators,
and a few 2-bit phase registers.

## Code rate and block size

Each scheme has its own code-rate mux. The mux holds the last column index
(N_cbps/d)-1, and so fixes the block size. The defaults are parameters of the top
level (`QPSK_LAST`, `QAM16_LAST`, `QAM64_LAST`):

| mode | `cr` | column limits (default) | N_cbps = 16·(limit+1) |
|------|------|-------------------------|-----------------------|
| QPSK | 0–7  | 8, 16, 24, 17, 32, 26, 40, 48 | 144, 272, 400, 288, 528, 432, 656, 784 |
| 16-QAM | 0–3 (`cr[1:0]`) | 11, 17, 23, 35 | 192, 288, 384, 576 |
| 64-QAM | 0–3 (`cr[1:0]`) | 11, 17, 26, 35 | 192, 288, 432, 576 |

The 16-QAM and 64-QAM entries are 802.16e block sizes. The QPSK entries are kept as
published for this architecture. Of those, only 144, 288 and 432 are standard 802.16e
QPSK block sizes. The other entries still give a valid row/column read-out (a plain
transpose), but of non-standard block sizes.

Six of the QPSK values, 8 to 48 in steps of 8, are also N_cbps/12 for the rate-1/2 QPSK
sizes 96 … 576, so they may originally have been meant for d = 12. Reading them as
16-row column limits, as done here, puts every scheme's mux under one rule.

To serve a different set of block sizes, override the three arrays. For example,
setting all limits to 5 gives the 96-bit block of the table above. The widths allow up
to 64 columns (`COL_W = 6`) and addresses up to 1023 (`ADDR_W = 10`).

## Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `en` | in | 1 | produce the next address this cycle |
| `mastermode` | in | 2 | 0 QPSK, 1 16-QAM, 2 64-QAM (3 acts as QPSK) |
| `cr` | in | 3 | code-rate select |
| `kn` | out | 10 | deinterleaver (read) address |
| `kn_valid` | out | 1 | `kn` is new this cycle (registered copy of `en`) |
| `kn_first`, `kn_last` | out | 1 | first / last address of a block, qualified by `kn_valid` |
| `blk_mode`, `blk_last_col` | out | 2, 6 | mode and column limit of the running block |

* An address requested with `en` appears on `kn` one clock later. With `en` held high
  there is one address per clock and no gap between blocks.
* Dropping `en` freezes the sequence, and `kn_valid` goes low.
* `mastermode` and `cr` are sampled only when a block starts: on the first `en` after
  reset, and on the `en` that follows a block's last address. A change in the middle of
  a block takes effect at the next block. Every block is therefore a complete
  permutation of 0…N_cbps-1.
* Every block starts at address 0.

## Departures and choices

* **Mode switch timing.** Published waveforms for this architecture show the address
  stream carrying on across a QPSK→16-QAM switch without a pause. Here the switch waits
  for the block boundary, because a switch inside a block cannot give a valid
  permutation.
* **Mode encoding.** 0 = QPSK, 1 = 16-QAM, 2 = 64-QAM. One published drawing of the
  top-level mux lists the inputs in the reverse order (0 = 64-QAM). The encoding used
  here matches the published waveform, where code 00 produces a QPSK row.
* **16-QAM code-rate mux.** Its contents are this design's choice: the four 802.16e
  16-QAM block sizes 192, 288, 384 and 576.
* **Phase counters.** The mod-s column and row phase counters, the row-start load
  `j+1 + d*rho_next`, the `en`/`kn_valid` handshake and the reset behaviour are this
  design's own. Only the counters with comparators, the per-scheme code-rate muxes, the
  master-mode select and the "present address plus increment" adder belong to the
  original architecture.
* **Fixed d.** d is a parameter (`D`, default 16, 12 also tested) and is not a
  run-time input.
* **No buffer.** The buffer that the addresses read is not included.
* **No timing claims.** Nothing here is tied to a particular FPGA.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_wimax_deint_addr_gen` runs the top level at its default parameters. A reference
  model inside the testbench evaluates the floor-function equations above and tracks
  block sequencing independently of the design. The stimulus covers:
  * every code rate of every mode, with one address per clock checked;
  * blocks with random `en` stalls;
  * mode and code-rate changes in mid-block, which must not act until the next block;
  * mode code 3;
  * the adaptive order QPSK → 16-QAM → 64-QAM → back.

  Every block is checked to be a permutation. The testbench counts each increment type
  and each mechanism, and fails if one never occurred.
* `tb_ref_rows_ncbps96` sets all column limits to 5 (N_cbps = 96). It checks the rows
  shown in the table above for all three modes, and whole blocks against the equations.
* `tb_rows12` sets d = 12 and standard block sizes. Every mode and code rate is checked
  against the equations. The other row count of the standard needs only parameter
  changes.
* `tb_qpsk_block`, `tb_qam16_block` and `tb_qam64_block` check every (cr, t, rho,
  rho_next) combination against `col(i, j)`.
* `tb_column_counter`, `tb_row_counter` and `tb_kn_update` check random stimulus
  against small models.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/wimax_deint_pkg.sv \
    tb/tb_wimax_deint_addr_gen.sv --top-module tb_wimax_deint_addr_gen -o sim
./obj_dir/sim
```

For another testbench, substitute its name. `-Irtl` lets Verilator find the modules
under `rtl/` by name. Every testbench finishes in well under a second.
