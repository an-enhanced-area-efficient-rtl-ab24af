# Reconfigurable multimode interleaver address generator (802.11a/g, 802.16e)

The OFDM PHYs of IEEE 802.11a/g (WLAN) and IEEE 802.16e (mobile WiMAX)
protect each coded block with a block interleaver: the Ncbps bits of one
OFDM symbol are written into memory in one order and read out in another.
The read order is defined by a two-step permutation with `mod` and `floor`
operations. For bit index n, d = 16 columns and s = max(Nbpsc/2, 1):

```
m = (Ncbps/d) * (n mod d) + floor(n/d)
k = s * floor(m/s) + (m + Ncbps - floor(d*m/Ncbps)) mod s
```

This RTL computes k for every n, one address per clock. It covers all four
modulations (BPSK, QPSK, 16-QAM, 64-QAM) and every block size from 48 to 576
bits, with no address ROM and no divider. Apart from the counters, the
hardware is a few 2-bit adders, five small multiplexers, one small
multiplier and one adder.

## The idea: a 2-D walk plus a small row correction

Split n into a column index i = n mod 16 (0..15, fastest) and a row index
j = floor(n/16) (0..Ncbps/16 - 1). Let R = Ncbps/16. For every block size
the design supports, R is a multiple of s, and then the formula above becomes

```
k = R*i + j + delta(i mod s, j mod s)
```

with a correction `delta` that takes only five values:

| modulation | s | i mod s | j mod s | row term  |
|------------|---|---------|---------|-----------|
| BPSK, QPSK | 1 | -       | -       | j         |
| 16-QAM     | 2 | 0       | any     | j         |
|            |   | 1       | 0       | j + 1     |
|            |   | 1       | 1       | j - 1     |
| 64-QAM     | 3 | 0       | any     | j         |
|            |   | 1       | 0       | j + 2     |
|            |   | 1       | 1, 2    | j - 1     |
|            |   | 2       | 0, 1    | j + 1     |
|            |   | 2       | 2       | j - 2     |

For BPSK and QPSK the addresses step by R from one column to the next. For
16-QAM they alternate between steps of R+1 and R-1 (for example 13, 11 at
192 bits). For 64-QAM they cycle through R+2, R-1, R-1 (for example 26, 23,
23 at 384 bits). So the hardware needs:

* a **column counter** (i, 0..15) and a **row counter** (j, 0..R-1) that
  advances each time the column counter wraps;
* **MOD_column** and **MOD_row**, which compute i mod s and j mod s;
* a **selection unit**, which picks j, j±1 or j±2;
* a **multiplier and adder**, which form R*i + row term.

## Configuration codes

`mod_type` (2 bits) and `block_size` (4 bits) set the mode. Both are
latched on `start`.

| modulation | mod_type | block sizes supported (Ncbps)            |
|------------|----------|------------------------------------------|
| BPSK       | 00       | 48, 96, 192, 288                         |
| QPSK       | 11       | 96, 144, 192, 288, 384, 432, 480, 576    |
| 16-QAM     | 01       | 192, 288, 384, 576                       |
| 64-QAM     | 10       | 288, 384, 432, 576                       |

| block_size | Ncbps | R = Ncbps/16 |
|------------|-------|--------------|
| 1000       | 48    | 3            |
| 0000       | 96    | 6            |
| 0001       | 144   | 9            |
| 0010       | 192   | 12           |
| 0011       | 288   | 18           |
| 0100       | 384   | 24           |
| 0101       | 432   | 27           |
| 0110       | 480   | 30           |
| 0111       | 576   | 36           |

The modulation encoding is chosen so that all control signals come straight
from its bits:

* `^mod_type` is 0 for BPSK/QPSK (no correction) and 1 for 16-QAM/64-QAM.
* `mod_type[0]` picks mod 2 (QPSK, 16-QAM) or mod 3 (BPSK, 64-QAM) in both
  MOD circuits. It also picks +1 (16-QAM) or +2 (64-QAM) in the selection
  unit.

The block-size decoder (`block_size_decoder`) is two multiplexers. M6 picks
one of eight values of R from code bits [2:0], and M7 overrides the result
with R = 3 when bit 3 is set. The codes 1001..1111 are not in the table and
decode as the 48-bit block. Other modulation / block-size pairs are outside
the specification. For 16-QAM and 64-QAM they can break the row correction
(R must be a multiple of s), so an assertion in the top reports them when
`start` loads one.

## The MOD circuits

All residues are computed with 2-bit ripple carry adders. `rca2` writes each
adder as three flat sum-of-products equations, so each output is one small
LUT. Since 4 ≡ 1 (mod 3), x mod 3 is the sum of the base-4 digits of x,
taken mod 3.

**MOD_column** (`mod_column`, 4-bit input C3..C0) works in four steps:

1. `{s1,s0}, c = {C1,C0} + {C3,C2}`.
2. `{s3,s2} = {s1,s0} + {0,c}`. This is the end-around carry. It cannot
   overflow, because a carry in step 1 leaves `{s1,s0}` at 2 or less.
3. A result of 3 is folded to 0 by inverting both bits. This gives i mod 3.
4. The MOD2 value is C0. A final multiplexer on `mod_type[0]` picks between
   the two.

**MOD_row** (`mod_row`, 6-bit input, j ≤ 35) applies the same principle to
three base-4 digits. It is built from `mod3_reduce`, a parameterised chain
with one add and one end-around-carry add per extra digit, followed by the
same fold of 3 to 0. `mod3_reduce` works at any width. The 8-bit and 16-bit
versions, which are the widths the circuit is usually benchmarked at, are
instances of it (default `WIDTH = 16`).

**MOD7** (`mod7_reduce`, default 10-bit input) carries the idea over to
base-8 digits (8 ≡ 1 mod 7). It adds 3-bit digits with end-around carry and
folds 7 to 0. The address generator does not use it. It stands on its own
ports (`mod7_x`, `mod7_r`) in the top.

## The selection unit

`selection_unit` chooses the row term from j, j+1, j+2, j-1 and j-2 with
five multiplexers:

```
M2 = mod_type[0] ? j+1 : j+2        // 16-QAM : 64-QAM
M3 = (MOD_row != 0) ? j-1 : M2      // used when i mod s = 1
M4 = MOD_row[1] ? j-2 : j+1         // used when i mod s = 2 (64-QAM only)
M5 = MOD_column==0 ? j : MOD_column==1 ? M3 : M4
M1 = ^mod_type ? M5 : j             // BPSK/QPSK bypass
```

The correction never leaves the range 0..R-1. j-1 is taken only when
j mod s ≠ 0, so j ≥ 1, and j-2 only when j mod 3 = 2. j+1 is taken only
when j mod s < s-1, and j+2 only when j mod 3 = 0. Because R is a multiple
of s, the result is still below R. The 6-bit arithmetic therefore never
wraps.

`address_adder` forms `addr = R*i + row_term`, a 7×4-bit product plus a
6-bit term, in 10 bits (at most 575).

## Interface and timing of `interleaver_addr_gen`

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock |
| `rst_n`      | in  | 1     | asynchronous reset, active low |
| `start`      | in  | 1     | latch `mod_type` and `block_size`, restart at n = 0 |
| `en`         | in  | 1     | advance to the next address |
| `mod_type`   | in  | 2     | modulation code |
| `block_size` | in  | 4     | block-size code |
| `addr`       | out | 10    | interleaver address k for the current n |
| `valid`      | out | 1     | a configuration has been loaded since reset |
| `first`      | out | 1     | `addr` is the first of a block (n = 0) |
| `last`       | out | 1     | `addr` is the last of a block (n = Ncbps-1) |
| `mod7_x`     | in  | 10    | input of the separate MOD7 unit |
| `mod7_r`     | out | 3     | `mod7_x mod 7` |

* After `start` is sampled high, the next cycle shows address 0 of the new
  mode.
* Each cycle with `en` high (and `start` low) moves to the next address. A
  block takes exactly Ncbps enabled cycles.
* The next block follows with no gap: the counters wrap, and `first` marks
  its start.
* `en` low holds the address (a stall).
* `start` may come at any time, including in the middle of a block. It
  abandons the current block.
* `addr`, `first` and `last` are combinational from the counter and
  configuration registers. There is no output register.
* The design holds 17 flip-flops: a 4-bit column counter, a 6-bit row
  counter, a 6-bit configuration register and a run flag.

## Where this RTL makes its own choices

The following follow from the permutation formula and the mode encoding:

* the datapath structure: counters, the two MOD circuits, M1-M5, the
  multiply-add;
* the MOD_column steps and its adder equations;
* the mode and block-size codes.

These are this implementation's choices:

* **Counter order.** The column index i is the fast counter and the row
  index j the slow one. Only this order produces the published example
  sequences (for example 0, 3, 6, …, 45, 1, 4, … for 48-bit BPSK).
* **MOD_row internals.** Only the function and the 6-bit input width of
  this circuit were specified. The digit-sum chain here is the column
  circuit's method extended to three digits.
* **MOD7 internals.** Only the function and the 10-bit input were
  specified. The 3-bit digit adders use `+` rather than flat equations.
* **Control interface.** `start`/`en`, the configuration latch, the
  `valid`/`first`/`last` flags, and asynchronous active-low reset.
* **Block-size decode.** How M6 and M7 are arranged, and the handling of
  unlisted codes.
* **No output register.** In an FPGA at high clock rates, a register on
  `addr` adds one cycle of latency and shortens the critical path through
  the multiplier.

The design generates addresses only. The interleaver memory (write in
order, read at `addr`, or the reverse for a deinterleaver) is not part of
it.

## Verification

Each module has a self-checking testbench in `tb/`. None of them uses the
RTL's own structure as its reference:

* `tb_rca2`, `tb_mod_column`, `tb_mod_row`, `tb_block_size_decoder`:
  exhaustive against `+`, `%` and the code table.
* `tb_mod3_reduce` (6, 7, 8, 16 bits) and `tb_mod7_reduce` (10, 16 bits):
  exhaustive against `%`.
* `tb_selection_unit`: every modulation, every row of the 576-bit block and
  every column residue, against k - R*i with k from the two-step formula.
* `tb_column_counter` and `tb_row_counter`: random enable and step patterns
  against a cycle model, with checks on the wrap period.
* `tb_address_adder`: every R, i and in-range row term.
* `tb_interleaver_addr_gen`: the whole design at its only size. It runs:
  * all 20 supported modulation / block-size pairs for two back-to-back
    blocks each, checking every address against the formula, checking that
    each block is a permutation of 0..Ncbps-1, and checking that each block
    takes Ncbps cycles;
  * the first 32 addresses of four published example sequences: 48-bit
    BPSK, 96-bit QPSK, 192-bit 16-QAM and 384-bit 64-QAM;
  * 20,000 cycles of random stalls and mid-block mode switches;
  * all 1024 inputs of the MOD7 unit.

  It counts how often each row correction (-2..+2), stall, mode switch and
  block wrap happens, and fails if any of them never occurs.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/intlv_pkg.sv \
    tb/tb_interleaver_addr_gen.sv --top-module tb_interleaver_addr_gen
./obj_dir/Vtb_interleaver_addr_gen
```

Any other testbench works the same way: name its file and top module. The
shared constants and types (d = 16, widths, the `mod_type_e` and
`block_size_e` enums, and the table of supported pairs) are in
`rtl/intlv_pkg.sv`. Supporting a different number of columns means changing
`D` and `COL_W` there, and replacing the fixed 4-bit `mod_column` with a
`mod3_reduce` instance.
