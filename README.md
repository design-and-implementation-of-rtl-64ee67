# Divider-free address generator for the WiMAX (802.16e) block deinterleaver

The 802.16e channel interleaver spreads each block of `Ncbps` coded bits with
two permutations. The first maps neighbouring coded bits onto subcarriers that
are far apart. The second alternates which bits land on the more and less
reliable bit positions of the QAM constellation. Written directly, both use floor and
modulo operations on `Ncbps`, which are costly in logic. The receiver must undo
them: for every received bit it needs the position that bit had before
interleaving. Storing those addresses in lookup tables costs a table per block
size and per modulation.

This design computes each address instead. The received block is treated as a
matrix of **d = 16 rows** and `Ncbps/16` columns, filled row by row. With row
index `j` and column index `i`, the original position `Kn` has a short closed
form for each modulation. It needs only the residues of `i` and `j` mod 2 or
mod 3, and a small finite-state machine keeps those as counters. The result is
one address per clock, with no divider, no multiplier (16 is a shift) and no
table.

## The address relations

For received position `n = j*C + i` (with `C = Ncbps/16` columns), the
original bit index is `Kn = 16*c + j`. Here `c` is the source column:

| modulation | bits/symbol | source column `c` |
|---|---|---|
| QPSK   | 2 | `c = i` |
| 16-QAM | 4 | `c = i+1` if `j` odd and `i` even; `c = i-1` if `j` odd and `i` odd; else `c = i` |
| 64-QAM | 6 | `c = i - i%3 + (i%3 + j%3) % 3` |

All three come from inverting the standard's two interleaver steps,

```
m_k = (Ncbps/16)*(k mod 16) + floor(k/16)
j_k = s*floor(m_k/s) + (m_k + Ncbps - floor(16*m_k/Ncbps)) mod s,   s = max(bits/2, 1)
```

Because there are 16 rows, `floor(16*m_k/Ncbps)` is simply the row of `k`.
Within a row, the second step then rotates each group of `s` columns by the row
number. The inverse rotates it back. For QPSK (`s = 1`) there is nothing to
rotate. For 16-QAM (`s = 2`) the rotation flips the column LSB on odd rows, so
`qam16_addr` is an XOR on one bit. For 64-QAM (`s = 3`) it is a column offset
taken from a 3x3 table indexed by `j%3` and `i%3`:

| `j%3` \ `i%3` | 0 | 1 | 2 |
|---|---|---|---|
| 0 | 0  | 0  | 0  |
| 1 | +1 | +1 | -2 |
| 2 | +2 | -1 | -1 |

The offset never leaves the block. The column count of a 16-QAM block is even,
and that of a 64-QAM block is a multiple of 3.

Example for a 576-bit 64-QAM block (36 columns), positions 35..45:
`560, 17, 33, 1, 65, 81, 49, 113, 129, 97, 161`.
Example for a 192-bit QPSK block, row 1: `1, 17, 33, 49, ...`.

The QPSK and 16-QAM relations are the published basis of this generator. The
64-QAM relation is derived here from the interleaver equations above. It agrees
with every value of the published 64-QAM reference waveform.

## The row/column FSM (`addr_counter`)

Two states, `IDLE` and `RUN`. A start pulse loads the last column index
`a = C-1` and enters `RUN`. Each clock, `i` advances. When `i == a` it wraps to 0
and `j` advances. Next to `i` and `j` the FSM keeps:

* `i_mod3` and `j_mod3`, which wrap at 3. The 64-QAM unit needs these, and
  keeping them as counters avoids a modulo-3 circuit. Assertions check that
  they track `i % 3` and `j % 3`.
* `n`, the linear position, as a plain counter.

`last` is high on `(i, j) = (a, 15)`. After it the FSM returns to `IDLE`. If
`start` is high in the `last` cycle, the next block is loaded at once and
blocks follow with no gap.

## Block sizes and the `sel` input (`ncbps_decoder`)

`sel` is the number of 48-subcarrier slots in a block, so
`Ncbps = 48 * bits_per_symbol * sel` and `C = 3 * bits_per_symbol * sel`.
Supported settings keep the block at 576 bits or fewer:

| `mod_type` | scheme | `sel` | `Ncbps` | columns |
|---|---|---|---|---|
| `2'b00` | QPSK   | 1..6 | 96, 192, 288, 384, 480, 576 | 6 .. 36 |
| `2'b01` | 16-QAM | 1..3 | 192, 384, 576 | 12, 24, 36 |
| `2'b10` | 64-QAM | 1..2 | 288, 576 | 18, 36 |

Any other pair, including `mod_type = 2'b11` or `sel = 0`, is rejected.

## Top level (`wimax_deint_addr_gen`)

The decoder feeds the FSM. The three address units (`qpsk_addr`, `qam16_addr`,
`qam64_addr`) all work on the same `(i, j)` in parallel. A multiplexer picks
the result for the `mod_type` latched at start.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything is on the rising edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `start` | in | 1 | one-cycle pulse: begin a block |
| `mod_type` | in | 2 | modulation, sampled with `start` |
| `sel` | in | 3 | block size in slots, sampled with `start` |
| `kn` | out | 10 | deinterleaver address for position `n` |
| `n` | out | 10 | linear position of the received bit in the block |
| `valid` | out | 1 | `kn`, `n` valid |
| `last` | out | 1 | final address of the block |
| `busy` | out | 1 | a block is running (same as `valid`) |
| `cfg_err` | out | 1 | one-cycle flag: the last `start` had an unsupported pair and was dropped |

Timing:

* `start` is taken when `busy` is low, or in the cycle that carries `last`. At
  other times it is ignored.
* From the next clock, `valid` stays high for exactly `Ncbps` cycles, with one
  address per cycle.
* `kn` is combinational from the FSM registers. It is valid in the same cycle
  as its `n`.

In use, the receiver writes bit `n` of the incoming block to memory address
`kn`. It can then read the memory out in order, or it can write in order and
read at `kn`. The memory itself is not part of this design.

Shared constants live in `wimax_pkg`: `D = 16`, `ADDR_W = 10`, `COL_W = 6`,
and the `mod_t` encoding.

## Where this design makes its own choices

* **The `sel` encoding.** The select-to-size rule above is taken from the
  802.16e slot structure. One published 16-QAM waveform shows `sel = 001`
  with 18 columns (288 bits), which no 16-QAM slot count gives. This
  decoder cannot produce that setting, but `qam16_addr` handles 18 columns
  correctly and is tested at that size. The QPSK (`sel = 2` → 12 columns) and
  64-QAM (`sel = 2` → 576 bits) reference points match the rule.
* **Address width.** Some reference waveforms show a 9-bit QPSK/16-QAM
  address, which cannot reach 575. This design uses 10 bits for all schemes.
* **Output timing.** The address is aligned with its indices, as in the 16-QAM
  and 64-QAM reference waveforms. In the QPSK one it appears a cycle later.
* **Handshake and reset.** The start/valid/last/cfg_err handshake, latching
  the mode at start, back-to-back chaining and an active-low synchronous reset
  are all choices of this design. The reference waveforms disagree on the
  polarity of the reset.
* **Multiplier.** In the reference FPGA implementation a multiplier maps onto
  an embedded FPGA multiplier. Here every product is a multiply by 16, a
  shift, so none is built.

The reference implementation on a Spartan-3E reports 89.9 MHz. This RTL
has not been characterised on an FPGA. Its critical path is the 6-bit column
adder, the shift and the 3-way multiplexer behind the FSM registers. It holds
34 flip-flops.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Reference values come from `tb_ref_pkg`,
which evaluates the two interleaver equations literally, using `/` and `%`,
and searches for the inverse. It shares no code with the RTL.

* `tb_qpsk_addr`, `tb_qam16_addr`, `tb_qam64_addr` test every `(i, j)` for the
  supported column counts (and 18 columns for 16-QAM), plus the published
  waveform rows.
* `tb_ncbps_decoder` tests all 32 `(mod_type, sel)` pairs.
* `tb_addr_counter` checks, on every clock, `i`, `j`, the residues, `n`,
  `last` and the cycle count. It also checks that a start during a block is
  ignored and that blocks can be chained.
* `tb_wimax_deint_addr_gen` is the end-to-end test at default parameters. It
  runs all 11 supported blocks and checks each against the equations. It also
  checks that each block is a permutation of `0..Ncbps-1` and takes
  `Ncbps` clocks. It covers rejected configurations, an ignored start, and
  back-to-back blocks with a modulation switch, and counts a failure if any of
  those never happened.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/wimax_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_wimax_deint_addr_gen.sv \
  --top-module tb_wimax_deint_addr_gen -Mdir obj
./obj/Vtb_wimax_deint_addr_gen
```

Every testbench finishes in well under a second.

## Changing it

* **Larger blocks.** Widen `ADDR_W` and `COL_W` in `wimax_pkg`, and raise the
  `max_sel` limits in `ncbps_decoder`.
* **A different row count.** `D` is used everywhere through the package. The
  relations above hold for any `D`, but the testbench reference has 16 built
  in.
* **Another modulation.** Add an address unit with its own rotation and a case
  to the output multiplexer. A scheme with `s = 4` would need `i%4` and `j%4`,
  which are free index bits.
