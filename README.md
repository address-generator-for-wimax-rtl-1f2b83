# Floor-free address generation for the IEEE 802.16e channel deinterleaver

The WiMAX (IEEE 802.16e) channel interleaver spreads the coded bits of a
block over a D-row matrix so that a burst of channel errors lands on bits
that are far apart after decoding. The receiver undoes this with a
deinterleaver. The standard writes the permutation with `floor()` and
`mod` terms that depend on the block size Ncbps and on the modulation.
Dividing by a variable in hardware is expensive. Storing one lookup table
per mode is expensive too, because 802.16e has many block sizes.

This design computes the deinterleaver addresses on the fly with two
counters, a few small adders and a multiplier by a constant, with no
division. It also includes the two-bank (ping-pong) memory that the
addresses drive. It supports QPSK, 16-QAM and 64-QAM blocks of up to 576
bits and takes one bit per clock.

## The permutation seen as a matrix

Take D = 16 rows and C = Ncbps/16 columns. The received bits are numbered
n = 0 .. Ncbps-1 and walked row by row: row j = n / C, column i = n mod C.
A generator produces the original bit index `kn` of each received bit.
Writing each bit at address `kn` and then reading the memory at addresses
0, 1, 2, ... returns the block in its original order.

Working the standard's two permutation steps through for this order, all
floor terms collapse into the row and column numbers:

| modulation | s | address of row j, column i |
|------------|---|----------------------------|
| QPSK   | 1 | `kn = 16*i + j` |
| 16-QAM | 2 | `kn = 16*i + j` for even j; `16*(i+1) + j` for odd j and even i; `16*(i-1) + j` for odd j and odd i |
| 64-QAM | 3 | `kn = 16*f + j`, where `f = 3*floor(i/3) + ((i mod 3) + (j mod 3)) mod 3` |

Put simply, the column number i is rotated inside groups of s columns, and
the rotation is set by the row. For 16-QAM this means odd rows swap columns
in pairs. For 64-QAM, rows rotate groups of three columns by 0, 1 or 2.
Example rows (first five columns):

```
QPSK    96 bits  : 0 16 32 48 64 | 1 17 33 49 65 | 2 18 34 50 66 | 3 19 35 51 67
16-QAM 192 bits  : 0 16 32 48 64 | 17 1 49 33 81 | 2 18 34 50 66 | 19 3 51 35 83
64-QAM 576 bits  : 0 16 32 48 64 | 17 33 1 65 81 | 34 2 18 82 50 | 3 19 35 51 67
```

## The three generators

All three generators have the same skeleton, built from `bounded_counter`
instances:

* **Column counter.** It counts i from 0 up to a limit, the last column
  index C-1. A multiplexer picks the limit from a small selector input
  `crate`. A comparator resets the counter when it reaches the limit.
* **Row counter.** It counts j from 0 to 15 and steps once each time the
  column counter wraps. A second comparator resets it after row 15.
* **Multiply and add.** A multiplier (`ml_mult`), whose second input is
  tied to d = 16, forms 16 times the column value, and an adder adds j.

They differ only in what they put in front of the multiplier:

* **`qpsk_addr_gen`** feeds i straight through. Its 3-bit selector picks the
  last column from 5, 8, 11, 17, 23, 26, 29 or 35. These give Ncbps = 96,
  144, 192, 288, 384, 432, 480 and 576.
* **`qam16_addr_gen`** builds i+1 with an incrementer and i-1 with a
  decrementer.
  * A first multiplexer, steered by i mod 2 (the low bit of i), picks one of
    the two.
  * A second multiplexer, steered by j mod 2, picks plain i on even rows and
    the first multiplexer's output on odd rows.
  * Its 2-bit selector picks the last column from 11, 17, 23 or 35. These
    give Ncbps = 192, 288, 384 and 576.
* **`qam64_addr_gen`** has no floor or division. It keeps two modulo-3
  counters alongside the main counters:
  * `p = i mod 3` steps with the column counter and clears when the column
    counter wraps.
  * `r = j mod 3` steps with the row counter and clears when the row counter
    wraps. D = 16 is not a multiple of 3, so this clear is needed.
  * Then `q = (p + r) mod 3`, computed as one conditional subtraction of 3,
    and `f = i - p + q`.
  * Its 2-bit selector picks the last column from 8, 17, 26 or 35. These
    give Ncbps = 144, 288, 432 and 576. Every one of these column counts is a
    multiple of 3, which the rotation needs.

`kn` is combinational from the counter registers. It is the address of the
bit presented in the same cycle. `en` steps the generator to the next bit.
`last` marks the final bit of a block. After that bit the generator is back
at row 0, column 0, ready for the next block.

`ml_mult` is a plain shift-and-add array multiplier. It adds one shifted
copy of the column value for each set bit of its second input. Inside the
generators that input is the constant 16. Synthesis therefore folds the
array into a 4-bit left shift that costs no logic. Used on its own, it is a
full 8 x 8 multiplier.

## Two banks and the bank selector

`wimax_deinterleaver` holds two 576 x 1-bit banks, M-1 and M-2
(`deint_mem`: single port, one address for both write and read,
asynchronous read). The selector `sel` decides which bank does what:

| sel | M-1 | M-2 | output |
|-----|-----|-----|--------|
| 1 | written at `kn` (WE on) | read at the read counter | M-2 |
| 0 | read at the read counter | written at `kn` (WE on) | M-1 |

`addr_gen` provides both addresses and `sel`. It works as follows:

* **Mode sampling.** It samples `mod_sel` and `crate` with the first bit of
  a block and holds them until the block's last bit. Only the generator of
  that modulation is stepped.
* **Bank swap.** When the last bit of a block is written, `sel` toggles. The
  bank just filled is then read at addresses 0 .. Ncbps-1, one per clock,
  whether or not new input arrives. So the last block of a burst drains by
  itself.
* **Shrinking blocks.** Suppose a block is shorter than the one still being
  read. Then its last bit could complete before the read finishes. In that
  case `in_ready` falls on that last bit until the read ends, so unread bits
  are never overwritten. This is the only time `in_ready` is low. An
  assertion in `addr_gen` checks that a swap never happens while a read is
  unfinished.

## Interface and timing (top: `wimax_deinterleaver`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1, 1, DATA_W | received bit, taken when valid and ready are both high |
| `mod_sel` | in | 2 | 0 QPSK, 1 16-QAM, 2 64-QAM (3 acts as QPSK) |
| `crate` | in | 3 | block-size selector; 16-QAM and 64-QAM use the low 2 bits |
| `out_valid`, `out_data`, `out_last` | out | 1, DATA_W, 1 | deinterleaved bits; `out_last` marks a block's last bit |
| `sel` | out | 1 | current bank selector (1 after reset) |

* **Latency.** The first bit of a block leaves two clocks after the block's
  last bit was taken: one clock for the write, one for the output register.
* **Throughput.** After that, one bit leaves per clock. Input is accepted
  at one bit per clock.
* **Backpressure.** The output has no backpressure.

## What follows the published architecture and what does not

These parts follow the published design:

* The address formulas for QPSK and 16-QAM.
* The counter, comparator, multiplexer, incrementer, decrementer,
  modulo-2, multiplier and adder structure of those two generators.
* Their multiplexer constants.
* d = 16.
* The 8-bit counter widths.
* The two-bank structure with its address multiplexers and its
  sel-controlled write enables and output multiplexer.

Two parts are inferred rather than given:

* **Row-counter stepping.** The row counter steps on a column wrap. The
  published timing traces show this, but the schematics draw only a clock.
* **64-QAM addresses.** The published material gives only sample addresses
  for a 576-bit block, and this design reproduces them. The modulo-3 counter
  structure and the block sizes 144/288/432 are this design's own.

These are this design's own choices:

* The reset style.
* The valid/ready handshake and the shrinking-block stall.
* Gating write enable with the handshake.
* Latching the mode per block.
* The free-running read counter.
* The output register.
* Asynchronous-read memories.
* One bit per memory word. `DATA_W` widens it, for soft bits for example.
* The internals of the multiplier.

The three generators are separate instances behind a multiplexer. The
published work claims resources are shared between the modulations but does
not show how, so this design does not attempt it.

Not included:

* **Transmit-side interleaver.** It would use the same two-bank structure
  with the address roles swapped.
* **Other transceiver blocks.** The randomiser, FEC, mapper and FFT blocks
  of the WiMAX chain are not part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_qpsk_addr_gen`, `tb_qam16_addr_gen`, `tb_qam64_addr_gen` | Every block size, all Ncbps addresses. Each is checked against the standard's floor-based deinterleaver formula, in `tb/deint_ref_pkg.sv`. The enable drops at random. `last` must come on the Ncbps-th step. |
| `tb_published_addresses` | The example rows above, and the published QPSK and 16-QAM address sequences, as literal numbers. |
| `tb_bounded_counter`, `tb_ml_mult`, `tb_deint_mem` | The building blocks against behavioural models. |
| `tb_addr_gen` | 24 blocks of random mode and size. Checks the write addresses, the `sel` toggling, the read sequence and the stall rule, and that every mechanism occurs. |
| `tb_wimax_deinterleaver` | End to end at the default size, DATA_W = 1. Random data blocks are interleaved with the standard's formulas and fed in with gaps, and must come back in order. It also checks the two-clock latency. It counts bank swaps in both directions, all three modulations, mode changes, input gaps, stalls and output drained without input. It fails if any of these never occurs. |

All pass.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_wimax_deinterleaver \
    -y rtl -y tb +libext+.sv rtl/wimax_pkg.sv tb/deint_ref_pkg.sv tb/tb_wimax_deinterleaver.sv
./obj_dir/Vtb_wimax_deinterleaver
```

Replace the top module and testbench file to run another test. The full
end-to-end test runs in well under a second.

## Changing it

* **Block sizes.** These live in `rtl/wimax_pkg.sv`:
  * The last-column tables `qpsk_last_col`, `qam16_last_col` and
    `qam64_last_col`. An entry is Ncbps/16 - 1.
  * `NCBPS_MAX`, which sets the bank depth and the address width.
  * 16-QAM entries need an even column count. 64-QAM entries need a column
    count that is a multiple of 3.
* **Row count.** `D` is also in the package. The 16-row matrix is fixed for
  802.16e. Changing it changes the permutation.
* **Word width.** `DATA_W` on `wimax_deinterleaver` sets how many bits each
  memory location holds.
