# Aries: a multiplier-free 5-tap convolution block

Aries is a building block for 1-D and 2-D convolution filters on 8-bit
unsigned samples (image pixels, typically). One block computes a 5x1 kernel

    y = c1*x0 + c2*x1 + c3*x2 + c4*x3 + c5*x4

once per data cycle, with programmable coefficients and no multipliers.
Blocks are made to be tiled: each one passes its oldest sample on to a
neighbour, to widen the kernel along X. Each one also has its own adder and
output multiplexers, so a set of blocks can sum all their results in a
pipelined adder tree without outside logic. A 5x5 filter takes 5 blocks. A
9x9 filter takes 18.

This repository holds synthesizable SystemVerilog for the block, plus
self-checking testbenches. The testbenches cover every module, one block end
to end, and complete 5x5, 9x9 and 17-operand filter arrays.

## The idea: look up bit-plane sums instead of multiplying

Write each sample as bits, x_i = sum_j 2^j * b(i,j). Then

    y = sum_j 2^j * ( sum_i c_i * b(i,j) )

For a fixed bit position j, the inner sum depends only on the five bits
b(4,j)..b(0,j). So it takes one of only 32 values, whatever the coefficients
are. Those 32 values are computed ahead of time and stored in a 32-word RAM.
Word w holds the sum of the coefficients c_(i+1) for each bit i set in w:

| w (binary) | stored word        |
|------------|--------------------|
| 00000      | 0                  |
| 00001      | c1                 |
| 00110      | c2 + c3            |
| 10011      | c1 + c2 + c5       |
| 11111      | c1 + c2 + c3 + c4 + c5 |

Address bit i comes from tap i, and tap 0 holds the newest sample. A
convolution then needs one RAM read per bit plane, a shift-and-add of the
eight bit-plane sums, and nothing else. RAM read time does not depend on the
word width. So the coefficients' precision is limited only by the 10-bit
word, not by adder or multiplier size.

The words are plain two's complement numbers when the block runs in signed
mode (`tc = 1`). This is how negative coefficients are used.

## Nibble time multiplexing

The block does not handle all eight bit planes at once. It takes four planes
per cycle of a clock running at twice the sample rate:

* **Fast cycle, phase 0:** the four RAM ports are addressed with bit planes
  0..3 (the low nibble of every tap).
* **Fast cycle, phase 1:** the same ports are addressed with planes 4..7.

There are four bit planes per phase but only two RAMs. Each RAM is
dual-ported, so the two RAMs give four read ports. Both RAMs hold identical
contents.

The **systolic adder** forms A + 2B + 4C + 8D from the four 10-bit plane
sums. It uses two carry-save rows of full adders and a 13-bit Brent-Kung
parallel-prefix adder, and produces a 13-bit nibble result every fast cycle.
The **accumulator** keeps the low-nibble result and adds the high-nibble
result shifted left by 4. The sum is 17 bits wide. Its LSB is dropped to give
the 16-bit block result.

### Cycle-by-cycle timing

`clk` is the fast clock. An internal phase bit toggles on every edge. The
output `sample_en` is high in phase 1. The edge that ends phase 1 is a
*data-clock edge*. At that edge the block takes a new sample from `din`, and
all data-rate registers load. Take edge E0 as the data-clock edge that loads
sample x0:

| edge | what is captured |
|------|------------------|
| E0 (data) | x0 enters tap 0; the window is x0..x4 |
| E1 | RAM output registers: low-nibble plane sums |
| E2 (data) | systolic register: low-nibble result; RAM registers: high-nibble plane sums |
| E3 | accumulator holding register: low result; systolic register: high result |
| E4 (data) | block result register: bits 16..1 of (low + 16*high) |

So `result` for a window is valid two data cycles after its newest sample
(three with `delay_sel = 1`). `sum` is valid one data cycle after its
operands were presented. The accumulator's adder also works in the cycle
after E4, on a stale pair. That result is never sampled. It is harmless work,
kept to save a buffer register.

The flip-flop count matches the original chip's pipeline register budget:

* 40 input shift register bits
* 40 RAM output bits
* 13 systolic adder bits
* 13 accumulator holding bits
* 16 result bits
* 16 delay bits
* 32 final adder operand bits

That makes 170. Three more bits are this design's: the phase bit and the
2-bit RAM control state.

## Loading coefficients

The RAM contents are the program. Set `mode = 1` for initialization. The RAM
control then runs through its states:

1. Reads stop at once.
2. After one idle fast cycle, `we` rises. The input multiplexers now route
   `ext_addr` to every RAM port.
3. Every fast cycle while `we` is high writes `wr_data` into row `ext_addr`
   of both RAMs.
4. When `mode` returns to 0, the write ends. One more idle cycle follows
   before reads resume, which the RAM's bitlines need to recover after a
   write.

An outside counter can step `ext_addr` through 0..31 and supply the 32
conditional sums. Word 0 must be written with 0. Computation can be stopped
for a reload at any time, for example in an image's blanking interval.
Results are meaningless until five new samples have entered after a reload.

## Number ranges and signed mode

| quantity | width | note |
|----------|-------|------|
| sample | 8 bits unsigned | |
| RAM word (sum of a coefficient subset) | 10 bits | unsigned, or two's complement with `tc = 1` |
| nibble result A+2B+4C+8D | 13 bits | wraps modulo 2^13 |
| full result lo + 16*hi | 17 bits | wraps modulo 2^17 |
| block output | 16 bits | bits 16..1 of the full result |

With `tc = 1`, the short operands are sign-extended. A, B and C in the
systolic adder, and the low result in the accumulator, have their top bit
ANDed with `tc` and repeated into their missing upper bits. With `tc = 0`
those bits are zero.

Overflow is not detected or flagged. Choose coefficients so that every
subset sum times 15 fits the 13-bit nibble range. Unsigned, that means
subset sums up to 546. Signed, it means a magnitude up to 273.

Dropping the LSB truncates, so positive results round down and negative
results round up. No correction is applied. The final adder's carry-in,
which could apply one, is tied to 0.

## Chaining blocks into large filters

**Along Y (more image rows):** use one block per row, each with its own row
stream.

**Along X (more taps):** feed `cascade_out` of one block into `din` of the
next. The second block's taps then hold samples 5..9 places back.

The block results are summed with the blocks' own final adders.

### Output stage and final adder

| `delay_sel` | `input_sel` | `result` | final adder's second operand |
|---|---|---|---|
| 0 | 0 | own result | own result |
| 0 | 1 | own result | `ext_b` |
| 1 | 0 | own result, one data cycle late | that delayed result |
| 1 | 1 | own result, one data cycle late | `ext_b` |

The final adder's first operand is always `ext_a`. Both operands are
registered at the data-clock edge. A 16-bit ripple-carry adder, built as two
chained 8-bit halves, produces `sum` from them. `sum` is not registered
again: the next block in the tree registers it on its `ext_a` or `ext_b`. So
each tree level costs one data cycle.

### Arranging a tree of n results

1. Split the list of blocks in two halves, as equal as possible, and repeat
   until every group has two or three blocks.
2. In a group of three (a, b, c), set:
   * c: `delay_sel = 0`, `input_sel = 1`. Its result goes to b's `ext_a`.
   * b: `delay_sel = 0`, `input_sel = 0`. Its sum goes to a's `ext_a`.
   * a: `delay_sel = 1`, `input_sel = 0`. Its sum is the group total.
3. In a group of two (a, b), b takes a's result on `ext_a`, and b's sum is
   the pair total. If any group of three exists, set `delay_sel = 1` on both
   a and b, so that all group totals appear in the same cycle.
4. The final adders left unused (a of each pair, c of each triple) add the
   group totals level by level, taking one total on `ext_a` and one on
   `ext_b`.

For a 5x5 filter this gives a pair and a triple, plus one top adder. The
total appears 5 data cycles after the newest sample. For 17 operands it
gives seven pairs and one triple at the first level, then three more levels.

## Module map

    aries_block            top: one macro-block
    ├─ ram_control         mode bit -> read / idle / write / idle sequence
    ├─ input_registers     5 x 8-bit shift register, 3:1 address multiplexers
    ├─ coeff_ram  (x2)     32 x 10 dual-port RAM, registered outputs
    │  └─ row_decoder (x2) two-stage 5-to-32 wordline decoder
    ├─ systolic_adder      A+2B+4C+8D: full-adder rows + Brent-Kung adder
    │  ├─ full_adder
    │  └─ brent_kung_adder
    ├─ accumulator         low + 16*high, 17 -> 16 bits
    │  └─ brent_kung_adder
    ├─ output_stage        delay register, two multiplexers
    └─ final_adder         operand registers + 16-bit ripple-carry adder
       └─ full_adder
    aries_pkg              widths and the RAM control state type

Every module's file opens with a description of its ports and timing. All
registers reset asynchronously on `rst_n` low, to 0. The RAM array has no
reset and must be loaded before use.

## Simulating

Every testbench in `tb/` checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        --top-module tb_aries_block rtl/aries_pkg.sv tb/tb_aries_block.sv
    ./obj_dir/Vtb_aries_block

| testbench | what it shows |
|-----------|---------------|
| `tb_aries_block` | One block at its default sizes. Loads unsigned coefficients and streams 1200 samples through all four output modes. Reloads signed coefficients mid-stream and streams 1200 more. Every data cycle it checks `result`, `sum` and `cascade_out` against a software convolution. |
| `tb_aries_filters` | A 5x5 filter (5 blocks), a 9x9 filter (18 blocks, two chained per row) and a 17-operand tree, all wired by the rule above. Checks the tree output every data cycle. |
| `tb_<module>` | One module each. These tests are exhaustive where the module is small, and random plus corner cases otherwise. |

Assertions check the RAM handshake: there is never a read in the cycle after
a write, and never a read and a write in the same cycle.

## How far this follows the original block

What follows the original:

* the algorithm
* the widths (10, 13, 17 and 16 bits)
* the nibble multiplexing
* the register placement and count
* the dual-port RAM organisation
* the sign-extension scheme
* the output stage modes
* the ripple-carry final adder
* the adder-tree rule

Choices this design makes where the original is a full-custom circuit or
leaves a detail open:

* **One clock plus a phase bit** replaces the original pair of clocks (f and
  2f). In the original, the level of the clock steers the nibble
  multiplexers.
* **Synchronous RAM writes.** The original write is unclocked and lasts as
  long as the write signal is high. Here the write uses port A's decoder.
* **One idle cycle each side of a write.** The RAM control block's exact
  sequence is this design's own.
* **Systolic adder structure.** The original uses a half-adder row, full-adder
  rows and a 10-bit Brent-Kung adder over the upper bits. This design reduces
  all 13 columns with two full-adder rows and a 13-bit Brent-Kung adder. The
  result is identical.
* **Row decoder split.** The split into a 3-bit NOR predecoder and a 2-bit
  predecoder is assumed. So is the mapping of tap i to address bit i.
* **A `tc` input** selects signed mode for the whole block.
* **All 32 RAM rows are writable.** An early version of the original
  hard-wired row 0 to zero.

Not modelled: the transistor-level parts. These are the TSPC flip-flop, the
8-transistor dual-port SRAM cell, the bitline precharge, the sense amplifier
and the write driver. Their logic functions are the registers, the memory
array and its read and write ports. Timing, such as the 10 ns inner cycle,
is a property of the original circuit and is not represented. Nor is the
optional processor that could program many blocks.
