# LUT multiplier: multiplication by fraction-product tables and a wide adder

This is a sequential unsigned multiplier. It does not use a multiplier array.
Each N-bit operand is cut into K-bit *fractions*. Every product of two
fractions is read from a precomputed table. Each table product is shifted to
its bit position and added into a 2N-bit running sum by a wide ripple adder
built from one-bit full adders. The unit handles one fraction pair per clock,
so an N x N product takes (N/K)^2 accumulation steps. The default
configuration is a 32 x 32-bit multiplier with an 8 x 8-bit table:
(32/8)^2 = 16 steps.

The architecture follows the article "High-Capacity Data Processing with
FPGA-Based Multiplication Algorithms and the Design of a High-Speed LUT
Multiplier" (32-bit operands, k = 8, a 64-bit adder made of full adders, a
state machine that steps from `sr` through `S0..S15` to a final state). The
RTL here is a fresh SystemVerilog implementation. Where the article is
ambiguous or silent, the choices made are listed below under
[Where this implementation decides for itself](#where-this-implementation-decides-for-itself).

## Block structure

```
            data_a, data_b (N)
                  |
          +-------v--------+  s_data_a, s_data_b (K)   +-----------+
  clk --->|  lut_mult_ctrl |------------------------->|  lut_rom  |
  rst --->|  state machine |<-------------------------|  K x K    |
          |  step counter  |      lut_result (2K)      +-----------+
          |  fraction mux  |
          |  a_signal reg  |  a_signal, b_signal (2N)  +------------------+
          |  b_signal reg  |------------------------->| expandable_adder |
          |                |<-------------------------|  2N full adders  |
          +-------+--------+     total_signal (2N)     +------------------+
                  |
            result (2N), t
```

| file | role |
|---|---|
| `rtl/lut_mult_pkg.sv` | default sizes (`DEF_N = 32`, `DEF_K = 8`), state type `mult_state_e`, step-count function |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/expandable_adder.sv` | `WIDTH` full adders in a carry chain (default 64) |
| `rtl/lut_rom.sv` | product table of two K-bit fractions, zero inputs bypassed |
| `rtl/lut_mult_ctrl.sv` | sequencer: operand registers, step counter, fraction selection, adder input registers, result and done flag |
| `rtl/lut_multiplier.sv` | top level: wires the three parts together |

## The step schedule

This is the core of the design. Let Q = N/K be the number of fractions per
operand, A_j the j-th K-bit fraction of A (bits `K*j +: K`), and B_i likewise
for B. Then

    A * B = sum over i, j in 0..Q-1 of (A_j * B_i) << K*(i + j)

The step counter `ta` runs from 0 to Q^2 - 1, and each step takes one term:

    j = ta mod Q        (fraction of A)
    i = ta div Q        (fraction of B)
    shift = K * (i + j)

For the default Q = 4, A's fraction cycles 0,1,2,3 while B's fraction stays
fixed, and B's fraction then advances: (j,i) = (0,0),(1,0),(2,0),(3,0),(0,1),...
The largest shift is K*(2Q-2) = 48 bits. A 16-bit product placed there ends at
bit 63, so everything fits the 64-bit sum.

The sequencer is pipelined over three register stages. This lets the table
and the adder each have a full clock cycle:

1. `s_data_a`, `s_data_b`: the fraction pair that goes into the table.
2. `a_signal`: the table output, shifted into place (zero elsewhere).
3. `b_signal`: the running sum. Each step it takes `total_signal = a_signal + b_signal`.

Cycle by cycle, for one multiplication:

| state | s_data (table input) | a_signal | b_signal | result, t |
|---|---|---|---|---|
| `ST_SR` | gets pair 0; operands sampled | 0 | 0 | 0, 0 |
| `ST_STEP` ta=0 | gets pair 1 | gets P0 | gets 0 | 0, 0 |
| `ST_STEP` ta=1 | gets pair 2 | gets P1 | gets P0 | 0, 0 |
| ... | | | | |
| `ST_STEP` ta=15 | (don't care) | gets P15 | gets P0+...+P14 | 0, 0 |
| `ST_LAST` | gets 0 | 0 | 0 | gets P0+...+P15, 1 |

Here Pn is the shifted table product of step n, and "gets" is the value
registered at the end of that cycle. The state returns to `ST_SR` after
`ST_LAST`, so the unit multiplies continuously.

## Timing and interface of `lut_multiplier`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active high; the first multiplication starts on the first clock after it falls |
| `data_a`, `data_b` | in | N | unsigned operands, sampled in `ST_SR` |
| `result` | out | 2N | the product while `t` = 1, otherwise 0 |
| `t` | out | 1 | done flag, high for exactly one clock per product |
| `state`, `step` | out | 2, log2(Q^2) | sequencer state and step counter, for observation |

* A product takes **Q^2 + 2 clocks**, which is 18 clocks by default (one `ST_SR`,
  16 `ST_STEP`, one `ST_LAST`). `t` pulses every 18 clocks.
* The operands are sampled on the clock edge that leaves `ST_SR`. `t` and the
  product appear 17 clock edges after that one.
* The operands are held internally, so `data_a` and `data_b` may change while a
  multiplication runs. To present the next pair, change the inputs at any time
  after the sampling edge and before the next `ST_SR` edge. `ST_LAST` is a
  convenient point.
* There is no start input. Use `rst` to abort or restart.

The article counts the 16 accumulation steps as the multiplication time
("16 cycles"). The two extra clocks here are its initial and final states, made
explicit.

## The product table

`lut_rom` gives `p = a * b` for two K-bit inputs, read combinationally. If
either input is zero, the output is forced to zero and the table is not
used. The table therefore stores only the (2^K - 1)^2 products of non-zero
inputs: 65025 words of 16 bits for K = 8, instead of 65536. It is declared as
`rom[1:2^K-1][1:2^K-1]`, so the fractions themselves are the row and column
index and no address arithmetic is needed. At start-up an `initial` block
fills each row by repeated addition: `rom[x][y] = rom[x][y-1] + x`, starting
from 0. On an FPGA this initial content becomes the ROM image.

The read is asynchronous, so a synchronous block RAM does not fit this
pipeline as written. Using one would need an extra pipeline stage between
`s_data` and `a_signal` and one more state of latency.

The table grows as 2^(2K). K = 8 is the practical limit. K = 16 would need
about 4 G words, and the K = 32/128/512 rows of the article's step-count table
(for 1024-bit operands) cannot be built at all.

## The expandable adder

`expandable_adder` instantiates `WIDTH` `full_adder` cells. Each cell passes
its carry to the next. It has no registers: the sum settles in the same cycle
as its inputs. Its length is set only by `WIDTH`, so a wider multiplier is
just a parameter change. Carry-in and carry-out pins are provided; the
multiplier ties carry-in to 0, and the carry-out is always 0 there because a
2N-bit product cannot overflow. Be aware that a ripple chain's delay grows
linearly with `WIDTH`. On an FPGA the synthesis tool maps the chain onto the
dedicated carry logic, which is what keeps a 64-bit addition inside one cycle.

## Parameters and scaling

| parameter | default | where |
|---|---|---|
| `N` | 32 | `lut_multiplier`, `lut_mult_ctrl`; operand width |
| `K` | 8 | `lut_multiplier`, `lut_mult_ctrl`, `lut_rom`; fraction width |
| `WIDTH` | 64 | `expandable_adder`; set to 2N by the top |

`N` must be a multiple of `K`, and larger than `K`. A simulation
assertion checks the multiple at start-up. Q need not be a power of two: the fraction
indices use `div` and `mod` by the constant Q, and these reduce to bit
selects when Q is a power of two. `lut_multiplier #(.N(1024), .K(8))` is the
article's 1024-bit, k = 8 case. It takes 16384 steps (16386 clocks) per
product, with a 2048-bit adder and the same 8-bit table.

## Where this implementation decides for itself

* **B's fraction index.** `i = ta div Q`. The article's printed formula for `i`
  does not visit every fraction of B for Q = 4. All Q^2 pairs must each be
  used once for the sum to equal A*B, and the schedule above does that.
* **Placed width.** The table product is placed in 2K bits at bit K(i+j).
* **Operand sampling.** Operands are sampled once per multiplication. The
  article's sequencer reads the inputs in every state, which would require
  them to stay constant.
* **Reset and start.** Reset is synchronous and active high. There is no
  start input, matching a free-running sequencer.
* **Observation ports.** `state` and `step` are extra outputs.
* **Signedness.** Operands are unsigned only.
* **Adder pins.** The adder's carry-in and carry-out are extra.
* **Table contents.** The table is filled by an `initial` loop, not read from
  a file.

The article also reports maximum clock frequencies after vendor place and
route on several FPGA families. That has not been reproduced here.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it shows |
|---|---|
| `tb/full_adder_tb.sv` | all 8 input combinations |
| `tb/expandable_adder_tb.sv` | 64-bit and 1024-bit instances; full-length carry ripple, random words, against built-in addition |
| `tb/lut_rom_tb.sv` | all 65536 input pairs of the 8-bit table, including the 511 zero-bypass pairs |
| `tb/lut_mult_ctrl_tb.sv` | sequencer alone, with behavioural table and adder. Checks every step's fraction pair and the placement of its product, the 18-clock period and the one-cycle `t`. Operands change every clock. |
| `tb/lut_multiplier_tb.sv` | the full design at default sizes. Runs 310 back-to-back products: corner cases, then random operands with zeroed fractions. Checks latency, the `t` pulse, and zero result outside `t`. Changes operands mid-multiplication and resets mid-multiplication. Counts zero-bypass reads, carry ripples of 16 or more bits, back-to-back products, mid-operation operand changes and resets, and fails if any of these never happened. |
| `tb/lut_multiplier_1024_tb.sv` | N = 1024, K = 8: three 2048-bit products and the 16386-clock spacing |

Running one with Verilator, for example the full design:

```
verilator --binary --timing --assert -Irtl rtl/lut_mult_pkg.sv \
    tb/lut_multiplier_tb.sv --top-module lut_multiplier_tb -Mdir obj
./obj/Vlut_multiplier_tb
```

The package file must come first. Verilator finds the other modules in
`rtl/` through `-Irtl`. Every testbench finishes in seconds. The 1024-bit one
spends most of its time compiling.
