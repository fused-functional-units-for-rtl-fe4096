# Fused functional units and a king-mesh CGRA built from them

A coarse-grained reconfigurable array (CGRA) spends much of its area on
functional units (FUs). The usual way to build a multi-function FU is to put
an adder, a subtractor, a comparator, a multiplier and a MAC side by side and
multiplex their results. This design builds one *fused* FU instead. A single
carry-propagate adder does all the work:

* subtraction is addition of the inverted operand plus one;
* every comparison is the sign of a subtraction (operands swapped for
  `gt`/`lte`, the sign complemented for `gte`/`lte`);
* the multiplier stops at carry-save form (two vectors whose sum is the
  product), and the shared adder sums those two vectors;
* multiply-accumulate adds one 3:2 carry-save row that folds the addend into
  the multiplier's two vectors, and the shared adder sums the result.

Adding `sub` and the comparisons to a plain adder costs little more than
operand steering. Adding `mac` to a unit that already multiplies costs one
row of full adders. The RTL is built around that unit and holds:

* `fused_fu`: the 16-bit fixed-point fused FU. It is a generator with seven
  incremental levels, from "add only" up to the full unit.
* `cgra_top`: a 4x4 king-mesh CGRA whose tiles each hold a fused FU, a
  crossbar, a configuration memory and output registers. The left column's
  tiles also load from and store to a scratchpad bank.
* `fp_add_fused` and `fp_mul_fused`: floating-point units of any exponent
  and mantissa width. A mode input makes them run the fixed-point functions
  on their own significand adder and multiplier.
* `banded_switch`: a generator for a banded N-input, 2N-output switch that
  connects two levels of FUs.

The fused-FU idea, its function set, the FP formats and the switch
parameters follow the paper "Fused Functional Units for Area-Efficient
CGRAs". The tile and array around the FU stand in for the VectorCGRA
framework that the paper plugs its FU into. They are this design's own
simple, statically scheduled fabric, with the same topology: tiles on a
grid, a crossbar to the eight neighbours, an FU configured from a
configuration memory, and memory tiles in the left column.

## The fused FU (`fused_fu`)

Ports: `op` (a `cgra_pkg::fu_op_e`), operands `a`, `b`, `c`, and result `y`,
all `W` = 16 bits wide. The unit is purely combinational. The tile registers
its result.

| `op`     | result                | adder inputs                   |
|----------|-----------------------|--------------------------------|
| `FU_ADD` | a + b                 | a, b, cin 0                    |
| `FU_SUB` | a - b                 | a, ~b, cin 1                   |
| `FU_LT`  | 1 if a < b            | a, ~b, cin 1; take the sign    |
| `FU_GTE` | 1 if a >= b           | same sum; take the sign, inverted |
| `FU_GT`  | 1 if a > b            | b, ~a, cin 1; take the sign    |
| `FU_LTE` | 1 if a <= b           | same sum; take the sign, inverted |
| `FU_MUL` | low 16 bits of a*b    | the multiplier's sum and carry vectors |
| `FU_MAC` | low 16 bits of a*b+c  | a 3:2 row's output from (sum, carry, c) |

Comparisons are signed. The paper takes the sign as the MSB of the
difference, which gives the wrong answer when the subtraction overflows
(e.g. 0x7fff < 0x8000). Here the shared adder is therefore one bit wider
than the data, with sign-extended operands, and its top bit is the true
sign. All other results use the low 16 bits.

`pp_multiplier` builds the partial products `a & b[i]` and reduces them with
a linear array of 3:2 rows (`csa`) to two vectors. For a 16-bit result it
only generates the low 16 bits of each partial product. The paper used a
DesignWare partial-product multiplier in this role; its internals are not
part of this design.

`LEVEL` (default 7) selects the incremental designs of the generator:

| LEVEL | adds              |
|-------|-------------------|
| 1     | add               |
| 2     | sub               |
| 3     | lt                |
| 4     | gte (one inverter on the `lt` sign; an XOR with an opcode bit does the same) |
| 5     | gt, lte           |
| 6     | mul (partial-product multiplier, shared adder) |
| 7     | mac (one 3:2 row) |

Below level 6 the multiplier is not generated. A function the level lacks
returns 0. The paper names levels 1, 2, 6 and 7. How the comparisons spread
over levels 3 to 5 is this design's choice.

## The CGRA (`cgra_top`)

### Array and links

`ROWS` x `COLS` tiles (default 4x4) sit on a grid. Tile (r, c) has eight
16-bit inputs and eight registered 16-bit outputs, one per direction: N, S,
W, E, NW, NE, SW, SE, numbered 0..7 in `cgra_pkg::dir_e`. Output `d` of a tile
drives input `opposite(d)` of the neighbour in direction `d`. Inputs that
would come from outside the grid read 0. Tile (r, 0), in the left column, is
a memory tile. It owns scratchpad bank r (256 x 16 bits).

### What a tile does in one slot

Each tile has `CFG_DEPTH` = 8 configuration words (`cgra_pkg::tile_cfg_t`):

| field         | bits | meaning                                             |
|---------------|------|-----------------------------------------------------|
| `op`          | 4    | `fu_op_e`: NOP, the 8 FU functions, LD, ST          |
| `opnd_sel[3]` | 3x4  | sources of FU operands a, b, c                      |
| `out_sel[8]`  | 8x4  | source of each of the 8 outputs                     |
| `konst`       | 16   | a constant that any destination can select          |

Source codes: 0..7 are the neighbour inputs, 8 is the tile's own result, 9
is `konst`, and 10..15 read 0. The crossbar (`tile_crossbar`) lets any
source feed any number of destinations.

In every cycle of a run, all tiles execute slot `pc` at once. At the clock
edge that ends the slot:

* each output register takes its selected source. A value therefore moves
  one tile per cycle.
* for an FU function, the result register takes the FU output. The next
  slot can use it as source 8.
* `FU_LD` (memory tiles only) reads `spm[a]`. The word becomes the tile's
  result in the next slot, the same latency as an FU function.
* `FU_ST` (memory tiles only) writes `b` to `spm[a]`. The address is the
  low 8 bits of operand a.
* `FU_NOP`, `FU_ST`, and `LD`/`ST` in a tile without memory keep the result.

Source 8 means "the result as it stands at the start of this slot". One
slot can therefore send the old result to its neighbours and replace it
with a new one. The loop counter in the example below does exactly that.

### Running a program

1. While the array is idle (`busy` = 0), write configuration words. Hold
   `cfg_we` for one cycle with `cfg_tile = r*COLS + c`, `cfg_addr` = slot
   and `cfg_wdata` = word.
2. Fill the banks through the host port. A write takes one cycle. For a
   read, set `host_en`; `host_rdata` is valid in the next cycle.
3. Pulse `start` with `ii` (slots per iteration, 1..8) and `iters`. The
   sequencer (`cgra_ctrl`) raises `busy` on the next edge. It then steps
   `pc` 0, 1, .., ii-1 and repeats that `iters` times. The run takes exactly
   `ii*iters` cycles; `done` pulses once when it ends.
4. Read the results back through the host port.

The array has no flow control. The schedule alone decides when a value
arrives, as in a statically scheduled (modulo-scheduled) CGRA. The host port
is meant for use while the array is idle. If the host and a memory tile
write the same word in the same cycle, the tile's write wins.

### Example schedule: `c[i] = a[i]*b[i] + a[i]`

This is the kernel run by `tb/tb_cgra_top.sv`. `a` is in bank 0, `b` in
bank 1, and `c` goes to bank 2. Each iteration takes seven slots (`ii` = 7):

| slot | tile (1,1)                    | tile (0,0)        | tile (1,0)          | tile (0,1)            | tile (2,0)               |
|------|-------------------------------|-------------------|---------------------|-----------------------|--------------------------|
| 0    | i -> NW, W, SW; res <= i+1    |                   |                     |                       |                          |
| 1    |                               | LD from SE input  | LD from E input     |                       | res <= NE input + 0 (i)  |
| 2    |                               | res -> E          | res -> NE           |                       |                          |
| 3    |                               |                   |                     | MAC(W, SW, W)         |                          |
| 4    |                               |                   |                     | res -> SW             |                          |
| 5    |                               |                   | NE input -> S       |                       |                          |
| 6    |                               |                   |                     |                       | ST addr=res, data=N input |

Reset clears every result register, so the counter starts at 0.

## Fused floating-point units

`fp_add_fused` and `fp_mul_fused` take a format: sign, `EXP_W` exponent
bits (bias 2^(EXP_W-1)-1) and `MAN_W` mantissa bits with a hidden one.

**`fp_add_fused`** (default 6/14, 21 bits):

* `fp_mode` = 1: `op` = `FU_ADD` or `FU_SUB`. The unit orders the operands by
  magnitude, aligns the smaller one with guard, round and sticky bits, adds
  or subtracts in a (MAN_W+5)-bit significand adder, normalises with a
  leading-zero count, and packs the result.
* `fp_mode` = 0: the same adder runs 16-bit (MAN_W+2 bits) integer `add`,
  `sub` and the four compares. Operands come from the low bits of `a` and
  `b`.

**`fp_mul_fused`** (default 6/15, 22 bits):

* `fp_mode` = 1: `op` = `FU_MUL`. The significands (MAN_W+1 bits) go
  through a partial-product multiplier and a (2*MAN_W+2)-bit adder, the
  exponents through a small separate adder. The product is normalised by at
  most one place.
* `fp_mode` = 0: that multiplier, a 3:2 row and the adder run all eight
  fixed-point functions on MAN_W+1 = 16 bits.

The default widths are the formats sized so that the units carry 16-bit
integer operations, which matches the CGRA's 16-bit datapath. The general
rule: an adder with mantissa M runs (M+2)-bit integers, and a multiplier
with mantissa M runs (M+1)-bit integers. The paper's formats cover 8-, 16-,
24- and 32-bit integers this way.

Special cases are simplified, as the paper does not specify them:

* rounding is toward zero;
* subnormal inputs count as zero, and results too small to be normal become
  (signed) zero;
* overflow saturates to the largest finite value;
* the all-ones exponent is an ordinary exponent, so there are no
  infinities and no NaNs;
* an exact zero sum is +0.

In the array these units are not tiles. `cgra_top` instantiates them beside
the array with their own ports (`fpa_*`, `fpm_*`), as separate units of the
same family.

## Banded switch (`banded_switch`)

The switch sits between two levels of FUs. Its N inputs are the outputs of
the level above. Its 2N outputs are the two operands of each of the N FUs
below. Banding limits vertical reach: both operands of FU j can only take
inputs j-BAND .. j+BAND. Each output is then a (2*BAND+1)-way multiplexer
instead of an N-way one.

Parameters:

* `N`: input count.
* `PHYS_W`: width of the multiplexers.
* `EFF_W`: width of the routed data. Input bits above it are not routed,
  and the outputs carry 0 there.
* `BAND`: the banding number.
* `ONEHOT`: select encoding. 0 is a binary window offset. 1 is one-hot, an
  AND-OR multiplexer.

Selects that point outside the window or outside 0..N-1 give 0. The
defaults are N = 8, 16 bits and band 2. It is combinational. `cgra_top`
brings it out on `sw_*` ports.

## Files

| file | contents |
|------|----------|
| `rtl/cgra_pkg.sv` | opcodes, directions, crossbar source codes, configuration word |
| `rtl/csa.sv`, `rtl/pp_multiplier.sv` | 3:2 row, carry-save partial-product multiplier |
| `rtl/fused_fu.sv` | fixed-point fused FU (generator, `LEVEL`) |
| `rtl/fp_add_fused.sv`, `rtl/fp_mul_fused.sv` | fused FP adder and multiplier |
| `rtl/banded_switch.sv` | banded switch generator |
| `rtl/tile_crossbar.sv`, `rtl/config_mem.sv`, `rtl/cgra_tile.sv` | tile and its parts |
| `rtl/scratchpad.sv`, `rtl/cgra_ctrl.sv` | scratchpad bank, schedule sequencer |
| `rtl/cgra_top.sv` | array, banks, sequencer, and the stand-alone units |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fp_formats.sv`, `tb/fp_format_check.sv` | FP units at all eleven custom formats (8 to 40 bits) |
| `tb/tb_cgra_sizes.sv`, `tb/cgra_array_check.sv` | 2x2 and 6x6 arrays against a reference model |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a watchdog. It needs a simulator with `--timing` support. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cgra_pkg.sv tb/tb_cgra_top.sv --top-module tb_cgra_top
./obj_dir/Vtb_cgra_top
```

Replace `tb_cgra_top` with any other testbench name. The package must come
first on the command line. Every other file is found through `-y`.

What the testbenches cover:

* **`tb_cgra_top`** runs the whole design at its default parameters.
  * It runs the multiply-add kernel above for 20 iterations, checks the 20
    results, and checks that the run takes exactly 140 cycles.
  * It then loads 12 random programs: every function, every source, random
    constants, `ii` and `iters`. A cycle-level model of the array predicts
    all 128 links every cycle and every bank word at the end.
  * It exercises the FP units in both modes and the banded switch.
  * It counts how often each function, diagonal links, links at the array
    edge, multi-iteration runs and reconfigurations occurred. A mechanism
    that never occurs counts as a failure.
* **`tb_cgra_sizes`** repeats the random-program check on 2x2 and 6x6
  arrays.
* **`tb_fp_formats`** checks both FP units at every format. Its reference
  does exact arithmetic on 320-bit integers.
* **The unit testbenches** check their module against independent
  arithmetic. Each one was also run against a deliberately broken copy of
  its module and caught it.

## Trust and departures

What comes from the paper:

* the fused FU's function set and how it shares the adder;
* the 16-bit granularity;
* the king-mesh tile arrangement, with a crossbar to eight neighbours, an
  FU configured from a configuration memory, and memory tiles in the left
  column;
* the FP formats;
* the switch's parameter set and the meaning of banding.

What is this design's own choice:

* the configuration word, its source codes, and the global lockstep
  sequencer;
* one-cycle hops and FU latency, and the register placement;
* the scratchpad organisation (one two-port bank per row, 256 words) and
  the host ports;
* no valid/ready flow control. The original framework passes data through
  send/receive interfaces whose protocol is not reproduced here;
* signed comparisons on a one-bit-wider adder;
* the FP special-case rules (rounding toward zero, flush to zero,
  saturation, no infinities or NaNs);
* the split of the comparisons over generator levels 3 to 5;
* the switch defaults and its behaviour at the array edge;
* the 4x4 default array. The fused FU was evaluated in 2x2, 4x4 and 6x6
  arrays, and `ROWS`/`COLS` build any of them.

Not included:

* the Python wrappers that adapt the FU to the original framework;
* the behavioural baseline FUs and vendor FP units that the fused designs
  were compared against;
* area, power and timing figures. These come from synthesis with a
  commercial 12 nm library and cannot be reproduced from RTL alone.
