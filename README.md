# A multiplier-free FIR filter built on a coefficient look-up table

An N-tap FIR filter computes

    y(n) = h(0) x(n) + h(1) x(n-1) + ... + h(N-1) x(n-N+1)

and a direct implementation needs N multipliers. This design needs none. The
coefficients are fixed, so every sum of a subset of them can be computed in
advance and stored in a small table. The filter then reads one bit of every
stored sample per clock and uses those N bits as the table address. The
addressed entry is added into an accumulator that is halved before each
addition. After B clocks (B = sample word length) the accumulator holds y(n)
exactly. The datapath is one table, one adder/subtractor and one register.

The default configuration is a 4-tap low-pass filter with 4-bit samples and a
16-entry table. It produces one output every 4 clocks.

The same source tree also holds the bit-parallel arithmetic units that the
filter is made of or compared against:
- a ripple-carry adder;
- a two's complement adder/subtractor built on it;
- a two's complement array multiplier made of three kinds of signed
  full-adder cells.

## Why the table works

Write each sample in two's complement with bits `b(k,l)`, where `l = 0` is
the LSB and `l = B-1` is the sign bit:

    x(n-k) = -b(k,B-1) 2^(B-1) + sum_{l<B-1} b(k,l) 2^l

Put this into the filter sum and swap the order of the two sums:

    y(n) = sum_{l<B-1} 2^l T(l)  -  2^(B-1) T(B-1)
    T(l) = sum_k b(k,l) h(k)

(Samples are treated as integers here. Reading the same bits as fractions
with the sign bit worth -1 only scales y(n) by a constant power of two; the
hardware is the same.)

`T(l)` depends only on the N bits `b(0,l) ... b(N-1,l)`. So it is one of
2^N values, and those values are what the table holds:

| address (b3 b2 b1 b0) | entry              |
|-----------------------|--------------------|
| 0000                  | 0                  |
| 0001                  | h(0)               |
| 0010                  | h(1)               |
| 0011                  | h(1)+h(0)          |
| ...                   | ...                |
| 1111                  | h(3)+h(2)+h(1)+h(0)|

The sign-bit term enters with a minus sign. This is why the adder in the
datapath is an adder/*subtractor*: it subtracts on the last bit position.

## Datapath

```
 x_in ──► tap_shift_registers ──bits[N]──► da_lut ──► [pipeline reg] ──► +/- ──► acc register ──► y
          (N words x B bits,               (2^N              (PIPE=1)       ▲           │
           one bit of each tap             entries)                         │           │
           per clock, LSB first)                                            └── >>>1 ◄──┘
                                                                               (2^-1)
 da_controller: accepts a sample, counts bit positions 0..B-1,
                flags the first position (restart) and the last (subtract)
```

**Tap registers** (`tap_shift_registers`) hold the last N samples as a delay
line. When a sample is accepted, the delay line advances. A copy of every tap
is then loaded into a B-bit shift register. The shift registers move towards
the LSB once per clock, so `bits[k]` presents bit 0, 1, ..., B-1 of tap k on
successive clocks. The delay line itself is left alone, so the samples are
still there for the next output.

**Table** (`da_lut`) is a constant ROM. Its contents are computed from the
`COEF` parameter when the design is elaborated. Address bit n selects h(n).
An entry is `W_COEF + log2(LUT_IN)` bits wide, enough for any sum of the
coefficients.

**Accumulator** (`da_accumulator`) computes

    acc <= (first ? 0 : acc >>> 1)  ±  (value << (B-1))

It subtracts on the sign-bit position. The table value is aligned at weight
2^(B-1) before it is added. Because of this, the halving only ever shifts out
zeros, and after B steps the accumulator holds `sum_l 2^l T(l)` with no
rounding. The accumulator is `W_IN + B` bits wide: 10 bits at the defaults,
enough for the full range of the result. An assertion checks that the
adder/subtractor never overflows. The `+/-` unit is the ripple-carry
`adder_subtractor`.

**Pipeline register.** `PIPE = 1` (the default) places a register between the
table and the adder. The table read and the add then sit in separate clock
cycles, which raises the clock rate and adds one cycle of latency. `PIPE = 0`
removes the register.

**Sequencer** (`da_controller`) is a bit counter. It asserts `bit_valid` for B
clocks after each accepted sample. It marks the first clock (`bit_first`,
which restarts the accumulator) and the last clock (`bit_last`, sign bit,
subtract).

## Interface and timing (`fir_da`, and the filter ports of `fir_top`)

| signal     | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | clock, rising edge |
| `rst_n`    | in  | 1     | synchronous reset, active low; clears the taps and the accumulator |
| `in_valid` | in  | 1     | `x_in` holds a sample |
| `x_in`     | in  | B     | sample, two's complement |
| `in_ready` | out | 1     | the sample is taken at a clock edge where `in_valid && in_ready` |
| `y`        | out | W_Y   | y(n), two's complement, full precision |
| `y_valid`  | out | 1     | one-clock pulse: `y` holds a new output |

- **Latency:** `y_valid` rises B + 1 + PIPE clocks after the edge that took
  the sample. That is 6 clocks at the defaults.
- **Throughput:** `in_ready` is high when the filter is idle. It is also high
  during the last look-up of the current sample. A sample offered every clock
  is therefore taken every B clocks, with no gap, and outputs follow at the
  same rate.
- **Holding `y`:** `y` is the accumulator register. It stays valid until the
  next sample's first look-up reaches the accumulator. Capture it on
  `y_valid`.

With 4 taps, 4-bit samples and 4-bit coefficients, the full-precision output
is 10 bits.

## Longer filters: partial tables

The table has 2^N entries, so it grows exponentially with the number of taps.
For `N_TAPS > LUT_IN`, `fir_da` splits the taps into `N_TAPS / LUT_IN` groups.
Each group gets its own `LUT_IN`-input table, and the group outputs are added
before the accumulator. The accumulator and the output are `log2(groups)` bits
wider. `N_TAPS` must be a multiple of `LUT_IN`; elaboration stops with an
error otherwise. The default has one group. The test bench also runs an 8-tap
filter built from two 16-entry tables.

## The arithmetic units

### Ripple-carry adder and adder/subtractor

`ripple_carry_adder` is W full adders in a chain. The carry enters at the LSB
(`c_in`) and leaves at the MSB (`c_out`). Its delay grows linearly with W.

`adder_subtractor` computes `a - b` as `a + ~b + 1` on the same chain. It
inverts `b` with XOR gates and sets the carry-in when `sub = 1`. It also
reports signed overflow. The filter's accumulator uses it at its full width.

### Two's complement array multiplier

`array_multiplier` multiplies two W-bit two's complement numbers (default
W = 4) into a 2W-bit product. It is purely combinational.

The trick is in the weights. If bit 0 is the sign bit (MSB-first numbering),
a number is `-a0 + sum a_i 2^-i`. A partial product `a_i x_j` that pairs one
sign bit with one non-sign bit therefore has *negative* weight. The array never
converts these bits. Instead, each adder cell knows which of its inputs and
outputs count negatively:

| cell | equation           | negative-weight signals |
|------|--------------------|-------------------------|
| I    | 2c + s = x + y + z | none |
| II   | 2c − s = x + y − z | z, s |
| II'  | s − 2c = x − y − z | y, z, c |

Each cell is an ordinary full adder with its negative-weight inputs inverted
on the way in and its negative-weight output inverted on the way out. For a
single bit, `~b = 1 - b`, and in these three cases the constant offsets cancel
exactly.

The cells form rows:

- **First row:** adds the partial products of the two least significant bits
  of x.
- **Each following row:** adds one more bit of x. A cell in these rows is of
  kind II when one of its inputs has negative weight, otherwise of kind I.
- **Sign bit of x:** its row is made entirely of II' cells, because every one
  of those cells receives two negative-weight inputs.
- **Ripple row:** a last row of II' cells merges the remaining sums and
  carries. Its carry runs right to left with negative weight, and the
  constant 0 at its right end counts as a negative-weight input.

The result is that every product bit leaves the array with positive weight,
except the MSB, which is the final carry and carries the sign. For W = 4 the
rows are II I I / II II I / II' II' II' / II' II' II'.

The structure was drawn for the 4 x 4 case. The generalisation to any square
size W ≥ 3 is this implementation's own. It has been checked exhaustively for
W = 3, 4, 5 and 8. Non-square sizes are not supported.

In `fir_top` the multiplier sits beside the filter on its own ports (`mul_a`,
`mul_x`, `mul_p`). The filter itself uses no multiplier; the point of the
table is to avoid one per tap.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_TAPS`  | 4 | `fir_pkg`, `fir_da`, `fir_top` | number of coefficients |
| `LUT_IN`  | 4 | `fir_pkg`, `fir_da` | address bits of one table (2^4 = 16 entries) |
| `B`       | 4 | `fir_pkg`, `fir_da`, `fir_top` | sample word length = look-ups per output |
| `W_COEF`  | 4 | `fir_pkg`, `fir_da` | coefficient word length |
| `COEF`    | {1, 3, 3, 1} | `fir_pkg::DEFAULT_COEF` | h(0) ... h(N-1), signed |
| `PIPE`    | 1 | `fir_da` | pipeline register between table and adder |
| `W` (multiplier) | 4 | `array_multiplier`, `W_MUL` in `fir_top` | operand width |
| `W` (adders) | 8 | `ripple_carry_adder`, `adder_subtractor` | word length when used on their own |

If you change `N_TAPS`, also pass a `COEF` array of that length.

## How far to trust it, and what is this design's own

Taken from the original design:
- the table-based architecture: tap registers, a 16-entry table of
  coefficient sums, an optional pipeline register, a `+/-` unit, an
  accumulator register with 2^-1 feedback;
- 4 taps and a 4-input table;
- partial tables for long filters;
- the ripple-carry adder and the invert-and-carry subtraction;
- the array multiplier's cell kinds and their arrangement.

Chosen here, because the original leaves it open:
- **4-bit samples.** One look-up per sample bit, four look-ups per output.
- **4-bit coefficients.**
- **Coefficients {1, 3, 3, 1}.** A binomial low-pass filter. The original
  calls its filter low-pass but does not list its coefficients.
- **Full-precision output width.**
- **Bit order and sign handling.** LSB first, with the sign bit subtracted.
- **Where partial-table outputs are added.**
- **Handshake and timing.** The valid/ready handshake, the back-to-back
  timing, and the synchronous active-low reset.
- **Overflow output** of the adder/subtractor.
- **Multiplier for other sizes.** The generalisation beyond 4 x 4.

Not built:
- **Symmetric coefficients.** Folding them to halve the table is only
  mentioned as a possible improvement, with no structure given.
- **Format converters.** They are mentioned without any description.
- **Wallace-tree multipliers and other fast adders.** They are named only as
  alternatives.
- **FPGA mapping.** Nothing here maps to FPGA block RAM or LUT primitives.
  The design is plain synthesizable RTL.

Verification: every block has a self-checking test bench. The two cell
modules (`full_adder`, `mult_cell`) are covered through the blocks that use
them.
- **Adders and multiplier:** exhaustive.
- **Table:** all entries, for two coefficient sets.
- **Filter:** compared output by output against a direct FIR evaluation,
  including latency and rate. Three configurations are run: default, no
  pipeline register, and 8 taps with two partial tables and mixed-sign
  coefficients.
- **Frequency response:** `tb_fir_lowpass` drives the default filter with DC,
  a quarter-rate tone and a Nyquist-rate tone, and checks the steady-state
  outputs: gain 8 at DC, about 2.8 at a quarter of the sample rate, and 0 at
  Nyquist.

## Files

| file | content |
|------|---------|
| `rtl/fir_pkg.sv` | default sizes and coefficients |
| `rtl/fir_top.sv` | top level: filter and multiplier side by side |
| `rtl/fir_da.sv` | the table-based filter |
| `rtl/da_controller.sv`, `rtl/tap_shift_registers.sv`, `rtl/da_lut.sv`, `rtl/da_accumulator.sv` | its parts |
| `rtl/adder_subtractor.sv`, `rtl/ripple_carry_adder.sv`, `rtl/full_adder.sv` | ripple-carry arithmetic |
| `rtl/mult_pkg.sv`, `rtl/mult_cell.sv`, `rtl/array_multiplier.sv` | array multiplier |
| `tb/tb_<module>.sv` | one self-checking test bench per module |
| `tb/fir_da_harness.sv` | stimulus and scoreboard used by `tb_fir_da` |
| `tb/tb_fir_lowpass.sv` | frequency-response check of the default filter |

## Simulating

Every test bench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. It also has a watchdog that counts a failure if the run hangs. To
run the end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fir_pkg.sv rtl/mult_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
./obj_dir/Vtb_fir_top
```

For any other test bench, replace `tb_fir_top` with its name. The packages
must come first on the command line; `-y rtl -y tb` lets Verilator find
every other module by its file name. `tb_fir_top` also counts how often each
mechanism happened:
- sign-bit subtractions;
- samples taken back to back;
- samples taken from idle;
- negative outputs;
- table addresses used.

It fails if any of them never happened.

To change the filter, override `COEF` (and `N_TAPS`, `B`, `W_COEF`) on
`fir_da`. The table contents follow automatically.
