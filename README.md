# Multi-level LUT twiddle-factor generators for radix-2 FFTs

Each butterfly of a fixed-radix FFT needs a twiddle factor
W_N^k = cos(2πk/N) − i·sin(2πk/N). A parallel FFT needs a new one every clock
cycle. The usual way to supply them is one quarter-wave sine table of N/4
words. That table costs no arithmetic, but its size grows linearly with N:
for N = 2^20 it holds 262 144 words, and for N = 2^30 it holds 2^28.

This RTL trades memory for multipliers. The angle is split into a coarse part
and one or more fine parts. Each part is read from its own small table, and the
parts are joined with the angle-addition identities

    cos(θ+φ) = cosθ·cosφ − sinθ·sinφ
    sin(θ+φ) = sinθ·cosφ + cosθ·sinφ

With K resolutions the tables together hold about (2K−1)·(N/4)^(1/K) words.
The price is 4(K−1) multipliers and 2K cycles of pipeline latency. Throughput
stays at one twiddle factor per clock.

Four generators are provided, all with the same interface:

| module | scheme | tables at default size | multipliers | latency |
|---|---|---|---|---|
| `twiddle_gen_1level` | one quarter-wave table | N = 2^10: 256 words | 0 | 2 |
| `twiddle_gen_2level` | coarse + 1 fine | N = 2^20: 512 + 512 + 512 = 1536 words | 4 | 4 |
| `twiddle_gen_3level` | coarse + 2 fine | N = 2^30: 1024 + 4 × 512 = 3072 words | 8 | 6 |
| `twiddle_gen_klevel` | coarse + K−1 fine | K = 3, N = 2^30: as above | 4(K−1) | 2K |

A 24-bit word is used throughout. The top level, `twiddle_top`, places all
four generators on one twiddle-exponent stream for N = 2^20. It feeds the
twiddle factor of the selected scheme into a radix-2 decimation-in-time
butterfly.

## How the angle index is cut up

This is the part to understand before changing anything. A generator takes
the angle index `k` (LOG2_N bits) and returns cos(2πk/N) and sin(2πk/N).

```
 k:  | quadrant (2) | coarse c (LOG2_COARSE) | fine f1 (LOG2_FINE) | ... | fine f_{K-1} (LOG2_FINE) |
```

* **Quadrant.** The two top bits select the quadrant. Every table only covers
  [0, π/2), and `quadrant_fold` swaps and negates the first-quadrant result:
  quadrant 1 gives (sin, cos) = (cos a, −sin a), quadrant 2 gives
  (−sin a, −cos a), and quadrant 3 gives (−cos a, sin a).
* **Coarse field.** The coarse field addresses `quarter_sine_lut`, which holds
  only the sine: word i is sin((π/2)·i/2^LOG2_COARSE). The cosine comes from the
  same table at the mirrored address 2^LOG2_COARSE − c. That is why the coarse
  table needs two read ports. For c = 0 the mirrored address would be one past
  the end of the table, so the read logic supplies the constant 1.0 there
  instead of storing an extra word.
* **Fine fields.** Each fine field m addresses a `fine_trig_lut` pair: a sine
  table and a cosine table with one read port each. Word i of the pair holds
  sin and cos of (π/2)·i/2^(LOG2_COARSE + m·LOG2_FINE). Because the fields are
  consecutive bit ranges of k, the coarse angle plus all fine angles equals the
  in-quadrant angle exactly. No approximation is made beyond table rounding.
* **Derived widths.** LOG2_COARSE is always derived as
  LOG2_N − 2 − (K−1)·LOG2_FINE. Giving the fine tables a length of 2^LOG2_FINE
  fixes everything else.

The ideal length for every table is (N/4)^(1/K). When that is not a power of
two, the coarse table takes the remainder. For N = 2^30 and K = 3 the tables
are 1024 words (coarse) and 512 words (fine). That costs 3072 words instead of
the 5·645 ≈ 3225 that equal lengths would need.

## Pipelines

Every stage is one register. A new `k` may enter every cycle. The valid flag
travels in a reset-cleared shift register beside the data.

* **Single level.** Table read (1), then quadrant fold (1). No multiplier.
* **Two level.** Task 1 reads the tables (1 cycle). Task 2 forms the four
  products (1). Task 3 does one subtraction and one addition, rounded (1).
  Then comes the quadrant fold (1).
* **Three level.** The two fine pairs are combined first:
  A − B = cos φ1 cos φ2 − sin φ1 sin φ2 and C + D = sin φ1 cos φ2 + cos φ1 sin φ2
  (2 cycles). The result is then rotated by the coarse angle (2 cycles). The
  coarse table outputs wait in a 2-cycle delay line meanwhile. Table read and
  fold add one cycle each, so the latency is 6.
* **K level.** The same idea in a `generate` loop. The finest level is rotated
  by each coarser level in turn, and the coarse angle comes last. Level j's
  table output is delayed 2(j−1) cycles so that it meets the running result.

Tasks 2 and 3 of every rotation sit in one module, `rot_stage`. It keeps the
four 48-bit products at full precision and rounds once, after the addition.

## Number format and accuracy

Twiddle components are signed 24-bit words with 22 fractional bits, so
+1.0 = 0x400000 is exact and the range is [−2, 2). Table entries are rounded
to the nearest value. The testbenches check every output against
double-precision cos/sin, with these bounds:

* single level: within 1 LSB (2^−22);
* two level: within 2 LSB;
* three level and K level with K = 3: within 3 LSB;
* K = 4 at N = 2^30: within 4 LSB; K = 4 inside the top: within 8 LSB
  (checked loosely).

The table contents are computed when the design is elaborated, by `initial`
loops that call `$sin`/`$cos`. In silicon they stand for pre-computed ROM
contents. A tool that cannot evaluate those calls needs the tables supplied
another way, for example with `$readmemh` from a generated file.

## The top level: `twiddle_top`

`twiddle_addr_gen` produces the twiddle exponents of one radix-2 DIT stage s.
Butterfly j needs k = (j mod 2^s)·2^(LOG2_N−1−s). These exponents form an
arithmetic sequence with increment 2^(LOG2_N−1−s), taken modulo N/2, so one
accumulator produces them: the sum wraps to zero exactly at each group
boundary.

Operation:

1. Pulse `start_i` with `stage_i` and `scheme_i` (`twiddle_pkg::scheme_e`). The
   scheme is held for the whole pass.
2. While `busy_o` is high, each cycle with `in_valid_i` high supplies one
   butterfly's inputs `x0`, `x1` (24-bit signed complex) and consumes the next
   exponent. After N/2 inputs the pass ends and `busy_o` falls.
3. The results come out on `out_valid_o`, 1 + L + 3 cycles after the inputs.
   L is 2, 4, 6 or 2·KLEVELS depending on the scheme. They are
   y0 = x0 + W·x1 and y1 = x0 − W·x1 (26 bits, unscaled), plus the twiddle
   components used. `out_last_o` marks the final butterfly.

All four generators run all the time. The butterfly data pass through one
shift register, which is tapped at the selected generator's latency. Do not
start a pass with a different scheme while results of the previous pass are
still in flight.

Sizes at the defaults (LOG2_N = 20, KLEVELS = 4): the single-level table has
2^18 words. The two-level generator has three 512-word tables. The
three-level generator has five 64-word tables. The four-level generator has a
64-word coarse table and six 16-word fine tables.

The butterfly (`radix2_butterfly`) applies the twiddle to the second input,
as in a DIT butterfly. It has three stages: products, rounded sum W·x1, then
add/subtract. Its outputs grow by two bits so that nothing can overflow. No
1/√N or per-stage scaling is applied.

## Where this departs from the scheme it implements, and what is missing

* **Address arithmetic.** The cost analysis of the schemes counts one adder
  per table address, as if each address were stepped by its own accumulator.
  Here one accumulator steps the exponent k. The table addresses are bit
  fields of k, plus one subtraction for the mirrored coarse-cosine address, so
  the address adders are fewer than counted.
* **Choices made here.** The quadrant fold is a separate register stage. Each
  task takes exactly one cycle. Rounding is half-up. All of these are choices
  of this design.
* **Scheme selection.** The run-time scheme select in the top exists so that
  the schemes can be compared side by side. A real FFT would build only the
  one scheme it needs.
* **Radix-R.** Radix-R FFTs need R−1 twiddle factors per butterfly, meaning
  R−1 copies of a generator running in parallel. Only the radix-2 case, one
  twiddle per butterfly, is built.
* **Not included.** There is no FFT data memory, stage sequencing across
  passes, or output reordering. The top processes one stage per pass, with
  data supplied through ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

* **Generators.** The single-level, two-level, three-level and K-level
  generators are tested at their default sizes, up to N = 2^30. The tests
  cover sequential and strided sweeps that reach every coarse entry and every
  quadrant, plus random indices with gaps in valid. Exact latency is checked
  too. The K-level test also runs K = 2 and K = 4 instances at N = 2^30
  on the same index stream.
* **Components.** The tables, `rot_stage`, `quadrant_fold`, the exponent
  sequencer and the butterfly are tested against real-arithmetic references.
* **`tb_twiddle_top`.** Runs N = 1024 with K = 4: complete passes for four
  stages under each of the four schemes. It counts scheme use, exponent
  wrap-around, input gaps and completed passes, and fails if any of them never
  happened.
* **`tb_twiddle_top_full`.** Runs the top at its default size (N = 2^20). It
  makes one pass per scheme over the last stage, whose 2^19 butterflies use
  every distinct twiddle factor, plus one pass of stage 10. It takes a few
  seconds.

To simulate with Verilator (5.x), give the package first and let the
tool find the modules in `rtl/` by name:

```
verilator --binary --timing --assert -y rtl --top-module tb_twiddle_top \
    rtl/twiddle_pkg.sv tb/tb_twiddle_top.sv
./obj_dir/Vtb_twiddle_top
```

To use a generator on its own, set LOG2_N, and for the multi-level ones
LOG2_FINE (and LEVELS for the K-level one). Keep
LOG2_N − 2 − (K−1)·LOG2_FINE ≥ 1.
