# Memoing multiply and divide units

Multiplication and, above all, division take many cycles, yet in image and
signal processing the same operations keep coming back: a small window of an
image holds only a handful of distinct pixel values, so the same products
and quotients are computed again and again. This RTL puts a small cache of
recent operations, a **MEMO-TABLE**, next to each multi-cycle arithmetic
unit. The operands go to the table and the arithmetic unit in the same
cycle. If the table holds a result for those operands, it is returned after
one cycle and the arithmetic unit is aborted. If not, the unit finishes as
usual and its result is written into the table while it is forwarded, so a
miss costs nothing extra.

The design follows the technique described in *Accelerating Multi-Media
Processing by Implementing Memoing in Multiplication and Division Units*,
in its main configuration: one 32-entry, 4-way set-associative table per
unit, next to an integer multiplier, a double-precision multiplier and a
double-precision divider, with trivial operations (multiply by 0 or 1,
divide by 1, divide 0) answered directly and never stored. The arithmetic
units themselves are simple stand-ins written for this design; the method
does not say how they work, only how long they take.

## Block structure

```
            id_valid/id_ready, id_op, id_a, id_b
                           |
                     memo_ex_stage
        +------------------+------------------+
        |                  |                  |
   memo_unit (IMUL)   memo_unit (FMUL)   memo_unit (FDIV)
        |                  |                  |
        +-- trivial_detect                    |
        +-- memo_table  (32 entries, 4 ways)  |
        +-- int_mul / fp_mul / fp_div  (computation unit, CU)
        +-- result mux  -> wb[op]
```

| File | Contents |
|---|---|
| `rtl/memo_pkg.sv` | operation and result-source enums, `wb_t` result struct, IEEE-754 helpers (classify, round-and-pack), table hash |
| `rtl/memo_table.sv` | the MEMO-TABLE |
| `rtl/trivial_detect.sv` | trivial-operation detector |
| `rtl/int_mul.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv` | multi-cycle computation units with an abort input |
| `rtl/memo_unit.sv` | one CU + its table + detector + result mux |
| `rtl/memo_ex_stage.sv` | top: the three memoing units behind one issue port |

## What happens to one operation

Cycle 0 is the cycle in which `id_valid` and `id_ready` are both high.

| Case | Cycle 0 | Result on `wb[op]` | Unit free again |
|---|---|---|---|
| trivial | detector matches; CU start is cancelled; table not looked up | cycle 1, `src = SRC_TRIVIAL` | cycle 1 |
| table hit | lookup matches; CU start is cancelled (abort) | cycle 1, `src = SRC_MEMO` | cycle 1 |
| miss | CU starts | cycle LAT, `src = SRC_CU`; same cycle the table is written | cycle LAT |

Because the lookup is finished inside cycle 0, the abort on a hit is applied
together with the start, so a hit never occupies the arithmetic unit and
back-to-back hits issue every cycle. During a miss `id_ready` is low for that
unit only; the other units keep accepting work, so a one-cycle hit in the
multiplier can complete before a 39-cycle division issued earlier. Each unit
therefore has its own write-back port `wb[OP_IMUL]`, `wb[OP_FMUL]`,
`wb[OP_FDIV]`, and the surrounding pipeline must accept results out of order,
as it already must for any non-pipelined divider.

An operation that waits for a busy unit must hold `id_op`, `id_a`, `id_b`
stable (an assertion in `memo_ex_stage` checks this).

## The MEMO-TABLE

* **Entry.** Tag = both 64-bit operands in full (128 bits), data = the 64-bit
  result, plus a valid bit: 193 bits per entry, 6176 flip-flops for 32
  entries, plus 2-bit LRU ages.
* **Index.** 8 sets. Integer multiply: the XOR of the 3 least significant
  bits of the two operands. Floating point: the XOR of the 3 most
  significant mantissa bits (bits 51..49) of the two operands. Neither hash
  includes the exponent, so values that differ only by a power of two
  share a set.
* **Commutative operations.** For both multiplications every way is
  compared against (a, b) and against (b, a). The XOR hash is symmetric,
  so both orders land in the same set and one stored entry serves both.
  Division compares only (a, b).
* **Replacement.** A result is written into an invalid way if the set has
  one, otherwise over the least recently used way. Ages are exact LRU
  (one 2-bit counter per way); a hit or a write makes its entry the most
  recent.
* **Lookup and write in the same cycle.** This happens when a new
  operation issues in the cycle a miss completes. The lookup sees the table
  as it was before the write, so it can still hit the entry that the write
  is replacing, and it also compares against the operands being written
  (a bypass), so the very next operation can reuse a result that has just
  been produced. If the hit and the write fall in the same set, only the
  write updates the LRU order; in different sets both do.
* **Reset** clears every entry.

The lookup is combinational (hash, 4 or 8 parallel 128-bit compares, way
select); `memo_unit` registers its output, which is what makes a hit cost
one cycle.

## Trivial operations

`trivial_detect` answers, in cycle 0, operations whose result needs no
arithmetic, and these are not entered into the table so they do not push out
entries worth keeping:

* integer multiply: `a*0`, `0*b` give 0; `a*1` gives `a`; `1*b` gives `b`;
* fp multiply: zero times zero-or-normal gives a zero with the XOR of the
  signs; `+1.0` times a normal gives the other operand;
* fp divide: zero divided by a normal or infinity gives a signed zero;
  a normal divided by `+1.0` gives the dividend.

Anything involving NaN, infinity times zero, or a zero divisor is left to the
arithmetic unit, so the detector's answer is always bit-identical to what the
unit would have produced. `TRIVIAL_EN = 0` turns the detector off; trivial
operations are then computed and stored like any other.

## Arithmetic units

All three are non-pipelined: one operation at a time, `start` when `busy` is
low, `done` a one-cycle pulse `LAT` cycles after `start`, `abort_op` clears
`busy` (and, with `start`, keeps an operation from starting). They use
`LAT-2` iteration cycles and one normalise/round cycle, so `LAT >= 3`.

* `int_mul`: low 64 bits of `a*b`, shift-and-add, `ceil(64/(LAT-2))` bits of
  `b` per cycle (default `LAT = 3`: a single 64x64 step).
* `fp_mul`: IEEE double, 53x53-bit shift-and-add, `ceil(53/(LAT-2))` bits per
  cycle, round to nearest even (default `LAT = 5`).
* `fp_div`: IEEE double, radix-2 restoring division producing 56 quotient
  bits, `ceil(56/(LAT-2))` per cycle, remainder as sticky bit, round to
  nearest even (default `LAT = 39`, i.e. two bits per cycle; `LAT = 13`
  does six).

Floating-point conventions of these units (and of the detector): subnormal
inputs read as zero, results below the normal range flushed to a signed
zero, overflow to infinity, every NaN result is `0x7FF8000000000000`. Only
round-to-nearest-even is provided. These are choices of this design; a real
processor would use its own units and the table would simply store whatever
they produce.

## Parameters

| Parameter (top) | Default | Origin |
|---|---|---|
| `ENTRIES` | 32 | method's main configuration |
| `WAYS` | 4 | method's main configuration (8 sets) |
| `FMUL_LAT` | 5 | the slower of the two machines the method evaluates (3 or 5) |
| `FDIV_LAT` | 39 | the slower of the two machines the method evaluates (13 or 39) |
| `IMUL_LAT` | 3 | this design's choice; the method gives no integer latency |
| `TRIVIAL_EN` | 1 | trivial-operation detection integrated, as the method recommends |

`ENTRIES/WAYS` must be a power of two. The method's size and associativity
studies (8 to 8192 entries, direct-mapped to 8-way) are all parameter
settings of the same RTL; the faster machine is `FMUL_LAT=3, FDIV_LAT=13`.

## Departures from the method, and what is not here

Choices made where the method is silent: the valid/ready issue port and
per-unit result ports; the index width (the hash uses log2 of the number of
sets bits, 3 for 8 sets); LRU replacement and the same-cycle bypass; the
abort port; 64-bit integer operands; the arithmetic algorithms and IEEE
conventions above; reset clearing the tables.

Deliberately not built, because the method presents them only as
alternatives or future extensions of its main configuration:

* storing only mantissas in the table and recomputing exponents (slightly
  higher hit ratios, more logic);
* one larger multi-ported table shared by several copies of the same unit,
  and using table ports as extra "units" that stall to the real unit on a
  miss;
* pipelined multipliers (the method's timing model, like this RTL, runs one
  operation at a time per unit);
* memoing for square root, logarithms or trigonometric functions.

The processor around the stage (decode, register file, write-back, the
compiler's scheduling assumptions) is outside this design; its signals are
the top's ports.

## Verification

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_int_mul` | 3- and 7-cycle multipliers against a 128-bit product; latency; abort |
| `tb_fp_mul` | against the simulator's own double arithmetic (with the conventions above); zeros, infinities, NaNs, overflow, underflow, rounding carry; latency; abort |
| `tb_fp_div` | same for division |
| `tb_trivial_detect` | all three detectors against restated rules, and every trivial result against the full operation |
| `tb_memo_table` | a commutative 32/4 fp-hashed table and a non-commutative 16/2 integer-hashed table, cycle by cycle against an LRU reference model, including same-cycle bypass, swapped-operand hits and evictions |
| `tb_memo_unit` | divider and fp multiplier units: value, source (trivial/hit/miss predicted by a table model), latency, abort on hit, stall on miss |
| `tb_memo_ex_stage` | the top at default parameters with a random low-entropy stream over all three units: values, sources, latencies, stalls, out-of-order completion, reuse of a result in the cycle it was produced, re-computation after eviction |
| `tb_mm_kernels` | three tops on the same operation stream: one at default parameters (fp multiply 5, divide 39 cycles), one at `FMUL_LAT=3, FDIV_LAT=13`, one with `TRIVIAL_EN=0`; Sobel-type, local-contrast and neighbour-ratio kernels over a generated 32x32 low-entropy image (`tb_mm_pkg`); values, sources, latencies; reports per unit the hit ratio over non-trivial operations, with trivial operations counted as hits, and with trivial operations stored (no detector), and the reduction in arithmetic cycles |
| `tb_entropy` | default-size fp multiply and divide units on images of rising pixel noise; values and latencies; prints whole-image and 8x8-window entropy against hit ratio, and fails unless the hit ratio falls as entropy rises |
| `tb_lut_sweep` | fp multiply and divide units with 8, 16, 32, 64 and 256 entries (4-way) and 1, 2, 4 and 8 ways (32 entries) on the same kind of kernel stream; values and latencies; reports the hit ratio of every table |

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_memo_ex_stage \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/memo_pkg.sv tb/tb_ref_pkg.sv tb/tb_memo_ex_stage.sv
./obj_dir/Vtb_memo_ex_stage
```

`tb_mm_kernels`, `tb_lut_sweep` and `tb_entropy` also need `tb/tb_mm_pkg.sv` on the command
line, after `tb/tb_ref_pkg.sv`.

Every testbench finishes in a few seconds of wall time on a current machine.
The hit ratios the image testbenches print at low noise (roughly 0.4 for division and
0.9 for multiplication in a 32-entry 4-way table) come from a synthetic
patchwork image, which is more uniform than a photograph; they show the
mechanism working and the trends with table size and associativity (larger
and more associative tables hit more; a direct-mapped multiply table loses
much of its hit ratio to conflicts), not the figures to expect on real images,
for which the method reports hit ratios of roughly 0.4 to 0.6 at 32 entries,
4 ways. The sweep stops at 256 entries to keep simulation short; the
parameters accept larger tables.

How far to trust it: every block has been simulated against independent
reference models, and each testbench was shown to fail on a deliberately
broken copy of its block. The floating-point units are tested on normal
numbers and special values but not exhaustively; subnormal and
directed-rounding behaviour are out of scope by design. Timing closure of the
combinational lookup (a 3-bit hash, then up to eight 128-bit compares) has
not been evaluated.
