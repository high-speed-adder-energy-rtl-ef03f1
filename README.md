# Hybrid variable-latency carry skip adder with a speculative Han-Carlson nucleus

A carry skip adder (CSKA) cuts an N-bit addition into stages. Each stage
checks whether all of its bits *propagate* (a[i] ^ b[i] = 1). If they do, the
carry entering the stage is passed straight to the next stage without
rippling through it. This is a "skip". The slowest case of a plain CSKA is a
carry that is generated in the first stage, skips every middle stage and
ripples into the last stage.

This design is a 32-bit CSKA built from three ideas:

1. **Concatenation and incrementation (CI) stages.** Every stage adds its own
   operand bits with carry-in 0 as soon as the operands arrive. The real
   carry is added later by a small incrementer. A stage therefore never
   waits on lower stages to start its ripple.
2. **Compound-gate skip logic.** The skip multiplexer is replaced by one
   AOI21 or OAI21 gate per stage, computing `G | P & Cin`. AOI and OAI stages
   alternate, and the carry changes polarity at each stage.
3. **A hybrid, variable-latency nucleus.** The middle stage is a 16-bit
   parallel-prefix (Han-Carlson) adder instead of a ripple block. Its
   all-propagate signal P predicts when the long carry paths are active. When
   P = 1, the adder takes a second clock cycle. Otherwise one cycle is
   enough, so the clock (or the supply voltage) can be set for the short
   paths. The Han-Carlson network is itself made *speculative*: its last
   Kogge-Stone row is removed from the one-cycle path. Whenever that might
   give a wrong carry, the second cycle is also taken.

The RTL models function and cycle behaviour. It does not model gate delay,
supply voltage or energy. The "slow" paths that justify the second cycle are
a timing property of a real implementation; in simulation every path settles
within the cycle.

## Datapath

Default partition (LSB first), set by the parameter `STAGE_M = {2,3,4,16,4,3}`:

| stage | bits  | kind                                  | skip gate          |
|-------|-------|---------------------------------------|--------------------|
| 0     | 1:0   | plain ripple block, fed by `cin`      | none (carry exact) |
| 1     | 4:2   | CI stage                              | AOI (true in)      |
| 2     | 8:5   | CI stage                              | OAI (inverted in)  |
| 3     | 24:9  | Han-Carlson nucleus (`NUC = 3`)       | AOI                |
| 4     | 28:25 | CI stage                              | OAI                |
| 5     | 31:29 | CI stage                              | AOI, output inverted back to true `cout` |

Stage sizes grow towards the nucleus and shrink after it. This is the
variable stage size style: the stages that wait longest for their carry are
made smallest. Any partition can be given, including fixed-size stages,
provided the nucleus size is a power of two of at least 4.

### CI stage (`ci_cska_stage`)

```
a,b ──► rca_block (cin = 0) ──► s_rca ──► inc_block ──► s
              │ co = G                       ▲
              │ p_all = P                    │ cin (true polarity)
              ▼                              │
        skip_logic:  cout = G | P & cin ◄────┴── stage carry in
```

Because the RCA works with carry-in 0, its carry out is the stage generate G.
The stage carry out is then exactly `G | P & cin`. This holds because
`s_rca + cin` can overflow only when every bit propagates. The incrementer's
own carry is therefore never needed. The incrementer is a chain of half
adders: bit i flips when `cin` and all lower bits of `s_rca` are 1.

### Carry polarity

A compound gate inverts. A stage whose carry enters in true polarity uses
`co_n = ~(G | P & ci)` (AOI21). The next stage receives the inverted carry
and uses `co = ~((~P | ci_n) & ~G)` (OAI21), which gives the true carry
again. Each stage re-inverts locally where its incrementer needs the true
carry. The top computes every stage's polarity from its index. `cout` is
inverted at the end only when the last gate is an AOI.

## The nucleus stage (`hc_nucleus_stage`, `hc_prefix`)

Pre-processing forms `g = a & b` and `p = a ^ b`. A prefix network combines
them into group signals (G[i:0], P[i:0]) for every bit. Then:

* **Skip gate.** `CO,p = G[15:0] | P[15:0] & CO,p-1`. The group signals of
  the most significant bit are always taken from the complete network, so the
  carry passed to stages 4 and 5 is never speculative.
* **Predictor.** `P[15:0]` (the `p_all` output) is 1 when the carry skips
  the nucleus, which is when the long paths may be active.
* **Post-processing.** The internal carries are
  `c[i+1] = G[i:0] | P[i:0] & CO,p-1`, and the sums are `s[i] = p[i] ^ c[i]`.

### Han-Carlson network, and what "speculative" means here

For M = 16 the network has 1 + log2(16) = 5 rows:

| row | cells                                   | span after the row (odd bits) |
|-----|-----------------------------------------|-------------------------------|
| 1   | Brent-Kung: odd bit i with bit i-1      | 2                             |
| 2   | Kogge-Stone, distance 2, odd bits only  | 4                             |
| 3   | Kogge-Stone, distance 4, odd bits only  | 8                             |
| 4   | Kogge-Stone, distance 8, odd bits only  | 16 (complete)                 |
| 5   | Brent-Kung: even bit i with odd bit i-1 | even bits complete            |

A Kogge-Stone cell is skipped where the bit already reaches bit 0.
Han-Carlson places cells only on every other bit, and the last row fills in
the even bits. This keeps fan-out at 2 with about half the Kogge-Stone cells,
at the cost of one extra row.

The speculative result skips the last `DROP` Kogge-Stone rows (default 1:
row 4) and then applies row 5. Above bit `SPAN = 2^(log2 M - DROP)` = 8, each
group signal then covers only the top 8 (odd bits) or 9 (even bits) bits of
its range. The speculative carry treats the uncovered lower part as carrying
nothing, which is wrong only when the covered span propagates completely.
`spec_err` is the OR of the propagate products of all truncated spans. This
test is conservative: it raises the flag in every case where the speculative
carry could be wrong, and sometimes when it is not. Random 16-bit operands
raise the flag in a few percent of additions. Note that `P[15:0] = 1` always
implies `spec_err = 1` when `DROP > 0`.

Both sum sets leave the stage: `s_spec` is used after one cycle, and `s_exact`
(from the full network) after two. With `DROP = 0` the two are identical and
`spec_err` is constant 0.

## Variable latency (`vl_controller`, `hvl_cska`)

```
        in_valid/in_ready             slow = P(nucleus) | spec_err
a,b,cin ─────► operand reg ─► datapath ─► result reg ─► sum, cout, out_valid, out_slow
                    ▲                         ▲
                    └──── vl_controller ──────┘
```

* The operands are loaded on an `in_valid && in_ready` edge.
* In the next cycle the controller looks at `slow`:
  * If it is 0, the one-cycle (speculative) sums are stored at the end of
    that cycle, and a new operand pair may be loaded at the same edge. Fast
    operations therefore run at one per cycle.
  * If it is 1, `in_ready` is 0 for one cycle. At the end of the second cycle
    the exact sums are stored.
* `out_valid` is a one-cycle pulse in the cycle after the result is stored.
  `out_slow` tells whether that result took two cycles.

From the load edge to `out_valid` there are 2 clock edges for a one-cycle
operation and 3 for a two-cycle one. There is no output back-pressure: the
consumer must take every result. Reset is asynchronous and active low.
Assertions in `vl_controller` check that a waiting operation always completes
in its second cycle and that no operand is accepted while one waits.

## Parameters of `hvl_cska`

| parameter | default             | meaning |
|-----------|---------------------|---------|
| `N`       | 32                  | adder width; must equal the sum of `STAGE_M` |
| `Q`       | 6                   | number of stages |
| `STAGE_M` | `{2,3,4,16,4,3}`    | stage sizes, LSB stage first (unpacked `int unsigned` array) |
| `NUC`     | 3                   | index of the nucleus stage (not 0) |
| `DROP`    | 1                   | Kogge-Stone rows left out of the one-cycle path |

The defaults live in `cska_pkg`. Elaboration stops with an error for
inconsistent sizes, for a nucleus that is not a power of two, or for `DROP`
larger than the number of Kogge-Stone rows.

## What comes from the source and what is this design's own

Taken from the published structure:

* the CI stages (RCA with carry-in 0 plus incrementer);
* AOI/OAI compound skip gates;
* the stage sizes rising to a middle nucleus and falling after it;
* a power-of-two prefix nucleus whose propagate product is both the skip
  condition and the latency predictor, with its longest carry given priority;
* the Han-Carlson topology (Brent-Kung outer rows, Kogge-Stone inner rows on
  odd bits, 1 + log2 n levels) at 16 bits;
* making the nucleus speculative by leaving out its last Kogge-Stone rows.

This design's own choices:

* the width of 32 bits and the exact stage sizes;
* the 16-bit nucleus (the same structure is also described with an 8-bit
  Brent-Kung nucleus);
* removing exactly one row;
* the conservative speculation-error test and the use of the exact sums in
  the second cycle;
* the first stage as a plain ripple block with no skip gate;
* reading the AOI/OAI alternation as a carry-polarity alternation (the gates
  are sometimes named NAND-NOR-Invert/NOR-NAND-Invert instead; the logic
  function is the same);
* the clocking, the registers, the handshake, the two-cycle slow path and
  the reset.

Not modelled:

* supply-voltage scaling and the near-threshold operation the structure is
  meant for;
* any energy or delay figures;
* the conventional multiplexer-based CSKA and the Brent-Kung hybrid, which
  serve only for comparison.

## Files

| file | contents |
|------|----------|
| `rtl/cska_pkg.sv` | default configuration, `log2_floor` |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/rca_block.sv` | ripple block with propagate product |
| `rtl/inc_block.sv` | incrementation block |
| `rtl/skip_logic.sv` | AOI/OAI skip gate |
| `rtl/ci_cska_stage.sv` | CI stage |
| `rtl/hc_prefix.sv` | speculative Han-Carlson prefix network |
| `rtl/hc_nucleus_stage.sv` | nucleus stage |
| `rtl/vl_controller.sv` | variable-latency control |
| `rtl/hvl_cska.sv` | top |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_hvl_cska_cfg.sv` | top in two other configurations |

## Verification

Every testbench compares against integer arithmetic or a loop-based
reference written in the testbench. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* **Exhaustive (M = 4):** `rca_block`, `inc_block`, `ci_cska_stage` (both
  polarities), and `skip_logic` (all 8 inputs, both forms).
* **`hc_prefix`:** 20,000 vectors for `DROP` = 0, 1, 2. Checks the exact and
  speculative group signals and the error flag, and that an unflagged
  speculation is exact. It also requires that real speculation errors occur.
* **`hc_nucleus_stage`:** sums, carry, predictor and speculative sums, for
  both polarities.
* **`vl_controller`:** 2,000 operations with random gaps. Checks latency 1/2
  per operation, stalls, back-to-back loads, `res_exact` and `out_slow`.
* **`tb_hvl_cska`:** the top at its default parameters, 20,000 operations
  through the handshake. Checks sums, carry and latency (2 or 3 edges)
  against a prediction made from the operands. It counts, and requires at
  least once:
  * fast operations;
  * slow operations caused by the skip predictor, and slow operations caused
    by the speculation check alone;
  * a carry skipping each of stages 1 to 5;
  * incrementer roll-over;
  * stalls;
  * back-to-back operations;
  * a carry out.
* **`tb_hvl_cska_cfg`:** two more configurations. One is 24 bits with five
  stages, an 8-bit nucleus and `DROP = 0`, so the last skip gate is an OAI.
  The other is 48 bits with fixed 8-bit stages around a 16-bit nucleus and
  `DROP = 2`.

Running one testbench with plain Verilator (from the directory that holds
`rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_hvl_cska \
    -y rtl -y tb +libext+.sv rtl/cska_pkg.sv tb/tb_hvl_cska.sv -o sim
./obj_dir/sim
```

Lint of the top alone:
`verilator --lint-only -Wall -Wno-fatal -y rtl +libext+.sv rtl/cska_pkg.sv rtl/hvl_cska.sv`.
The warnings left are all expected:

* unused package constants;
* two intentionally open `p_all` pins;
* `g_spec`/`p_spec` of the nucleus MSB, which the skip gate takes from the
  exact network instead;
* `SYNCASYNCNET` on `rst_n`, which is both the asynchronous reset of the
  flip-flops and the `disable iff` condition of the controller's assertions.
