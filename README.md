# Narrow-accumulator dot products with Alternating Greedy Scheduling

Quantized neural networks multiply small integers, e.g. 5-bit weights by 7-bit activations,
but they usually sum the products in a 32-bit accumulator so that the sum cannot overflow.
This RTL sums them in a **12-bit** accumulator instead. It never overflows while it adds,
as long as the final dot product fits in 12 bits.

An overflow can be of two kinds:

* **persistent**: the final sum itself does not fit. No order of addition helps.
* **transient**: the final sum fits, but a partial sum on the way does not. This comes
  only from the order in which the products are added.

The **Alternating Greedy Schedule (AGS)** removes transient overflows by changing that order:

1. Split the products into a positive list P and a negative list N, and drop the zeros.
2. Starting from z, add positives from P for as long as z stays at or below the accumulator
   maximum.
3. When the next positive would overflow, or P is used up, add negatives from N for as long as
   z stays at or above the minimum.
4. Go back to P, and repeat until both lists are used up.

While positives are being added, only the upper bound can be crossed, and the next positive
is refused just before that happens. The same holds for the lower bound and negatives. So z
never leaves the range. If the final sum fits, some list can always supply a value that fits.
This requires that every single product lies within the accumulator range (see "Why the
engine cannot get stuck" below).

Worked example, range [-10, 10], products `7 -5 -9 4 6 -4 -4 -3 9 6 -4 -7 4 7 2 -7 -2 -3 8 5`:

    P = 7 4 6 9 6 4 7 2 8 5          N = -5 -9 -4 -4 -3 -4 -7 -7 -2 -3
    order: (7) -(5+9) +(4+6) -(4+4+3) +(9+6) -(4+7) +(4+7+2) -(7+2+3) +(8+5) = 10

Added in the original order, this sum would have left the range several times. In the AGS
order it never does. `tb/tb_ags_engine.sv` replays this example and checks each add and the
cycle count.

## The hybrid unit: a fast path first, AGS only when needed

The AGS loop is sequential: one add per cycle. A SIMD multiplier produces 8 products per
cycle, so using AGS for every dot product would cut throughput by a factor of 8. The unit
therefore has two paths (`rtl/ags_dot_unit.sv`):

* **Fast path.** Each cycle, a chunk of 8 weight/activation pairs is multiplied (`simd_mul`).
  The 8 products are reduced in a full-width adder tree and added to the 12-bit running sum
  (`simd_reduce`). This is 8 multiply-accumulates per cycle. Most dot products finish here.
* **AGS path.** Suppose adding a chunk would take the running sum out of range. Then that chunk
  is *not* added. The AGS engine (`ags_engine`) starts with the running sum so far as its z.
  That chunk and every later chunk of the same dot product go through `sign_splitter`, which
  splits 8 products by sign in one cycle and compacts each side. The two sides are appended to
  two `pp_list` buffers, one for P and one for N. The engine adds one entry per cycle, while
  the input keeps arriving at one chunk per cycle.

So the slowdown depends on how early a dot product first overflows. If it overflows near the
end, almost nothing is left for the slow path. If it overflows at the first chunk, every
nonzero product costs one cycle. Narrow accumulators overflow earlier, so they slow the unit
down more.

```
 in_w/in_x ──► simd_mul ──pp[8]──► simd_reduce ──► acc (12 bit) ──► out_sum (fast path)
                              │                 └─ovf─► control (FAST / AGS)
                              └──► sign_splitter ──pos──► pp_list P ──head──┐
                                                 └─neg──► pp_list N ──head──┴► ags_engine ──► out_sum
```

## The AGS engine in detail

`ags_engine` keeps z, which list it is in (P or N), and a busy flag. Each cycle it looks at
both list heads and takes at most one action, in this priority order:

| situation (current list C, other list O) | action |
|---|---|
| head of C fits | add it, stay in C (greedy) |
| C and O both used up | finish: `done` pulses next cycle |
| C used up, O has a head | switch to O and add its head in the same cycle |
| head of C does not fit, head of O fits | switch to O and add its head in the same cycle |
| head of C does not fit, O empty but still filling | switch to O and wait |
| C empty but still filling | wait |
| head of C does not fit and O cannot help (used up, or its head does not fit either) | persistent overflow: add the head of C with saturation and set `clipped` |

A list is *used up* only when it is empty **and** `inputs_done` is set, meaning no more chunks
will arrive. If a list is empty and more may come, the engine waits (`stall`) and does not
treat the list as finished. As a result, the order of adds is exactly the order the algorithm
would produce with all the products available up front. Arrival timing changes only the cycle
count, never the order or the result. Switching lists costs no cycle: the other head is
examined in the same cycle.

**Why the engine cannot get stuck.** Suppose the P head does not fit and the N head does not
fit either. Then p − n ≥ (MAX − MIN) + 2. That is impossible when every product lies within
[MIN, MAX]. With 5-bit and 7-bit operands, products lie in [−1008, 1024], inside the 12-bit
range [−2048, 2047]. If you change the widths, keep `W_W + A_W ≤ ACC_W` so that this still
holds. When the final sum does not fit (a persistent overflow), the algorithm alone would never
finish. The engine instead clips that add and carries on, so it always terminates. The
result is then some in-range value, and `out_clipped` is set.

**Cycle timing of the AGS path.** Let t be the cycle in which the overflowing chunk is
accepted. The engine adds one entry per cycle from t+1. Its busy period ends with one cycle
that detects that both lists are used up. `done` is registered, and so is the unit's output.
Therefore `out_valid` comes exactly (nonzero products from the overflowing chunk on) + (wait
cycles) + 3 cycles after t. The end-to-end testbench checks this equality for every dot
product.

## Interface (`ags_dot_unit`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | a chunk moves when both are high |
| `in_w[LANES]` | in | `W_W` signed | weights of the chunk |
| `in_x[LANES]` | in | `A_W` signed | activations of the chunk |
| `in_last` | in | 1 | last chunk of the dot product (pad a short chunk with zero weights) |
| `out_valid` | out | 1 | one-cycle pulse with the result |
| `out_sum` | out | `ACC_W` signed | the dot product |
| `out_used_ags` | out | 1 | the AGS path was taken |
| `out_clipped` | out | 1 | the final sum did not fit and was saturated |
| `ags_busy`, `ags_step`, `ags_step_neg`, `ags_stall` | out | 1 | engine activity: running, adding (from N), waiting |
| `ags_backlog` | out | `clog2(MAX_K+1)+1` | entries waiting in the two lists |

Timing:
* **Fast path.** `in_ready` is high. One chunk is accepted per cycle. `out_valid` comes one
  cycle after the last chunk. The next dot product can follow immediately.
* **AGS path.** `in_ready` stays high until `in_last` has been accepted, as long as the lists
  have room. It then stays low until the result has been delivered. Activations are signed:
  an unsigned activation is expected to have been shifted by its zero-point offset into
  [−2^(A_W−1), 2^(A_W−1)−1]. Weights use a zero offset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LANES` | 8 | products per cycle (SIMD width) |
| `W_W`, `A_W` | 5, 7 | weight and activation widths |
| `ACC_W` | 12 | accumulator width |
| `ACC_MAX`, `ACC_MIN` | 2^(ACC_W−1)−1, −2^(ACC_W−1) | accumulator range. They can be narrowed, e.g. to [−10, 10] for the worked example. |
| `MAX_K` | 4608 | longest dot product the lists can hold (3·3·512) |

The shared defaults are in `rtl/ags_pkg.sv`.

## Files

* `rtl/ags_pkg.sv`: default sizes and the accumulator-range functions.
* `rtl/simd_mul.sv`: LANES signed multipliers.
* `rtl/simd_reduce.sv`: fast-path step, with the chunk sum, the new running sum and the overflow test.
* `rtl/sign_splitter.sv`: one-cycle split by sign with prefix-count compaction; zeros are dropped.
* `rtl/pp_list.sv`: one sign list. It appends up to LANES entries per cycle, pops one per
  cycle, and is cleared between dot products.
* `rtl/ags_engine.sv`: the alternating greedy summation.
* `rtl/ags_dot_unit.sv`: the top. It wires the blocks together and holds the FAST/AGS control.
* `tb/tb_<module>.sv`: a self-checking testbench for each module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_ags_latency.sv`: runs the same set of sparse dot products at 12-, 13-, 14- and 16-bit
  accumulators and reports cycles against an 8-MAC/cycle baseline. On its synthetic data
  (90 % zero weights of magnitude up to 7), the 12-bit unit needs about 1.02–1.05× the
  baseline cycles, with AGS used by 10–13 of 64 dot products. At 13 bits the cost is at most
  one AGS call, and at 14 and 16 bits there is none. Real layers with a larger share of early
  overflows cost more, up to one cycle per nonzero product.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
          rtl/ags_pkg.sv tb/tb_ags_dot_unit.sv --top-module tb_ags_dot_unit -Mdir obj_top
./obj_top/Vtb_ags_dot_unit
```

Use any other `tb/tb_*.sv` in the same way. Each testbench stops itself with a watchdog if it
hangs. `tb_ags_dot_unit` runs the top at its default parameters. It sends 60 back-to-back dot
products of lengths 9, 64, 320, 960, 1280 and 4608, with 80–95 % zero weights. It checks:

* every result;
* the path taken;
* the exact latency;
* that each mechanism occurs at least once: the fast path only, the switch to AGS, P→N and N→P
  changes, engine waits, input back-pressure and clipping.

## How far to trust it, and where it goes beyond its source

The AGS algorithm, the split by sign, one add per cycle, the 8-lane fast path that hands over
to AGS after an overflow, and the widths 5/7/12 are taken from the published method. The
following are this design's own choices:

* **Overflow test on the fast path.** It is made on the running sum after a whole chunk. Inside
  a chunk, the 8 products are reduced at full width (17 bits at the defaults), so a transient excursion inside
  one chunk is not seen. Only the accumulator register is narrow.
* **Handover.** The chunk that would overflow is not added. AGS continues from the running sum
  so far, not from zero.
* **List storage.** Each list is a 4608-entry register array with LANES write ports, so a whole
  dot product fits even if it overflows at the first chunk. That is about 110 k bits for the
  two lists. A real implementation would use banked SRAM. The algorithm may need a value from
  late in the stream before earlier ones, so smaller lists with back-pressure could deadlock.
* **Engine overlap.** The engine runs while its lists are still filling.
* **Persistent overflow.** Such a dot product is clipped, with `out_clipped` set. The published
  method leaves this case to pruning, which shortens dot products so that it becomes rare.
* **Interface.** The valid/ready interface, `in_last` framing and synchronous reset.
* **Critical path.** The multiply, the adder tree and the range test form one combinational
  path in front of the accumulator register. For a high clock rate, register the products
  first.

Not modelled: the host CPU core, its registers, cache and 512-bit bus, and the instructions
that would drive this unit. The operand stream stands in for them. The network-level
experiments (pruning, quantization, accuracy) are software and are not part of the RTL.
