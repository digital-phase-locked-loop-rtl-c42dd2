# All-digital phase-locked loop (ADPLL)

This is a phase-locked loop made only of digital logic: a handful of counters
and one gate, with no analog filter or VCO. A reference square wave `v1` is
compared with a fed-back square wave `v2'`. The loop keeps `v2'` at the
reference frequency, a fixed phase away from it. The structure is the classic
counter-based ADPLL, the arrangement of the 74HC297 family:

```
            +---------+ DN/UP +-----------+ Carry  +------------+ IDout +-----------+
  v1 ------>|  phase  |------>| K counter |------->| ID counter |------>| divide by |---+--> v2'
      +---->| detector|       |  (loop    | Borrow | (DCO)      |       |     N     |   |
      |     +---------+       |  filter)  |------->|            |       +-----------+   |
      |      XOR or JK        +-----------+        +------------+                       |
      |                            ^ K clock             ^ ID clock = 2N f0           |
      +-----------------------------------------------------------------------------+
```

With the clock at 2N times the centre frequency f0, the loop runs free at f0.
It locks to a reference within about ±f0/K of f0.

## How the loop works

### Phase detector

The main detector is an **EX-OR gate** (`xor_pd`). For two square waves of
equal frequency, its output is high for a fraction `d = Δφ / 180°` of the
time. When the two signals are a quarter cycle apart, `d` is 50%.

The alternative is an **edge-triggered JK flip-flop** (`jkff_pd`). A rising
edge of `v2'` sets it and a rising edge of `v1` resets it. Its duty cycle is
the lead of `v2'` over `v1` divided by 360°, and it locks half a cycle apart.
The top-level input `pd_sel` chooses between them (0 selects EX-OR).

Either detector's output drives the K counter's DN/UP input. A 1 there means
"the DCO is ahead, slow it down".

### K counter: a loop filter made of two counters

`k_counter` holds two counters that both count **upwards**, modulo K
(0 … K−1, then back to 0). On each enabled K clock:

* DN/UP = 0 advances the *up* counter and freezes the down counter.
* DN/UP = 1 advances the *down* counter and freezes the up counter.

**Carry** is the MSB of the up counter and **Borrow** is the MSB of the down
counter. Each counter's MSB therefore rises once per K counts of that
counter.

The filtering comes from this division by K. Over one reference period there
are M K clocks, where M = K clock / f0. That gives `(1−d)·M/K` carry edges
and `d·M/K` borrow edges. A larger K means fewer corrections per cycle: a
narrower, quieter loop that captures less.

K is chosen at run time: `k_log2` sets K = 2^k_log2, from 2 up to 2^KW_MAX.
Out-of-range values are clamped.

### ID counter: an oscillator that is nudged by half cycles

`id_counter` is the DCO. With no Carry or Borrow edges, it divides the ID
clock by two. Internally, a toggle flip-flop `t` flips on every clock. Each
clock in which `t` is 1 is one IDout pulse, so pulses come every 2 clocks.

* A **rising edge of Carry** (the increment input) is remembered. The next
  time `t` is 1, it is held at 1 for one extra clock. Two IDout pulses then
  come 1 clock apart, so half an IDout cycle has been **added**.
* A **rising edge of Borrow** (the decrement input) is remembered. The next
  time `t` is 0, it is held at 0 for one extra clock. Three clocks then pass
  between two pulses, so half a cycle has been **deleted**.

Only edges count. A Carry or Borrow that stays high has no further effect.
The one-clock edge pulses come out as `inc_p` and `dec_p`.

The correction shows in IDout within two clocks of the edge. An increment and
a decrement that are pending together are both applied, and they cancel.
Each correction shifts `v2'` by 1/(2N) of a cycle.

`id_out` is the registered `t` itself, not a clock. The divide-by-N counter
uses it as a count enable on the same clock, so two consecutive 1s are two
pulses. On silicon the same train is usually made by gating `t` with the ID
clock, which gives narrow pulses half a clock wide. That form is not
generated here, so the whole design stays in one clock domain with no gated
clocks.

### Divide-by-N counter

`n_counter` counts IDout pulses modulo N. Its output `v2'` is low for
counts 0 … ⌊N/2⌋−1 and high for the rest, so there is one `v2'` cycle per N
pulses. N comes from the `n_div` input, up to 2^NW − 1. The values 0 and 1
are treated as 2.

## Loop equations

Write M = K clock / f0, with M = 2N when `k_en` is tied high. Write
δ = f1/f0 − 1 for the reference offset. In lock, the net corrections per
reference cycle must make up the offset:

```
(1 − 2d) · M / (2 N K) = δ          d = DN/UP duty cycle
hold range:  |δ| < M / (2 N K)       (= 1/K for M = 2N)
free-running frequency:  f0 = f_clk / (2N)
```

So in lock the detector duty moves away from 50% just far enough to supply
the corrections. With the EX-OR detector, that moves the phase away from
quadrature. The end-to-end testbench checks these relations. Results with
K = 8 and N = 8 unless stated otherwise:

| case | reference | measured DN/UP duty | predicted | result |
|---|---|---|---|---|
| free running | none | 0.500 | 0.5 | v2' period = 2N clocks |
| EX-OR | f0 | 0.500 | 0.500 | locked |
| EX-OR | f0 ·1.05 | 0.300 | 0.300 | locked |
| EX-OR | f0 ·0.95 | 0.700 | 0.700 | locked |
| EX-OR | f0 ·1.10 | 0.100 | 0.100 | locked |
| EX-OR | f0 ·1.25 | — | outside hold range | not locked (409 of 500 cycles) |
| JK | f0 ·1.05 | 0.300 | 0.300 | locked |
| EX-OR, free running first, then reference applied | f0 ·1.08 | 0.180 | 0.180 | captured and locked |
| JK, free running first, then reference applied | f0 ·0.94 | 0.740 | 0.740 | captured and locked |
| EX-OR, K=16, N=32 | f0 ·1.02 | 0.340 | 0.340 | locked |
| EX-OR, K clock = clk/2 | f0 ·1.04 | 0.180 | 0.180 | locked |
| EX-OR, K clock = clk/2 | f0 ·1.10 | — | outside ±6.25% | not locked |
| EX-OR, 100 MHz clock, N = 12500 (f0 = 4 kHz) | f0 ·1.01 | 0.460 | 0.460 | locked |

**Free running.** With no reference, the EX-OR detector simply passes `v2'`
through at 50% duty. Carry and Borrow edges then alternate and the DCO sits
at f0. The JK detector behaves differently: without `v1` edges it is never
reset, so DN/UP stays at 1. The DCO then runs at the bottom of the hold
range, f0·(1 − M/(2NK)): 44 instead of 50 cycles for K = 8. Once a reference
arrives, both detectors pull in and lock.

The EX-OR detector's linear range is ±90° around its lock point. A larger
offset inside the hold range makes the duty move toward 0 or 1 (see the
+10% row, where it reaches 0.1).

## Interface of `adpll_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | ID clock and K clock, 2N·f0 |
| `rst_n` | in | 1 | asynchronous reset, active low; clears every register |
| `k_en` | in | 1 | K clock enable; tie high for K clock = clk (M = 2N) |
| `v1` | in | 1 | reference square wave, synchronous to `clk` |
| `pd_sel` | in | 1 | 0: EX-OR detector, 1: JK flip-flop detector |
| `k_log2` | in | clog2(KW_MAX+1) | K = 2^k_log2 |
| `n_div` | in | NW | N |
| `v2` | out | 1 | loop output v2' (IDout / N) |
| `pd_out` | out | 1 | selected detector output (DN/UP) |
| `xor_out`, `jk_out` | out | 1 | both detector outputs |
| `carry`, `borrow` | out | 1 | K counter outputs |
| `id_out` | out | 1 | IDout pulse train (one clock-wide pulse per IDout cycle) |
| `inc_p`, `dec_p` | out | 1 | one-clock pulses on rising edges of carry / borrow |

Parameters: `KW_MAX` = 16 is the widest K counter, so K can reach 65536.
`NW` = 16 is the width of the divide-by-N counter, so N can reach 65535.
Both defaults come from `adpll_pkg`.

Timing: everything is on the rising edge of `clk`. Carry and Borrow come
from registers. A Carry or Borrow edge reaches IDout one or two clocks
later, and `v2'` changes on the clock that counts the pulse. The EX-OR
detector is combinational. The JK detector adds one clock, because it finds
its input edges by sampling on `clk`.

## Where this RTL makes its own choices

The block structure and the behaviour of each block follow the classic
counter-based ADPLL. The following are choices of this implementation:

* **One clock.** The K counter and the ID counter share `clk`. The K clock
  can be made slower through `k_en`, but it is not a separate clock. The
  reference must be synchronous to `clk`. Add a synchronizer in front of
  `v1` if it is not; the synchronizer adds a fixed phase offset of its depth.
* **DN/UP polarity.** 1 advances the down counter.
* **JK detector wiring.** The JK detector is set by the edge of `v2'` and
  reset by the edge of `v1`. With the polarity above, this is the wiring that
  gives negative feedback. Its edges are detected synchronously.
* **Inside of the ID counter.** The toggle-and-hold mechanism, the pending
  flags and the registered pulse train in place of a gated clock are this
  implementation's own.
* **Controls and widths.** The encoding of the K modulus control (a binary
  exponent), the duty split of the divide-by-N output, the widths (16 bits)
  and the reset values are all this implementation's choices.
* **Lower limit on K.** K below 2 is not supported. With K ≥ 2, Carry and
  Borrow edges are far enough apart for the ID counter to apply each one.

## Files and simulation

`rtl/`:

| file | contents |
|---|---|
| `adpll_pkg.sv` | shared enum and default widths |
| `xor_pd.sv`, `jkff_pd.sv` | phase detectors |
| `k_counter.sv` | loop filter |
| `id_counter.sv` | DCO |
| `n_counter.sv` | feedback divider |
| `adpll_top.sv` | the loop |

`tb/` has one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`. Each reference value is computed from the
block's specification, not from the RTL: truth tables, duty cycles, counts
modulo K or N, gaps between IDout pulses, and the loop equations above.
`tb_adpll_top` runs the top with its default parameters and finishes in a
few seconds.

Example run with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb \
    rtl/adpll_pkg.sv tb/tb_adpll_top.sv --top-module tb_adpll_top -Mdir obj
./obj/Vtb_adpll_top
```

Use the same command with `tb_k_counter`, `tb_id_counter`, `tb_n_counter`,
`tb_xor_pd` or `tb_jkff_pd` in place of `tb_adpll_top`.
