# Forward, inverse and unified NTT accelerators for Kyber

Polynomial multiplication in lattice-based post-quantum schemes such as
CRYSTALS-Kyber is done in the number-theoretic-transform (NTT) domain: a
forward NTT on each operand, a point-wise product, and an inverse NTT. NTT
hardware commonly merges the forward and the inverse transform into one
"unified" butterfly unit to save area. This RTL provides three small,
non-pipelined accelerators so that the two styles can be compared directly:

| core        | transform           | butterfly                              |
|-------------|---------------------|----------------------------------------|
| `fntt_core` | forward NTT only    | Cooley-Tukey (`ct_btf`)                |
| `intt_core` | inverse NTT only    | Gentleman-Sande (`gs_btf`)             |
| `untt_core` | either, per request | unified CT/GS with routing muxes (`unified_btf`) |

All three work on Kyber polynomials: N = 256 coefficients, each a 12-bit
residue modulo Q = 3329. All three take **1410 clock cycles** per
transform: 256 cycles to load, 898 cycles to compute, 256 cycles to unload.
They do not differ in cycle count. They differ in the butterfly, and so in
the critical path and the logic between the register banks. The unified
butterfly has a longer path because its operators feed each other through
multiplexers.

`ntt_styles_top` instantiates the three cores side by side. They share only
the clock and reset.

## What is computed

The forward transform is Kyber's incomplete NTT. There are 7 butterfly
layers with spans 128, 64, …, 2. The result is 128 residues of degree 1,
stored as coefficient pairs. A complete 256-point negacyclic NTT does not
exist modulo 3329, because there is no 512th root of unity. The inverse
transform runs the 7 Gentleman-Sande layers in the opposite order (spans 2
to 128). It does **not** apply the final scaling by 1/128. A forward
transform followed by an inverse one therefore returns 128·a mod Q. If a
full inverse is needed, multiply the result by 128⁻¹ = 3303 (mod Q)
outside these cores.

The twiddle factors are not built into the hardware. They are streamed in
with every operation and held in a 256-entry table. Butterfly layer `l`
uses these table entries:

* forward: entry `2^l + g` for group `g` of the layer (entries 1 … 127,
  going up);
* inverse: entry `2G − 1 − g`, where `G` is the number of groups in the
  layer (entries 127 … 1, going down).

For standard Kyber results, load these values (ζ = 17, `br7` = 7-bit bit
reversal):

* forward table: `tw[k] = 17^br7(k) mod 3329`;
* inverse table: `tw[k] = 3329 − (17^br7(k) mod 3329)`.

Entries 0 and 128 … 255 are loaded but never read. The inverse butterfly
computes `w·(u − t)`. Kyber's reference code computes `ζ·(t − u)`, so the
inverse table holds negated roots.

## Butterflies

Each butterfly reads `u = r[lo]`, `t = r[hi]` and a twiddle factor `w`. It
returns `x` (written to `r[lo]`) and `y` (written to `r[hi]`). Each
butterfly is built from plain `+`, `*` and `−` operators and two Barrett
reducers.

* **Cooley-Tukey, forward:** `x = (u + t·w) mod Q`, `y = (u − t·w) mod Q`.
  The 24-bit product is not reduced first. It goes straight into the adder
  and the subtractor, and each of their results is reduced.
* **Gentleman-Sande, inverse:** `x = (u + t) mod Q`, `y = w·(u − t) mod Q`.
  The difference is corrected into `[0, Q)` before it is multiplied.

**Subtraction.** The subtractor of the forward and unified butterflies
(`ntt_pkg::modq_sub`) never returns a negative value:

* If `u − v` falls in `(−Q, 0)`, it adds `Q`.
* If `u − v` is lower still (`v` is an unreduced product), it adds `Q²`.

Either way the result is below 2²⁴ and congruent to `u − v`.

**Barrett reduction.** `barrett_modq` estimates the quotient as
`(x·5039) >> 24`, where 5039 = ⌊2²⁴/3329⌋. It then subtracts that multiple
of Q and applies one conditional subtraction of Q. For Q = 3329, one
correction step is exact for every 24-bit input. If you change Q,
re-check this.

### The unified butterfly

`unified_btf` has one adder, one multiplier, one subtractor and two
reducers. Four 2:1 multiplexers, all driven by one select `inv`, route the
operands:

| mux | feeds                   | `inv = 0` (forward) | `inv = 1` (inverse) |
|-----|-------------------------|---------------------|---------------------|
| mA  | adder operand           | `t·w`               | `t`                 |
| mB  | multiplier operand      | `t`                 | `u − t`             |
| mC  | subtractor operand      | `t·w`               | `t`                 |
| mD  | second reducer input    | `u − t·w`           | `w·(u − t)`         |

The multiplexers form three levels:

1. mA, mB and mC choose what starts the computation. In the forward
   direction the multiplication comes first. In the inverse direction the
   addition and subtraction come first.
2. The operators and mD.
3. The reducers.

The multiplier output reaches the subtractor (through mC), and the
subtractor output reaches the multiplier (through mB). The netlist
therefore has a structural combinational loop. No value of `inv` activates
it, because one of the two multiplexers always blocks it. Still, lint
(Verilator `UNOPTFLAT`) and synthesis report the loop, and static timing
analysis must be told it is a false path. This feedback is what makes the
unified style slower. It is kept on purpose and is not a bug.

## Datapath and schedule of one core

Each core contains three 256 × 12-bit register banks built from
flip-flops, not block RAM or SRAM macros. The banks have asynchronous read
ports, so a butterfly can read two words and write two words in every
clock.

* **RegBank1** receives the input polynomial.
* **RegBank3** receives the twiddle table.
* **RegBank1 and RegBank2** then alternate as source and destination
  (ping-pong). Even layers read RegBank1 and write RegBank2. Odd layers do
  the reverse. After 7 layers the result is in RegBank2.

The controller (`ntt_ctrl`) steps through these states:

```
IDLE -start-> LOAD (256) -> PINIT (1) -> PROC (7 x 128) -> PEND (1) -> STORE (256) -> IDLE
```

`PROC` runs one butterfly per clock with no pipelining. The clock period
must cover the bank read multiplexer, the butterfly and the bank write.
`PINIT` and `PEND` are single entry and exit cycles. Together with `PROC`
they give the 898 processing cycles.

`ntt_ctrl` is a single module. Its `STYLE` parameter serves all three
cores:

* FNTT: always forward.
* INTT: always inverse.
* UNTT: samples `inv_req` together with `start` and drives the unified
  butterfly's mux select for the whole operation.

## Interface and timing (every core)

| signal      | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the controller |
| `start`     | in  | 1  | starts an operation; ignored while `busy` is high |
| `inv_req`   | in  | 1  | UNTT only: 0 forward, 1 inverse; sampled with `start` |
| `in_ready`  | out | 1  | high for the 256 load cycles |
| `in_coef`, `in_tw` | in | 12 | in load cycle *i*: coefficient *i* and twiddle entry *i* |
| `out_valid` | out | 1  | high for the 256 store cycles |
| `out_coef`, `out_idx` | out | 12, 8 | result coefficient and its index (0 … 255, in order) |
| `done`      | out | 1  | high with the last result |
| `busy`      | out | 1  | high for all 1410 cycles of an operation |

After `start` is sampled, `in_ready` is high in the next cycle. Drive the
input data before each rising edge during those 256 cycles. There is no
back-pressure in either direction. The register banks have no reset,
because every word is written before it is read.

In `ntt_styles_top` the ports of the three cores carry the prefixes `f_`,
`i_` and `u_`.

## How this relates to the published architecture

These points follow the published design:

* the three architectures and their butterfly equations;
* the unified butterfly with one adder, one multiplier, one subtractor, two
  reducers and four muxes on a common select;
* Barrett reduction;
* three 256 × 12 register banks per design;
* dedicated FSM controllers;
* the budget of 256 + 898 + 256 = 1410 cycles.

The published resource counts (about 9.3k flip-flops per design) match
three register banks plus a small controller. This RTL has 9216 bank bits
and 21 to 22 control flip-flops per core.

These points are choices made in this RTL, because the published
description leaves them open:

* the load/store handshake, with one coefficient and one twiddle per cycle
  and no back-pressure;
* the ping-pong assignment of layers to RegBank1 and RegBank2;
* the twiddle-table addressing and the sign convention of the inverse
  table;
* splitting the 898 processing cycles into 896 butterfly cycles plus one
  entry and one exit cycle;
* the form of the subtractor's sign correction and the Barrett constants;
* reset behaviour;
* a single controller module with a `STYLE` parameter, instead of three
  separate controller sources.

The published description gives the inverse butterfly's second output as
`w·(u − t)`. This RTL implements that form.

Not included:

* the final ×1/128 (post-processing) multiplication of the Kyber inverse
  NTT;
* any pipelining;
* side-channel countermeasures.

The banks are written as arrays with asynchronous reads. An FPGA tool may
map them to distributed RAM rather than flip-flops unless told otherwise;
the published area figures assume flip-flops. Frequency, area and power
depend on the synthesis flow. The RTL has not
been characterised for them.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. The reference model
(`tb/ntt_ref_pkg.sv`) is written with plain integer `%` arithmetic from
Kyber's loop nests. It is independent of the RTL.

* `tb_barrett_modq`: boundary values and 200 000 random 24-bit inputs.
* `tb_regbank`: writes on both ports at once, random writes, and read-back
  against a shadow copy.
* `tb_ct_btf`, `tb_gs_btf`, `tb_unified_btf`: all corner combinations plus
  random residues. The unified butterfly alternates modes on every vector.
* `tb_ntt_ctrl`: checks every butterfly address pair, twiddle index and
  bank selection against the Kyber schedule, for all three styles. Also
  checks the phase lengths.
* `tb_fntt_core`, `tb_intt_core`, `tb_untt_core`: full-size transforms
  against the reference. Also checks the 1410-cycle budget, the impulse
  response (FNTT) and the round trip `INTT(NTT(a)) = 128·a` (INTT, UNTT).
* `tb_ntt_styles_top`: the three cores running concurrently at default
  parameters. It covers these cases:
  * FNTT output fed to the INTT;
  * a UNTT round trip with mode switches in both directions;
  * start pulses while busy, which must be ignored;
  * ping-pong layers into both banks.

  It counts each of these cases and fails if any one never occurs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ntt_pkg.sv tb/ntt_ref_pkg.sv tb/tb_ntt_styles_top.sv \
    --top-module tb_ntt_styles_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. `-Wno-fatal` is needed
because Verilator treats warnings as errors by default. The unified
butterfly produces an `UNOPTFLAT` warning, explained above, and the
reference package mixes integer widths. Every testbench finishes in well
under a second.

## Files

* `rtl/ntt_pkg.sv`: Q, N, widths, types, and the subtractor function.
* `rtl/barrett_modq.sv`, `rtl/regbank.sv`: the reducer and the register
  bank.
* `rtl/ct_btf.sv`, `rtl/gs_btf.sv`, `rtl/unified_btf.sv`: the three
  butterflies.
* `rtl/ntt_ctrl.sv`: the controller for all three styles.
* `rtl/fntt_core.sv`, `rtl/intt_core.sv`, `rtl/untt_core.sv`: the three
  accelerators.
* `rtl/ntt_styles_top.sv`: the three accelerators side by side.
* `tb/`: the testbenches and the reference package.
