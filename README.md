# Multiplierless super-sample-rate FIR filters

A direct-RF-sampling front end (for example the ADC of an RFSoC at 4 GSPS)
produces samples far faster than the FPGA fabric clock. A filter in the fabric
must therefore take in and put out P samples per clock, e.g. P = 8 at 500 MHz.
The usual way to build such a filter is a polyphase structure with one
hardware multiplier per coefficient and phase. The cost grows with P² per
subfilter length and uses up scarce DSP slices.

This RTL combines two ideas to cut that cost:

* **Fast FIR Algorithm (FFA) parallelism.** A 2-parallel FIR can be computed
  with three half-length subfilters instead of four. Nesting the 2-parallel
  stage p times gives a 2^p-parallel filter with 3^p subfilters instead of
  4^p.
* **Multiplierless subfilters.** Each subfilter is in transpose form, so all
  its taps multiply the same input sample. One *multiple constant
  multiplication* (MCM) block can therefore make all the products from a
  shared graph of shifts and adders, with no multipliers.

The same filter is also provided in a second, simpler structure: a
**polyphase filter whose subfilters share MCM blocks**. This structure is
better for short subfilters and for coefficient sets with much symmetry.

The whole design is SystemVerilog. The adder graphs, the FFA coefficient
algebra and all word lengths are computed at elaboration time from the
coefficient parameter, so a new coefficient set, parallelism or input width
needs only a parameter change.

## Structure

```
par_fir_top
├── ffa_fir (P = 8)                       nested 2-parallel FFA
│   ├── ffa_fir (P = 4)  H0   ─┐
│   ├── ffa_fir (P = 4)  H1    ├─ each again split into three, down to P = 1
│   └── ffa_fir (P = 4)  H0+H1 ┘
│        ...  ffa_fir (P = 1): mcm_block → mcm_transposed_fir
└── polyphase_mcm_fir (P = 8)
    └── per input lane: mcm_block → P × mcm_transposed_fir (one per phase)
```

| file | contents |
|---|---|
| `rtl/par_fir_pkg.sv` | coefficient vector type, adder-graph type, the graph builder, FFA/polyphase coefficient splitting, word-length and latency functions, the default coefficient set |
| `rtl/mcm_block.sv` | pipelined shift-and-add MCM built from an adder graph |
| `rtl/mcm_transposed_fir.sv` | transpose-form adder chain fed by MCM products |
| `rtl/ffa_fir.sv` | recursive nested FFA filter |
| `rtl/polyphase_mcm_fir.sv` | polyphase filter with one shared MCM per input lane |
| `rtl/par_fir_top.sv` | both structures side by side, valid tracking, optional half-band decimation |

## Lanes and samples

All parallel ports carry P consecutive samples per clock. Lane 0 is the oldest:
in clock k, `x[j]` is sample x[Pk+j] and `y[m]` is output y[Pk+m − P·latency].
Both structures compute exactly

    y[n] = Σ_i COEFS[i] · x[n − i]

with no rounding. The output width is
`ACC_W = IN_W + ceil(log2(Σ|COEFS|)) + 1`, which is 29 bits for the default set.
Internal nodes are also ACC_W bits wide and may wrap. Every operation is an
addition, a subtraction or a left shift, so the arithmetic is exact modulo
2^ACC_W. A result that fits in ACC_W bits therefore comes out exact even if an
intermediate value wrapped.

## The FFA stage (`ffa_fir`)

Split the input into its even samples X0 and its odd samples X1. Split the
taps into H0 (the even taps) and H1 (the odd taps). Then:

    y_even = H0·X0 + z⁻¹·H1·X1
    y_odd  = (H0+H1)·(X0+X1) − H0·X0 − H1·X1

Only three products of half-length filters are needed: H0·X0, H1·X1 and
(H0+H1)·(X0+X1). Each is itself a P/2-parallel filter, so the module
instantiates itself three times. The recursion ends at P = 1 with an MCM and a
transpose chain. The coefficient sets of the sub-filters are computed by
`ffa_part` in the package. H0+H1 has coefficients up to one bit wider, and the
input X0+X1 of its filter is one bit wider than X0 and X1. This is where FFA
pays for its saved multipliers: pre-adders, post-adders and longer words.

The least obvious part is the **z⁻¹ of a nested stage**. It delays the
half-rate stream by one sample, not by one clock. With P/2 lanes per clock,
that delay is a lane rotation:

* lane j of the delayed stream is lane j−1 of Y1 in the same clock;
* lane 0 is the last lane of Y1 from the previous clock, kept in one register
  (`y1_last_q`).

Pipelining, per stage:

* The pre-adder X0+X1 is registered, and X0 and X1 are delayed one clock to
  match.
* The post-adders are registered. The odd output has two adders between
  registers. If timing demands it, this is the first place to add a register.

All 3^p leaf subfilters share one MCM latency `MCM_LAT`, so that the three
branches of every stage stay aligned. `MCM_LAT` is the deepest adder graph of
any subfilter, as computed by `ffa_mcm_depth`. The latency of `ffa_fir` is
`MCM_LAT + 1 + 2·log2(P)` clocks.

## The polyphase structure (`polyphase_mcm_fir`)

Phase r of the taps is taps r, r+P, r+2P and so on. Output lane m adds, for
every input lane j, the phase (m−j) mod P subfilter applied to lane j. When
j > m, the sample belongs to the previous block, so that term is taken one
clock later.

All P subfilters on one input lane multiply that lane's sample, so a single
MCM built for the whole impulse response serves them all. Symmetric taps,
repeated taps, negated taps and taps that differ by a power of two then cost
no extra adders. The P terms of each output are summed in one registered
stage. The latency is `MCM_LAT + 2` clocks, where `MCM_LAT` is the depth of
the single graph.

## The MCM adder graph (`par_fir_pkg::mcm_build`, `mcm_block`)

Only distinct **odd positive** fundamentals are built:

* an even coefficient is a left shift of an odd fundamental;
* a negative coefficient becomes a subtraction in the transpose chain.

Node 0 of the graph is the input. Every other node is one adder, of the form
`(a<<s) + b`, `(a<<s) − b` or `b − (a<<s)`, where a and b are earlier nodes.

The builder is a simple greedy method:

1. Any target that is one adder away from the nodes already built is added,
   using the operand pair of least pipeline depth. This repeats until no
   target qualifies.
2. Then the smallest missing target t is split at its lowest signed digit. The
   odd part of t−1 (if t mod 4 = 1) or of t+1 (if t mod 4 = 3) becomes a new
   target. That new target has one signed digit fewer than t, so the builder
   always finishes.

This is not one of the published optimal-leaning algorithms (H_cub, RAG-n).
It finds the same adder count on small sets but can use more adders or more
depth on large ones. For the default half-band set it builds

    3 = (1<<1)+1,  27 = (3<<3)+3,  19 = (1<<4)+3,  77 = (3<<5)−19,  615 = (77<<3)−1

That is five adders at depth 4. An H_cub-style graph for the same set also
has five adders, at depth 3.

`mcm_block` registers every node at the stage equal to its depth. Operands
from shallower stages are carried forward through pipeline registers, and all
products leave together after `LAT` clocks. Registers that nothing reads are
left for synthesis to remove.

A graph holds at most 255 nodes (`MAX_NODES`). That is enough for a 128-tap
set of random 16-bit coefficients, which needs 133 nodes. The builder runs
inside the elaboration of every tool, so large configurations elaborate
slowly. A single 128-tap graph takes verilator about 10 s. A 16-parallel
filter with 128 taps builds hundreds of graphs and did not finish elaborating
in 20 minutes. Only configurations up to 24 taps (x2, x4) and 16 taps (x8)
have been simulated.

## Default configuration

| parameter | default | meaning |
|---|---|---|
| `P` | 8 | samples per clock (power of two) |
| `NTAPS` | 16 | taps (a multiple of P) |
| `COEFS` | fir0 | −6, 0, 54, 0, −256, 0, 1230, 2048, 1230, 0, −256, 0, 54, 0, −6, 0 |
| `IN_W` | 16 | input sample width |
| `COEF_W` | 16 | coefficient width; each coefficient is checked against it at elaboration |
| `DECIMATE` | 0 | 1: keep only y[2n], P/2 outputs per clock (half-band decimator) |

The default coefficients are the 15-tap half-band filter from the decimation
chain of the RFSoC ADC, padded with one zero. The P = 8 default is the least
parallelism that carries a 4 GSPS stream at a fabric clock of 500 MHz or more.

To use another filter, give `COEFS` as a `par_fir_pkg::coef_vec_t`. Tap i goes
in element i and unused elements are zero. Pad the set with zeros to a
multiple of P. For symmetric odd-length sets, one zero at the end is enough
when P = 2.

## Interface and timing of `par_fir_top`

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst` | in | 1 | synchronous, active-high reset clears all filter state |
| `in_valid` | in | 1 | marks clocks that carry samples |
| `x` | in | P × IN_W | P consecutive samples, lane 0 the oldest |
| `ffa_valid`, `ffa_y` | out | 1, OUT_L × ACC_W | FFA result; OUT_L = P, or P/2 when decimating |
| `pp_valid`, `pp_y` | out | 1, OUT_L × ACC_W | polyphase result |

A new block is accepted every clock and there is no back-pressure. The filters
run every clock. `*_valid` is `in_valid` delayed by each structure's latency.
With the defaults, the FFA latency is 11 clocks (MCM depth 4 + 1 + 6) and the
polyphase latency is 6 clocks.

Decimation here simply drops the odd outputs after full-rate filtering. A
decimator that merges the down-sampling into the FFA structure would save
logic, but is not built here.

## Where this departs from the reference design, and what is left out

* **MCM algorithm.** The graph builder is the greedy method above, not H_cub.
  Graph depths and adder counts can therefore differ from the reference
  design.
* **Pipelining.** Pipelining is a choice of this design: registered
  pre-adders, registered post-adders, and one adder stage for the polyphase
  recombination. The reference balances registers against f_max differently.
* **Alignment of subfilters.** All FFA subfilters share the deepest graph's
  latency. This costs registers in subfilters with shallow graphs.
* **Word lengths.** All internal words have the full output width. Synthesis
  is trusted to prune bits that can never be used.
* **Not part of this RTL.**
  * the traditional DSP-slice polyphase filter, which the design is meant to
    replace;
  * the RF data converter tiles that feed and take the samples;
  * any integration of decimation into the FFA.

## Simulation

The testbenches are self-checking and end with a
`TB_RESULT checks=N failures=M` line. Example with plain verilator, from the
directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
        rtl/par_fir_pkg.sv tb/tb_par_fir_top.sv --top-module tb_par_fir_top -o sim
    ./obj_dir/sim

| testbench | what it checks |
|---|---|
| `tb_mcm_block` | the default graph: 5 adders, every node consistent with its operands, every product exact at latency = depth |
| `tb_mcm_transposed_fir` | MCM and transpose chain against direct convolution: the default set, plus a set with negative, even, repeated, extreme and zero taps |
| `tb_ffa_fir` | 2-parallel with 8 taps, 4-parallel with 24 taps, and the default 8-parallel filter, all against direct convolution at the stated latency |
| `tb_polyphase_mcm_fir` | 4-parallel type-II with 16 taps, and the default 8-parallel filter |
| `tb_par_fir_top_full` | the default top with no parameter changes against direct convolution, with the same mechanism counts as below |
| `tb_par_fir_top` | the default top plus a decimating instance; also checks the valid flags, a gap in `in_valid`, pre-adder word growth, FFA lane rotation, and the wrapped polyphase phases |

The reference outputs in every testbench come from a direct convolution of the
serial input stream. They are never derived from the FFA or polyphase
equations.
