# Scalable logic BIST with a reversible bit-swapping LFSR

This is a built-in self-test (BIST) for a small arithmetic block. A
pseudo-random pattern generator drives the block under test, and a signature
register compresses its answers. The block is declared healthy when the
signature equals a reference ("golden") signature. The reference is not
stored at design time. The chip makes it itself: it first applies the full
pattern sequence to a fault-free copy of the block.

Two ideas set this design apart from a textbook logic BIST:

* **Low-switching patterns.** The pattern generator is a *bit-swapping LFSR*
  (BS-LFSR). The LFSR's most significant bit decides whether adjacent output
  bits are exchanged. This keeps the LFSR's pseudo-random sequence but
  changes the order in which bits toggle, to lower switching activity in the
  logic under test.
* **Reversible gates.** The pattern generator is built from reversible
  gates (Sam, Feynman, RMUX and double-Feynman gates), which lose no
  information. The flip-flops, the feedback XOR, the seed load and the swap
  multiplexers are all made of these gates.

The whole design is set by one parameter, the pattern width `N`. The
published configurations are 8, 16 and 32 bits. The default is the 8-bit
one.

## Sizes

| N (pattern bits) | K (ALU bits) | L (signature bits) | patterns per period |
|---|---|---|---|
| 8 (default) | 2 | 3 | 255 |
| 16 | 6 | 7 | 65 535 |
| 32 | 14 | 15 | 4 294 967 295 |

The relations are K = N/2 − 2 and L = K + 1 = N/2 − 1. An N-bit pattern holds two K-bit operands, a 3-bit
operation code and a carry-in (N = 2K + 4). The signature has one bit per ALU
result bit plus one for the carry. `bist_pkg` computes K and L from N.

## How a test session runs

Everything is driven by `bist_controller`, which has three phases.

1. **PH_IDLE** (`tm = 0`), normal operation. MUX1 passes `e_input` to the
   circuit under test, and its result comes out on `alu_out`/`carry_out`.
   The LFSR and the MISR stand still.
2. **PH_GOLDEN.** In the clock where `tm` is first seen high, the seed is
   loaded. The next 2^N − 1 clocks apply one full LFSR period. The
   demultiplexer sends the patterns to the fault-free ALU (`y_out1`), and
   MUX2/MUX3 pass its answers to the MISR. The LFSR reports `o_lfsr_done`
   whenever it holds the seed. The second report means the period is
   complete. At that clock the signature is written to the golden memory,
   and the controller moves to PH_TEST.
3. **PH_TEST.** The same period is applied again and again, now through
   `y_out2` → MUX1 → ALU_FAULT (the circuit under test). Each time the LFSR
   returns to the seed, the comparator checks the signature against the
   stored word, and `cycle_cnt` counts one more compared period.
   `comp_out` = 1 means the signatures match. `pass_fail` copies `comp_out`
   one clock later.

Two details make the periods line up exactly:

* At every period boundary the MISR *restarts*. It drops the old signature
  and absorbs the first pattern of the new period in the same clock. No
  clock is lost between periods.
* The routing signal `route_cut` moves to the CUT in the very clock that
  ends the golden period. So the first pattern of the first test period
  already goes to the circuit under test.

Timing for N = 8, counting from the clock in which `tm` = 1 is first
sampled (clock 0):

| event | clock |
|---|---|
| seed load | 0 |
| golden patterns | 1 … 255 |
| golden signature written, phase → PH_TEST | 256 |
| first comparison (`comp_out`, `cycle_cnt` update after this edge) | 511 |
| `pass_fail` updated | 512 |
| later comparisons | every 255 clocks |

`set` = 1 restarts the session: the seed is reloaded and a new golden
signature is made. Dropping `tm` returns to PH_IDLE. `pass_fail` is not
sticky. Once an injected fault is removed, the next complete period passes
again.

## The bit-swapping LFSR (`bs_lfsr`)

**Shift register.** The register shifts towards the MSB. Stage 0 takes the
XOR of the tap stages. For N = 8 this is Q7 ⊕ Q5 ⊕ Q4 ⊕ Q3, the polynomial
x^8+x^6+x^5+x^4+1. With the all-ones seed the raw states are ff, fe, fc, f8,
f0, e1, c2, 85, 0b, 17, 2f, …

**Swap rule.** When the MSB is **0**, the pairs (Q0,Q1), (Q2,Q3), (Q4,Q5)
are exchanged at the output. When the MSB is 1, the state passes unchanged.
Bit N−2 and the MSB are never swapped. The applied patterns are therefore
ff, fe, fc, f8, f0, e1, c2, 85, **07**, **2b**, **1f**, …
For any N the swapped pairs are (2k, 2k+1) for 2k+1 ≤ N−3.

The swap does not change which states the LFSR visits; it changes how many
output bits toggle from one pattern to the next. Over 244 consecutive 8-bit
patterns the swapped output toggles 806 bits against 996 for the raw state,
about a fifth fewer, which is where the lower test power comes from. The
N = 4 setting is the size of the gate-level drawing the design starts from
(feedback Q3 ⊕ Q2, one swap pair).

**Gates.** Each output bit of a pair is the Q output of an RMUX gate. The
MSB is the select input, and the two data inputs are crossed between the
two gates of the pair.

**Feedback.** The feedback XOR is a chain of Feynman gates, one per tap.

**Storage.** Each stage is a `rev_dff`. A Sam gate with inputs (en, D, Q)
selects new data or the held value on its R output. The result is stored on
the rising clock edge. A double Feynman gate with constant inputs 1 and 0
fans the stored bit out as Q, Q' and a feedback copy.

**Seed load.** One more RMUX gate per stage selects the seed bit while
`load` = 1.

**Done flag.** `o_lfsr_done` is simply "state equals seed". The period is
2^N − 1 for all three sizes, and the testbenches check it for 8 and 16
bits.

The gates' garbage outputs (Sam P/Q, RMUX P/R, Feynman P, DFG Q') are wired
but unused. Lint reports them as unused signals. Synthesis removes them, so
the power benefit of reversible logic exists only in the structure, not in
a CMOS netlist of this RTL.

## Circuit under test and fault injection

`bist_alu` is the circuit under test. It splits the pattern into the
following fields:

| field | bits |
|---|---|
| A | `din[K-1:0]` |
| B | `din[2K-1:K]` |
| op | `din[2K+2:2K]` |
| cin | `din[2K+3]` |

It supports eight operations:

| op | operation |
|---|---|
| 0 | A + B + cin |
| 1 | A + ~B + cin |
| 2 | AND |
| 3 | OR |
| 4 | XOR |
| 5 | XNOR |
| 6 | A + cin |
| 7 | {A, cin} shifted left |

The carry output is the adder carry, or the bit shifted out. Logic
operations return 0 on the carry output.

`bist_alu_fault` is the same ALU with a fault layer on its N input lines:

* **Stuck-at-1:** `s_a_1[i]` = 1 forces line i to 1.
* **Stuck-at-0:** `s_a_0[i]` = 1 forces line i to 0. It wins when both
  masks are set.
* **Bridging fault:** `bridge_fault` = 1 shorts line 0 and line K, the LSBs
  of the two operands, as a wired AND.

**Aliasing.** With the default L = 3, a faulty response stream gives the
golden signature about one time in eight. Stuck-at-0 on line 1, for example,
goes unnoticed at N = 8. The end-to-end testbench predicts this with a
reference model and checks that the hardware agrees. Several faults are
detected at N = 8:

* the published example, stuck-at-0 mask 40 with stuck-at-1 mask 02;
* stuck-at-0 mask 40 alone;
* stuck-at-1 mask 04;
* the bridging fault.

The wider signatures at N = 16 and 32 alias far less often (1/128 and
1/32768).

## Signature path

`bist_response_analyzer` groups MUX2 (result), MUX3 (carry) and the MISR.
The MISR update is:

```
sig <= {base[L-2:0], ^(base & TAPS)} ^ {carry, result}
```

Here `base` is 0 when `restart` = 1 and the old signature otherwise. The
feedback taps are Q2⊕Q0 (L = 3), Q6⊕Q5 (L = 7) and Q14⊕Q13 (L = 15), all
maximal length.

`bist_golden_mem` keeps one L-bit word and a `valid` flag. The figures of
the original call this block a ROM. `bist_comparator` registers
`comp_out = valid && sig == golden` when enabled and holds it otherwise. It
resets to 1.

## Top-level interface (`bist_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `i_clk`, `i_rst` | in | 1 | clock, asynchronous active-high reset |
| `set` | in | 1 | restart the test session |
| `tm` | in | 1 | test mode |
| `e_input` | in | N | CUT operands in normal mode |
| `s_a_0`, `s_a_1` | in | N | stuck-at-0 / stuck-at-1 masks |
| `bridge_fault` | in | 1 | enable the bridging fault |
| `pass_fail` | out | 1 | verdict of the last comparison |
| `comp_out` | out | 1 | comparator output |
| `o_lfsr_data` | out | N | pattern being applied |
| `o_lfsr_done` | out | 1 | LFSR holds the seed |
| `data` | out | L | current MISR signature |
| `r_data` | out | L | stored golden signature |
| `alu_out`, `carry_out` | out | K, 1 | selected ALU result (normal-mode output) |
| `cycle_cnt` | out | 11 | compared test periods |
| `phase` | out | 2 | controller phase (`bist_pkg::phase_e`) |

Parameters: `N` (default 8), and `SEED` (default all ones). `K` and `L` are
derived from `N` and should not be overridden.

## Files

RTL is in `rtl/`, one module per file:

| group | files |
|---|---|
| package | `bist_pkg.sv` |
| gates | `sam_gate.sv`, `feynman_gate.sv`, `rmux_gate.sv`, `dfg_gate.sv` |
| flip-flop | `rev_dff.sv` |
| pattern generator | `bs_lfsr.sv` |
| controller | `bist_controller.sv` |
| routing | `bist_demux.sv`, `bist_mux.sv` |
| circuit under test | `bist_alu.sv`, `bist_alu_fault.sv` |
| signature path | `bist_misr.sv`, `bist_response_analyzer.sv`, `bist_golden_mem.sv`, `bist_comparator.sv` |
| top | `bist_top.sv` |

Every module has a self-checking testbench `tb/tb_<module>.sv`. The two
system-level testbenches are:

* **`tb/tb_bist_top.sv`**: the default 8-bit design end to end. It covers
  normal mode, the golden run with every pattern checked, fault-free
  periods, each fault type with detection and recovery, an aliased fault,
  `set` and leaving test mode. A reference model predicts every signature.
  The test takes about 3 000 clocks.
* **`tb/tb_bist_scaled.sv`**: the 16-bit configuration for a full session
  (about 330 000 clocks), and the first 3 000 patterns of the 32-bit one.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5 (two-state, so all registers are reset):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bist_top \
  -y rtl -y tb +libext+.sv rtl/bist_pkg.sv tb/tb_bist_top.sv
./obj_dir/Vtb_bist_top
```

Replace `tb_bist_top` with any other testbench name. To build another size,
set `N` on `bist_top`. `bist_pkg::lfsr_taps` and `bist_pkg::misr_taps` hold
feedback taps for N = 4, 8, 16, 32 and L = 3, 7, 15. Other sizes fall back
to a two-tap polynomial that is not guaranteed to be maximal length, so add
a proper tap entry when you pick one.

## What follows the original description and what does not

**Taken from the original description:**

* the block structure (BS-LFSR, controller, DEMUX, MUX1–3, ALU, ALU_FAULT,
  MISR, ROM, comparator) and how the blocks connect;
* the widths N, K and L for 8, 16 and 32 bits;
* the gate equations of the Sam, Feynman and RMUX gates;
* the Sam + double-Feynman flip-flop, and the RMUX bit swap controlled by
  the MSB;
* the 8-bit feedback and swap rule, which reproduce the published 8-bit
  pattern sequence;
* the seed ff;
* the golden-signature-then-compare flow;
* the `comp_out`/`pass_fail` meaning (high = pass);
* the 11-bit period counter;
* the port names.

**This design's own choices:**

* **ALU.** The operation set and how the pattern is split into fields.
* **Feedback taps.** The 16- and 32-bit LFSR taps and all MISR polynomials.
  Of the two maximal 3-bit MISRs, the one chosen detects the published
  example fault.
* **Faults.** The bridging pair and the priority of the stuck-at masks.
* **`set`.** Its meaning (restart the session).
* **Controller timing.** The compare-once-per-period timing and the
  one-clock `pass_fail` delay.
* **Resets.** All reset values and the asynchronous reset style.
* **Golden memory.** A single-word memory.
* **Edge-triggered flip-flop.** The clock edge drives a real register, and
  the Sam gate's control input acts as an enable. The original drawing
  feeds the clock into the Sam gate itself, which would be a latch.

**Known differences from the original material:**

* **`r_data`.** The published waveforms show `r_data` changing between
  comparisons. Here it holds the one golden word.
* **Third waveform.** One of the published waveforms shows a different
  8-bit sequence (…, ff, fe, fd, fa, f5, …). This design follows the other
  two, which agree with each other.
* **Pattern count.** The original quotes 256 patterns for 8 bits. A maximal
  8-bit LFSR gives 255, which is what is built, consistent with the 65 535
  quoted for 16 bits.
* **`i_Enable`, `load`, `i_Seed_Data`.** The waveforms also show these
  signals, which the block diagrams do not have. Here they are the
  BS-LFSR's own `en`, `load` and `seed` inputs, driven by the controller and
  the `SEED` parameter, not top-level ports.
* **Implementation results not reproduced.** The published power, timing
  and area figures come from a 180 nm standard-cell implementation. This
  RTL does not reproduce or claim them. That implementation's controller
  used fewer flip-flops (8) than `bist_controller` does here (16, mostly
  the 11-bit period counter).
