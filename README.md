# One-hot NFA engine for high-speed pattern matching

Many pattern-matching jobs can be written as a non-deterministic finite
automaton (NFA). Network intrusion detection checks packets against sets of
regular expressions. Motif finding in genomics looks for strings within a small
Hamming distance of a motif. In software, an NFA costs time in proportion to
the number of states that are active at once. This design spends logic
instead: **every NFA state is a flip-flop, and every transition is an AND of a
state output with the decoded input character**. All states update in parallel,
so the engine consumes exactly one 8-bit character per clock cycle (or a fixed
number of characters, see *Striding*), however many states are active.

The NFA is not loaded at run time. It is compiled into the logic through
module parameters, so a new pattern set means a new synthesis run. The engine
also has the two element types that the Micron Automata Processor adds to
plain NFAs: **counters** and **boolean elements**. A device holds one copy of
the NFA for each input stream it serves. Matches are collected over a window
of input characters and then sent off chip over a limited number of output
pins, and the input stalls while they go out.

## Block overview

```
            in_char[0] ─► symbol_decoder ─► nfa_engine ─┐ report (N_REP bits)
            in_char[1] ─► symbol_decoder ─► nfa_engine ─┤
               ...                                      ├─► report_collector ─► out_data[OUT_PINS]
  in_char[NUM_STREAMS-1] ─► symbol_decoder ─► nfa_engine ─┘        │
                                                                   └─► in_ready (stall)
```

| module | role |
|---|---|
| `nfa_pkg` | shared types, counter and boolean encodings, the default NFA |
| `symbol_decoder` | character → one-hot symbol class, with optional alphabet compression |
| `nfa_engine` | one NFA: state flip-flops, transition logic, counters, booleans, report vector |
| `counter_element` | counter with pulse, latch and roll modes |
| `boolean_element` | AND / OR / NAND / NOR over state activations |
| `report_collector` | per-window match accumulation and pin-limited output, input stall |
| `nfa_fpga_top` | one device: NUM_STREAMS decoder+engine copies sharing one collector |

## How a character step works

This is the part that needs the most care when writing or reading an NFA for
the engine.

**States carry symbols.** The NFA is *homogeneous*: the set of characters a
state accepts belongs to the state, not to its incoming edges. This is the
form the ANML format uses. State `j` has a mask `STE_MASK[j]` with one bit per
symbol class, and a predecessor mask `STE_PRED[j]`. When a character is
consumed:

```
enabled[j]   = START_ALL[j]
             | (new_stream &  START_SOD[j])
             | (!new_stream & |(STE_PRED[j] & act))
next[j]      = enabled[j] & |(STE_MASK[j] & sym)
```

Here `act` is the vector of all element activations after the previous
character. `new_stream` is high for the first character after reset or for a
character marked `sod`. A regular expression such as `ab+[cd]e` therefore
becomes four states: `a` (a start state), `b` (fed by `a` and by itself),
`[cd]` (two bits set in its mask) and `e` (a report state).

**Counters and booleans live in the same step as the states they watch.** A
boolean element is combinational on the state flip-flops. A counter's output
is combinational on its stored count and on its inputs. So after character `t`:

1. the state flip-flops hold the states that matched `t`;
2. booleans evaluate those states;
3. counters see the states and booleans, and fire if this step reaches the
   target;
4. together these form `act` for step `t`. It enables states for character
   `t+1` and it is what gets reported.

A counter's stored count moves on to the next step on the clock edge that
consumes character `t+1`. To keep this free of combinational loops, booleans
take inputs from states only, and counters take inputs from states and
booleans. Any element may be a predecessor of a state.

**Counter modes.** In every mode, an active reset input clears the count and
wins over counting.

- `CNT_PULSE` fires only in the step that reaches the target, then holds until
  reset.
- `CNT_LATCH` fires from that step on, every step, until reset.
- `CNT_ROLL` fires in the step that reaches the target and starts again from 0.

**Stream restart.** On a `sod` character, activations from the previous
stream are ignored, `START_SOD` states may start, and all counters restart.
`START_ALL` states can start a match at any character, as an unanchored
pattern does.

**Timing.** `act`/`report` change on the clock edge that consumes a character.
They describe that character until the next one is consumed, whatever the gap
between characters.

## Describing an NFA in parameters

Every mask that refers to elements uses one numbering:

| indices | elements |
|---|---|
| `0 .. N_STE-1` | states |
| `N_STE .. N_STE+CW-1` | counters (`CW = max(N_CNT,1)`) |
| `N_STE+CW .. N_STE+CW+BW-1` | booleans (`BW = max(N_BOOL,1)`) |

With no counters (or no booleans) the single padding slot reads as 0. The
parameters are:

- `STE_MASK[N_STE][N_SYM]`: symbol set of each state.
- `STE_PRED[N_STE][N_ELEM]`: predecessors of each state.
- `START_ALL`, `START_SOD`: the two kinds of start state.
- `CNT_EN`, `CNT_RST` (`[CW][N_ELEM]`), `CNT_TARGET`, `CNT_MODE`: counter wiring
  and settings.
- `BOOL_IN` (`[BW][N_ELEM]`), `BOOL_FUNC`: boolean wiring and function.
- `REPORT[N_ELEM]`: report elements. The engine's `report` output packs the
  report elements in element order, so its width is `$countones(REPORT)`.

The default NFA (`nfa_pkg`) has 13 states, 1 counter and 1 boolean. Its
states match `a+bc`, `bcd+`, `cde` and `ab+[cd]e`. The counter (latch mode,
target 2) counts `ab+[cd]e` matches, and the boolean is an AND of the final
`c` of `a+bc` and the `c` of `bcd+`. The counter and the boolean are there so
that every element type is present in the default build. `tb/tb_nfa_engine.sv`
and `tb/tb_hamming_workload.sv` show how to build other NFAs with constant
functions. The second one builds a Hamming-distance automaton: for motif
position `i` and error count `e` there is a "match" state and a "mismatch"
state, `(2d+1)k - d²` states in all.

## Alphabet compression

`symbol_decoder` maps each of the 256 characters to a symbol class through the
table `CLASS_MAP`, then decodes the class one-hot over `N_CLASSES` lines.
Characters that no state tells apart can share a class. States then need only
`N_CLASSES`-bit masks, which saves wiring and LUTs. An example is the DNA
alphabet {A,C,G,T} mapped to 4 classes. The default is the identity map with
256 classes. A class at or above `N_CLASSES` decodes to all zeros: no state
accepts the character.

## Striding

With `STRIDE > 1` each stream takes `STRIDE` characters per clock. The
decoder maps each character to its class and numbers the tuple as one
compound symbol, `cls[0] + N_CLASSES*cls[1] + ...`, where `ch[0]` is the
earliest character. The engine itself does not change: it simply sees an
alphabet of `N_CLASSES^STRIDE` symbols.

The NFA must be rewritten for compound symbols. For stride 2,
`tb/tb_stride_top.sv` shows the construction:

- one state per original transition `p -> q`, matching `p` on the first
  character and `q` on the second;
- a state for a match starting on the second character;
- a state for a match ending on the first character.

Striding is only worth it together with alphabet compression: 256 classes
at stride 2 would need 65,536 decoded lines. `N_INPUTS` still counts
characters and must be a multiple of `STRIDE`. Counters and booleans are not
rewritten by that construction.

## Match reporting and throughput

`report_collector` ORs every character's report vector into one sticky bit
per report element (and per stream), over a window of `N_INPUTS` characters.
After the last character of a window:

- it sends the sticky vector out, least significant bits first, `OUT_PINS`
  bits per cycle, over `OUT_CYCLES = ceil(NUM_STREAMS*N_REP / OUT_PINS)`
  cycles;
- `out_valid` is high during those cycles and `out_last` marks the last slice;
- `in_ready` is low for exactly those cycles.

So at full input rate a window takes `N_INPUTS/STRIDE + OUT_CYCLES` cycles,
and a device's throughput is

```
throughput = NUM_STREAMS * 8 bit * N_INPUTS / (N_INPUTS/STRIDE + OUT_CYCLES) * f_clk
```

Useful window lengths are 64K characters for network traffic (the longest IP
packet), 1000 for synthetic regex sets, and 500 for gene regions. The output
has no back-pressure: the receiver must take one slice per cycle.

Concatenated report bits: stream `s` occupies bits `s*N_REP .. s*N_REP+N_REP-1`,
in element order within the stream. Bits above `NUM_STREAMS*N_REP` in the last
slice are 0.

## Top-level defaults

`nfa_fpga_top` defaults:

| parameter | default | meaning |
|---|---|---|
| `NUM_STREAMS` | 4 | NFA copies, one per stream, in lock step |
| `N_INPUTS` | 65536 | reporting window |
| `OUT_PINS` | 32 | output pins |
| `N_CLASSES`, `CLASS_MAP` | 256, identity | no alphabet compression |
| `STRIDE` | 1 | characters per stream per clock |
| NFA parameters | the default NFA | see above |

With these values the 24 match bits leave in one cycle per 64K-character
window.

All streams share `in_valid`, `in_ready` and `in_sod`. A larger pattern set
that does not fit one device is split into partitions offline. Each partition
goes into its own device, and every device sees the same input. As a scale
reference, a Virtex-6 XC6VLX130T has 160,000 flip-flops. At about 70%
flip-flop use, one device holds a partition of roughly 110,000 states.

## What this RTL does not include

- **Pattern compilation.** Turning regular expressions or ANML into the
  parameter masks, the state-reduction and striding transformations (only
  the stride-2 example in a testbench is provided), and the
  partitioning of large NFAs across devices are software. The RTL takes their
  result as parameters.
- **Host interface.** The character input and the report pins are plain ports.
  No PCIe/DMA or board logic is provided.
- **Realistic pattern sets.** The default NFA is a small example. Real network
  rule sets (thousands of states) or genomics sets (up to millions of states
  across many devices) need their own generated parameters.

## Design choices beyond the basic scheme

These choices are this design's own and can be changed without affecting the
one-hot core:

- combinational decoder;
- two kinds of start state and `sod` stream restart;
- counter modes and 12-bit counter width;
- the boolean functions offered;
- the input restrictions on booleans and counters (booleans from states only,
  counters from states and booleans);
- sticky-OR window format and bit order;
- 32 output pins;
- lock-step streams sharing one collector;
- active-low synchronous reset.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nfa_pkg.sv tb/tb_nfa_ref_pkg.sv tb/tb_nfa_fpga_top.sv \
    --top-module tb_nfa_fpga_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_symbol_decoder` | all 256 characters, plain and DNA-compressed |
| `tb_boolean_element` | all functions, all input combinations |
| `tb_counter_element` | pulse/latch/roll against a model, random count/reset/clear/gaps |
| `tb_nfa_engine` | default NFA and an NFA with start-of-data states, a roll counter gating a state and a NOR boolean, against pattern-level reference matchers, with random gaps and stream restarts |
| `tb_report_collector` | every output slice, `out_last`, stall exactly during output, `N_INPUTS + OUT_CYCLES` cycles per window |
| `tb_nfa_fpga_top` | whole device, 4 streams, 40-character windows, 8 pins (3 output cycles). Every window is compared with a reference. It also requires stalls, multi-cycle output, stream restarts, self loops, and every report element of every stream to occur. |
| `tb_nfa_fpga_full` | the same at the top's default parameters: two full 64K windows |
| `tb_hamming_workload` | a generated k=8, d=2 Hamming-distance NFA over compressed DNA, 20,000 random characters with planted motifs, against brute-force distances |
| `tb_gene_workload` (+ `tb_gene_harness`) | the motif-finding setup at k = 8, 12, 16, 20 with d = 2. Each device holds the NFAs of all length-k substrings of a short gene region, uses 500-letter windows (each a new stream) and a 4-class alphabet. The windows are compared with brute-force Hamming distances. |
| `tb_synthetic_workload` (+ `tb_synth_harness`) | synthetic rule sets, deep and shallow, with 64 and 256 symbols: a generated 96-state NFA with wide fan-out near the entry, wildcards, character sets and self loops, fed by a trace that walks the NFA (moving deeper with probability 0.9), checked per 1000-character window against an active-set simulation |
| `tb_stride_top` | two characters per clock: a stride-2 version of the default patterns, generated in the testbench, against the single-character reference; also checks 4 + 1 cycles per 8-character window |

`tb_nfa_ref_pkg` holds the reference used for the default NFA. It tests each
pattern directly against the stream's characters, without simulating states.
