# RF-DSP: one reusable datapath for FIR, LMS, matrix and FFT work

RF-DSP is a signal processor for FPGAs that replaces one fixed circuit per
algorithm with a single datapath steered by short instructions. Every step of
every supported algorithm is reduced to the same pattern:

1. route up to three operand vectors onto channels A, B and C of a row of
   identical processing engines (PEs);
2. let every PE compute `A+B` or `(A-B)*C`;
3. optionally sum the PE results in an adder tree whose depth is chosen per
   instruction, so that one tree yields one long sum or many short ones;
4. write the results back into an operand array, or send them out.

An FIR output is one instruction (multiply, sum 32 products). An LMS update is
four (filter, error, gradient, weight update). A block of matrix dot products is
one instruction per 12 dot products. The hardware never changes; only the
instruction stream does.

This repository holds synthesizable SystemVerilog (IEEE 1800-2017) for the
processor, with a self-checking testbench for every module. The default
configuration has 96 PEs, 16-bit data and 8 fraction bits.

## Structure

```
 DDR side ─► instr_cache ─► decoder ──────────────┬──────────────┬───────────────┐
            (32-bit words)  (splits into two      │ LOAD          │ compute       │ done
                             16-bit instructions) ▼               ▼               │
 DDR side ─► data_cache ◄── pre_process ──► data_load ──► data_distributor        │
            (2x16-bit       (moves words    (Weight, X,     (arrays → A,B,C)      │
             per word)       into arrays)    Middle, Y,          │                 │
                ▲                            mu)                 ▼                 │
                │                              ▲            comp_engine            │
                │                              │       (96 × pe, add_tree)         │
                │                              │                 │                 │
                │                              │                 ▼                 │
                └──── fft_post ◄──────── post_process ─► writeback ─► out stream   │
                     (next-round            (by sel-func)                          │
                      addresses)                 └─────────────── done ────────────┘
```

| Module | Role |
|---|---|
| `rf_dsp` | top level; the ports stand for the DDR memory (program and data writes, result stream) |
| `rfdsp_pkg` | instruction struct, opcode/function enums, array and write-mode types |
| `instr_cache` | 4096 × 32-bit program memory |
| `decoder` | fetches words, splits them, issues one instruction at a time, waits for completion |
| `data_cache` | 2048 × 32-bit data memory; each word holds two 16-bit values |
| `pre_process` | executes LOAD instructions: cache words → data arrays |
| `data_load` | the four 96-element arrays Weight, X, Middle, Y and the LMS step register `mu` |
| `data_distributor` | selects which array feeds which channel, fills idle channels with 0 or 1 |
| `pe` | one processing engine: adder, subtractor, multiplier, output selection |
| `add_tree` | selective adder tree, 1 to 7 levels |
| `comp_engine` | 96 PEs plus the tree, two register stages |
| `post_process` | sends FFT results to `fft_post`, everything else to `writeback` |
| `writeback` | writes results to an array, streams them out when the operation ends |
| `fft_post` | writes FFT results back to the data cache in the order the next round reads them |

## The instruction

Each 16-bit instruction has six fields (bit 0 is the least significant bit):

| Bits | Field | Values |
|---|---|---|
| 0 | `immi` | 1 = last instruction of an operation: results also go to the output stream |
| 2:1 | `opcode` | 00 MUL, 01 ADD, 10 SUB, 11 LOAD |
| 5:3 | `sel-reg` | one-hot data arrays: 001 X, 010 Middle, 100 Y (000 = Weight for LOAD) |
| 8:6 | `sel-func` | 000 fir, 001 iir, 010 lms-w, 011 lms-u, 100 fft, 101 ifft, 110 matrix |
| 9 | `adder-tree` | 1 = sum the PE results in the tree |
| 15:10 | `order` | N, the number of terms per sum (also element counts, see below) |

A 32-bit program word holds two instructions; the low half executes first. A
compute instruction with `sel-reg` = 000 is a NOP and fills an unused half.

## How an instruction becomes a data path

Getting the routing right is most of the design; the rest follows from it.

**Channel routing** (`data_distributor`). The arrays named in `sel-reg` are
taken in the order X, Middle, Y.

| opcode | A | B | C |
|---|---|---|---|
| MUL | first array | 0 | second array, or Weight if only one is named |
| ADD | first array | second array, or Weight | 1.0 |
| SUB | first array | second array, or Weight | 1.0, or `mu` when `sel-func` = lms-u |

A PE always computes its adder output `A+B` and its multiplier output
`(A-B)*C`, and selects the adder for ADD. So MUL yields `A*C`, SUB yields
`A-B`, and SUB with `C = mu` yields the scaled error `mu*(d-y)` in one pass.

**Lane mapping with the tree on.** With order N the tree uses
`L = ceil(log2 N)` levels, and the 96 lanes form `96 >> L` groups of `2^L`.
Lane `k` of group `g` reads element `g*N + k` of the data arrays and element
`k` of Weight, so every group shares one coefficient set and works on its own
N-element slice. Lanes with `k >= N` get zeros. With the tree off, lane `i`
reads element `i` of every array.

**Adder tree** (`add_tree`). The tree is a complete binary tree over 128
inputs (the 96 lanes plus zero padding). A selector behind each level makes it
the output level, and group `g`'s sum appears at `res[g]`. Summing 8 numbers
and summing two groups of 4 use the same adders, tapped one level apart.

**Destination** (`writeback`).

| Instruction | Written to |
|---|---|
| tree on | Y; every lane of group `g` receives group `g`'s sum, so a following lane-wise step sees the sum in each lane |
| ADD with `sel-func` = lms-w | Weight |
| anything else | Middle |

With `immi = 1` the results also stream out, one per cycle: one sum for
fir/iir/lms, one per group for other tree functions, and lanes 0..N-1 without
the tree (N = 0 means all 96). Results are saturated to 16 bits.

**LOAD** (`pre_process`). LOAD reads 32-bit words from the data cache,
sequentially from a pointer cleared by `start`. The low half of each word goes
to the first named array and the high half to the second.

| Case | Words read | Effect |
|---|---|---|
| `sel-func` fir, iir or lms-w | 1 | X and Y shift the value in at element 0 (a delay line); Middle receives it in every element |
| `sel-func` lms-u, `sel-reg` 000 | 1 | low half → `mu` |
| `sel-reg` 000, other `sel-func` | N (0 means 96) | Weight, element by element |
| fft, ifft, matrix | N (0 means 96) | element by element |

## Algorithms as programs

Encodings below are `{high half, low half}`. The end-to-end testbench builds
exactly these programs.

**FIR, N taps.** First word: LOAD Weight with N coefficients. Then one word per
sample:

- low half: LOAD X, fir (shift the new sample in);
- high half: MUL X, fir, tree, order N, immi = 1.

Each output is `y(n) = Σ h(k)·x(n-k)` over the first N lanes. The steady-state
rate is one sample per 15 clock cycles.

**LMS, N taps.** Load `mu` (the value 2μ) and zero or initial weights once.
Each iteration is three words:

| Word | Low half | High half |
|---|---|---|
| 1 | LOAD {X, Middle}, lms-w: `x(n)` is shifted into X, `d(n)` is broadcast into Middle | `y = w'x` (MUL X, lms-w, tree) → Y |
| 2 | `e = 2μ(d - y)` (SUB {Middle, Y}, lms-u) → Middle | `k = e·x` (MUL {X, Middle}, fir) → Middle |
| 3 | `w = w + k` (ADD Middle, lms-w) → Weight; immi = 1 streams the N new weights | NOP |

**Matrix product.** LOAD {X, Middle}, matrix, with `n·N` words (row elements in
the low half, column elements in the high half). Then MUL {X, Middle}, matrix,
tree, order N. Each instruction gives `96 >> L` dot products, so a 5×5 product
(25 dot products of 5 terms, groups of 8) takes three such pairs.

**FFT rounds.** An instruction with `sel-func` fft or ifft goes to `fft_post`
instead of the write-back. That module writes result `i` of the running index
into the data cache at address `rotl1(i)`, the perfect shuffle of a
constant-geometry radix-2 FFT, or at `i` itself in the last round. The round
number is taken from `order`. `sel-reg` X writes the real (low) half and
Middle the imaginary (high) half. The butterfly instruction sequence, with its
complex twiddle products, is not provided.

## Number format and timing

- Data are signed 16-bit fixed point with `FRAC` = 8 fraction bits; 1.0 is 256.
- A PE keeps 32 bits. It shifts a product right by `FRAC` before the tree, and
  the tree sums wrap at 32 bits.
- Write-back saturates to 16 bits.
- The decoder has one instruction in flight. Fetching a word takes 2 cycles.
- A compute instruction takes dispatch, 2 engine stages, 1 write-back cycle
  (plus one cycle per streamed value) and the completion hand-back.
- An N-word LOAD takes N+1 cycles plus the hand-back.

The published prototype pipelines far more aggressively: its reported FIR
throughput is close to two samples per clock. This RTL favours a simple,
verifiable control flow over throughput, and it does not reproduce those
latency or throughput figures.

## Parameters (`rf_dsp`)

| Parameter | Default | Meaning |
|---|---|---|
| `NPE` | 96 | PE lanes and array length (the published prototype's PE count) |
| `DW` | 16 | data width |
| `AW` | 32 | PE and tree width |
| `FRAC` | 8 | fraction bits |
| `IC_DEPTH` | 4096 | instruction words (a 1024-iteration, 32-tap LMS needs 3073) |
| `DC_DEPTH` | 2048 | data words (32 coefficients plus 1024 samples fit) |
| `FFT_LOG2N` | 10 | FFT size for `fft_post` addressing (1024 points) |

The 6-bit `order` field limits a sum to 63 terms and one LOAD to 63 words (0
means 96).

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/rfdsp_pkg.sv tb/tb_rf_dsp.sv \
          --top-module tb_rf_dsp -Mdir obj && obj/Vtb_rf_dsp
```

Use the same command for any other testbench, replacing `tb_rf_dsp` with its
name.

`tb_rf_dsp` runs the top at its default parameters through one program:

- a 32-tap FIR filter over 64 samples;
- 24 iterations of a 32-tap LMS filter;
- the 5×5 matrix product;
- one FFT round.

It compares every output with a bit-exact model. It also counts each mechanism
and fails if one never occurs: every LOAD mode, the three PE operations, tree
on and off, fused words, NOPs, the three write-back targets, the output stream
and the FFT cache path. It finishes in well under a second.

`tb_workloads` runs the filter workloads at their full evaluated length on
the default top: a 32-tap FIR filter over 1024 samples, a 6-tap (5th-order)
FIR filter, and a 32-tap LMS filter over 1024 iterations, a 3073-word program.
It checks every FIR output, and the LMS weights after the last iteration,
against the same bit-exact model, and it checks the FIR rate of 15 cycles per
sample. The whole run takes about a second. The LMS run also checks that the weights approach the
unknown 32-tap system that produced the desired signal (over five random seeds
the summed weight error fell from 2340 LSB to between 168 and 781 LSB; the
check requires it to at least halve). With 8 fraction bits, `2μ(d-y)` and
`e·x` truncate to zero for small errors, so LMS needs signal and weight levels
well above the LSB, and step sizes near 1/8, to adapt.

The per-module testbenches check their module against independent models,
including cycle counts where the module defines them:

- decoder program timing;
- N+1-cycle loads;
- two-cycle engine latency;
- one value per cycle from the write-back and FFT modules.

The simulator is two-state, so all state that is read is reset.

## Where this RTL departs from, or fills in, the published design

These parts follow the published design: the six-module structure, the four
arrays and their roles, the three-channel PE with 0/1 fills, the
level-selectable adder tree, the post-process split into an FFT module and a
write-back, and completion pacing of the decoder. So do the instruction field
positions and codes, and the four-step LMS mapping. The following are this
design's own:

- **LOAD (opcode 11) and NOP.** The published encoding leaves the control of
  the pre-process unspecified. Here one opcode and its field reuse carry it.
- **Adder-tree bit.** The field legend reads "0 open, 1 close", but the LMS
  example sets it to 1 exactly where the tree is used. This RTL uses 1 = tree
  on.
- **Order field.** Here it holds the number of terms N. The legend relates the
  filter order to N by a factor that does not fit odd orders such as the
  5th-order examples.
- **Sequential halves.** The two halves of a word run one after the other,
  not concurrently. Task scheduling and function fusion keep their order but
  lose their overlap.
- **Routing rules and lane mapping.** The rules for operand routing, the lane
  mapping of tree groups, the choice of destination array and the stream
  counts generalise the published LMS walk-through.
- **Number format.** Fixed point with `FRAC` = 8, per-product scaling and
  saturation is this design's choice; no format is published.
- **FFT addressing.** The perfect-shuffle permutation, the round taken from
  `order`, and one result written per cycle are assumptions. The published
  design only says that the module computes per-round addresses.
- **Sequential data-cache pointer.** The published design gives no addressing
  for the pre-process.
- **Write-back target.** Intermediate results go straight back into the data
  arrays, as in the published LMS walk-through. They are never parked in the
  data cache for a later LOAD. Only the FFT module writes to the data cache.
- **FFT channel routing.** The routing rules cannot put real part, imaginary
  part and a twiddle factor on A, B and C in one instruction: naming two data
  arrays leaves no slot for Weight.
- **Not built.**
  - An IIR instruction sequence: the feedback over past outputs has no
    published data flow, and the Y array does not keep an output history.
  - The FFT butterfly sequence.
  - The host-side compiler.
  - The DDR memory, the PCIe link and the host: they are represented by the
    top-level ports.
