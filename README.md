# Pipelined parallel CRC

A parallel CRC circuit folds a whole w-bit word into an n-bit CRC register
every clock. When the word is wider than the CRC (w > n), the XOR network that
folds it in gets deep: at w = 256 an output bit of a 16-bit CRC can depend on
175 input bits, about 8 levels of 2-input XOR, and that depth sets the clock
period.

This design removes the problem by splitting the update into two parts:

    CRC(t+1) = F^w · CRC(t)  ⊕  M · Din(t)
               \__ CX ___/      \__ DX __/

* **CX** (CRC code XOR logic) depends on the CRC register. It is in the
  feedback loop and cannot be pipelined. It is also small: every output depends
  on at most 8–21 CRC bits in the configurations below, whatever w is.
* **DX** (data XOR logic) depends only on the input word. It can therefore be
  cut into K stages with registers in between, without changing the result.
  The data simply arrives K clocks later.

In the resulting circuit the only logic inside the loop is CX plus one XOR per
bit (the XOR array). The clock period follows CX, not the width of the input.

```
 din ─► Reg(K-1) ─► DX Sub-Logic(K-1) ─► Reg(K-2) ─► … ─► Reg(0) ─► DX Sub-Logic(0) ─► d ─┐
  (w bits)                                                                              XOR array ─► CRC Reg ─┬─► crc_code
                                                    ┌────────► CX = F^w · crc ─► c ─────┘                     │
                                                    └─────────────────────────────────────────────────────────┘
```

## The arithmetic

A CRC register is a linear system over GF(2). For a generator polynomial
P(x) = x^n + p_(n-1) x^(n-1) + … + p_0, one serial step of the register is
multiplication by the companion matrix F:

    c'_i = c_(i-1) ⊕ p_i · fb,     fb = c_(n-1) ⊕ data bit,     (c_(-1) = 0)

This is the usual MSB-first LFSR. The feedback enters bit 0 and the taps of
P, and the data bit is XORed into the feedback.

* **CX** is F^w: the register after w steps with zero input. Row j of F^w
  selects the CRC bits that output c_j depends on.
* **DX** is the data matrix M. Input bit b is `din[b]`, and `din[W-1]` is the
  first bit in serial order. Its column is F^b · p, which is what the register
  holds b steps after a single 1 has been shifted in.

Both matrices are computed while the design is elaborated
(`rtl/crc_pkg.sv`), from the `POLY` and `W` parameters. No table is stored in
the source.

A DX output `d_j` is the XOR of the S(j) input bits in row j of M. The
logic-level estimate for a balanced XOR tree over S inputs is L = ⌈log2 S⌉.
The fan-ins this design computes are below. They set how deep CX and the
unpartitioned DX are for the sixteen configurations the design was evaluated
on:

| CRC | polynomial | w=32 CX/DX | w=64 | w=128 | w=256 |
|---|---|---|---|---|---|
| CRC16-A (ITU-TSS) | x^16+x^12+x^5+1 (`16'h1021`) | 11 / 18 | 12 / 35 | 9 / 70 | 10 / 133 |
| CRC16-B | x^16+x^15+x^2+1 (`16'h8005`) | 14 / 29 | 12 / 55 | 8 / 100 | 13 / 175 |
| CRC16-C (PCI Express) | x^16+x^12+x^3+x+1 (`16'h100B`) | 15 / 24 | 12 / 39 | 10 / 77 | 10 / 146 |
| CRC32 (Ethernet) | `32'h04C11DB7` | 17 / 17 | 19 / 34 | 20 / 69 | 21 / 138 |

The logic levels are 4 for CX (5 for CRC32, 3 for CRC16-B at w = 128), and 5,
6, 7 and 8 for DX at w = 32, 64, 128 and 256. The published evaluation of this
architecture lists the same counts except in five cells:

| cell | this design | published |
|---|---|---|
| CRC16-A, w=64, DX | 35 | 25 |
| CRC16-B, w=64, DX | 55 | 56 |
| CRC16-C, w=64, DX | 39 | 47 |
| CRC16-A, w=256, DX | 133 | 132 |
| CRC32, w=256, CX | 21 | 20 |

Only the first cell changes a logic level: 6 here against 5 there.
`tb_crc_workloads` prints both sets of numbers. It checks this design's own
counts against an independent long-division reference.

## Partitioning DX

This is the part of the design that needs the most care.

The input register is Reg(K-1). It is followed by K sub-logics, numbered K-1
down to 0, with stage registers Reg(K-2) … Reg(0) between them. You choose a
logic level DL(i) for each sub-logic. Sub-Logic(i) takes, for each output
bit j, a group of S(j,i) bits and XORs them in runs of 2^DL(i). The partial
sums it produces are the next register's bits:

    S(j,K-1) = number of input bits d_j depends on   (row j of M)
    S(j,i)   = ⌈ S(j,i+1) / 2^DL(i+1) ⌉                for i < K-1
    RS(i)    = Σ_j S(j,i)                               (size of Reg(i))

Sub-Logic(0) XORs all of its S(j,0) inputs into `d_j`. Each output bit gets
its own network and its own register bits. Nothing is shared between outputs,
and removing duplicates is left to synthesis. Example: an output with 10
inputs and DL(1) = 2 becomes 3 partial sums (4 + 4 + 2 inputs) in Reg(0).
Sub-Logic(0) then XORs those 3 in 2 levels.

How the wiring is laid out:

* Behind Reg(K-1), each output bit's S(j,K-1) input bits are copied into a
  flat bus of Σ_j S(j,K-1) lanes, in ascending bit order. This is wiring only,
  no gates.
* Every later stage register is a flat vector of RS(i) bits. Output j's group
  starts at offset Σ_(j'<j) S(j',i).
* `crc_dx_sublogic` is the same module for every stage. It is parameterised by
  its stage index and computes its own port widths from the sizing formulas.

**Choosing K and DL.** The goal is a clock set by the loop, which is CX plus
one XOR level. The rules that follow from this:

* Sub-Logic(0) should be no deeper than CX, because it feeds the same XOR
  array.
* The other sub-logics may be as deep as CX + 1.
* The levels must add up to at least the DX level. Sub-Logic(0) ends up
  ⌈log2 max_j S(j,0)⌉ deep.
* Choosing exactly the limits leaves no margin for wiring and fan-out. A
  margin of a level is wise where the count allows.

These rules fix the number of stages. Write L_CX and L_DX for the levels of
CX and of the whole DX. The smallest K that works is

    K = 1                                       if L_DX ≤ L_CX − 1
    K = 1 + ⌈(L_DX − (L_CX − 1)) / L_CX⌉        otherwise

By default the RTL picks K and DL itself (`crc_pkg::auto_k` and `auto_dl`):

* DL(0) is L_CX − 1.
* The remaining L_DX − DL(0) levels are spread evenly over Sub-Logic(K-1)…(1).
* A leftover level goes to the stages nearest the input.

Since the default `POLY`, `N` and `W` are CRC16-A at w = 32 (CX 4 levels,
DX 5 levels), the defaults come out as K = 2 with DL(1) = 2 and DL(0) = 3.
Other splits also respect the limits: (DL(1), DL(0)) = (3, 2) or (4, 1). Any
split can be forced by overriding `K` and `DL`.

This rule reproduces the pipeline depths of the published evaluation in 14
of its 16 configurations: three stages for CRC16-A and CRC16-C at w = 256,
two elsewhere. The exceptions are CRC16-B at w = 128 and 256. The evaluation
built those with two stages. With CX only 3 and 4 levels deep, two stages
reach L_DX = 7 and 8 only if one sub-logic sits at the limit itself:
Sub-Logic(0) as deep as CX, or Sub-Logic(1) as deep as CX + 1. The rule
therefore asks for three. `tb_crc_workloads` runs them
with K = 2 and hand-set levels, as evaluated.

DL(0) does not change the logic: Sub-Logic(0) reduces whatever it is given.
It is a parameter so that a test can check that the split really fits in it.
K = 1 gives the unpipelined circuit (input register, whole DX, XOR array,
CRC register), which is useful for comparison.

The splits used in `tb_crc_workloads`, with the stage-register sizes they give:

| config | K | DL(K-1)…DL(0) | RS(1) | RS(0) |
|---|---|---|---|---|
| CRC16-A w=32 (default) | 2 | 2, 3 | – | 60 |
| CRC16-A w=64 / 128 | 2 | 3,3 / 4,3 | – | 63 / 71 |
| CRC16-A w=256 | 3 | 3, 2, 3 | 253 | 70 |
| CRC16-B w=32 / 64 | 2 | 2,3 / 3,3 | – | 40 / 47 |
| CRC16-B w=128 / 256 (set by hand) | 2 | 4,3 / 5,3 | – | 49 / 57 |
| CRC16-C w=32 / 64 / 128 | 2 | 2,3 / 3,3 / 4,3 | – | 83 / 76 / 78 |
| CRC16-C w=256 | 3 | 3, 2, 3 | 290 | 80 |
| CRC32 w=32 / 64 / 128 / 256 | 2 | 1,4 / 2,4 / 3,4 / 4,4 | – | 235 / 243 / 260 / 264 |

## Timing and framing

* One word per clock, no back-pressure. `din_valid = 0` inserts a bubble,
  which travels down the pipeline and leaves the CRC register unchanged.
* `din_sop` marks a message's first word, which starts from `INIT`.
  `din_eop` marks its last word. A one-word message sets both. An assertion
  requires `din_valid` with either.
* **Latency.** K + 1 clocks: the last word is sampled by clock edge t, and the
  finished CRC is on `crc_code` just after edge t + K. The word passes the
  input register, the K-1 stage registers and the CRC register. `crc_done` is
  high for that one clock. With the defaults (K = 2) the latency is 3 clocks.
* Messages may follow each other back to back. Words of two messages share the
  pipeline, and the first word of the next message replaces Cr with the
  constant F^w·INIT. This way no multiplexer is placed in front of CX.
* **Conventions.** `INIT` is loaded straight into the register (the "direct"
  initial value) and defaults to 0. There is no final XOR and no bit
  reflection. To get a standard CRC that needs them, add those outside the
  circuit and choose `INIT` to match.
* **Reset.** `rst_n` is asynchronous and active low. It clears the control
  bits, loads `INIT` into the CRC register and clears `crc_done`. The data
  registers are not reset, because nothing uses them while `valid` is 0.

## Parameters (`crc_pipelined`)

| name | default | meaning |
|---|---|---|
| `N` | 16 | CRC degree n (2…64) |
| `POLY` | `16'h1021` | generator without the x^n term, bit i = coefficient of x^i |
| `W` | 32 | input word width (1…1024) |
| `K` | `auto_k(N, POLY, W)` = 2 | number of DX sub-logics, i.e. pipeline stages of DX (1…8) |
| `DL` | `auto_dl(N, POLY, W)` = DL(1) 2, DL(0) 3 | 4 bits per sub-logic, `DL[i]` = level of Sub-Logic(i) |
| `INIT` | 0 | initial CRC register value |

Any width W works, including widths that are not a multiple of n. The data
matrix is derived from the serial definition, so it is exact for every W.
Elaboration builds the matrices with constant functions. This takes about
15 seconds in Verilator at n = 32, w = 256.

## Files

| file | contents |
|---|---|
| `rtl/crc_pkg.sv` | types (`crc_ctl_t`, `dl_t`, …), matrix construction, fan-in, stage-count/level choice and stage-size functions |
| `rtl/crc_pipelined.sv` | top level |
| `rtl/crc_cx.sv` | CX, F^w · CRC |
| `rtl/crc_dx.sv` | pipelined DX: input register, gather, sub-logics, stage registers |
| `rtl/crc_dx_sublogic.sv` | one DX sub-logic |
| `rtl/crc_stage_reg.sv` | data/control pipeline register |
| `rtl/crc_code_reg.sv` | XOR array and CRC register |
| `tb/crc_ref_pkg.sv` | reference CRC by polynomial long division (shares no code with the RTL) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_crc_workloads` (uses `tb/crc_workload_run.sv`) |

## Verification

Every testbench prints `TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_crc_pipelined` runs the top at its default parameters. It sends 400
  random messages of 1–12 words with bubbles and back-to-back starts. Every CRC
  is compared with long division, and every latency with K + 1. It also
  requires that bubbles, back-to-back messages, one-word messages and a full
  pipeline each occurred at least once.
* `tb_crc_workloads` runs all sixteen configurations in the table above, with
  `INIT` = 0 and all-ones alternating. It also checks the fan-in functions,
  the DL(0) fit, and that the automatic K matches the evaluated depth and
  obeys the level limits.
* The unit testbenches:
  * `tb_crc_cx` checks against C·x^w mod P, for CRC-16 at w=32 and CRC-32 at
    w=64. It also checks CRC-16 ITU-TSS at w=16 against the published XOR
    table for that case. That table numbers bits from the other end, so its
    R_i and x_k are bits 15−i and 15−k here.
  * `tb_crc_dx` checks each word's CRC from zero and the K-clock latency, for
    the default and for a 3-stage w = 256 CRC16-C.
  * `tb_crc_dx_sublogic` recomputes S(j,i) and RS(i) independently and checks
    each partial sum.
  * `tb_crc_stage_reg` and `tb_crc_code_reg` check against cycle models.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/crc_pkg.sv tb/crc_ref_pkg.sv \
    tb/tb_crc_pipelined.sv --top-module tb_crc_pipelined -Mdir obj && ./obj/Vtb_crc_pipelined
```

Replace the testbench name to run any other. `-Irtl -Itb` lets Verilator find
the remaining modules by file name, and the build is clean with Verilator's
default warnings. The workload testbench takes about two minutes to build, almost all of it in
elaboration.

## What is and is not modelled

* Function, pipeline structure and register sizes are modelled. Timing is
  not: the circuit's point is a shorter critical path after synthesis, and only
  a synthesis and timing run with a cell library can show that. The logic
  levels above are the structural estimate.
* Outputs whose last group has a single input pass it straight through a
  sub-logic, as a wire. Synthesis reports those output bits as wired to an
  input.
* Area optimisation across outputs (sharing partial sums) is not done in the
  RTL and is left to the synthesis tool.
