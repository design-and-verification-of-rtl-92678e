# CI-CSKA: concatenation-incrementation carry skip adder

A carry skip adder splits an N-bit addition into stages of ripple-carry
adders. A stage whose bits all propagate (every `a_i XOR b_i = 1`) hands its
incoming carry straight to the next stage over a short skip path, so the long
carry chain is cut into short pieces. The conventional version puts a 2:1
multiplexer at the end of every stage. It must still wait for the incoming
carry to ripple through the stage before the stage's sum bits are valid.

The CI-CSKA changes this in two ways:

1. **Concatenation and incrementation.** Stages 2 to Q do not take a carry
   into their ripple-carry block. Each one adds its own operand bits from a
   zero carry, right after the operands arrive, in parallel with all the
   other stages. The incoming carry is added afterwards by a separate
   *incrementation block*, which is a chain of half adders. A zero carry input
   also means the first cell of each of these ripple blocks is a half adder,
   not a full adder.
2. **Compound-gate skip logic.** Each stage's carry out is
   `C_out = G | (P & C_in)`. Here `G` is the carry out of the stage's own
   zero-carry ripple block and `P` is the AND of its propagate bits. Because
   the ripple block started from zero, this one expression is exact, so no
   multiplexer is needed. A single AND-OR-Invert (AOI) or OR-AND-Invert (OAI)
   gate computes it. The stage's carry out comes from this gate only, never
   from the incrementation block.

The longest path starts with the carry generated in stage 1. It crosses one
skip gate for each middle stage and then ripples through the incrementation
block of the last stage. A variable-latency wrapper is built on this fact. A
clock period that covers everything except this path is enough, provided the
few additions that use the path get two cycles. This slack can then be spent
on a lower supply voltage.

## Module hierarchy

```
ci_cska_top            clocked, variable-latency adder (top)
├── ci_cska            combinational N-bit CI-CSKA
│   ├── rca_block      stage 1: full-adder chain with carry input
│   └── ci_cska_stage  stages 2..Q
│       ├── rca_block             zero-carry chain (half adder first)
│       ├── skip_logic            AOI (even stage) or OAI (odd stage)
│       └── incrementation_block  half-adder chain, no carry out
│           (rca_block and incrementation_block use full_adder / half_adder)
└── vl_controller      long-path detector and 1/2-cycle sequencing
cska_pkg               skip_gate_e type, stage-to-gate rule
```

## The skip chain and its alternating polarity

This part is the easiest to get wrong. AOI and OAI gates invert, so the carry
between stages changes polarity at every skip gate:

| stage | skip gate | carry in | carry out |
|---|---|---|---|
| 1 | none (ripple carry out) | `cin`, true | true |
| 2, 4, 6, … | AOI: `~((P & C) \| G)` | true | complemented |
| 3, 5, 7, … | OAI: `~((~P \| C_n) & ~G)` | complemented | true |

The OAI form gives the same `G | P·C`, but it reads the complemented carry
together with `~P` and `~G`. Those are the NAND of the propagates and the
inverted carry of the ripple block. No inverter sits in the skip path.
Two inverters lie off that path:

* In an OAI stage, the incrementation block needs the true carry, so the
  complemented carry passes through an inverter before it enters the block.
* When the number of stages is even, the last gate is an AOI. Its
  complemented output is inverted to form `cout`. With an odd number of
  stages, `cout` comes straight from the last OAI.

`skip_gate_of_stage()` in `cska_pkg` encodes the rule that even stages use AOI
and odd stages use OAI. `ci_cska` applies it when generating the stages.

## Stage sizes

`ci_cska` and `ci_cska_top` take `WIDTH`, `NUM_STAGES` and an unpacked array
`STAGE_SIZE[NUM_STAGES]`. Entry 0 is stage 1, the least significant stage.
The sizes must add up to `WIDTH`, and elaboration stops with an error if they
do not.

* Equal sizes give the fixed-stage-size (FSS) form.
* Unequal sizes give the variable-stage-size (VSS) form. For example,
  `'{2,3,4,5,6,5,4,3}` gives 32 bits with short stages at both ends. VSS is
  usually the faster choice: short early stages get the first carry out
  quickly, and short late stages keep the final incrementation short.

The default is a 32-bit adder in eight 4-bit stages (FSS). The stage sizes are
not taken from a source. They are a neutral choice, and VSS needs only a
parameter change. Pass an array-valued parameter through a named `localparam`
array, as the testbenches do (`.STAGE_SIZE(SIZES)`). Verilator checks an
inline `'{...}` pattern against the default `NUM_STAGES`.

## Variable latency (`ci_cska_top`, `vl_controller`)

Interface: `clk`, synchronous active-low `rst_n`, and `in_valid`/`in_ready`
with `a`, `b`, `cin`. The outputs are `out_valid`, `two_cycle`, `sum` and
`cout`.

* Operands are stored at the edge where `in_valid && in_ready`.
* The combinational `ci_cska` works on the stored operands. It also outputs
  each stage's propagate product `stage_p`.
* `long_path = &stage_p[Q-2:1]`: every middle stage (2 to Q-1) propagates, so
  the stage-1 carry may have to cross the whole skip chain. With fewer than
  three stages this is always 0.
* The result is stored one edge after the operands, or two edges after when
  `long_path` is set. `out_valid` is high for the next cycle, and `two_cycle`
  says which case it was. `sum` and `cout` hold until the next result.
* `in_ready` is high when nothing is held or the held addition finishes in
  this cycle. One-cycle additions can therefore be issued on every clock; a
  two-cycle addition holds off the next one for one cycle.

Assertions in `vl_controller` check that the second cycle only follows a
first one and that no addition waits more than two cycles.

The RTL only sequences this. Any timing benefit comes from the clock period
chosen in implementation: the period must cover every path except the one
`long_path` flags, and the path from the operand register through
`ci_cska` to the result register becomes a two-cycle path when
`long_path` is set.

## How far it follows the source design, and where it departs

Taken from the source design:

* The stage structure (zero-carry ripple block, skip gate, incrementation
  block) and the half adder as the first cell of stages 2 to Q.
* The alternating AOI/OAI skip gates, and the complemented carry after even
  stages.
* The incrementation block as a half-adder chain whose carry out is unused.
* The 32-bit main width, the 128-bit wide variant, and the rule that an
  addition whose critical path is active takes two clock cycles.

Choices of this design:

* The stage sizes.
* The exact condition that marks the long path.
* The handshake, the registers and the reset.
* The polarity of the inputs of the OAI gates.
* The inverter that feeds the incrementation block in OAI stages.

Not built:

* The **modified parallel (prefix) structure** that the hybrid
  variable-latency version uses to widen timing slack. Its structure is not
  specified, so this wrapper uses the plain CI-CSKA throughout.
* **Supply-voltage scaling.** It is an operating condition, not logic.
* The **conventional multiplexer-based CSKA**. It is only a point of
  comparison.

The propagate signal is `a_i XOR b_i` throughout.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
results computed independently in the testbench, and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_half_adder`, `tb_full_adder`, `tb_skip_logic` | exhaustive truth tables |
| `tb_rca_block` | exhaustive, 4-bit block with carry in and 5-bit block without |
| `tb_incrementation_block` | exhaustive, 4 and 7 bits |
| `tb_ci_cska_stage` | exhaustive, one AOI stage and one OAI stage |
| `tb_ci_cska` | 20 000 random and propagate-forced additions on four configurations: default 32-bit FSS, 32-bit VSS, 32-bit with 7 stages (odd count), and 128-bit |
| `tb_vl_controller` | cycle-accurate check of ready, loads, `out_valid` and `two_cycle` against a reference model |
| `tb_ci_cska_top` | end to end at default parameters: 20 000 additions, checking sum, carry, `two_cycle` and latency (2 edges, or 3 for long-path additions) |
| `tb_ci_cska_top_128` | the same at 128 bits (32 stages) |

The end-to-end tests count how often each mechanism occurs, and fail if any
count is zero:

* one-cycle and two-cycle additions
* back-to-back issue
* stalls
* carries skipped over a stage
* incrementations
* carry in and carry out

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/cska_pkg.sv tb/tb_ci_cska_top.sv \
    --top-module tb_ci_cska_top
./obj_dir/Vtb_ci_cska_top
```

Replace the testbench name to run any other test. The package must come
first on the command line. Verilator finds the other modules in `rtl/` by
their file names.

Lint with `verilator --lint-only -Wall` and it reports three unused-signal
warnings, all by design:

* `rca_block.ci` is ignored in the zero-carry form.
* `vl_controller` does not look at the propagate products of the first and
  last stages.
* `long_path` is brought out of the controller for observation but is not
  used in the top.
