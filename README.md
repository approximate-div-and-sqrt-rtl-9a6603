# Transprecision floating-point division and square root, shared by a RISC-V cluster

Division and square root are rare but slow instructions. In a small in-order
core they cost many stall cycles and a lot of area. This design puts one
iterative DIV/SQRT unit in a cluster of eight cores and lets software ask for
fewer mantissa bits. Every four bits fewer saves one cycle. In single precision
a full result takes 8 cycles, and an 8-11-bit result takes 5. Fewer cycles mean
fewer stalls and less energy per operation, paid for with a controlled loss of
accuracy.

The RTL has three parts:

* **`div_sqrt_iter`**: the iterative unit. It handles division and square root
  in one shared datapath, supports IEEE-754 single precision with denormals,
  and has a run-time precision control. With other parameters it also
  provides the 5-cycle half-precision unit.
* **`div_sqrt_comb`**: a single-cycle quarter-precision unit (1-5-2 format)
  built from the same pieces.
* **`div_sqrt_cluster_top`**: eight per-core dispatchers, a round-robin
  arbiter and the shared single-precision unit. The HP and QP units sit
  beside it with their own ports.

## Latency and accuracy at a glance

| Format / setting | fraction bits kept | latency (cycles) | max. error of the kept mantissa |
|---|---|---|---|
| single, `precision_ctl` 20-23 | 20-23 | 8 | ≤ ½ ULP at the kept precision |
| single, `precision_ctl` 16-19 | 16-19 | 7 | (i.e. ≤ 2^(22-P) single-precision ULP) |
| single, `precision_ctl` 12-15 | 12-15 | 6 | |
| single, `precision_ctl` 8-11  | 8-11  | 5 | |
| half (C_EXP 5, C_MANT 10)    | 10    | 5 | ≤ ½ ULP |
| quarter (C_EXP 5, C_MANT 2)  | 2     | 1 | ≤ ½ ULP |

Latency = 1 (pre-processing) + ⌈(P+1)/4⌉ (iteration) + 1 (post-processing).
Here P is the number of fraction bits and the +1 is the hidden bit. A
precision setting below 8 is treated as 8, and one above 23 as 23.

## The datapath (`div_sqrt_iter`)

```
 op_a, op_b ─► pre-processing ─► [regs] ─► 4 × NR cell per clock ─► [regs] ─► post-processing ─► [result, done]
              decompose, 2×LZD,           (⌈(P+1)/4⌉ cycles)                 guard cell, normalise,
              exponent, sign, classify                                       round, compose, flags
```

**Pre-processing** (`div_sqrt_preprocess`, cycle 1). It splits both operands
into sign, exponent and mantissa. Two leading-zero detectors (`lzd`) normalise
denormal mantissas. The effective exponent of an operand is
`max(EXP,1) − LZ`. The result exponent is:

* division: `E_a − E_b + bias`, minus 1 if `MANT_a < MANT_b`;
* square root: `floor((E_a − bias)/2) + bias`.

The `mant_shift` flag doubles the dividend or radicand mantissa. A division
sets it when `MANT_a < MANT_b`. A square root sets it when its unbiased
exponent is odd. Either way the result mantissa always lies in [1, 2), so its
top bit is always the hidden bit and it never needs a left shift later. The
exponent is kept as a signed (C_EXP+2)-bit value, so that underflow and
overflow survive until normalisation. The stage also flags zero, infinity,
NaN and signalling NaN for each operand.

**Iteration** (`nrbd_nrsc_step`, four chained per clock). One
non-restoring cell serves both operations with a single adder/subtractor. The
sign of the partial remainder `r` chooses between subtracting and adding, and
the new result bit is `1` when the new remainder is non-negative:

* division: `r' = 2r ∓ d`;
* square root: `r' = 4r + (next 2 radicand bits) ∓ (4q+1 | 4q+3)`.

Only the adder's second operand depends on the operation; that is the
sharing. The scaling is the subtle part:

* Division starts with `r = MANT_a` (already doubled if needed) and
  `d = 2·MANT_b`. The first step is then `2·MANT_a − 2·MANT_b ≥ 0`, so the
  first result bit has weight 2⁰.
* Square root starts with `r = 0` and a radicand register
  `x = MANT_a · 2^(2T−2−C_MANT)`, which the cells use up two bits at a time.
* `T = 4·⌈(C_MANT+1)/4⌉ + 1` is the width of the result register: 25 bits for
  single precision, 13 for half and 5 for quarter.
* The partial remainder has `T+4` bits.

**Post-processing** (`div_sqrt_postprocess`, last cycle):

1. One more cell produces a guard bit beyond the computed bits.
2. The remainder is corrected to its restoring value: `+d` for division,
   `+(2q+1)` for square root. If it is non-zero, or if radicand bits remain
   unused, the sticky bit is set.
3. The computed bits are left-aligned into a (C_MANT+3)-bit vector
   `{hidden, fraction, guard, sticky}`.
4. An exponent ≥ all-ones overflows to ±∞. An exponent ≤ 0 is shifted right
   into the denormal range, and the bits shifted out join the sticky bit.
5. The result is rounded to nearest, ties to even, at bit position P. All
   fraction bits below P are cleared. The rounding increment is added to the
   packed `{exponent, fraction}` word, so a carry renormalises by itself. A
   denormal that rounds up to the smallest normal gets exponent 1, and a
   value that rounds up to the all-ones exponent becomes infinity.
6. Special operands override the result, using RISC-V rules. NaN inputs,
   0/0, ∞/∞ and √(negative) give the canonical quiet NaN `0x7FC00000`. x/0
   gives ±∞ with the divide-by-zero flag. Also ∞/x = ±∞, x/∞ = ±0, √(−0) = −0
   and √(+∞) = +∞.

With reduced precision a very small denormal result becomes zero, because its
only non-zero bits lie below the kept precision.

Flags come out as the struct `fflags_t {nv, dv, of, uf, nx}`, in the order of
the RISC-V `fflags` CSR. `dv` is divide-by-zero. Underflow means "tiny before
rounding and inexact".

## Interface and timing of the units

`div_sqrt_iter` (defaults C_EXP 8, C_MANT 23, ITER_PER_CYCLE 4,
TRANSPRECISION 1, MIN_PREC 8):

* `div_start_i` / `sqrt_start_i`: a one-cycle pulse, given with `op_a_i`,
  `op_b_i` and `precision_ctl_i`. It is accepted only while `ready_o` is high
  (unit idle). An assertion flags a start while the unit is busy, and one
  flags both starts at once.
* `done_o` pulses exactly LATENCY edges after the edge that sampled the start.
  `result_o` and `flags_o` hold their value until the next result.
* `ready_o` goes high again in the cycle of `done_o`, so back-to-back
  operations are possible.
* The latency does not depend on the operand values; special cases take as
  long as ordinary ones.
* Reset (`rst_ni`) is active-low and asynchronous.

For the half-precision unit, instantiate `div_sqrt_iter` with `C_EXP=5,
C_MANT=10, TRANSPRECISION=0`. It ignores `precision_ctl_i` and always takes 5
cycles.

`div_sqrt_comb` has the same ports without `precision_ctl_i`. `ready_o` is
always 1. Every start gives `done_o` and the result one cycle later, and it can
take a new operation every cycle.

## Sharing the unit among the cores

Each core has an `fpu_dispatcher` in its execute stage:

* When the decoder presents a DIV or SQRT (`op_valid_i`, with operands from the
  forwarding path and a precision setting), the dispatcher raises `req_o` and
  the core sees `stall_o`.
* The `rr_arbiter` grants at most one request per cycle, and only while the
  shared unit is `ready`. It starts its search at the core after the one
  served last, so a waiting core is served before any other core is served
  twice.
* A dispatcher that loses, or that finds the unit busy, simply asks again the
  next cycle.
* On a grant, the top multiplexes the winner's operands, operation and
  precision into the unit and registers the winner's index as the **tag**.
* When `done` rises, the result is broadcast with that tag. Only the matching
  dispatcher raises `wb_valid_o`. In the same cycle it drops the stall and
  hands the data and flags to the register-file write port.

The core must hold `op_valid_i` and its operands while it is stalled. An
assertion in the dispatcher checks this. The write-back comes exactly the
unit latency after the grant: 5-8 cycles depending on the precision asked for.

`div_sqrt_cluster_top` exposes:

* per-core vectors `core_op_valid_i`, `core_op_i` (`OP_DIV`/`OP_SQRT`),
  `core_opa_i`, `core_opb_i`, `core_prec_i`, `core_stall_o`,
  `core_wb_valid_o`, `core_wb_data_o` and `core_wb_flags_o`;
* the ports of the half-precision unit (`hp_*`) and the quarter-precision unit
  (`qp_*`), which are not connected to the cores.

## What is not here

The cores themselves (four-stage RV32IMC with an FPU), the TCDM memory banks,
the logarithmic interconnect, the instruction cache, the DMA and the cluster
bus are not part of this RTL. The top's `core_*` ports stand for each core's
decode/forwarding outputs and its register-file write port.

## Design choices and deviations

These points are not fixed by the architecture description; they are this
design's own choices:

* **Rounding.** Only round-to-nearest-even is provided; there is no rounding
  mode input. The guard bit comes from one extra non-restoring cell in the
  post-processing cycle, so the four cells per clock compute exactly
  4·⌈(P+1)/4⌉ bits. The resulting error (≤ ½ ULP at the kept precision) is
  within the accuracy stated for the architecture: 1 ULP in single precision
  and 2^(23−P) ULP with reduced precision.
* **Normalisation.** The quotient is normalised up front (mantissa compare in
  the pre-processing stage) instead of after the iteration.
* **Flags.** Invalid (`nv`) and inexact (`nx`) are added to the published
  overflow / underflow / divide-by-zero set. Signalling NaNs are detected.
* **Two signals for "ready".** `ready_o` means "idle" and is what the arbiter
  uses. `done_o` means "result valid".
* **Precision.** `precision_ctl` is clamped to 8..23. In the cluster each core
  supplies its precision with the request, for example from a control
  register.
* **Formats.** The quarter-precision format is 1-5-2. The half-precision
  format is IEEE binary16.
* **Arbiter.** The round-robin pointer design, the core-side stall handshake
  and asynchronous active-low reset are implementation choices.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
(`tb/fp_ref_pkg.sv`) computes results with 128-bit integer division, and
square roots by binary search. It shares no algorithm with the hardware.

| testbench | what it shows |
|---|---|
| `tb_lzd` | all one-hot, zero and random inputs |
| `tb_nrbd_nrsc_step` | 25 chained steps equal integer quotient/remainder and integer root/remainder |
| `tb_div_sqrt_preprocess` | fields, exponents, normalisation, classes for random operands of every class |
| `tb_div_sqrt_postprocess` | rounding/normalisation of arbitrary end states incl. ties, denormal and overflow ranges, special cases |
| `tb_div_sqrt_iter` | 20 000 random SP DIV/SQRT at random precisions: results, flags, latency 5/6/7/8 |
| `tb_div_sqrt_hp` | 20 000 random HP operations, latency 5 |
| `tb_div_sqrt_comb` | all 65 536 QP divisions and 256 square roots, back to back |
| `tb_rr_arbiter` | grant order against a round-robin model, no grant while busy, no starvation |
| `tb_fpu_dispatcher` | request/stall/retry/tag-matched write-back, foreign tags ignored |
| `tb_div_sqrt_cluster_top` | 8 cores × 300 random operations at default size. Checks every write-back, latency from grant and fairness. It requires contention, busy declines, all four latency classes, special operands and HP/QP operations to occur. |
| `tb_error_analysis` | mean relative error of random SP DIV/SQRT for each precision 8..23 |
| `tb_kernel_offload` | the DIV/SQRT streams of four matrix/geometry kernels, full size, on the 8-core top at four precisions |

Measured mean relative error (random normal operands, 8 000 operations per
setting, from `tb_error_analysis`):

| fraction bits | 8 | 11 | 12 | 15 | 16 | 19 | 20 | 23 |
|---|---|---|---|---|---|---|---|---|
| latency | 5 | 5 | 6 | 6 | 7 | 7 | 8 | 8 |
| mean rel. error | 7.0e-4 | 8.6e-5 | 4.4e-5 | 5.4e-6 | 2.7e-6 | 3.4e-7 | 1.7e-7 | 2.1e-8 |

The error halves with each extra bit, going from about 10⁻³ to 10⁻⁸.

`tb_kernel_offload` replays the division and square-root streams of four
kernels on the 8-core top:

* Cholesky: 24 564 instructions, 90 DIV, 100 SQRT;
* QR: 155 909 instructions, 710 DIV, 170 SQRT;
* 3-D distance: 12 133 instructions, 1 000 SQRT;
* 2-D reprojection error: 82 778 instructions, 2 530 DIV.

The cores are modelled crudely. Each executes one other instruction per
cycle, its share of the DIV/SQRTs is spread evenly through its instruction
stream, and it stalls on each until write-back. With this model the run time
falls by these amounts relative to 23 bits:

| kernel | 19 bits (7 cy) | 15 bits (6 cy) | 11 bits (5 cy) |
|---|---|---|---|
| Cholesky | 1.0 % | 1.9 % | 2.9 % |
| QR | 0.6 % | 1.2 % | 1.7 % |
| 3-D distance | 12.5 % | 25.0 % | 37.4 % |
| 2-D reprojection | 12.5 % | 24.9 % | 37.4 % |

The two DIV/SQRT-heavy kernels are limited by the single shared unit, so their
run time follows the unit latency almost one for one. Real cores hide part of
the latency and also stall for other reasons, so measured gains on silicon
differ.

To run a testbench with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/div_sqrt_pkg.sv tb/fp_ref_pkg.sv \
          tb/tb_div_sqrt_cluster_top.sv --top-module tb_div_sqrt_cluster_top -o sim
./obj_dir/sim
```

Use the same command with any other `tb_*` module. The `-Irtl -Itb` flags let
Verilator find each module by its file name. Every testbench finishes in well
under a second.

Every file compiles cleanly with `verilator --lint-only -Wall` and with the
slang front end of yosys. The only remaining lint warning is SYNCASYNCNET:
the reset is used both asynchronously by the flops and synchronously in
`disable iff` of the assertions, which is intended.
