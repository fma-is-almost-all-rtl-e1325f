# Nonlinear functions on a GEMM engine's FMA array

A matrix-multiply accelerator already contains dozens of FP16 fused
multiply-add (FMA) units. Transformer workloads also need softmax,
layer normalisation and activations such as GELU and SiLU, which are
usually handled by extra hardware or by a slow general-purpose core. This
design runs them on the FMAs that are already there.

It is a RedMule-style GEMM engine: 8 rows of 8 computing elements (CEs),
each an FP16 FMA with a 2-stage pipeline. A small amount of extra logic
lets the same rows evaluate any function as a **piecewise polynomial
approximation (PWPA)**. The PWPA uses degree 3 and 8 non-uniform
partitions. The extra logic is:

* a partition detector;
* coefficient multiplexers for the Horner stages;
* a parameter memory (ParamMem) holding breakpoints and coefficients;
* separate input and output buffers for the nonlinear data;
* a little exponent logic, so that a reciprocal and an inverse square
  root are also just PWPAs.

Softmax needs a division and layernorm needs an inverse square root, so
neither needs a divider or a square-root unit.

All RTL is SystemVerilog-2017 in `rtl/`. The self-checking testbenches
are in `tb/`.

## How a row evaluates a function

A row is a chain of eight CEs, `CE0` to `CE7`. Each CE computes `a*b + c`
and its result appears 2 cycles later. In nonlinear mode the row works
as a pipeline that takes one element per cycle. Below, "slot" is the
interleave slot described in the next section.

| stage | softmax pass             | what it computes                               |
|-------|--------------------------|------------------------------------------------|
| CE0   | shift                    | `x' = (-1) * x_max[slot] + x`                  |
| CE1   | forward + partition detect | 7 comparisons of `x'` with the breakpoints, then a 3-level mux tree gives the partition id `p` |
| CE2   | Horner 1                 | `P0 = a[p] * x' + b[p]`                        |
| CE3   | Horner 2                 | `P1 = P0 * x' + c[p]`                          |
| CE4   | Horner 3                 | `P2 = P1 * x' + d[p]`                          |
| CE5   | accumulate or scale      | `D[slot] += P2` (pass 1) or `y = P2 * (1/D[slot])` (pass 2) |
| CE6, CE7 | idle (bypassed)       |                                                |

Two things travel alongside the data, delayed exactly like the CEs:

* the shifted input `x'` and its partition id, kept for the
  `P*(degree-1)` cycles the later Horner stages need them;
* a side band carrying the valid bit, the slot and a
  "first element" flag.

The coefficient multiplexers take the partition id from this side band.

ParamMem is written once per phase and broadcast to all rows. It holds:

* the 7 inner breakpoints, in ascending order;
* the coefficients `a b c d` for each of the 8 partitions;
* one shift value (`x_max`) per row and slot.

Partition `p` covers `[bp[p-1], bp[p])`. Partitions 0 and 7 extend to
minus and plus infinity. A table for any function is therefore 39
FP16 words.

### Interleaving: why an accumulator needs no extra reduction

A CE that adds its own previous result can only take a new input every
P = 2 cycles. To keep the row busy every cycle, each row processes
**P = 2 independent sequences**, alternating between them. Beat `b`
carries element `b/2` of the sequence in slot `b%2`. In CE5, the
previous result of the same slot leaves the CE in the cycle the next
element of that slot enters, and it is forwarded straight back. Each slot
also has a register that keeps its sum across input bubbles. The whole
engine therefore works on 2 x 8 = 16 sequences per operation. The
`x_max`, `1/D`, mean and inverse-sigma values are kept per slot. For
the softmax shift, a multiplexer picks the shift value of the current
slot.

### Reciprocal and inverse square root

Both reuse the same PWPA path, surrounded by exponent manipulation
(`pwpa_domain_reduction`, `pwpa_post_process`):

* `1/x`: write `x = 2^E * m` with `m` in [1, 2). The PWPA approximates
  `1/m`, and the result is `2^-E * PWPA(m)`.
* `1/sqrt(x)`: when `E` is odd, fold it into the mantissa:
  `z = m` or `2m`, so `z` is in [1, 4), with `k = floor(E/2)`. The PWPA
  approximates `1/sqrt(z)`, and the result is `2^-k * PWPA(z)`.

The reduced operand enters `CE0` with a zero shift. The exponent
correction waits in a 5-bit register per slot. After `CE4`, the
post-processing step adds the correction to the exponent of the
polynomial result. Both steps touch only the exponent field, so they are
a few small adders.

Inputs must be positive and normal. That holds for a softmax
denominator and for `variance + eps`. A subnormal input is treated as
2^-14.

## The four operations

Each operation is a list of phases run by the controller (`nl_ctrl`).
After each streaming or scalar phase, the controller waits 2·8+1 cycles
for the rows to drain.

**Activation** (GELU, SiLU, or anything else that has a table):
1. Load the 39-word table.
2. Run one pass with `x_max = 0`. `CE1` and `CE5`–`CE7` are bypassed, so
   the output is `P2`.

**Softmax** (`y_i = exp(x_i - x_max) / sum_j exp(x_j - x_max)`):
1. Load the exp table and the 16 `x_max` values (55 words). `x_max` is
   computed by the host.
2. Pass 1: shift, exp, and accumulate `D` in `CE5`.
3. Reload ParamMem with the reciprocal table (39 words; the `x_max`
   words are kept).
4. Reciprocal phase: one beat per slot turns `D` into `1/D`.
5. Reload ParamMem with the exp table (39 words).
6. Pass 2: the input is streamed again and `exp(x')` is recomputed.
   `CE5` multiplies it by `1/D`.

Recomputing the exponentials avoids storing them: the input is read
twice, but no intermediate values are written out.

**Layer normalisation** (`(x - mu) / sqrt(var + eps)`, no affine step):
1. Load the inverse-square-root table once.
2. Pass 1: `CE0` computes `x/N`, `CE5` accumulates `q += (x/N)*x`, and
   `CE6` accumulates `s += x`.
3. Three scalar phases on `CE0` compute `mu = s/N`, `var = q - mu^2` and
   `var + eps`.
4. Inverse-square-root phase: one beat per slot gives
   `r = 1/sqrt(var + eps)`.
5. Pass 2: `CE0` computes `x - mu` and `CE5` multiplies the result by
   `r`.

`1/N` and `eps` are FP16 registers written by the host.

**GEMM**: the row computes `z = y + sum_j x[j]*w[j]`.
* `x[j]` is stationary in the X buffer.
* `w` is broadcast to all rows by the W buffer. The W buffer delays
  column `j` by `j*P` cycles, so each weight meets the partial sum as it
  passes.
* One W vector and one `y` per row enter per beat, and one Z column
  leaves 16 cycles later.
* Tiling over larger matrices is the host's job.

Every multiplication is an FMA whose addend is `-0`, so it is a correctly rounded product (including the sign of zero).
Every addition is an FMA with a multiplier of 1. Every intermediate
value is rounded to FP16.

## Throughput and latency

* A row accepts one beat per cycle, and every beat leaves `H*P = 16`
  cycles later.
* The rows never stall. An output-producing beat is issued only when the
  output buffer has room for it plus everything still in flight (credit
  counting). Back-pressure on the output therefore only holds back the
  issue.
* Ideal rates are 8 elements/cycle for activations and 4 elements/cycle
  for softmax and layernorm, which need two passes.
* At sequence length 1024, the end-to-end testbench measures 7.77, 3.82
  and 3.85 elements/cycle. At 1 GHz this corresponds to 7.8, 3.8 and
  3.9 G elements/s. Shorter sequences are slower because ParamMem loads
  and pipeline drains are amortised over fewer elements.

## Programming model

Top module: `redmule_nl`, with parameters `L=8` rows, `H=8` columns,
`P=2` pipeline stages and `BUF_DEPTH=32`.

Registers are written through `cfg_we_i/cfg_addr_i/cfg_wdata_i`, and
only while idle or done:

| addr | register | content                                         |
|------|----------|-------------------------------------------------|
| 0    | MODE     | 0 GEMM, 1 activation, 2 softmax, 3 layernorm    |
| 1    | LEN      | elements per sequence (GEMM: number of W beats) |
| 2    | INV_N    | FP16 1/N (layernorm)                            |
| 3    | EPS      | FP16 epsilon (layernorm)                        |
| 4    | START    | any write starts the operation                  |

`busy_o` is high while the operation runs. `done_o` stays high from the
end of the operation until the next START.

All streams are valid/ready. A beat moves when both are high.

* `param_*`: ParamMem words. Each load phase takes its words, written to
  addresses 0, 1, 2, …. The word layout is: address 0–6 breakpoints;
  `7 + 4p + s` coefficient `s` (0=a … 3=d) of partition `p`;
  `39 + 2r + slot` the shift value of row `r`.
* `xin_*`: GEMM X tile, one row of 8 values per beat.
* `w_*`: GEMM W vector. In the nonlinear modes it carries one input
  element per row instead; these go to the nonlinear input buffer.
  **Write MODE before streaming**, because MODE decides where W beats
  go. Softmax and layernorm read the input twice, so the host streams
  it twice.
* `y_*`: the GEMM bias, paired with the W beat.
* `out_*`: one result per row per beat, from the Z buffer (GEMM) or the
  nonlinear output buffer.

The coefficient tables are data, not RTL. The testbench package
`tb/fp16_ref_pkg.sv` builds them by interpolating the target function at
4 Chebyshev nodes per partition and converting the cubic to monomial
form. The resulting tables reach:

| function            | range       | error                  |
|---------------------|-------------|------------------------|
| exp                 | [-16, 0]    | 1e-3 absolute          |
| 1/m                 | [1, 2)      | 0.6 % relative         |
| 1/sqrt(z)           | [1, 4)      | 0.3 % relative         |
| GELU                | [-8, 8]     | 6e-3 absolute          |

The error figures include FP16 rounding at every step.

## Module map

| module | role |
|--------|------|
| `nl_pkg` | FP16 type, PWPA sizes, ParamMem layout, mode and row-op enums |
| `fp16_fma` | exact FP16 FMA with a single round-to-nearest-even |
| `redmule_ce` | FMA plus `PIPE` registers (one CE) |
| `pwpa_part_detect` | 7 comparators and a binary mux tree giving the partition id |
| `pwpa_coeff_select` | 8:1 mux tree for one coefficient |
| `pwpa_domain_reduction` | [1,2) / [1,4) reduction and 5-bit exponent correction |
| `pwpa_post_process` | applies the exponent correction |
| `param_mem` | breakpoints, coefficients, per-row shifts; broadcast |
| `ce_row` | one row: CEs, side band, per-slot scalar registers, mode muxes |
| `x_buffer`, `w_buffer` | stationary X; W broadcast with systolic skew |
| `nl_fifo` | valid/ready FIFO (NL input, NL output, Z buffers) |
| `nl_ctrl` | registers, phase FSM, ParamMem loading, output credits |
| `redmule_nl` | top |

## How far to trust it, and where it departs

Verification: every module has a self-checking testbench. The reference
is independent of the RTL. It computes each FMA exactly in binary64 and
rounds once to FP16.

* The FMA alone is checked on 50 000 cases, including subnormals,
  infinities, NaN and overflow.
* `tb_ce_row` checks a single row in every mode, bit for bit, including
  its exact 16-cycle latency.
* `tb_redmule_nl` runs the whole engine at its default size: GEMM, GELU,
  SiLU, softmax and layernorm at sequence lengths 32 and 1024, with
  random input bubbles and output back-pressure. Every output is checked
  bit-exactly, and also against the true function (largest deviation
  0.03). It also checks the throughput figures above and that each
  mechanism occurred: every mode, ParamMem reloads, credit stalls, input
  bubbles and accumulator forwarding.
* `tb_redmule_nl_sweep` runs GELU, softmax and layernorm at every size
  from 32 to 1024 (powers of two), plus softmax over 197 scores and
  layernorm over 768 features (the attention block of a ViT-B model). It
  checks every output and that throughput grows with size, from about
  4.1 / 1.6 / 1.8 elements per cycle at 32 to 7.8 / 3.8 / 3.9 at 1024.

This is an implementation from a description, not the original RTL.
Where the description was silent, the following choices were made:

* The base GEMM engine is reduced to its essentials. One beat carries
  one W vector and a bias per row. The streamers that fetch data from
  memory, the host core and the cluster memory are outside the design;
  their streams are ports. The X, W and Y/Z buffers are simple register
  arrays and FIFOs.
* Linear and nonlinear operations run one after another. The separate
  nonlinear buffers would allow them to overlap, but that is not
  implemented. Likewise an activation is not applied to a GEMM result
  in place: the result leaves through the output stream and is streamed
  back in for the activation pass.
* `x_max` for softmax is computed by the host and loaded with the exp
  table.
* Which CEs hold the layernorm statistics (`CE0`, `CE5`, `CE6`), the
  register map, the ParamMem load protocol, buffer depths, the fixed
  drain wait and the credit scheme are this design's own choices.
* The FMA's pipeline registers follow a combinational FMA, and synthesis
  is expected to retime them.
* Reset is asynchronous and active-low, and it clears all state.

## Simulating

Any testbench builds with Verilator 5. `-y rtl` finds the modules; the
two packages are listed first. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/nl_pkg.sv tb/fp16_ref_pkg.sv tb/tb_redmule_nl.sv --top tb_redmule_nl
./obj_dir/Vtb_redmule_nl
```

Each testbench prints a single line, `TB_RESULT checks=N failures=M`.
`tb_redmule_nl` also prints the measured throughput and how many times
each mechanism occurred. Testbenches that use only RTL need just
`rtl/nl_pkg.sv` besides `-y rtl`. `tb_fp16_fma`, `tb_redmule_ce` and the
`pwpa_*` testbenches also need `tb/fp16_ref_pkg.sv`.
