# Unified LDPC / turbo decoder

LDPC codes and turbo codes are usually decoded by two different pieces of
hardware. This design decodes both with one soft-in soft-out (SISO) engine.
The trick is to treat an LDPC code as many single-parity-check (SPC) codes
placed side by side. Each SPC code is a two-state trellis, so it can be
decoded with the same forward/backward log-MAP recursion that a turbo decoder
runs on its 8-state trellis. Two things make the sharing cheap:

* The LDPC check-node function and the turbo add-compare-select step are the
  same circuit with its muxes and lookup tables moved. One kernel, the FACS
  (flexible ACS), does both.
* Eight FACS kernels side by side compute either the 8 state metrics of one
  turbo trellis or one metric each for 8 independent SPC trellises.

On top of the engine sits an LDPC decoder that uses the *group sub-trellis*
(GST) schedule. The checks are split into groups. Within a group no two checks
share a bit, so a whole group can be decoded at once. Each group's results are
used straight away by the next group. This turbo-like message passing
converges about twice as fast as the usual two-phase schedule.

All files are SystemVerilog 2017. `rtl/` holds synthesizable code and `tb/`
holds self-checking testbenches.

## Number formats

Soft values are fixed-point with two fractional bits ("q:2"), so one LSB is
0.25. An LLR is `log P(bit=0)/P(bit=1)`, so a positive value means "0".

| quantity | bits | where |
|---|---|---|
| channel LLR `y`, `ys`, `yp` | 6 | engine input |
| a-priori / extrinsic `La`, `Lambda_e` | 7 | engine input, extrinsic memory |
| branch metric `gamma` | 8 | branch unit output |
| alpha/beta state metric, LLR out | 10 | recursions, Lambda unit |
| column sum `Lambda_all` | 10 | accumulating memory |

The LDPC "+infinity" is 511. Turbo state metrics are not normalised. They wrap
modulo 2^10, and every comparison uses the sign of the wrapped difference.
This is correct as long as the metrics of one step lie within 512 of each
other. The testbenches keep their inputs inside that range.

## The correction table (`g_lut`)

Both modes need `g(x) = log(1 + e^-x)`. In q:2 it takes four values:

| \|x\| (LSBs) | 0 | 1..3 | 4..8 | > 8 |
|---|---|---|---|---|
| g (LSBs) | 3 | 2 | 1 | 0 |

The table has two variants:

* The plain LUT is indexed by a sum that is known to be non-negative.
* The double-sided DLUT takes a signed difference directly. It returns the
  entry for the magnitude, so no absolute-value stage sits in the critical
  path.

## The FACS kernel (`facs`)

The kernel has four inputs. X and V are 10 bits (state metrics), and Y and W
are 8 bits (branch metrics). The output Z goes through one register.

```
            +-----+   s_top   +-----+
 X,Y ------>|  +  |---------->| LUT |--------+          turbo: bypassed
            +-----+     |     +-----+        v
                        |                 +-----+   +------+
                        +---------------->|  -  |-->| DLUT |--+   LDPC: bypassed
            +-----+   s_bot   +------+    +-----+   +------+  |
 V,W ------>|  +  |---------->| DLUT |------^                 v
            +-----+           +------+                      +---+   +---+
   sign(s_top - s_bot) -> pick larger sum  ----(turbo)----->| + |-->| D |--> Z
   sign(s_bot)         -> pick smaller of X, Y --(LDPC)---->|   |   +---+
                                                            +---+
```

**Turbo mode** (`ldpc = 0`) computes `Z = max*(X+Y, V+W) = max + g(|X+Y-V-W|)`.
The LUT and the DLUT on `s_bot` are bypassed, so the subtractor forms the
difference of the two sums. The second DLUT turns that difference into the
correction, and the sign of the difference picks the larger sum.

**LDPC mode** (`ldpc = 1`) computes the magnitude of the check function
`f(a,b) = log((1+e^a e^b)/(e^a+e^b))`. The caller drives `X = V = |a|`,
`Y = |b|` and `W = -|b|`. Then:

```
|f(a,b)| = min(|a|,|b|) + g(|a|+|b|) - g(||a|-|b||)
```

* The LUT reads `|a|+|b|` and the DLUT reads `|a|-|b|`.
* The subtractor now forms the difference of the two table outputs.
* The sign of `|a|-|b|` selects the smaller input.
* The sign of `f` is `sign(a) xor sign(b)`. Every unit that uses FACS in LDPC
  mode registers this sign beside the kernel and applies it to Z.

Three details are this design's own:

* The LDPC sums carry an extra bit, so `511 + 127` cannot wrap.
* The LDPC result is clamped at zero. Exhaustive simulation over small inputs
  never hit the clamp, but it costs one mux.
* `|gamma|` is saturated at 127 before it enters the kernel.

## The SISO engine (`siso_engine`)

```
 y, La --> branch unit --gamma--> alpha unit (8 FACS, forward) --alpha--> [stack] --+
                  |                                                                 |
                  +--> [stack] --gamma reversed--> beta unit (8 FACS, backward)     |
                                        |   \--> PADD (beta+gamma) --+              |
                                        v                            v              v
                                  Lambda-S1 (8 FACS) <--------------------------- alpha
                                        |--> LDPC extrinsic (8 lanes)
                                        +--> Lambda-S2 (6 max*, 1 subtract) --> turbo LLR
```

Data moves in **windows** of `len` trellis steps, with `len` at most `LMAX`
(32). For turbo codes a window is the sliding window. For LDPC codes a window
is one SPC trellis, so `len` equals the check's row weight.

While window *w* streams in, in natural order, the alpha unit runs the forward
recursion. The branch metrics and the alpha values are pushed onto two stacks.
During window *w+1* the stacks give window *w* back in reverse order. The beta
unit runs the backward recursion on it, and the Lambda unit combines alpha,
beta and gamma. All units run in parallel at one trellis step per cycle. The
output of a window therefore trails its input by one window.

Each stack (`lifo_stack`) is one RAM of `LMAX` words. Every step reads an
address and then writes the new entry to the same address. The direction of
the address sweep flips at each window boundary. As a result, reading returns
the previous window reversed while the current window is written into the
freed slots. Every entry also carries a valid flag, which reset clears.

**LDPC mode: 8 SPC trellises per window, one per lane.**

* The branch unit forms `gamma = Lch + La`.
* alpha and beta both start at +infinity at the window edges:
  `alpha(i+1) = f(alpha(i), gamma(i))` and `beta(i) = f(beta(i+1), gamma(i+1))`.
* The extrinsic is `Lambda(i) = f(alpha(i), beta(i))`, which combines all
  inputs except input *i*.
* The output is taken after Lambda-S1. PADD and Lambda-S2 are unused.

**Turbo mode: one 8-state trellis.**

* The code is the 3GPP LTE constituent code: feedback 1+D²+D³, parity 1+D+D³.
  The state is `{s1,s2,s3}`, with s1 the newest register bit.
* The branch unit puts the metric of the branch with bits (u,p) into
  `gamma[{u,p}]`: `gamma(u,p) = (1-u)(ys+La) + (1-p)yp`. This differs from the
  symmetric form only by a per-step constant, which cancels. It also fits
  8 bits without rounding.
* The routing in front of each recursion unit sends each state its two
  predecessors (alpha) or successors (beta).
* alpha starts from state 0 (metric 0; the others get -128) when `blk_first`
  is set on a window's first step. Otherwise alpha carries on across windows.
* beta starts each window from the `beta_init` input, which is sampled on the
  window's first backward step.
* When a window's backward pass ends, the beta metric at its left edge comes
  out on `beta_bnd`. Storing it and feeding it back in the next iteration is
  the "next iteration initialisation" (NII) scheme, which needs no training
  recursion. The top level keeps these vectors in `nii_mem` (see below).
* PADD forms `beta(next(s',u)) + gamma(u,p)` for all 16 branches. Lambda-S1 adds
  `alpha(s')` and reduces pairs of same-u branches with eight max*.
* Lambda-S2 reduces each bit value's four results with three max*. It outputs
  `LLR = max*(u=0) - max*(u=1)`, the a-posteriori LLR. Subtracting the inputs to
  get an extrinsic value is left to the turbo controller.

**Protocol.** Each cycle with `step` high consumes one input and advances both
passes. `in_valid` marks real data. After the last window, the caller gives one
more window of steps with `in_valid` low to flush the backward pass.

* `lam`, `lam_valid` and `lam_pos` appear one cycle after the step that
  produced them.
* `llr`, `llr_valid` and `llr_pos` appear two cycles after that step.
* `*_pos` is the position inside the window, counting down.
* `len` may change only at a window boundary.

## The GST LDPC decoder (`udec_top`)

The parity-check matrix is split into `S` groups. Each group has `T` checks,
and no two checks in a group share a bit. For a quasi-cyclic code, one block
row is such a group. The `P = ceil(T/8)` engines give `8P` lanes, enough to
decode one whole group in one sub-iteration. `S` sub-iterations make one
iteration.

Two memories hold the messages:

* The **extrinsic memory** (`ext_mem`) has one 7-bit word per non-zero of H. It
  holds the last message that the owning group produced for that bit.
* The **accumulating memory** (`acc_mem`) has one 10-bit word per code bit. It
  holds `Lambda_all`, the sum of all groups' latest messages for that bit.

For each bit of each check in the current group:

```
La        = sat7(Lambda_all - Lambda_old)       (read during the feed window)
gamma     = Lch + La                           (in the branch unit)
Lambda_new = sat7(SISO output)                  (written back during the flush window)
Lambda_all = sat10(Lambda_all + Lambda_new - Lambda_old)
Lambda_old <- Lambda_new
```

The column sum is corrected by the difference, so it is never rebuilt from
scratch. The next group reads the updated sums at once, and that is where the
faster convergence comes from.

**Schedule.** A group with row weight *d* takes *d* feed cycles, then *d*
flush cycles (its results are written back during these), then one drain
cycle. That is `2d+1` cycles per group. Groups run strictly one after another,
so a group always sees every update of the group before it.

`start` first clears both memories. This uses all lanes at once and takes
`ceil(max(E,N)/8P)` cycles, where `E = S*T*DCMAX`. It then runs `max_iter`
iterations and pulses `done`. After that, `rd_col` selects a bit, `rd_llr`
gives `Lch + Lambda_all` for it, and `rd_bit` gives its sign, which is the
hard decision.

At the default size (2304-bit rate-1/2 code: S = 12, T = 96, 12 engines)
with six groups of weight 7 and six of weight 6, one iteration takes
6 × 15 + 6 × 13 = 168 cycles. Clearing takes 84 cycles, so 10 iterations
take 84 + 1680 + 2 = 1766 cycles from `start` to `done`. At 500 MHz that
is about 3.5 µs for 1152 information bits.

**Code structure.** The permutation network between the memories and the
engines is not part of this design. Instead, the host loads a table through the
configuration port, one entry per (group g, check t, position i), at address
`(g*T + t)*DCMAX + i`:

| `cfg_sel` | address | data |
|---|---|---|
| 0 | `(g*T+t)*DCMAX+i` | `{valid, column}` |
| 1 | group g | row weight of the group (1..DCMAX) |
| 2 | bit k | channel LLR (6-bit q:2) |

Load the table only while `busy` is low. Entries with `valid = 0` are never
written back, which lets a shorter code (smaller lifting size) run on the same
hardware.

**Turbo mode.** When `turbo_mode` is high, engine 0 is connected to the `t_*`
ports: the SISO stream described above, plus `t_beta_init` and `t_beta_bnd`.

* The caller numbers the windows: `t_win` is the window being fed, and
  `t_nwin` is the number of windows in the block. During the flush window,
  `t_win = t_nwin`.
* The beta vector at the left edge of each window is written into `nii_mem`
  at that window's number. The store holds 192 windows, which covers a
  6144-bit block with 32-step windows.
* With `t_nii` high, the backward pass of window w starts from the vector
  stored for window w+1 in the previous pass. The last window of the block
  still starts from `t_beta_init`. With `t_nii` low, every window starts from
  `t_beta_init`, as on the first iteration.
* The scheme is also known as "1-alpha, 1-beta" because segmented decoders
  store alpha boundaries the same way. Here one engine runs alpha through the
  whole block, so only beta boundaries are stored.

The turbo interleaver, the turbo block memories and the iteration control are
outside this design.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `udec_top` | `N` | 2304 | code length |
| | `S` | 12 | groups (block rows) |
| | `T` | 96 | checks per group; `P = ceil(T/8)` engines |
| | `DCMAX` | 7 | largest row weight |
| | `LMAX` | 32 | engine window / stack depth |
| | `ACCW` | 10 | column-sum width |
| | `NWIN` | 192 | turbo windows held for NII |
| `siso_engine` | `LMAX` | 32 | |
| `facs` | `XW`, `YW` | 10, 8 | X/V and Y/W widths |

Shared constants and the trellis functions are in `rtl/udec_pkg.sv`.

## Departures and own choices

These are the places where this RTL fills gaps or departs from the
architecture it implements:

* **LLR sign.** The convention is `log P(0)/P(1)` in both modes. This is the
  convention under which the check function above holds. The turbo LLR is
  therefore `max*(u=0) - max*(u=1)`.
* **Turbo code.** The trellis is the LTE code. Only the state count (8) is
  fixed by the architecture.
* **Normalisation.** Turbo state metrics wrap modulo 2^10 instead of being
  normalised.
* **Stacks.** Each stack is one RAM with alternating direction, not a pair of
  stacks.
* **Engine protocol.** The step/valid protocol, the flush window, the
  boundary-metric ports and the window-numbered NII store are this design's.
* **Word lengths.** Extrinsic words are 7 bits and the column sum is 10 bits,
  both saturating. The architecture fixes neither.
* **GST schedule.** Groups do not overlap in the engines, because the engines
  drain between groups. The code structure comes from a host-loaded table, not
  a hard-wired permuter.
* **Turbo parallelism.** Only one engine serves turbo mode. A parallel turbo
  decoder with several engines is not included.
* **Row weights.** `DCMAX = 7` covers the 802.16e rate-1/2 codes. The 802.11n
  rate-1/2 codes need 8, and higher-rate 802.16e codes need up to 20. Both are
  reachable through the parameter.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
For example:

```
verilator --binary -Irtl -Itb rtl/udec_pkg.sv tb/tb_ref_pkg.sv tb/tb_siso_engine.sv \
          --top-module tb_siso_engine -Wno-fatal
./obj_dir/Vtb_siso_engine
```

`tb/tb_ref_pkg.sv` holds a reference model written straight from the
equations: the table as a real-valued step function, `f`, `max*`, and an
encoder-based trellis. The testbenches compare against it:

| testbench | what it checks |
|---|---|
| `tb_g_lut` | both tables over every 11-bit index |
| `tb_facs` | all LDPC magnitudes up to 40, random ones up to 511, random turbo max*, register hold |
| `tb_branch_unit`, `tb_padd` | every output in both modes |
| `tb_recursion_unit` | forward and backward units, both modes, step by step |
| `tb_lifo_stack` | reversal across windows of lengths 4, 32 and 7, and the valid flags |
| `tb_lambda_s1`, `tb_lambda_s2` | both stages of the Lambda unit |
| `tb_siso_engine` | LDPC windows of 6, 7 and 32 (values, positions, latency); turbo blocks with boundary inputs (LLRs and returned boundary metrics) |
| `tb_ext_mem`, `tb_acc_mem` | multi-lane access, clearing and saturation |
| `tb_nii_mem` | random boundary-vector writes and reads |
| `tb_udec_top` | reduced decoder: 96-bit code, 3 groups of weights 4/3/4, 2 engines, 8 iterations, plus a turbo block through the top, run twice: once from `t_beta_init`, once from the NII store |
| `tb_udec_top_full` | default-size decoder, 2304-bit code, 10 iterations |

The two top-level testbenches build a quasi-cyclic code from a base pattern
with circulant shift `(11rc + 3r² + 7c + 3) mod Z`. They send the all-zero
codeword with uniform noise on the channel LLRs. After the run, every column
sum must match a reference GST decoder bit for bit. The run time must match the
schedule above. The testbenches also count each mechanism: memory clear,
sub-iterations, group-length changes, several engines writing at once, turbo
LLRs, boundary metrics, NII stores and NII window starts. The full-size run corrects 131 channel errors to 0
and takes 1766 cycles from start to done.

## Limits

* The test codes are synthetic codes with the shape of the standard codes, not
  the standard matrices themselves.
* Bit-error-rate performance has not been measured. The tests check that the
  hardware equals the algorithm, and that noisy codewords are corrected.
* Timing and area have not been evaluated.
