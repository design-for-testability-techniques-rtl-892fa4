# Self-checking SAD processing element with residue-and-quotient error detection and data recovery

In a motion-estimation engine, processing elements (PEs) compute the sum of absolute
differences (SAD) between a block of the current frame and a candidate block of the reference
frame. If a PE has a fault, the wrong SAD reaches the motion-vector decision and visibly
degrades the coded video. This design puts concurrent error detection and data recovery (EDDR)
around one PE. The checking runs at full speed while the PE works, with no test mode.

The main idea is to predict the result in a cheaper code. For a modulus `m = 2^k − 1`, every
value `X` is fully described by its **residue** `R = X mod m` and its **quotient**
`Q = floor(X / m)`. A *test code generator* (TCG) computes the (R, Q) code of the block's SAD
from the pixels. It does this on its own, without building the SAD. The PE's real SAD is
encoded the same way and the two codes are compared. If they differ, the PE is in error, and the
SAD is rebuilt from the predicted code as `Q·m + R`. The (R, Q) pair fixes the value uniquely, so
this catches any wrong SAD, not just single-bit errors as a plain residue check would. It can
also recover the value, which a residue alone cannot.

Default configuration:

| item | value |
|---|---|
| pixels | 8-bit luminance |
| block | 4 × 4, so 16 pixels and 128-bit pixel buses |
| SAD | 12-bit adder and accumulator (at most 16·255 = 4080) |
| code | modulus m = 2^6 − 1 = 63; R and Q carried on 8-bit signals |

## Block structure

```
 cur_pix_pe, ref_pix_pe ──► PE ──► SAD (pe_out) ──► RQCG1 ──► R_PE, Q_PE ──┐
                                      │                                    ▼
 cur_pix_tcg, ref_pix_tcg ──► TCG ──► R_T, Q_T ────────────────────────► EDC ──► error
                                      │                                    │
                                      └──► DRC ──► data = Q_T·m + R_T      │
                                                        │                  ▼
                              pe_out ──────────────► selector (error ? data : pe_out) ──► eddrout
```

| module | role |
|---|---|
| `eddr_top` | Top level: the wiring above plus a small sequencer. |
| `pe` | The PE under test: an 8-bit absolute-difference unit and a 12-bit accumulator. |
| `pe_top` | `pe` plus RQCG1, which encodes the PE's SAD. |
| `rqcg` | RQ code generator: R and Q of a value, built from adders only. |
| `tcg` | Test code generator: predicts (R_T, Q_T) of the block SAD. |
| `edc` | Error detection: XOR compare of both codes, OR-reduced to a 0/1 flag. |
| `drc` | Data recovery: `(Q_T << k) − Q_T + R_T`. |
| `eddr_mux` | Output selector. |
| `eddr_ctrl` | Block sequencer (start, pixel index, done). |
| `eddr_pkg` | Shared constants and two reference functions used by the testbenches. |

The PE and the TCG have **separate pixel buses**. In normal use they carry the same pixels. If
the PE gets different pixels, that acts like a faulty PE, which is how the testbenches inject
errors.

## How the RQ code generator avoids division (`rqcg`)

For `m = 2^k − 1` we have `2^k ≡ 1 (mod m)`. Split `X` at bit k into a low part `Y0` and a high
part `Y1`. Then:

```
X = Y0 + Y1·2^k = (Y0 + Y1) + Y1·m
```

Let `S = Y0 + Y1`. Split it again: `Z0` is its low k bits and `Z1` is its carry bit. Then
`S = (Z0 + Z1) + Z1·m`, and `Z0 + Z1 ≤ m`. So:

```
R = (Z0 + Z1 == m) ? 0 : Z0 + Z1
Q = Y1 + Z1 + (Z0 + Z1 == m)
```

This takes three small adders and one comparator. It is exact whenever `X` is at most 2k bits
wide, which is true for every instance in this design: the 12-bit SAD with k = 6, the pixels and
the accumulator sums. For a wider input, the module falls back to a constant division. That
path is only there for other parameter choices.

**Signed inputs** (`SIGNED_IN = 1`). The module first adds the constant `OFF = m·ceil(2^(W−1)/m)`,
so the value to fold is never negative. The residue does not change. `OFF/m` is then subtracted
from the quotient, so `Q` is the floor quotient in two's complement, rounded towards −∞. The TCG
needs this, as the next section explains.

## How the TCG predicts the code of a SAD (`tcg`)

Per pixel pair, the TCG works as follows:

1. **Comparator.** It orders the pair so that `X ≥ Y`; then `X − Y = |Cur − Ref|`.
2. **Two RQCGs.** They encode the pixels as `X = q_x·m + r_x` and `Y = q_y·m + r_y`.
3. **Two subtractors.** They form `r = r_x − r_y` and `q = q_x − q_y`. Then `X − Y = q·m + r`.
   - `q ≥ 0` always, because floor division preserves order.
   - `r` is **negative** whenever the larger pixel has the smaller residue. For example, 64 and
     62 give residues 1 and 62, so r = −61.

Two paths then run side by side over the 16 pixels:

- **Residue path:** `r` is reduced to `|r|_m` by a signed RQCG. ACC1 sums the reduced values,
  and a final RQCG reduces the sum. This gives `R_T = |Σ |r|_m|_m = SAD mod m`.
- **Quotient path:** ACC2 sums `r` (signed) and ACC3 sums `q`. A signed RQCG gives
  `floor(Σr / m)`, and an adder forms `Q_T = Σq + floor(Σr / m) = floor(SAD / m)`.

The last equality holds because `SAD = m·Σq + Σr`. If Σr is negative, the quotient must be a
floor, not a truncation. This is the one part where a careless implementation gives wrong codes
on ordinary data. About a third of random pixel pairs produce a negative `r`.

Accumulator widths at the defaults:

| accumulator | width | largest value |
|---|---|---|
| ACC1 | 10 bits | 16·62 |
| ACC2 | 11 bits, signed | ±16·62 |
| ACC3 | 7 bits | 16·4 |

## Detection, recovery and selection (`edc`, `drc`, `eddr_mux`)

- **EDC:** XORs `R_PE` with `R_T` and `Q_PE` with `Q_T`, then ORs all the difference bits into
  `error`. Here 1 means the PE is wrong.
- **DRC:** rebuilds `Q_T·63 + R_T` as `Q_T·64 − Q_T + R_T`. The multiplication is a 6-bit shift.
  It works in parallel with the EDC.
- **Selector:** outputs the PE's own SAD when `error = 0` and the recovered SAD when `error = 1`.
  Either way `eddrout` is correct, provided the TCG itself is fault-free. Faults in the checker
  are not covered.

## Interface and timing (`eddr_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | starts a block when idle; all four buses are captured on this edge |
| `cur_pix_pe`, `ref_pix_pe` | in | 128 | pixels for the PE; pixel p is bits `[8p+7:8p]` |
| `cur_pix_tcg`, `ref_pix_tcg` | in | 128 | pixels for the TCG |
| `eddrout` | out | 12 | error-free SAD |
| `error` | out | 1 | PE result was wrong and has been replaced |
| `busy`, `done` | out | 1 | block in progress; one-cycle pulse when results are valid |
| `pe_out`, `data`, `rpe`, `qpe`, `rt`, `qt` | out | 12/12/8/8/8/8 | observation of the internal results |

The pixel pairs are accumulated one per clock:

- `start` is sampled at edge 0.
- Pixels 0 to 15 are accumulated at edges 1 to 16.
- `done` is high for the cycle after edge 16, which is **16 cycles after start**.
- The outputs then stay stable until the next accepted `start`.
- A `start` while busy is ignored.

An assertion in `eddr_ctrl` checks that `done` is a single-cycle pulse issued when idle.

## Where this RTL makes its own choices

These points follow the published EDDR scheme:

- the block list and how the blocks connect;
- the RQ code equations and the TCG's residue and quotient paths;
- the 8-bit pixels, 12-bit SAD, 128-bit buses and 8-bit R/Q signals;
- the XOR comparison and the multiplexer selection.

These points are this design's own choices:

- **Modulus.** The scheme derives `m = 2^k − 1` with `k = n/2`. Its recovery step is described
  as "multiply the quotient by 64 and add the remainder". The reference simulation values agree
  only with m = 63: SAD 2124 gives R 45 and Q 33, because 2124 = 33·63 + 45. So m = 63 is used,
  and the 64 is the shift in `Q·64 − Q + R`.
- **Sign handling.** Negative residue differences are handled by signed subtractors and
  accumulators, with floor quotients. The published description does not cover this.
- **Comparator.** The TCG's comparator is taken to order the pixel pair. Its function is not
  described.
- **Control.** The sequencing is this design's: clock, one pixel per cycle, capture on `start`,
  `done` pulse and reset. The scheme gives only a datapath and operation times in ns.
- **Absolute difference.** The PE's first adder is built as an absolute-difference unit, which
  is what a SAD needs.
- **SAD width.** The SAD is 12 bits. One 14-bit signal width appears in the reference material,
  but 12 bits holds the largest 4×4 SAD.
- **Scope.** Only one PE with its EDDR logic is built. The scheme's remark that a PE passes its
  checked result to the next PE of a motion-estimation array does not define the array, so no
  array is built.
- **Not reproduced.** The area overhead (5.13 %) and timing penalty (6.24 %) figures depend on a
  cell library that is not specified.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rqcg` | Exhaustive over every input of every width used, both signed and unsigned, against integer mod and floor division. |
| `tb_pe`, `tb_pe_top` | Random and extreme blocks against a reference SAD and its code; hold and clear. |
| `tb_tcg` | 1000 blocks, including ones chosen to make residue differences negative. It fails if negative differences or swapped pixel pairs never occurred. |
| `tb_edc`, `tb_drc`, `tb_eddr_mux` | Exhaustive or random checks of the combinational blocks. `tb_drc` covers every SAD from 0 to 4080. |
| `tb_eddr_top` | End to end at the default size, described below. |

`tb_eddr_top` runs the whole design at its default size. It checks:

- that the latency is 16 cycles;
- the reference case: the TCG's block has SAD 2124 and the PE's block has SAD 1092, which must
  give rt = 45, qt = 33, error = 1 and eddrout = 2124;
- 200 fault-free blocks;
- 200 blocks with one flipped bit on a PE pixel input;
- 200 blocks where the PE sees unrelated pixels.

Every single-bit fault that changes the SAD is detected and corrected. Flips that leave the SAD
unchanged give no error, correctly. The test counts every mechanism (clean pass, recovery,
masked flip, negative residue, swapped pair, ignored start) and fails if one never happened.

Example with plain Verilator (run from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -y rtl rtl/eddr_pkg.sv tb/tb_eddr_top.sv \
          --top-module tb_eddr_top -o sim
./obj_dir/sim
```

Replace `tb_eddr_top` with any other testbench name to run that test. `verilator --lint-only
-Wall -y rtl rtl/eddr_pkg.sv rtl/eddr_top.sv` lints the design. Unused package constants show
up as warnings only.

## Changing the design

- **Block size.** Set `NPIX` on `eddr_top`. Widen `SAD_W` to `clog2(NPIX·255+1)`. `RQ_K`
  should then be `SAD_W/2` so that the adder-only RQCG stays exact, and `RQ_W` must hold
  `SAD/m`.
- **Modulus.** Any `m = 2^k − 1` works: set `RQ_K`. The DRC and all RQCGs follow.
- **Pixel width.** Set `PIX_W`. The TCG derives its internal widths from `PIX_W`, `NPIX` and
  `K`.

The testbenches run only the default configuration. They take their sizes from `eddr_pkg`, so
other sizes need testbench changes too. An 8×8 block (`NPIX=64`, `SAD_W=14`, `RQ_K=7`)
elaborates and lints cleanly, but it has not been simulated.

In the 8-bit R/Q signals the top two residue bits are always 0 at the defaults, because
R ≤ 62. Synthesis removes them.
