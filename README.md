# RNS NTT polynomial multiplier

This design multiplies two polynomials of degree below N = 4096 with 128-bit
coefficients modulo `x^N + 1` and a 120-bit prime `M`. That is the core
operation of lattice-based and fully homomorphic encryption. The hardware
never handles a 128-bit integer in its arithmetic. Each coefficient is split
into residues modulo nine 32-bit primes (a residue number system, RNS). From
then on, every addition and multiplication is nine independent 32-bit
operations. The polynomial product itself is a negative wrapped convolution
built on the number theoretic transform (NTT):

```
A'  = A ∘ phi^i            B' = B ∘ phi^i          (twist, phi^2 = w, phi^N = -1)
A'' = NTT(A')              B'' = NTT(B')
C'' = A'' ∘ B''
C   = INTT(C'') ∘ n^-1 ∘ phi^-i
```

Here `∘` is the element-wise (Hadamard) product. Every product in this chain
is an RNS Montgomery product. It is the hard part of the design, because
reducing modulo `M` is not a channel-wise operation.

All RTL is in `rtl/`, one module per file. Testbenches are in `tb/`.

## 1. Number system

`rns_pkg` fixes the channels:

| channels | moduli | role |
|---|---|---|
| 0..3 (base 1) | 2^32-5, 2^32-17, 2^32-65, 2^32-99 | product D ≈ 2^128 |
| 4..7 (base 2) | 2^32-107, 2^32-135, 2^32-153, 2^32-185 | product D2 |
| 8 (m_r) | 2^32-209 | redundant channel for the exact base extension |

A value travels as an `rns_t`: nine 32-bit residues, 288 bits in all. Both
bases always describe the same integer.

- The system modulus `M = 0x00ff…ff66001` is a 120-bit prime with `M ≡ 1 (mod 8192)`.
  - So a primitive 2N-th root of unity exists for every N up to 4096 (`PSI8192` in the package).
  - `36·M < D`, which leaves room for values that are bounded but not fully reduced.
- Every constant the base extensions and the Montgomery unit need is computed at elaboration by constant functions in `rns_pkg`. Examples are `|D_i^-1|_i`, `|D_i|_j`, `|M^-1|_i` and `|D^-1|_j`. If you change a modulus or `M`, these follow automatically.

### Channel arithmetic

| module | operation | how |
|---|---|---|
| `mod_add` | `(a+b) mod m` | sum and `sum-m` side by side; the borrow selects one |
| `mod_sub` | `(a-b) mod m` | the borrow selects `a-b` or `a-b+m` |
| `mod_mul_barrett` | `a·b mod m` | 64-bit product, then `barrett_reduce` |
| `barrett_reduce` | `x mod m` | see below |
| `mod_mac` | `Σ a_t·b_t mod m` | products registered, summed, one Barrett reduction (2 cycles) |
| `rns_add` / `rns_sub` / `rns_mul` | the same over all channels | one channel unit per modulus |

`barrett_reduce` takes a quotient estimate `t = (x·L) >> K` with
`L = floor(2^K/m)`, where K is the input width. The estimate is at most one
too small, so one conditional subtraction finishes the reduction. The modulus
must fill its 32-bit channel (top bit set). All nine moduli do, and the
module checks this at elaboration.

## 2. RNS Montgomery multiplication (`rns_montmul`)

`Z ≡ A·B·D^-1 (mod M)` is computed without leaving the RNS:

1. `X = A·B` in all nine channels.
2. `Q = -X·M^-1` in base 1. This is the Montgomery quotient; it makes `X + Q·M` divisible by D.
3. `bajard_ext` extends Q to base 2 and m_r.
   - It is a fast CRT sum without a correction term.
   - The result is `Q + α·D` with `0 ≤ α < 4`. In the final value the error only adds `α·M`, so it is harmless.
4. `Z = (X + Q·M)·D^-1` in base 2 and m_r. D is invertible there.
5. `shenoy_ext` extends Z exactly back to base 1.
   - It forms the CRT sum `t`, and also `t_r` in the redundant channel.
   - `β = |D2^-1·(t_r − z_r)|_{m_r}` counts how many times the sum overshot by D2.
   - It subtracts `β·|D2|_i` in each base-1 channel.

The result is an integer below `(k+1)·M + A·B/D`. It is congruent to the true
product but not fully reduced. All datapath values stay below about `6·M`,
which is why `36·M < D` matters. The pipeline has a register after every
block:

- 15 cycles of latency (`LAT_MONT`)
- one product per cycle
- shift registers carry `X` and `Z` past the two extensions

To cancel the Montgomery factor, every table value fed to a Montgomery
product is stored pre-multiplied by D (see section 6).

## 3. Butterfly (`rns_butterfly`)

The butterfly computes `Y = B + w·A` and `Z = B − w·A`.

- The product `w·A` comes from `rns_montmul`, while B waits in a shift register.
- The subtraction must give a non-negative integer that is the same in every channel, because the next stage feeds it to another Montgomery product.
  - A per-channel "add the modulus, then subtract" would keep each residue correct but break that consistency.
  - So the subtractor computes `(B + 6·M) − w·A`. The constant `SUBK·M` is in every channel and is taken from the package.
- Latency is 18 cycles (`LAT_BF`), one butterfly per cycle.

A bypass input (`i_byp`) passes `Y = B, Z = A` through a delay of the same
length, so both modes leave in issue order. The NTT stage described next does
not need this mode. The testbench covers it.

## 4. Chained NTT stage (`ntt_stage`) — the core of the datapath

The NTT unit is a chain of stages (single-path delay feedback). Samples
stream through at one per cycle. Each stage does one radix-2 layer with pair
distance `L = 2^logl`. The stream is cut into blocks of 2L samples:

- **fill** (first L samples of a block): the sample goes into the *sample FIFO*.
- **compute** (next L samples): the head of the sample FIFO is `x[i]` (B) and the incoming sample is `x[i+L]` (A).
  - The butterfly result `Y` goes to a small *sum queue* (32 entries).
  - `Z` goes to the *difference FIFO*.
- **output**: for each block, the stage emits its L sums, then its L differences. That is the order in which the next stage (pair distance L/2) needs them.

The twiddle of block b is `w^bitrev(b)`, with the bit reversal over
`log2(N)−1` bits. With pair distance N/2 first, a chain of `log2 N` stages
turns natural-order input into the transform in bit-reversed order
(Cooley–Tukey). Flow control:

- Valid/ready streams on both sides.
- A compute issue needs only room downstream. It counts credits over the 18 butterfly pipeline slots.
- So a stage never stalls itself, for any L, including L = 1.

**Departure from the classic single-FIFO stage.** The usual stage has one
FIFO of L words. It routes filling samples and outgoing differences back
through the butterfly in bypass mode.

- With a deeply pipelined butterfly, that schedule stalls whenever L is below the pipeline depth.
- Here, samples that need no arithmetic take a direct path, and the differences get their own FIFO.
- The cost is storage: each stage holds about `2L + 32` words instead of L.
- The four stages of the default unit hold FIFOs of 2048/1024/512/256 words (sample side) plus 2080/1056/544/288 words (difference side), at 288 bits each.

The strobes `ev_compute`, `ev_bypass` (fill or difference output) and
`ev_stall` (input offered but not taken) are for observation.

## 5. NTT unit (`rns_ntt_unit`)

The unit has four stages (`NBF = 4`) with sample FIFOs of N/2, N/4, N/8 and
N/16 words. It also has:

- a twiddle bank of N/2 forward and N/2 inverse entries, written by the host;
- an N-word intermediate BUFFER;
- read/write ports to a polynomial bank.

Each pass streams N samples through the chain and does four layers. A
4096-point transform has 12 layers, so it takes three passes:

| pass | reads | writes | pair distances |
|---|---|---|---|
| 1 | polynomial bank | BUFFER | 2048..256 |
| 2 | BUFFER | BUFFER | 128..16 |
| 3 | BUFFER | polynomial bank, at bit-reversed addresses | 8..1 |

- The bit-reversed write-back leaves the bank in natural order.
- If the layers do not divide into passes of four, the stages left over in the last pass become wires (`en = 0`).
- A transform that fits one pass gets a second, all-wire pass that copies the BUFFER back. This way the bank is never overwritten before it has been read.
- The stages take their pair distances from the pass number.
- `inverse` selects the inverse twiddle table. The INTT has no `1/N`; the Hadamard unit applies it.
- Passes do not overlap. The next pass starts after the last write of the previous one.

**Timing at N = 4096:** 16,624 cycles per transform. That is three passes of
4096 samples plus fill and pipeline latency. A single chain of
`log2 N` butterflies would need about `2N`; four butterflies reused three times
trade that for a smaller circuit.

## 6. Negative wrapped convolution (`nwc_ctrl`, `rns_hadamard`, `rns_polymul_top`)

`nwc_ctrl` runs one step at a time. For each step it gives a one-cycle `go`
and waits for the engine's `done`:

| step | engine | operation |
|---|---|---|
| HAD_A_PHI, HAD_B_PHI | Hadamard | `A[i] ← A[i]·phi^i`, the same for B |
| NTT_A, NTT_B | NTT unit | forward transforms |
| HAD_AB | Hadamard | `A[i] ← A[i]·B[i]` |
| INTT_A | NTT unit | inverse transform |
| HAD_NINV | Hadamard | `A[i] ← A[i]·n^-1` |
| HAD_PHIINV | Hadamard | `A[i] ← A[i]·phi^-i` |
| REV | reverse converter | bank A to the result memory |

`rns_hadamard` streams a bank through one `rns_montmul`. It reads one index
per cycle and writes back 15 cycles later, so a pass takes N + 17 cycles.

Every Montgomery product brings a factor `D^-1`. The host therefore loads:

- the twiddles as `w^e·D` and `w^-e·D`;
- the twists as `phi^i·D` and `phi^-i·D`;
- the scale as `n^-1·D²`. The extra D undoes the `D^-1` of the `A''·B''` product, which has no table operand.

All table values are taken mod M and written as residues.

## 7. Conversion

**Forward conversion (`rns_fwd_conv`)** happens as coefficients are written.
The 128-bit value is split into four 32-bit words `X_w`. Each channel then
forms `|Σ X_w·|2^{32w}|_m|_m` with one `mod_mac`. Latency is 2 cycles.

**Reverse conversion (`rns_rev_conv`)** uses base 1 only:

1. `σ_i = |x_i·D_i^-1|_{m_i}`
2. `S = Σ σ_i·D_i`. This is below 4D.
3. Subtract D up to three times to get `S mod D`.
4. Nine shift-and-subtract steps reduce the result mod M.

The final mod M gives the canonical coefficient, because values inside the
multiplier are only bounded. Latency is 4 cycles.

## 8. Top-level interface (`rns_polymul_top`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock; synchronous active-low reset (control state only) |
| `coef_we, coef_sel, coef_addr[11:0], coef_wdata[127:0]` | write coefficient `coef_addr` of A (`sel=0`) or B (`sel=1`); value below M |
| `tbl_we, tbl_sel, tbl_addr[11:0], tbl_wdata[287:0]` | write a table entry in RNS; `tbl_sel`: `TBL_TW_FWD`, `TBL_TW_INV` (index e < N/2), `TBL_PHI`, `TBL_PHIINV` (index i < N), `TBL_NINV` (index 0) |
| `start`, `busy`, `done` | start one product; busy until the one-cycle `done` |
| `res_re, res_addr, res_rdata[127:0]` | read a result coefficient, one cycle after `res_re` |

How to use it:

1. Load the tables once.
2. For each product, write both operands and pulse `start`.
3. Wait for `done`, then read the result.

Writes are accepted only while the unit is idle. For a given N, the host
computes:

- `phi` = a primitive 2N-th root, `PSI8192^(8192/2N)`;
- `w = phi²`;
- the powers of both, times D, mod M.

The testbench `tb_polymul_common.svh` shows this.

Memory of the top: banks A and B (N × 288 bits each), the phi and phi^-1
tables (N × 288), the BUFFER (N × 288), the twiddle bank (N × 288), the
stage FIFOs (section 4) and the result memory (N × 128).

**Cycle counts:**

| N | cycles from `start` to `done` |
|---|---|
| 4096 | 74,549 (three transforms and five Hadamard passes, plus the reverse conversion) |
| 32 | 890 |

## 9. Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- drives random (`$urandom`) and edge-case stimulus;
- compares against a model written independently with wide integer arithmetic (helpers in `tb/tb_rns_util.svh`);
- has a watchdog;
- ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_mod_*`, `tb_barrett_reduce`, `tb_rns_add/sub/mul` | exact results against `%`, including the values 0, m−1 and full-width inputs |
| `tb_mod_mac`, `tb_bajard_ext`, `tb_shenoy_ext`, `tb_rns_montmul` | results and pipeline latency |
| `tb_bajard_ext` | also that α stays below 4 and that both α = 0 and α > 0 occur |
| `tb_rns_montmul` | that both bases agree and that the result is below the bound |
| `tb_rns_butterfly` | both modes, latency 18 |
| `tb_ntt_stage` (N = 4096) | L = 2048, 1024, 16, 2, 1 and the wire mode, against a software model of one layer in stream order; counts computes, bypasses and stalls |
| `tb_rns_ntt_unit` (N = 4096) | 48 outputs against the direct NTT sum; an INTT round trip giving N·x; zero stalls; passes; the cycle budget (16,624 measured) |
| `tb_rns_hadamard`, `tb_rns_fwd_conv`, `tb_rns_rev_conv`, `tb_nwc_ctrl`, `tb_sync_fifo`, `tb_dp_ram` | function and cycle counts |
| `tb_rns_polymul_top` (N = 32) | the whole product against a negacyclic schoolbook product mod M; counts butterflies (3·N/2·log2 N), bypasses, passes, wire stages, transforms and stalls (must be 0) |
| `tb_rns_polymul_full` | the same at the default N = 4096 with no parameter override; 24 coefficients checked, about 20 s in Verilator |
| `tb_rns_polymul_lattice` | a product in `Z_q[x]/(x^1024+1)` with `q = 2^32−5`, embedded as `a(x^4)` into the default N = 4096 build; lifted results are checked mod q against a direct 1024-point product, and coefficients between embedded positions must be 0 |

To run one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/rns_pkg.sv tb/tb_rns_polymul_full.sv \
          --top-module tb_rns_polymul_full && ./obj_dir/Vtb_rns_polymul_full
```

`-y rtl` lets Verilator find each module in `rtl/` by its file name. Only the
package has to be named first.

Simulation is two-state. Datapath registers are not reset, so testbenches
only read what they have written.

## 10. Where this design departs from the usual description of this architecture

- **NTT stage storage.** The stage uses two FIFOs and a direct path instead of one FIFO plus the butterfly bypass (section 4). This makes it stall-free for every pair distance, at about twice the FIFO storage.
- **Output order of a stage.** Sums leave before differences, which the chained Cooley–Tukey order requires. Descriptions that send the sum back into the FIFO and the difference forward describe the other data-flow orientation.
- **Pass overlap.** Passes do not overlap, so the BUFFER is a full N words. Overlapping passes could shrink it to about 3·N/32 words (384 at N = 4096) and save roughly one pass of latency. That is not built.
- **Sub_RNS.** The subtractor adds `6·M` instead of the channel moduli, so that all channels keep describing one integer.
- **Reverse conversion.** It uses the `σ_i·D_i` form of the CRT plus a final mod M, instead of precomputed weights `D_i·|D_i^-1|_i`.
- **Constants.** Constants are computed at elaboration. Tables that depend on N (twiddles, phi powers) are loaded by the host through the table port.
- **Bypass clock gating.** Gating the clock of a butterfly during bypass is not built.
- **Sizes.**
  - The channel width is fixed at 32 bits.
  - A 32-bit-coefficient configuration with 8-bit channels would need a new moduli set.
  - `M` is limited to about 122 bits by `36·M < D`, so 124-bit or 180-bit moduli do not fit.
  - Smaller ring dimensions run on the default build: embed `a(x) → a(x^{4096/n})`, provided the exact integer product stays below M.

## Files

`rtl/`:

- `rns_pkg.sv` — types, moduli, constants
- channel units: `mod_add`, `mod_sub`, `barrett_reduce`, `mod_mul_barrett`, `mod_mac`
- RNS units: `rns_add`, `rns_sub`, `rns_mul`
- `bajard_ext`, `shenoy_ext`, `rns_montmul`, `rns_butterfly`
- `sync_fifo`, `dp_ram`, `ntt_stage`, `rns_ntt_unit`
- `rns_hadamard`, `rns_fwd_conv`, `rns_rev_conv`, `nwc_ctrl`
- `rns_polymul_top`

`tb/`: one testbench per module, the lattice workload test
`tb_rns_polymul_lattice`, and the shared includes `tb_rns_util.svh`
and `tb_polymul_common.svh`.
