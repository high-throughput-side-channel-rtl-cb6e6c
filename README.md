# Masked LOL2.0-Mini style stream cipher and AEAD engines

This design is a hardware engine for a LOL2.0-Mini style stream cipher with an
SCMAC-style authenticated mode (AEAD). It is organised for first-order
masking against power analysis. The masked S-box gadget is, for now, a
functional stand-in (see "Sharing and the R core"), so the design as
delivered is not yet secure.

The cipher's only nonlinear part is the AES S-box inside a round function R.
So the whole protection problem becomes the problem of evaluating R on
Boolean shares. Every secret register is kept as two shares, and the state
update outside R is pure XOR and bit permutation. Those linear parts run
share by share, and the shares never meet.

R is built from pipelined two-share S-box gadgets. Each gadget has two
register stages and uses 46 fresh random bits per call. A masked R therefore
costs two cycles of latency. The engine hides that latency with a schedule:

- Each cycle it issues one state register to each R core.
- It collects each result as it comes out of the pipeline.
- It updates the state once all results of a traversal are in, while the
  next traversal is already being issued.

The same design is available with one masked core (compact) or five (fast).
Two unmasked engines sit next to it as baselines. All three compute the same
function.

## What is in the box

| Engine | Module | Nonlinear resources | Cycles per 128-bit block (SC / AEAD) |
|---|---|---|---|
| masked, fast (default) | `lol2_masked`, `ARCH = ARCH_FAST` | 5 masked 128-bit R cores, 3680 random bits/cycle | 4 / 4 |
| masked, compact | `lol2_masked`, `ARCH = ARCH_COMPACT` | 1 masked R core, 736 random bits/cycle | 5 / 9 |
| unmasked, fast | `lol2_unmasked_fast` | 9 full R functions (144 S-boxes) | 1 / 1 |
| unmasked, compact | `lol2_unmasked_compact` | 3 32-bit R column units (12 S-boxes) | 7 / 12 |

`lol2_top` puts the three engines side by side on one clock and reset. Each
engine has its own ports: `m_*` for the masked engine, `uf_*` for
unmasked-fast and `uc_*` for unmasked-compact.

Given the same key, IV and data, the three engines return the same
ciphertext and tag. This is how the testbench checks them against each other
and against a software reference.

The masked engines start the next traversal while the previous one is still
draining the pipeline. This gives one block every 5 (SC) or 9 (AEAD) cycles
on the compact engine, and one initialization round every 5 cycles on both.
The fast engine's SC and AEAD lists cannot overlap with this design's round
equations, so it takes 4 cycles per block. The published design takes 2
(see "Departures").

## The state

The encryption state S holds six 128-bit registers:

- L and H form a linear feedback shift register.
- N is a nonlinear feedback register.
- S0, S1 and S2 form a small finite-state machine.

An extra register G holds an intermediate R result, so two R calls can be
chained inside one round. In AEAD mode, a second state E = (E0, E1, E2, E3)
accumulates the authentication data. It is kept apart from S except at two
points: E is copied from S after initialization, and E is folded back into S
before tag generation.

The LFSR feedback is `f(H, L) = lambda(H) ^ sigma(L)`. Both functions work on
eight 16-bit words, with word 7 in bits 127:112.

- `lambda`: `(h7<<5 ^ h6>>11, h6<<5, h5<<5 ^ h4>>11, h4>>6, h3>>6, h2<<5, h1<<5 ^ h0>>11, h0>>6)`. The shifts are logical shifts inside each 16-bit word.
- `sigma`: the word permutation `(x7..x0) -> (x5, x0, x3, x6, x4, x7, x2, x1)`.

### The round

R is one AES round without the key addition: `MixColumns(ShiftRows(SubBytes(x)))`.
Bytes are numbered from the most significant end, and byte `4c+r` is row `r`
of column `c`.

One round, with all operations per share (`lol_linear_update`):

```
Z   = R(G) ^ S1 ^ L                          keystream
S2' = R(S1) ^ L     S1' = R(S0) ^ H     S0' = R(N) ^ S2
N'  = N ^ R(G)      G'  = R(S2) ^ H
L'  = H ^ fz        H'  = lambda(H) ^ sigma(L) ^ fz        fz = fb ? Z : 0
E0' = R(E3) ^ x     E1' = R(E0) ^ E2    E2' = R(E1) ^ E3    E3' = R(E2) ^ E0
```

`fb` feeds the keystream back into the state during initialization and tag
generation. `x` is the data block absorbed into E, and it goes to share 0 only.

**These XOR equations are this design's own.** The register set, the LFSR,
the use of R on each register, the chained G and the keystream feedback all
follow the LOL2.0 structure. The exact wiring between them is a stand-in, so
the keystreams are not LOL2.0-Mini test vectors. Once the real equations are
known, only `lol_linear_update` and the reference model `tb/lol_ref_pkg.sv`
need to change, and both change in the same way. The schedule, the pipelines
and the control are not affected.

## An operation, phase by phase (`lol_phase_ctrl`)

| Phase | Length | What happens |
|---|---|---|
| LOAD | 1 cycle | `L = IV`, `H = key[127:0]`, `N = key[255:128]`; S0..S2, G and E are cleared |
| INIT | `N_INIT` rounds | keystream fed back, no output |
| COPY | 1 cycle, AEAD | `E = (S0, S1, S2, N)` |
| AD | one round per AD block, AEAD | E absorbs the block; S is not touched |
| MSG | one round per message block | S makes Z and the engine outputs `din ^ Z`; in AEAD mode E absorbs the plaintext block in the same round |
| LEN | 1 round, AEAD | E absorbs `Theta = {ad_blocks*128 (64 bit), msg_blocks*128 (64 bit)}` (bit lengths) |
| FINX | 1 cycle, AEAD | `S0 ^= E0, S1 ^= E1, S2 ^= E2, N ^= E3` |
| FIN | `N_FIN` rounds, AEAD | keystream fed back; the last round's Z is the tag |

The default `N_INIT = N_FIN = 12` matches the published short-message cycle
counts. For example, unmasked-fast needs 14 cycles for a 2-block SC message,
and unmasked-compact needs 14 × 8 cycles.

## The masked engine (`lol2_masked`)

### Sharing and the R core

- `tsm_sbox` is a two-share AES S-box with two register stages. It accepts a
  new input every cycle and consumes 46 random bits per call.
- `masked_r_core` puts 16 gadgets side by side, using
  `rnd[46k +: 46]` for byte `k`. It then applies ShiftRows and MixColumns to
  each share separately. Latency is 2 cycles, the initiation interval is 1,
  and it uses 736 random bits per cycle.

**The gadget is a functional stand-in.** It has the interface and timing of a
time-sharing-masking (TSM) gadget: share 0 is handled in stage 1, share 1 in
stage 2, and 46 random bits are consumed. Inside, however, stage 2 evaluates
the S-box on the recombined value. It computes the right function, but it
gives **no side-channel protection**. To make the design secure, replace
`tsm_sbox` with a real TSM gadget that has the same ports (two stages, 46
random bits). Nothing else needs to change.

### Schedule (`lol_scheduler`)

A traversal issues a list of registers to the cores, one list item per cycle.
An item is a single register, or a tuple with one register per core.

| List | Compact (1 core) | Fast (5 cores) |
|---|---|---|
| INIT / FIN | S2, S1, S0, N, G | the same, on core 0 |
| SC | S2, S1, S0, N, G | (S0, S1, S2), then (N, G) |
| AEAD | E3, E0, E1, E2, S2, S1, S0, N, G | (E3, E2, E1, E0, G) on cores 0..4, then (S1, N, S2, S0) on cores 0..3 |
| EABS (AD, length) | E3, E0, E1, E2 | E3, E2, E1, E0 in one step |

Each R call travels through its core's pipeline with a tag that names the
register. When it comes out, the call's result is stored in that register's
slot of a result buffer; this is the "output select". Results that arrive in
the same cycle are forwarded. This is why the lists may issue registers in
any order.

### Traversal timing

A traversal issues its list in `n_steps` cycles. Its last result comes out of
the pipeline two cycles after the last issue. In that cycle the two
`lol_linear_update` instances (one per share) compute the new state, and it
is written.

The next traversal of the same phase can start in the cycle right after the
last issue, before that commit. Its first two items then read the *pending*
new state, which is the linear update's output, not the registers. This is
safe only if the inputs those two items need have already come out of the
pipeline. With the round equations above, that holds for:

- the INIT/FIN list: `S2' = R(S1) ^ L`, and `R(S1)` was issued second;
- the compact SC list (the same order);
- the compact AEAD list: `E3' = R(E2) ^ E0`, and `R(E2)` was issued fourth.

These lists give one traversal every `n_steps` cycles: 5 for INIT/FIN and
compact SC, 9 for compact AEAD.

The other lists wait for the commit and take `n_steps + 2` cycles:

- fast SC: the next S0 is issued one cycle after N, so `R(N)` is still in
  the pipeline when `S0' = R(N) ^ S2` is needed;
- fast AEAD: the next G is issued one cycle after S2, so `R(S2)` is still in
  the pipeline when `G' = R(S2) ^ H` is needed;
- the E-only list.

The first traversal of a phase also waits for the commit, and so does a
traversal whose input block arrives late.

Examples, at `N_INIT = 12`:

- masked-fast SC: the first block comes out 1 + 12×5 + 2 + 4 cycles after
  `start`;
- masked-compact SC: 1 + 12×5 + 2 + 7 cycles.

For a message block, the engine outputs `dout`, `z_sh0` and `z_sh1` one cycle
after its traversal commits. A data block is accepted (`din_valid && din_ready`)
in the cycle its traversal starts. A missing block stalls the engine; it
stays in the same state.

`rnd` must carry `NCORES * 736` fresh bits **in every cycle**. The engine
does not gate randomness for idle cores.

The key enters as two shares, `key_sh0 ^ key_sh1`. The IV is public and is
loaded into share 0.

## The unmasked engines

`lol2_unmasked_fast` uses one full R function (`lol_r_func`, 16 S-boxes) per
register that goes through R, nine in all. It completes one round per cycle.

`lol2_unmasked_compact` has three 32-bit units (`lol_r_col`). Each unit
applies four S-boxes and one MixColumns column to a single output column of
R(x). ShiftRows is done by how the column is gathered: output column `c`,
row `r` takes input byte `4((c+r) mod 4) + r`. The register list is cut into
column jobs, three per cycle:

- SC rounds: 20 jobs, 7 cycles;
- AEAD rounds: 36 jobs, 12 cycles;
- AD and length rounds: 16 jobs, 6 cycles.

## Interface (all engines)

| Port | Meaning |
|---|---|
| `start`, `mode_i` (`MODE_SC` / `MODE_AEAD`), `iv`, `key` or `key_sh0`/`key_sh1`, `ad_blocks_i`, `msg_blocks_i` | Sampled at `start`; ignored while `busy`. |
| `din`, `din_valid`, `din_ready` | AD blocks first, then message blocks; one 128-bit block per round. |
| `dout`, `dout_valid` | Ciphertext block, registered. The engine decrypts too, since ciphertext = plaintext ^ Z. |
| `z` / `z_sh0`, `z_sh1` | Keystream of the same block; two shares on the masked engine. |
| `tag`, `tag_valid` | AEAD tag, after the last FIN round. |
| `busy`, `done` | `done` pulses once per operation. |
| `rnd` | Masked engine only: fresh randomness, 736 bits per core per cycle. |

Reset (`rst_n`, asynchronous, active low) clears only the control state. The
datapath is written by LOAD before it is read.

Parameters:

- `ARCH`: `ARCH_FAST` (default) or `ARCH_COMPACT`; masked engine only.
- `N_INIT`, `N_FIN`: number of initialization and tag-generation rounds,
  default 12.
- `CNT_W`: width of the block counters, default 32.

## Departures from the published design

- **Cycles per block.**
  - Masked-compact matches the published 5 / 9 cycles, and initialization
    matches at 5 cycles per round.
  - Masked-fast takes 4 cycles per block, against the published 2. With
    this design's round equations, the fast lists need results that are
    still in the pipeline.
  - Every phase change costs 2 extra cycles while the pipeline drains.
  - Unmasked-compact SC takes 7 cycles against the published 8. AEAD
    matches at 12, and unmasked-fast matches at 1.
- **S-box gadget.** It is functional only (see above). The design as
  delivered is not side-channel secure.
- **Round equations, R's linear layer, load format, Theta encoding and
  `N_INIT`/`N_FIN`.** These are this design's choices, as described above.
  The keystream is therefore not LOL2.0-Mini's.
- **Not built.** There is no fresh-randomness source; the published design
  assumes an external PRNG, and here it is the `rnd` input. The FPGA
  measurement setup is not part of the design either.

## Verification

`tb/lol_ref_pkg.sv` is an independent software model: a class with its own
S-box (brute-force inverse), AES round, lambda, sigma and phase sequence.
Every block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_aes_sbox`, `tb_lol_r_func`, `tb_lol_r_col` | S-box over all 256 inputs; R against the model; column units with every column |
| `tb_tsm_sbox`, `tb_masked_r_core` | Recombined outputs against the model, latency 2, one input per cycle, output shares that change with the randomness |
| `tb_lol_linear_update` | Random states and R results against the model's round; fixed lambda/sigma vectors |
| `tb_lol_scheduler`, `tb_lol_phase_ctrl` | Every list step by step; rounds per phase, flags and the done pulse for SC and AEAD operations |
| `tb_lol2_unmasked_fast`, `tb_lol2_unmasked_compact`, `tb_lol2_masked` | Full SC and AEAD operations against the model, block period, time to the first block, stalls (masked: both architectures) |
| `tb_lol2_top` | All three engines at default parameters, running the same operations in parallel; every mechanism (SC, AEAD, AD, stall, feedback, copy, fold-back, tag) is counted per engine, plus overlapped traversals in the masked engine |
| `tb_lol2_workloads` | Messages of 32 B to 16384 B in SC and AEAD mode on all four variants (both masked architectures); every block and tag checked; total cycles must grow by exactly one block period per block |

Cycles from `start` to `done` for a 16384-byte message (1024 blocks, no AD),
and the resulting throughput at the clock each variant is meant for. The
masked-compact and unmasked-fast numbers land within 0.3 % of the published
results for the same lengths. Masked-fast is at half the published rate (4
instead of 2 cycles per block). Unmasked-compact SC is above it (7 instead of
8 cycles per block).

| Variant | Clock | SC cycles | SC Gbps | AEAD cycles | AEAD Gbps |
|---|---|---|---|---|---|
| masked fast | 2.22 GHz | 4159 | 69.96 | 4226 | 68.85 |
| masked compact | 2.22 GHz | 5185 | 56.12 | 9351 | 31.12 |
| unmasked fast | 1.43 GHz | 1037 | 180.75 | 1052 | 178.17 |
| unmasked compact | 4 GHz | 7253 | 72.29 | 12465 | 42.06 |

To simulate with Verilator:

```
verilator --binary --timing --assert --top-module tb_lol2_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/lol_pkg.sv tb/lol_ref_pkg.sv tb/tb_lol2_top.sv
./obj_dir/Vtb_lol2_top
```

Use the same command with another `tb_*` as the top module to run that block's
testbench.
