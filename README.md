# SPC-turbo codec

A turbo code whose decoder is several times cheaper than that of a classic
turbo code of the same strength. The saving comes from single parity checks
(SPC). A classic turbo code runs every information bit through a long
convolutional code and then punctures bits to set the rate. An SPC-turbo code
instead cuts the interleaved information block into short columns. It adds up
each column modulo 2 and gives only these column sums to a very small (4-state)
convolutional code. The trellis the decoder has to walk is therefore short.
Over all dimensions it is `(1/R - 1) * J * K` sections long for rate `R`, so
at rate 1/2 that is one section per information bit. Each section also has
only 4 states where a comparable classic turbo code needs 16. Strength comes
from using three interleaved dimensions instead of two.

This repository holds synthesizable SystemVerilog for the encoder and for the
iterative soft-decision decoder. It also has self-checking testbenches,
including one that encodes, corrupts and decodes a full 65535-bit block.

## The code

Take an information block `D` of `N = J*K` bits. In each of `M` dimensions,
`D` is permuted and laid out as a `J x K` array. The top `J_E` rows form the
array `E` and the bottom `J_F` rows form `F` (`J = J_E + J_F`). One dimension
encodes its array in three steps:

1. `p_k` = parity (XOR) of column `k` of `E`, for `k = 0..K-1`.
2. `p` drives the recursive systematic convolutional code `C^ = (1+x)/(1+x+x^2)`
   (4 states), which gives a parity sequence `p'`.
3. `q_k` = parity of column `k` of `F` XORed with `p'_k`.

Only `q` (K bits) is sent. `p` and `p'` are implied: `p_k` is the parity of an
`E` column, and `p'_k` is the parity of an `F` column together with `q_k`.
So the "column parity vector" of the dimension, `(p, p')`, is a codeword of
`C^`. The full codeword is `{D, q(1), ..., q(M)}` and the rate is `J/(J+M)`.

The default configuration is `M = 3`, `(J_E, J_F) = (2, 1)`, rate 1/2 and
`K = 21845`, which gives 65535 information bits. The same RTL, with other
parameters, builds the other configurations of this code family:

| configuration          | rate | K used here | information bits |
|------------------------|------|-------------|------------------|
| (2,1), default         | 1/2  | 21845       | 65535            |
| (2,1), short block     | 1/2  | 341         | 1023             |
| (3,0)                  | 1/2  | 341 / 21845 | 1023 / 65535     |
| (6,3)                  | 3/4  | 7282        | 65538            |
| (9,18)                 | 9/10 | 2428        | 65556            |

`C^` is terminated circularly (tail-biting). That needs `K mod 3 != 0`:
`C^`'s zero-input state map has period 3, so for `K` a multiple of 3 there
is no circular state. This is why the table uses 7282 and 2428 instead of the
nearest multiples of `J` below 65535. Both modules that depend on it assert
the condition at elaboration.

### Interleavers

Row `r`, column `k` of dimension `m` holds information bit

    pi_m(r, k) = G(m, r) * K + ((A(m, r) * k + B(m, r)) mod K)

- `G` picks one of the `J` groups of `K` consecutive information bits. The `F`
  rows of dimension `m` take groups `m*J_F .. m*J_F + J_F - 1` (mod `J`).
  In the default configuration every bit is therefore read once in an `F` row
  and twice in `E` rows over the three dimensions. Keeping that balance is the
  one rule the code construction sets for its interleavers.
- `A` is a step coprime with `K`, taken from a table of primes.
- `B` is an offset.

The constants are in `spc_pkg` (`il_group`, `il_mult`, `il_off`). The
hardware steps each row's address by one modular addition per column, in
either direction, so it needs no address table. The published scheme used
random permutations that obey the same grouping rule. These linear ones are a
substitute, chosen for hardware, and a different interleaver changes the code
(but not the RTL structure).

## Encoder (`spc_turbo_enc`, `spc_conv_enc`, `spc_rsc_enc`, `spc_interleaver`)

`spc_turbo_enc` stores `D` in a bit buffer as it arrives, one bit per cycle.
Then `M` copies of `spc_conv_enc` run in lock step, each with its own
interleaver.

Circular termination costs a second pass. Pass 1 computes `p` and runs `C^`
from state 0 to find the end state `S0`. The circular start state is then
`A*S0` (`K mod 3 = 1`) or `A^2*S0` (`K mod 3 = 2`), where `A` is the
zero-input state transition. Pass 2 runs `C^` from that state, and it ends in
the state it started from. Pass 2 emits `q(m)_k` for all `m` in column order,
one column per cycle.

From the last input bit, encoding takes `2K + 2` cycles.

## Decoder

### Soft values

The decoding rules are written for likelihood ratios (LR). The hardware keeps
their logarithms (LLR, `ln P(bit=0)/P(bit=1)`) in fixed point, with 2
fraction bits:

- products of LRs become sums;
- the division in the iteration loop becomes a subtraction;
- the parity function `f(x,y) = (xy+1)/(x+y)` of two LRs becomes
  `sign(a)sign(b)min(|a|,|b|) + c(|a+b|) - c(|a-b|)`, with `c(d) = ln(1+e^-d)`
  read from a four-value table (`spc_fbox`).

The word widths are:

| quantity                         | width | type     |
|----------------------------------|-------|----------|
| channel, a priori and extrinsic  | 8     | `llr_t`  |
| posterior                        | 10    | `post_t` |
| trellis path metric              | 12    | `met_t`  |

The wider posterior matters. A posterior is the channel value plus up to `M`
extrinsic values. If it saturated at the extrinsic width, dividing a stored
extrinsic value back out would wipe out the channel information. With 8-bit
posteriors, the decoder converged for 2 to 3 iterations and then diverged to
an almost entirely wrong word.

### Algorithm of one dimension (`spc_app_dec`)

Each dimension is decoded exactly, in the APP (a posteriori probability)
sense, in three steps. They map to hardware as follows:

- **Step 1, `spc_col_app`.** A forward chain of `f` functions over a column's
  bits gives the LLR that the column's parity bit is 0. That value is the
  a priori LLR of `p_k` for an `E` column, or of `p'_k` for the `[F; q]`
  column.
- **Step 2, `spc_map_section`.** This is a log-MAP (BCJR) decoder of `C^`, with
  `p` as its systematic bit and `p'` as its parity bit. It produces the
  extrinsic LLRs of `p_k` and `p'_k`.
- **Step 3, `spc_col_app`.** A backward chain of `f` functions starts from the
  Step-2 extrinsic value of the column's parity bit. Combined with the forward
  chain, it gives every bit the parity LLR of "all the other bits plus the
  parity bit". That is the bit's extrinsic LLR.

`spc_app_dec` schedules these steps as two passes over the `K` columns, one
column per cycle:

- **Forward pass.** It reads the column's bits through the interleaver and
  divides out this dimension's extrinsic values from the previous iteration.
  It runs Step 1 and updates the forward metric alpha. It stores alpha for
  every column: `K x 4` metrics, which is the decoder's only per-dimension
  working storage.
- **Backward pass.** It reads the same column again, recomputes Step 1 (it is
  not stored) and combines the stored alpha with the running beta to get the
  Step-2 extrinsic values. Step 3 follows. For each information bit it writes
  back the new posterior (`a priori + extrinsic`) and the new extrinsic value.

Within a dimension each information bit belongs to exactly one column. Reads
and write-backs therefore never collide.

The trellis of `C^` is circular, but its start state is not known. A pass
starts from the end metrics that the same dimension reached in the previous
iteration: alpha at `K` becomes alpha at 0, and beta at 0 becomes beta at `K`.
The first iteration of a block starts from all states equally likely. As a
result, errors in the first and last columns of a dimension are harder to
correct in the first iteration. They are cleaned up in later ones.

A pass takes `2K + 1` cycles from `start` to `done`.

### Iteration loop (`spc_turbo_dec`)

The `M` local decoders form a loop. Each one takes the posteriors left by the
previous one, divides out its own extrinsic values from one iteration ago,
decodes, and overwrites the posteriors. The hardware has one `spc_app_dec`
and visits the dimensions in turn. The memories are:

- `post[N]`: posteriors, loaded with the channel LLRs. Loading them is the
  "input" position of the loop's switch.
- `extm[M][N]`: extrinsic values per dimension, cleared to 0 (LR 1) when a
  block is loaded. This is the one-iteration delay of the loop.
- `lq[M][K]`: channel LLRs of the redundant bits.

An iteration takes `M * (2K + 2)` cycles, which is `2 * M * K`: twice the
total trellis length. A decode of `n_iter` iterations finishes
`1 + n_iter * M * (2K + 2)` cycles after `start`.

## Interfaces

All modules use one clock `clk` and an asynchronous active-low reset `rst_n`.
The top, `spc_turbo_codec`, puts the encoder (`enc_*`) and the decoder
(`dec_*`) side by side. The channel between them is up to the user.

| port                                   | use |
|----------------------------------------|-----|
| `enc_in_valid`, `enc_in_bit`, `enc_in_ready` | information bits, bit 0 of the block first; encoding starts after `J*K` bits |
| `enc_q_valid`, `enc_q_bits[M]`, `enc_q_col`  | the `M` redundant bits of column `enc_q_col`, `K` cycles |
| `enc_done`                             | one cycle after the last column; `enc_in_ready` rises again |
| `dec_ld_valid`, `dec_ld_sel`, `dec_ld_addr`, `dec_ld_llr` | while not busy: `sel=0` loads the LLR of information bit `addr`; `sel=m` (1..M) loads the LLR of `q(m)_addr` |
| `dec_start`, `dec_n_iter`              | decode with `n_iter` iterations (0 returns at once) |
| `dec_busy`, `dec_done`                 | status; `done` is a one-cycle pulse |
| `dec_rd_addr`, `dec_rd_llr`, `dec_rd_bit` | combinational read of a posterior and its hard decision (1 = negative LLR) |

LLRs on the ports are two's complement, with 2 fraction bits. A positive LLR
means bit 0. An LLR for BPSK over AWGN is `4 * 2y/sigma^2`, rounded and
saturated to +-127.

## How far it has been checked

Every module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|-----------|----------------|
| `tb_spc_fbox` | all 65025 input pairs of `f`, against the exact formula, within 1 LSB |
| `tb_spc_col_app` | Steps 1 and 3 on random columns, against exact parity LLRs |
| `tb_spc_map_section` | trellis sections against a floating-point BCJR section |
| `tb_spc_rsc_enc` | parity bits, and that the circular state closes, for `K mod 3` = 1 and 2 |
| `tb_spc_interleaver` | permutations, forward/backward symmetry, and the F/E balance |
| `tb_spc_conv_enc`, `tb_spc_turbo_enc` | redundant bits and latency, against a procedural reference encoder (`tb_spc_ref_pkg`) |
| `tb_spc_app_dec` | single-error correction, the write-back rule, and that stored extrinsic values are divided out exactly |
| `tb_spc_turbo_dec` | error-free decoding of noisy 150-bit blocks, and the cycle count |
| `tb_spc_turbo_codec` | the whole codec on 150-bit blocks |

Three benches run the full codec with larger blocks:

- **`tb_spc_turbo_codec_full`** uses the default build. It encodes a
  65535-bit block and sends it over AWGN at Eb/N0 = 1.5 dB, which caused 7819
  channel bit errors. After 10 iterations it decoded the block with no errors.
  It simulates in about 2 s.
- **`tb_spc_workloads`** runs the rate-1/2 (2,1) and (3,0) codes with 1023
  bits at 2.0 dB. It also runs the rate-3/4 (6,3) code at 2.6 dB and the
  rate-9/10 (9,18) code at 4.2 dB, each with about 65535 bits. Each point is
  about 1 dB above the Shannon limit of its rate, and each block decoded
  without errors.

These runs check one block per configuration, not bit error rate curves. The
decoder has not been measured for error rate near the waterfall, where its
fixed-point formats and the handling of the first iteration's boundary will
show.

## Design choices not fixed by the code construction

- Log-domain fixed point, the word widths and the correction table.
- One local decoder time-shared over the dimensions. There is no pipelining:
  one column per cycle with a long combinational path (memory read,
  subtraction, `f` chains, trellis section, `f` chains, write).
- Step 1 is computed twice per column rather than stored.
- The boundary metrics of the circular trellis, as described above.
- Linear-congruential interleavers instead of random ones.
- All columns of a dimension have the same height (`J_E` rows in `E`, `J_F`
  rows in `F`). The construction also allows columns of different sizes; this
  is not supported.
- Block length and code shape are elaboration parameters. The default build
  decodes only 65535-bit blocks of the (2,1) code.
- Memories are plain arrays with several combinational read ports: `M*J` ports
  on the encoder buffer and `J` on each decoder memory. A physical
  implementation would bank them by row. This is not done here.

## Simulating

With Verilator 5, the package comes first, then the testbench reference
package, then the RTL directory as a library:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/spc_pkg.sv tb/tb_spc_ref_pkg.sv -y rtl -y tb \
        tb/tb_spc_turbo_codec_full.sv --top-module tb_spc_turbo_codec_full
    ./obj_dir/Vtb_spc_turbo_codec_full

Each bench prints `TB_RESULT checks=<n> failures=<n>`.

To change the configuration, set `K`, `JE`, `JF` and `M` on `spc_turbo_codec`.
Keep `K mod 3 != 0`. The soft-value widths are in `spc_pkg`. If you change
`LLR_FB`, the correction table `jac_corr` must change with it:
`round(2^FB * ln(1 + exp(-d / 2^FB)))`.

## Files

- `rtl/spc_pkg.sv`: types, widths, trellis of `C^`, interleaver constants.
- `rtl/spc_turbo_codec.sv`: top.
- `rtl/spc_turbo_enc.sv`, `rtl/spc_conv_enc.sv`, `rtl/spc_rsc_enc.sv`,
  `rtl/spc_interleaver.sv`: encoder.
- `rtl/spc_turbo_dec.sv`, `rtl/spc_app_dec.sv`, `rtl/spc_map_section.sv`,
  `rtl/spc_col_app.sv`, `rtl/spc_fbox.sv`: decoder.
- `tb/`: one testbench per module, the full-size and multi-configuration
  benches, and their reference package and helper `tb_codec_case`.
