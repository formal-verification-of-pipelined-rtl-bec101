# AES-128 encryption: a ten-stage pipeline and its iterative twin

This design encrypts 128-bit blocks with AES-128 (FIPS-197) in two ways
that compute exactly the same function:

* **`aes128_pipe`**, the main design: the ten AES rounds are unrolled into ten
  pipeline stages. A new block, with its own key, can enter on every clock;
  its ciphertext leaves ten clocks later. Ten blocks are in flight when the
  pipeline is full.
* **`aes128_seq`**: one round unit is reused for all ten rounds. It takes one
  block at a time and needs ten clocks per block plus a load clock.

The two exist together because of how the design is meant to be trusted.
The iterative core is the small, obvious implementation: it is checked
against an algorithmic model of AES. The pipelined core is then checked
against the iterative one, block by block. If the iterative core matches
the model and the pipeline matches the iterative core, the pipeline matches
the model. The included testbenches carry out this chain by simulation.
`aes128_top` places both cores side by side, each with its own ports.

Only encryption is implemented, and only with 128-bit keys.

## Data layout

A block or key is a `logic [127:0]` whose top byte is byte 0 of the block.
This is the order in which AES test vectors are written, so
`128'h00112233445566778899aabbccddeeff` is the FIPS-197 example plaintext
as printed. The sixteen bytes fill a 4×4 matrix column by column: byte
`i` is row `i % 4`, column `i / 4`, at bits `[127-8*i -: 8]`. A round key
is four 32-bit words `w0..w3`, with `w0` in the top bits.

## The round datapath

`aes_round` is combinational:

```
state ──SubBytes──ShiftRows──MixColumns──┬──AddRoundKey── next state
                       │                  │       ▲
                       └──── last_round ──┘   round key
```

| Step | Module | What it does |
|------|--------|--------------|
| SubBytes | `sub_bytes`, `aes_sbox` | each byte through the AES S-box (16 in parallel) |
| ShiftRows | `shift_rows` | row r rotated left by r bytes; wiring only |
| MixColumns | `mix_columns` | each column times the matrix `[2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2]` in GF(2^8) mod x^8+x^4+x^3+x+1 |
| AddRoundKey | `add_round_key` | XOR with the round key |

The last round of AES leaves out MixColumns. `last_round` selects this. In
the pipeline each stage ties `last_round` to a constant, so synthesis keeps
only the logic that stage uses. The iterative core drives it from its round
counter.

The S-box is not typed in as a table. `aes_pkg::sbox_table()` builds it at
elaboration from its definition. It takes the inverse of each byte in
GF(2^8), found with exponent/logarithm tables of the generator 3, and
applies the AES affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`.
The result is the package constant `SBOX`. Every `aes_sbox` indexes it, so
each S-box becomes a 256×8 lookup.

## Key schedule, one step at a time

No key schedule is stored. `key_expand_step` turns round key n−1 into round
key n:

```
w0' = w0 ^ SubWord(RotWord(w3)) ^ {rcon(n), 24'h0}
w1' = w1 ^ w0'    w2' = w2 ^ w1'    w3' = w3 ^ w2'
```

`RotWord` rotates the word left by one byte. `SubWord` passes its four bytes
through S-boxes. `rcon(n) = x^(n-1)` in GF(2^8) (01, 02, 04, …, 80, 1b, 36),
held in a table built at elaboration. Round key 0 is the cipher key itself,
and it whitens the plaintext before round 1.

## `aes128_pipe`: the ten-stage pipeline

```
        stage 1                     stage 2               stage 10
pt ─⊕─ round 1 ─▶[reg]─ round 2 ─▶[reg]─ … ─ round 10 (no MixColumns) ─▶[reg]─ ct
key ┴─ step 1 ──▶[reg]─ step 2 ──▶[reg]─ … ─ step 10 ─────────────────▶[reg]
in_valid ──────▶[ v ]───────────▶[ v ]─ … ────────────────────────────▶[ v ]─ out_valid
```

Stage n computes round n and, in parallel, round key n from the round key
its register bank received from stage n−1. The state and the round key are
registered together (a packed struct per stage), so the key travels with its
block. Each block can therefore use a different key, and changing key costs
nothing.

Interface and timing:

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk_i`, `rst_ni` | in | 1 | clock; asynchronous reset, active low |
| `in_valid` | in | 1 | a block enters on this rising edge |
| `plaintext`, `key` | in | 128 | block and its cipher key |
| `out_valid` | out | 1 | ciphertext valid |
| `ciphertext` | out | 128 | result |

* A block taken on edge t appears with `out_valid` high after edge t+10.
* Throughput is one block per clock. There is no back-pressure, so the
  receiver must accept every output.
* Blocks leave in the order they entered. Gaps in the input travel through
  as gaps.
* Reset clears only the valid bits. Data registers load only when their
  valid input is set and are meaningless while invalid.

The critical path of a stage is the S-box lookup of the key step, followed by
the three-word XOR chain and the AddRoundKey XOR. The data path runs in
parallel: S-box, MixColumns, XOR. A faster clock would need a register
inside the round. The design does not do that.

## `aes128_seq`: the iterative core

One `aes_round` and one `key_expand_step` are wrapped in a two-state machine
(`S_IDLE`, `S_RUN`) with a 4-bit round counter.

* `start` is taken on a rising edge while `busy` is low. The state register
  loads `plaintext ^ key` and the key register loads `key`.
* On each of the next ten edges, the core derives the next round key and
  applies one round. Round 10 bypasses MixColumns.
* `done` pulses for one clock after the tenth round, 10 clocks after the
  start edge. `ciphertext` holds the result until the next start.
* `start` is ignored while `busy` is high.
* An assertion checks that the round counter stays in 1..10 while busy.
* Reset clears all registers.

## How the design is checked

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/aes_ref_pkg.sv`, an AES model written separately from the RTL:

* its S-box comes from a different construction (a walk over powers of 3
  and of its inverse);
* it expands the full 44-word key schedule;
* it works on a byte matrix.

The model reproduces the FIPS-197 vectors 69c4e0d8… (Appendix C.1) and
3925841d… (Appendix B). The testbenches also check those vectors and the
published intermediate values of the Appendix B example directly.

| Testbench | What it exercises |
|-----------|-------------------|
| `aes_sbox_tb` | all 256 inputs |
| `sub_bytes_tb`, `shift_rows_tb`, `mix_columns_tb`, `add_round_key_tb` | FIPS-197 round-1 values and 2000 random states |
| `key_expand_step_tb` | ten chained steps against the full schedule, FIPS-197 key and 200 random keys |
| `aes_round_tb` | the ten rounds of the FIPS-197 example; random states in both modes |
| `aes128_pipe_tb` | 342 blocks with a new key each, bursts and gaps; in-order results at exactly 10 clocks; at least ten blocks in flight |
| `aes128_seq_tb` | 202 blocks; latency 10; `busy`/`done` behaviour; starts during busy ignored; result held |
| `aes128_top_tb` | both cores on the same 120 blocks (see below) |

`aes128_top_tb` is the end-to-end test, run at the design's only
configuration. The pipelined core receives the blocks as a stream with a
long burst and random gaps. The iterative core processes the same blocks one
by one, with extra starts poked in while it is busy. Every block is compared
three ways: iterative against the model, pipelined against iterative, and
pipelined against the model.

The test also counts how often each mechanism occurred, and each must occur
at least once:

* the pipeline holding ten blocks;
* back-to-back blocks;
* bubbles;
* neighbouring blocks with different keys;
* ignored starts.

Simulation only samples the input space. Proving the two cores equal for all
2^256 (plaintext, key) pairs needs a formal equivalence check, which any
SAT-based equivalence tool can do. Compare `aes128_pipe` against
`aes128_seq` (after ten clocks) or against a combinational unrolling of
`aes_round`. That proof is not part of this repository.

## Simulating

With Verilator 5, from the repository root (the package files first):

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes128_top_tb.sv --top-module aes128_top_tb
./obj_dir/Vaes128_top_tb
```

Replace `aes128_top_tb` with any other testbench name. Each run takes well
under a minute.

## Size

Coarse synthesis of `aes128_top`, both cores, gives about 2,700 flip-flop
bits:

* the pipeline: 10 stages × (128 state + 128 key + 1 valid), less the last
  stage's key register, which nothing reads;
* the iterative core: about 260.

There are about 220 S-box lookups of 256×8 bits each:

* the pipeline: 10 × (16 + 4);
* the iterative core: 20.

How the lookups are mapped (ROM, LUTs or composite-field logic) is left to
the synthesis tool.

## Choices made here, and limits

* **Register placement.** There is one register bank per round, after the
  round logic. The initial key addition shares stage 1 with round 1. This
  gives the ten-blocks-in-flight behaviour of a round-per-stage pipeline. A
  different cut (for example registering the whitened input, or splitting
  rounds) changes the latency, not the function.
* **Handshakes.** Both handshakes and the reset style are this design's own:
  valid-only for the pipeline, start/busy/done for the iterative core.
* **On-the-fly keys.** Both cores compute round keys on the fly instead of
  expanding and storing the key schedule first. The results are the same.
* **Shared round module.** The regular round and the final round are one
  module with a select input rather than two modules.
* **Constants.** The S-box, the MixColumns matrix and the round constants
  are the standard AES ones from FIPS-197.
* **Not implemented.** Decryption, and key sizes of 192 and 256 bits, are
  not implemented. AES-192 would need a 192-bit key path, a different key
  step and 12 rounds.
* **No back-pressure and no key storage.** The pipeline has no back-pressure.
  Neither core keeps keys between blocks: supply the key with every block.
