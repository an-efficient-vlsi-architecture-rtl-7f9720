# Pipelined AES-128 with on-the-fly round keys

This is an AES-128 (Rijndael, 128-bit block, 128-bit key) engine in synthesizable
SystemVerilog. Its main idea is that key expansion is not a separate phase. Each
round key is computed one round ahead of the round that needs it, in parallel with
the round before. When a round starts, its key is already in a register. So the key
schedule adds nothing to the critical path of a round, and no expanded key has to be
stored.

The design has three engines:

| engine | module | structure | throughput | latency |
|---|---|---|---|---|
| encryption pipeline | `aes_enc_pipeline` | 10 unrolled rounds, one register per round | 1 block / clock | 11 clocks |
| decryption pipeline | `aes_dec_pipeline` | same, inverse rounds, key schedule run backwards | 1 block / clock | 11 clocks |
| iterative encryptor | `aes_enc_iter` | one round block reused, one round per clock | 1 block / 11 clocks | 12 clocks from the `ld` cycle |

`aes_top` places the three engines side by side, each with its own ports.

## The cipher in brief

The 128-bit block is held as a 4x4 array of bytes, the *state*. Byte `i` of the input
is `s[i%4][i/4]`, so each column is one 32-bit word. In the vectors this is bits
`[127-8*i -: 8]`, the byte order of FIPS-197.

Encryption works as follows:

* First the state is XORed with the cipher key (AddRoundKey with round key 0).
* Rounds 1 to 9 each apply SubBytes, ShiftRows, MixColumns and AddRoundKey.
  * SubBytes looks up each byte in the S-box.
  * ShiftRows rotates row `r` left by `r` bytes.
  * MixColumns multiplies each column by a fixed polynomial over GF(2^8).
* Round 10 is the same as the others but leaves out MixColumns.

Decryption runs the inverse steps in this order: InvShiftRows, InvSubBytes,
AddRoundKey, InvMixColumns. The last decryption round leaves out InvMixColumns.

Key expansion turns the 4-word key into 44 words, four per round key. In round key
`n+1`:

* The first word is `w[4n] ^ SubWord(RotWord(w[4n+3])) ^ {rcon, 24'h0}`.
* Each of the other three words is the previous new word XORed with the word four
  positions back.

## Overlapping key generation with the rounds

The building block is `aes_enc_round`. It is combinational and contains two
independent paths:

```
state_i ──SubBytes──ShiftRows──MixColumns*──AddRoundKey── state_o
                                                 ▲
key_i (round key n) ─────────────────────────────┤
            └──────────key step (rcon)─────────────────── key_next_o (round key n+1)
                                         * bypassed when last_i
```

The key path reads only `key_i`, never the state. It therefore runs alongside the
round logic, and its result is registered next to the round's result. The critical
path of a stage is the longer of the round path and the key path, not their sum. For
decryption, `aes_dec_round` has the same shape. Its key path runs the schedule one
step backwards:

* `w[4n+3] = w[4n+7] ^ w[4n+6]`
* `w[4n+2] = w[4n+6] ^ w[4n+5]`
* `w[4n+1] = w[4n+5] ^ w[4n+4]`
* `w[4n] = w[4n+4] ^ SubWord(RotWord(w[4n+3])) ^ rcon`

## The pipelines

```
pt, key ─► ARK0 / key step 0→1 ─►[R]─► round 1 ─►[R]─► round 2 ─► … ─►[R]─► round 10 ─►[R]─► ct
                                 valid,state,key    valid,state,key        valid,state,key
```

* Every stage register `[R]` holds a valid bit, the 128-bit state and the round key
  for the round that follows it. The key travels with its data block. Consecutive
  blocks can therefore use different keys with no set-up time, and no key RAM is
  needed.
* `ld_i` is a plain valid strobe. The pipeline never stalls and has no
  back-pressure: whatever is presented with `ld_i` high comes out 11 clocks later
  with `valid_o` high.
* `aes_enc_pipeline` also outputs `last_key_o`, the block's round-10 key.
  `aes_dec_pipeline` takes that round-10 key as its key input (`last_key_i`). It
  works back to round key 0 and outputs it as `cipher_key_o`. To decrypt under a
  cipher key, first get its round-10 key, for example by encrypting any block with
  it.
* Only the valid bits are reset (synchronous, active-low `rst_n`). The data
  registers need no reset.
* After round 10 there is an output register, which puts the latency at 11 clocks.
  Removing it gives a latency of 10, but the output then comes straight from
  combinational logic.

## The iterative encryptor

`aes_enc_iter` uses a single `aes_enc_round` and steps through these phases:

`reset → wait for ld → r0 → r1 → … → r10 → (r0 if ld, else wait for ld)`

* With `ld_i` high in the wait phase, the plaintext and key are loaded.
* In r0 the core applies the initial AddRoundKey and computes round key 1.
* In r1 to r10 it writes back the round result and the next round key on the same
  clock edge.
* At the end of r10 it writes `ciphertext_o` and pulses `done_o` for one cycle.
* `ready_o` is high in the wait phase and in r10. A load during r10 starts the next
  block with no idle cycle, so back-to-back blocks finish every 11 clocks.
* `ld_i` is ignored while `ready_o` is low.
* Concurrent assertions in the module check three handshake rules: `done_o` only
  follows r10, the round counter never passes 10, and r0 is entered only through a
  load.

## S-box tables

The S-box is not typed in as a table. `aes_pkg` computes it during elaboration:

1. `gen_sbox` builds exponent and logarithm tables over GF(2^8), modulo
   x^8+x^4+x^3+x+1, with generator 3.
2. It inverts each byte as `exp[255 - log[x]]`, with 0 mapping to 0.
3. It applies the affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`.

The inverse table is made by inverting the forward table. Each lookup becomes a
256x8 ROM.

Synthesis therefore sees 16 S-box ROMs per round plus 4 per key step. In the
encryption pipeline that is 200 ROMs: 10 rounds of 16, plus 10 key steps of 4. The
decryption pipeline has the same number. MixColumns uses only `xtime` and XOR.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | types, constants (`NB=4`, `NK=4`, `NR=10`), GF helpers, S-box and rcon tables |
| `rtl/aes_sub_bytes.sv`, `aes_shift_rows.sv`, `aes_mix_columns.sv` | the round steps; `INVERSE` parameter selects the decryption variant |
| `rtl/aes_add_round_key.sv` | state XOR round key |
| `rtl/aes_key_step.sv` | one key-expansion step, forward or (`INVERSE=1`) backward |
| `rtl/aes_enc_round.sv`, `aes_dec_round.sv` | one round plus the parallel key step |
| `rtl/aes_enc_pipeline.sv`, `aes_dec_pipeline.sv` | the unrolled pipelines |
| `rtl/aes_enc_iter.sv` | the iterative encryptor |
| `rtl/aes_top.sv` | the three engines side by side |
| `tb/aes_ref_pkg.sv` | independent behavioural AES model used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench:

* compares the block with `aes_ref_pkg`;
* prints `TB_RESULT checks=N failures=M` at the end;
* stops with a failure if its watchdog runs out.

The reference model is written a different way from the RTL:

* The S-box inverse is computed as x^254 with a bit-serial multiplier.
* MixColumns is written as a general GF(2^8) matrix product.
* The key schedule is the textbook 44-word array.

The model is checked against the known-answer vectors of FIPS-197 (Appendix B and
C.1). The step-level testbenches also check the intermediate values of round 1 of
the FIPS-197 worked example.

* Step testbenches: every S-box entry, random states in both directions, and the
  forward and backward key steps over whole key schedules.
* `tb_aes_enc_pipeline` / `tb_aes_dec_pipeline`: 400 / 300 blocks, each with its
  own random key, in bursts with random gaps. They check:
  * the ciphertext or plaintext;
  * the key outputs;
  * a latency of exactly 11 clocks;
  * one burst of 40 / 30 blocks that must come out with no gaps.
* `tb_aes_enc_iter`: starts from the wait phase and back to back. It checks that
  `ld` is ignored while busy, the latency of 12 clocks, and the 11-clock spacing
  between back-to-back blocks.
* `tb_aes_top`: end to end at the default configuration. Encryption output feeds
  straight into decryption, and the result must be the original plaintext and key.
  A share of the blocks also runs through the iterative engine. The test counts, and
  requires at least once: back-to-back input, a pipeline bubble, a key change, key
  reuse, a round trip, and an iterative start from wait, back to back, and with `ld`
  ignored.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_top \
    -Irtl -Itb -y rtl -y tb rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv
./obj_dir/Vtb_aes_top
```

Each testbench runs in seconds.

## Where this design makes its own choices

The following points are design decisions of this implementation, not part of the
description it was built from:

* **AES-128 only.** Rijndael also allows 192- and 256-bit keys. They would need a
  wider key step and 12 or 14 stages. They are not built.
* **Matrices and constants.** The S-box, the MixColumns matrices, the reduction
  polynomial and the round constants are those of the AES standard.
* **Decryption key handling.** Giving the decryption pipeline the round-10 key and
  running the key schedule backwards was chosen so that decryption keeps on-the-fly
  keys. The alternative is to expand the key forwards first and store the round
  keys.
* **Interfaces.** The `ld`/`valid` interface, the output register and the reset
  scheme are this design's own.
* **Iterative engine timing.** The iterative engine keeps the round key exactly one
  round ahead of the state. Other timings are possible, such as computing the keys
  during reset and waiting, or keeping them two rounds ahead.
* **Not modelled.** FPGA-specific mapping, such as block RAM for the S-boxes, is not
  modelled. Timing and area on a particular device were not evaluated.
