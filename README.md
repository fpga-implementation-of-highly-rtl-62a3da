# Parallel AES-128-GCM engine, eight blocks per clock

AES-GCM gives confidentiality and authentication in one pass. AES in counter
mode (GCTR) makes the ciphertext. GHASH, a chain of multiplications in
GF(2^128), makes the authentication tag. Counter mode parallelises freely,
but GHASH as usually written is serial: `Y <- (Y xor B) * H` per 128-bit
block. That one multiplication in a feedback loop caps throughput.

This engine removes the cap by working on **Q = 8 blocks per clock cycle**:

* eight fully unrolled, pipelined AES-128 cores run side by side in counter
  mode; and
* GHASH absorbs all eight blocks of a beat in one cycle. It uses eight
  multipliers, each with a different power of the hash subkey, `H^8 ... H^1`.

The powers are computed once per key. `H^2`, `H^4` and `H^8` come from
squaring networks, which are XOR gates only. The four other powers take one
multiplier each. One beat of 8 x 128 = 1024 bits is taken per cycle. The
first result appears after the 10-cycle AES latency.

## Block structure

```
                 key ──► aes_key_expand ──► round keys (shared by all lanes)
                                               │
 iv, beats ──► beat sequencer ──► gctr_parallel ─────────────────────────┐
 (aes_gcm_top)    │               ├ gcm_inc   (Q counter blocks/cycle)   │
                  │               ├ Q x aes_pipe (10 stages each)        │
                  │               │    └ aes_round x10 ─ aes_sbox x16    │
                  │               └ 10-stage delay line for data + kind  │
                  │                                                      ▼
                  │              beat kind at output:  HKEY ─► hash_key_powers (H^1..H^8)
                  │                                    J0   ─► E_K(J0) register, GHASH clear
                  │                                    AAD/DATA/LEN ─► ghash_parallel
                  └───────────────────────────────────────────── tag = Y xor E_K(J0)
```

| module | role |
|---|---|
| `aes_gcm_pkg` | block type, beat kinds, `inc32`, GF(2^8) helpers, GF(2^128) squaring, S-box table |
| `aes_sbox` | SubBytes as a 256-entry ROM (built at elaboration from inverse + affine map) |
| `aes_sbox_composite` | SubBytes in logic gates via GF((2^4)^2) with one GF(2^4) inversion |
| `aes_round` | SubBytes, ShiftRows, MixColumns (skipped when `LAST`), AddRoundKey |
| `aes_pipe` | ten rounds unrolled, a register after each, 10-cycle latency, 1 block/cycle |
| `aes_key_expand` | AES-128 key schedule, one round key per cycle, 11 keys stored |
| `gcm_inc` | the INC_Q counter: presents CB, CB+1 … CB+Q−1, advances by the blocks used |
| `gf2_polymul` | carry-less multiply: bit-parallel, or recursive Karatsuba-Ofman |
| `gf128_mul` | GF(2^128) multiply in GCM bit order, with reduction |
| `gf128_pow2` | H^(2^J) as one flat XOR network |
| `hash_key_powers` | H^1..H^Q from H |
| `ghash_parallel` | GHASH with Q multiply-add lanes |
| `gctr_parallel` | Q AES lanes in counter mode plus the matched delay line |
| `aes_gcm_top` | sequencing, key/H setup, tag |

## How eight blocks are hashed in one cycle

For a beat of `r` valid blocks `B1 … Br` (lanes 0 … r−1), `ghash_parallel`
computes

```
Y' = (Y xor B1)·H^r  xor  B2·H^(r-1)  xor … xor  Br·H
```

Expanding `r` serial steps `Y <- (Y xor Bi)·H` gives exactly this sum, so
the result is bit-identical to serial GHASH. Each lane has its own
multiplier. Lane `j` takes `H^(r−j)` from a multiplexer over the power
registers. A full beat uses `H^8 … H^1`. A short beat, such as the tail of
the AAD or the data, or the single length block, only changes which power
each lane selects. Any message length therefore costs no extra cycles. The
eight products are XORed together and registered. The critical path is one
multiplier, an 8-input XOR tree and the power mux. This is the longest
combinational path in the design.

The multipliers default to the bit-parallel (schoolbook) form, which has
quadratic gate count but the shortest delay. Setting `KO_STEPS = i` (1 … 6)
replaces every GF(2^128) multiplier with `i` levels of Karatsuba-Ofman
splitting: fewer gates, longer delay. `KO_STEPS = 4` is the usual sweet spot
for large Q.

### The hash subkey powers

Squaring in GF(2^128) is linear, so `H^2`, `H^4` and `H^8` need no
multiplier. `gf128_pow2` builds each power directly from `H` as a single XOR
network. It does not chain squarers one after another. This "parallel"
form keeps the depth low. Every other power is one product of a
power-of-two power and a smaller power:

```
H^3 = H^2·H    H^5 = H^4·H    H^6 = H^4·H^2    H^7 = H^4·H^3
```

That is four multipliers, the minimum for Q = 8. The power registers are
recomputed from their own previous values every cycle. A power whose
exponent has p one-bits is therefore correct after p cycles, and `ready`
rises 4 cycles after `start`.

## One pipeline for everything GHASH sees

GHASH must absorb the AAD blocks, then the ciphertext, then the length
block, all in order. When encrypting, the ciphertext exists only after
the 10-cycle AES pipeline. The engine does not reorder anything. Instead,
every beat goes through `gctr_parallel`, tagged with its kind, and all
beats leave in the order they entered:

| kind | lanes | output | consumer |
|---|---|---|---|
| `BEAT_HKEY` | lane 0 encrypts 0^128 | H | `hash_key_powers` |
| `BEAT_J0` | lane 0 encrypts J0 = IV‖0^31‖1; counter loaded with inc32(J0) | E_K(J0) | tag mask, GHASH clear |
| `BEAT_AAD` | idle | blocks unchanged | GHASH |
| `BEAT_DATA` | lane i encrypts CB+i | block xor E_K(CB+i) | user, GHASH |
| `BEAT_LEN` | idle | len(A)‖len(C) in bits | GHASH, then tag |

A 10-stage delay line in `gctr_parallel` carries each beat's input blocks,
kind, count and mode alongside the AES pipelines. The same line supplies
the plaintext for the final XOR. `hash_blocks` picks what GHASH absorbs:
the output when encrypting, the input when decrypting. Either way that is
the ciphertext, so the only thing decryption changes is this one select.

## Interface and timing (`aes_gcm_top`)

Parameters: `Q = 8` (lanes), `KO_STEPS = 0` (bit-parallel multipliers),
`COMPOSITE_SBOX = 0` (table S-boxes). All resets are
synchronous, active low (`rst_n`).

1. **Key.** Pulse `key_load` with `key`. The schedule takes 11 cycles. The
   zero block then goes down the pipeline (10 cycles), and the powers take
   4 more. `key_ready` (and `in_ready`) rise 28 cycles after `key_load`.
   Do not change the key while a message is in flight.
2. **Message start.** Hold `msg_start` with `iv` (96 bits) and `decrypt`.
   It is accepted on a cycle where `in_ready` is high. Do not assert
   `in_valid` in that cycle.
3. **Beats.** Hold `in_valid`, `in_aad`, `in_count`, `in_last` and
   `in_blocks`. A beat is taken on each cycle where `in_ready` is high. The
   rules for a beat:
   * `in_count` (0 … Q) blocks sit in lanes 0 … `in_count`−1.
   * Block order in the message is lane 0 first.
   * AAD beats come before data beats.
   * `in_last` marks the final beat.
   * A beat with `in_count = 0` carries no blocks. It ends a message that
     has no AAD and no data.
4. **Length block.** In the cycle after the last beat, `in_ready` is low.
   The engine uses that cycle to insert `len(A)‖len(C)`. This is the
   engine's only stall.
5. **Outputs.** `out_valid`/`out_count`/`out_blocks` appear 10 cycles after
   the data beat was taken: ciphertext when encrypting, plaintext when
   decrypting. `tag_valid` pulses with `tag` 11 cycles after the length
   block was inserted.

Messages can follow each other back to back. The next `msg_start` can be
accepted in the cycle after the length block. Sustained rate is Q blocks
per cycle, less one cycle for `msg_start` and one for the length block per
message. There is no output back-pressure.

Assertions check these rules:

* `msg_start` and a data beat must not be taken in the same cycle.
* `in_count` must be at most Q, and may be 0 only on a last beat.
* Each AES lane's valid bit must agree with the delay line's record of the
  lanes in use.

## What follows the source architecture and what does not

Follows it:

* AES-128 built as ten unrolled rounds with a register after each round.
* A result 10 cycles after input, then one per cycle per lane.
* Eight parallel AES lanes inside GCTR, with an increment-by-8 counter.
* Eight parallel multiply-add lanes in GHASH.
* `H^(2^j)` from XOR-only squaring in the parallel form; the other powers
  with the fewest multiplications.
* Bit-parallel multipliers by default, with Karatsuba-Ofman as an option.
* A lookup-table S-box by default, the form that suits FPGA memory.
* As an option, S-boxes in logic gates built on inversion in the GF(2^4)
  subfield (`COMPOSITE_SBOX = 1`).
* 96-bit IVs.

This design's own choices, where the source gives no detail:

* The beat interface: valid/ready, a block count, AAD and last flags, and
  the zero-count last beat.
* One shared pipeline that carries AAD, J0, H and the length block
  alongside the data.
* The exact GHASH update form and how each lane selects its power.
* The standard AES-128 key schedule, one round key per cycle, stored in
  registers. The source mentions an on-the-fly key expansion but does not
  describe it.
* The counter advances by the number of blocks actually used, so short
  beats keep the counter sequence. A full beat advances it by 8.
* Reset style and all latencies outside the AES pipeline.
* The composite-field constants: GF(2^4) modulo x^4 + x + 1, GF(2^8) as
  GF(2^4)[y] modulo y^2 + y + λ with the smallest valid λ, and the
  isomorphism to the AES field. `aes_gcm_pkg` finds all three at
  elaboration. The GF(2^4) inverse is written as d^14 and left to logic
  optimisation, not as a hand-minimised gate list.

Not provided:

* **192- and 256-bit keys.** The engine is AES-128 only.
* **Partial final blocks.** Lengths are whole 128-bit blocks. A
  partial-byte tail would need a byte mask on the ciphertext before GHASH
  and byte-exact length fields.
* **IVs of other lengths than 96 bits.**
* **On-chip tag comparison.** On decryption the caller compares `tag` with
  the received tag.
* **Alternatives not built:**
  * the AES simple-loop structure;
  * sub-pipelined rounds;
  * cascade or hybrid squaring.

Size at the defaults: about 21 k word-level cells and 13.3 k flip-flops
after generic synthesis. This includes 1284 S-box ROMs (8 lanes × 10 rounds
× 16, plus 4 in the key schedule) and 12 GF(2^128) multipliers (8 in GHASH,
4 for the powers).

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the
module with `gcm_ref_pkg`, a reference model written in a different style:

* the S-box from a brute-force inverse search;
* AES on a 4×4 byte matrix;
* GF(2^128) multiplication by the bit-serial algorithm of the GCM
  specification.

The testbenches also check published values:

* the FIPS-197 example ciphertext;
* a FIPS-197 round key;
* GCM test cases 1 and 2, both tags;
* the GHASH intermediate `X1` of test case 2.

They check latencies too:

* 10 cycles through AES and GCTR;
* 11 cycles for the key schedule;
* 4 cycles for the powers;
* 28 cycles for key setup;
* 11 cycles from the length block to the tag.

`tb_aes_gcm_top` runs the whole engine at its default size:

* the two published messages;
* a key change;
* 24 random messages of 0–11 AAD blocks and 0–39 data blocks, mixing
  encryption and decryption, some sent back to back.

`tb_aes_gcm_top_alt` runs the same test on the alternative build
(composite-field S-boxes and KO4 multipliers). Both count the
length-insertion stall, partial beats, AAD beats, decrypt
mode, back-to-back messages, key changes and empty messages, and fail if
any never happened.

## Simulating

With Verilator 5 (the package files must come first):

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/aes_gcm_pkg.sv tb/gcm_ref_pkg.sv tb/tb_aes_gcm_top.sv \
  --top-module tb_aes_gcm_top
./obj_dir/Vtb_aes_gcm_top
```

Replace the testbench name to run any other. Each testbench prints
`TB_RESULT checks=N failures=M` at the end. The full-size top testbench
builds in well under a minute and runs in under a second. The alternative
build takes about a minute to compile.

To change the lane count, set `Q` on `aes_gcm_top`. The count ports are
`$clog2(Q+1)` bits wide and `hash_key_powers` derives whatever powers Q
needs, but only Q = 8 has been simulated end to end.
