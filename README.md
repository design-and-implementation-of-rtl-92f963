# Rolled, inner-pipelined Rijndael engine (256-bit block, 256-bit key)

This is a small-area hardware engine for Rijndael, the cipher behind AES,
configured for a **256-bit data block and a 256-bit key**. It encrypts and
decrypts. The block size is larger than standard AES, which always uses
128-bit blocks. With a 256-bit block the state is a 4 x 8 byte matrix (8
columns), and 14 rounds are run.

The design keeps area low in two ways:

* **It is rolled.** There is one round of logic, and a round counter sends
  the state through it 14 times. The engine does not build 14 separate rounds.
* **The round is pipelined inside.** Full-width (256-bit) registers sit
  between SubBytes, ShiftRows, MixColumns and AddRoundKey. The longest
  combinational path is then a single transformation, in practice one S-box
  look-up, not a whole round.

The S-boxes are 256-entry look-up tables. They are not built from GF(2^8)
inverse-and-affine logic.

Block and key sizes are parameters, `NB` and `NK`, counted in 32-bit
columns. The default is `NB = NK = 8`. All nine Rijndael combinations of
128, 192 and 256 bits elaborate and are tested.

## Data layout

A block enters as one vector of `NB*32` bits. Byte 0 of the block is in the
most significant byte. Byte *n* goes to state row `n % 4`, column `n / 4`,
which is the usual Rijndael column-major order. So column 0 is bits
`[255:224]`, with row 0 in bits `[255:248]`.

Keys follow the same rule. Word `w[0]` of the key is the most significant 32
bits. The expanded key `round_keys` is laid out the same way, with `w[0]` at
the top and `w[NW-1]` at the bottom. `NW = NB*(NR+1)`, which is 120 words by
default.

With this layout, the AES-128 and AES-256 test vectors of FIPS-197 go in and
come out exactly as printed, when the design is built with `NB = 4`.

## The round pipeline and its timing

This is the part that needs the most care when integrating or changing the
design.

```
 encryption round (aes_enc_round)
   state_q --> SubBytes --[R1]--> ShiftRows --[R2]--> MixColumns* --[R3]--> AddRoundKey --> state_q
                                                      (*bypassed in round NR)

 decryption round (aes_dec_round)
   state_q --> InvShiftRows --[R1]--> InvSubBytes --[R2]--> AddRoundKey --[R3]--> InvMixColumns* --> state_q
                                                                               (*bypassed in the last pass)
```

`R1`, `R2` and `R3` are the three 256-bit pipelining registers. `state_q` is
the round state register in the core. It closes the loop and holds the
result.

A block therefore takes **4 clocks per round**. A valid bit and a "last
round" flag travel through `R1` to `R3` with the data. The last-round flag is
what bypasses MixColumns (or InvMixColumns) in the final round.

Encryption:

1. On `start`, `state_q` is loaded with the input block XOR round key 0.
2. For rounds r = 1..NR, the state goes through the round pipeline. The
   result, after AddRoundKey with round key r, is written back into `state_q`.

Decryption:

1. On `start`, `state_q` is loaded with the input block XOR round key NR.
2. Pass r (r = 1..NR) undoes one round. It applies InvShiftRows and
   InvSubBytes, adds round key NR-r, then applies InvMixColumns. The last
   pass, which adds round key 0, skips InvMixColumns.

So decryption reads the round keys in reverse order from the same expanded
key.

Timing of the default build, counted from the clock edge that takes the
request:

| event | clocks |
|---|---|
| `key_load` to `key_ready` (key expansion) | NW - NK = 112 |
| `start` to `done` (one block, either direction) | 4*NR = 56 |
| throughput | one 256-bit block per 56 clocks |

Only one block is in flight at a time, so three of the four pipeline slots
are idle. The round modules can take a new block every clock, and
`tb_aes_enc_round` / `tb_aes_dec_round` drive them that way. To interleave
up to four independent blocks, the core would need a round counter for each
block. This RTL does not do that.

## Key schedule and round-key selection

`aes_key_expansion` runs the standard Rijndael key schedule and produces one
32-bit word per clock:

* The key is loaded into `w[0..NK-1]`.
* Each later word is `w[i] = w[i-NK] xor f(w[i-1])`, where `f` is:
  * RotWord, then SubWord, then XOR with Rcon, when `i mod NK = 0`;
  * SubWord alone, when `NK > 6` and `i mod NK = 4` (the extra step for
    256-bit keys);
  * nothing, otherwise.

Only the last NK words are needed, so they are kept in a shift window. A
single SubWord unit (four S-boxes) serves every step. Rcon is not stored in
a table: it starts at `01` and is multiplied by x (the xtime operation) once
every NK words.

Every word is also written into a register file of NW words. Each core reads
that file through its own `aes_round_key_select`, a multiplexer that returns
words `w[r*NB .. r*NB+NB-1]` for round r. The file is held complete, and not
generated on the fly, so that decryption can read it backwards.

## Top level: `aes_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_load`, `key` | in | 1, NK*32 | load a cipher key; ignored while `busy` |
| `key_ready` | out | 1 | expanded key valid; stays high until the next accepted load |
| `start`, `decrypt`, `block_in` | in | 1, 1, NB*32 | process one block (`decrypt = 0` encrypts); accepted only when `key_ready && !busy` |
| `busy` | out | 1 | key expansion or a block in progress |
| `done` | out | 1 | one-clock pulse; `block_out` is valid from then until the next accepted start |
| `block_out` | out | NB*32 | result |

A request that is not accepted is simply dropped; nothing queues it. The
engine has one encryption core and one decryption core, and they share the
key schedule. Only one core runs at a time, and an assertion checks this.
`block_out` comes from the core chosen by the last accepted start.

## Module map (`rtl/`)

| module | role |
|---|---|
| `aes_pkg` | types, round count `max(NB,NK)+6`, ShiftRows offsets, xtime, column (inverse) mixing |
| `aes_sbox`, `aes_inv_sbox` | 256-entry S-box and inverse S-box tables |
| `aes_sub_bytes`, `aes_inv_sub_bytes` | one table per state byte (32 in parallel) |
| `aes_shift_rows`, `aes_inv_shift_rows` | wiring only; row offsets 1, 3, 4 for NB = 8, and 1, 2, 3 for NB = 4 or 6 |
| `aes_mix_columns`, `aes_inv_mix_columns` | column multiply by `{03}x^3+{01}x^2+{01}x+{02}` and by its inverse, mod x^4+1, over GF(2^8) with polynomial x^8+x^4+x^3+x+1 |
| `aes_add_round_key` | XOR with the round key |
| `aes_key_expansion`, `aes_round_key_select` | key schedule and round-key multiplexer |
| `aes_enc_round`, `aes_dec_round` | the pipelined rounds shown above |
| `aes_encrypt_core`, `aes_decrypt_core` | round counter and state register around a round |
| `aes_top` | key schedule plus both cores |

InvMixColumns multiplies by `{04}x^2+{05}` and then reuses the forward
MixColumns network. The product equals the usual
`{0b}x^3+{0d}x^2+{09}x+{0e}` multiply, with less logic.

## How far it follows the original description, and where it is its own

These points follow the original description:

* the rolled round with a 256-bit register between each pair of
  transformations;
* the table-based S-box and inverse S-box;
* row offsets of 1, 3 and 4 for the 256-bit block;
* the MixColumns polynomial;
* the round order: an extra AddRoundKey first, and no MixColumns in the last
  round;
* key expansion and round-key selection as two separate parts;
* decryption with round keys taken in reverse order.

Where the original description and Rijndael differ, this RTL follows
Rijndael:

* **Rounds.** The description speaks of a round counter of value 10. It also
  says 14 rounds belong to 256-bit keys. The RTL computes
  `NR = max(NB, NK) + 6`, which is 14 here, because 10 rounds would not be
  Rijndael for this size.
* **Key schedule.** The description only names the key expansion, so its
  contents are the standard Rijndael schedule. The word-per-clock
  organisation is this design's own choice.

These are this design's own choices, because the description does not give
them:

* reset, handshake and interface signals;
* the byte layout described above;
* one block in flight at a time;
* where the registers sit in the decryption round;
* the valid and last-round flags;
* holding the expanded key in registers;
* size selection by parameters rather than a run-time mode.

No FPGA area, power or speed figures are reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare
against `tb/aes_ref_pkg.sv`, a behavioural Rijndael model written
independently of the RTL:

* its S-box is computed from the inverse-plus-affine definition;
* its MixColumns uses a general GF(2^8) multiplier;
* its decryption applies the inverse steps one by one.

The model and the RTL both reproduce the FIPS-197 AES-128 and AES-256
vectors at `NB = 4`.

The 256-bit block has no FIPS vector. The known answers used for it are:

| key | plaintext | ciphertext |
|---|---|---|
| 000102…1f | 000102…1f | `623d2bd4ca3796dc3d02ecf2f37fb637fd3da58509cebb67ab9265b04db51e7d` |
| all zero | all zero | `c6227e7740b7e53b5cb77865278eab0726f62366d9aabad908936123a1fc8af3` |

What the testbenches cover:

* `tb_aes_top` runs the default build end to end. It loads keys, encrypts and
  decrypts known and random blocks, and decrypts every ciphertext it
  produced.
  * It checks the 112-clock and 56-clock timings.
  * It checks that a start or key load while busy is ignored, and that a
    start during key expansion is ignored.
  * It counts each mechanism: key expansion, both directions, mode switches,
    last-round bypasses and ignored requests. It fails if any of them never
    happened.
* `tb_aes_configs` builds `aes_top` for all nine NB/NK combinations and
  checks encryption, decryption and timing for each.
* The unit testbenches cover:
  * the S-boxes, exhaustively;
  * the state transforms, with random vectors at NB = 8 and 4, plus the
    256-bit ShiftRows byte-numbering example;
  * every expanded-key word;
  * back-to-back traffic through the round pipelines;
  * the cores in three configurations.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` with any other testbench name to run that one. The full
default-size top-level test compiles in about half a minute and simulates in
well under a second.

## Notes for changing it

* To change the size, set `NB` and `NK` on `aes_top`. `NR` and `NW` are
  derived from them. The ShiftRows offsets come from `aes_pkg::row_shift`.
* The only long combinational path left is the S-box, between `state_q` and
  `R1`. The round-key multiplexer feeds AddRoundKey after `R3`. Its select
  changes only between rounds, so a pipeline register could be added there if
  timing needs it.
* Verilator reports `SYNCASYNCNET` on `rst_n`. The reset is asynchronous in
  the flip-flops and is also used in the assertions' `disable iff`, which
  Verilator sees as a synchronous use. This is harmless.
