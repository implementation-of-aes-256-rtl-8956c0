# Small-area iterative AES-256 encryption core

This is an AES-256 block encryptor (FIPS-197: 128-bit block, 256-bit key,
14 rounds) built to use as little logic as possible rather than to be fast.
Instead of unrolling the cipher, one round datapath is reused on every clock.
Instead of expanding and storing all fifteen round keys, one key-schedule step
is reused too. A single 256-bit register walks through the key schedule two
round keys at a time, alongside the data. One block takes 15 clocks.

The architecture follows a published FPGA design (an AES-256 implementation
aimed at small area, demonstrated on an Intel/Altera MAX 10 board). Its
register set, its round numbering, its shared key-schedule hardware and its
five pass/fail self-test flags are reproduced here. The start/done handshake,
the reset style and the exact flag assignment are this implementation's own
choices. They are listed under [Departures and choices](#departures-and-choices).

## Block structure

```
aes256_top
├── aes256_enc            control, round counter, subkey_a / data_a registers
│   ├── aes_key_expand    one key-schedule step: 8 words -> next 8 words
│   │   └── aes_sub_word ×2   (each: aes_sbox ×4)
│   └── aes_round         SubBytes, ShiftRows, MixColumns (bypassable), AddRoundKey
│       ├── aes_sub_bytes     (aes_sbox ×16)
│       └── aes_mix_columns
└── aes_result_flags      five match flags for the on-board self-test
aes_pkg                   types, xtime, RotWord, ShiftRows
```

| Module | Kind | What it holds |
|---|---|---|
| `aes256_enc` | sequential | `subkey_a` (256 b), `data_a` (128 b), `round` (4 b), `busy`, `done`, output registers |
| `aes_key_expand` | combinational | 2 SubWord units, 1 RotWord, 8 XOR chains |
| `aes_round` | combinational | 16 S-boxes, MixColumns, bypass mux, key XOR |
| `aes_sbox` | combinational | 256×8 lookup table |
| `aes_result_flags` | sequential | 5 flags plus a valid bit |

After synthesis the core has 646 flip-flops and 24 S-box ROMs (16 in the
round, 8 in the key step).

## The cyclic key register

This is the part that needs the most care to follow.

AES-256 derives 60 key words w0..w59 from the key. Four words make one round
key, so there are round keys RK0..RK14. The words come in groups of eight:
group G0 = w0..w7 is the key itself, G1 = w8..w15, and so on up to G7, which
begins with w56..w59. So each group is two round keys: Gj = {RK(2j), RK(2j+1)}.

`subkey_a` holds exactly one group. `aes_key_expand` computes the next group
from it in one combinational step. That output is called `subkey_b` in the
core.

```
w'0 = w0 ^ SubWord(RotWord(w7)) ^ Rcon      w'4 = w4 ^ SubWord(w'3)
w'1 = w1 ^ w'0                              w'5 = w5 ^ w'4
w'2 = w2 ^ w'1                              w'6 = w6 ^ w'5
w'3 = w3 ^ w'2                              w'7 = w7 ^ w'6
```

The unit is reused for every group, so the key schedule needs only two SubWord
units and one RotWord in total. A fully unrolled schedule needs thirteen and
seven.

`subkey_a` is loaded with `subkey_b` at the end of every even round. The round
key is picked from `subkey_a` by a 2:1 multiplexer on the low bit of the round
counter:

| round r | work done in this clock | round key | `subkey_a` during r | Rcon used | reload at end |
|---|---|---|---|---|---|
| 0 | data ^ RK0, then full round | RK1 (low half) | G0 | 01 | yes → G1 |
| 1 | full round | RK2 (high half) | G1 | – | no |
| 2 | full round | RK3 (low half) | G1 | 02 | yes → G2 |
| … | … | … | … | … | … |
| 11 | full round | RK12 (high) | G6 | – | no |
| 12 | full round | RK13 (low) | G6 | 40 | yes → G7 |
| 13 | final round, no MixColumns | RK14 (high) | G7 | – | no |
| 14 | `cipher_text <= data_a`, `subkey14 <= RK14`, `done` | – | G7 | – | – |

Two things in this table need explaining:

- **Round 0 does two jobs.** It applies the initial AddRoundKey with RK0 (the
  high half of the freshly loaded key) and the first full round with RK1, both
  in the same clock. As a result the counter reaches 13 at the final round, and
  at round 14 the high half of `subkey_a` is RK14. That value is brought out on
  `subkey14`.
- **The round constant is a case on the round counter.** Even rounds 0, 2, …,
  12 get 01, 02, 04, …, 40 in the top byte. All other rounds get zero, the
  case default. The key step's output is used only in even rounds.

The last group also produces w60..w63, which no round uses.

## Round datapath

`aes_round` computes `AddRoundKey(MixColumns(ShiftRows(SubBytes(s))), k)`.
When `last_round` is high (round 13) the MixColumns output is bypassed:

- SubBytes is 16 parallel S-box lookups.
- ShiftRows is wiring: row r rotates left by r bytes.
- MixColumns multiplies each column by the circulant matrix [02 03 01 01]
  over GF(2^8), using `xtime` and XOR only.

The S-box is a 256-entry constant table. A constant function fills it at
elaboration from its definition: the inverse in GF(2^8) modulo
x^8+x^4+x^3+x+1 (computed as a^254), followed by the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. Synthesis sees a
ROM. To use a different S-box structure (for example a composite-field one),
change only `aes_sbox`.

Byte order is the FIPS-197 order everywhere. Bits [127:120] are the first byte
of the block as written in hex. Column c is bytes 4c..4c+3. Key word w0 is
key bits [255:224].

## Interface and timing (`aes256_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset; clears every register |
| `start` | in | 1 | start an encryption; sampled only when idle |
| `use_test_vector` | in | 1 | sampled with `start`: 1 encrypts the built-in test vector, 0 encrypts `data_in`/`key_in` |
| `data_in` | in | 128 | plaintext |
| `key_in` | in | 256 | key |
| `busy` | out | 1 | encryption in progress |
| `done` | out | 1 | one-clock pulse: `cipher_text` and `subkey14` are new |
| `cipher_text` | out | 128 | ciphertext; held until the next result |
| `subkey14` | out | 128 | last round key (RK14); held |
| `flags` | out | 5 | self-test flags, registered the clock after `done` |
| `flags_valid` | out | 1 | `flags` hold a result |

Timing:

- The clock edge that sees `start` high while idle loads the key into
  `subkey_a` and the plaintext into `data_a`. It also raises `busy`.
- `done` goes high 15 clocks after that edge: rounds 0 to 13, plus the output
  transfer.
- The inputs may change once `start` has been sampled.
- A `start` given while `busy` is high is ignored.
- A new block can start on the clock after `done`. The throughput is therefore
  one block every 16 clocks.

An assertion in `aes256_enc` checks that the round counter never exceeds 14
while busy.

## Self-test flags

The core is meant to be checked on an FPGA board with nothing attached. With
`use_test_vector` high, the core encrypts the built-in vector:

- plaintext `00112233445566778899aabbccddeeff`
- key `603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4`

`aes_result_flags` then compares the result with the expected values:

- `flags[0..3]`: ciphertext word 0..3 (MSB word first) equals the matching
  word of `EXP_CIPHER` = `d83414223d20a0c928b136c884d07ea2`
- `flags[4]`: `subkey14` equals `EXP_SUBKEY14` = `fe4890d1e6188d0b046df344706c631e`

All five flags are high on a correct core, and they can drive LEDs directly.
The test vector and the expected values are top-level parameters
(`TEST_DATA`, `TEST_KEY`, `EXP_CIPHER`, `EXP_SUBKEY14`). The flags are updated
for every result, so with external data they only show which words happen to
match.

## Departures and choices

- **Handshake.** The original design loads the key into its key register at
  reset and then runs. Here reset clears everything and `start` loads the key
  and data. Consecutive blocks therefore need no reset in between. `busy` and
  `done` are additions.
- **`subkey_b` is combinational.** The original names it among its registers.
  Its key-expansion block, however, is evaluated whenever the round counter
  changes, which is combinational logic. Storing it in flip-flops would add
  256 flip-flops and a clock of latency per group for no benefit.
- **The round constant is decoded from the round counter.** It is not held in
  a 32-bit register.
- **"Pipelining"** in the original description means that the key schedule
  advances alongside the data rounds. The core is iterative, one round per
  clock. It is not an unrolled pipeline.
- **Flag assignment.** The original design has five flags that check the test
  data but does not say what each one covers. The split into four ciphertext
  words plus the last round key is this design's choice.
- **Expected values.** The expected results are the standard AES-256 results
  for the built-in plaintext and key. The testbenches check them against
  FIPS-197 and an independent software model.
- **Scope.** Only encryption is provided; there is no decryption datapath. No
  pin assignment or board wrapper is included: every signal is a top-level
  port.
- **Area.** The original reports a synthesized area figure from an ASIC flow.
  No such figure is reproduced here, and the RTL has not been timed on any
  device.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog. The reference
is `tb/aes_ref_pkg.sv`, a byte-array software model written separately from
the RTL. It finds S-box entries by exhaustive inverse search, multiplies with
a generic GF(2^8) routine, and runs the textbook 60-word key-schedule loop.

| Testbench | What it checks |
|---|---|
| `tb_aes_sbox` | all 256 entries, plus values printed in FIPS-197 |
| `tb_aes_sub_word`, `tb_aes_sub_bytes` | random words and states; FIPS-197 examples |
| `tb_aes_mix_columns` | standard test columns (db135345 → 8e4da1bc, …), random states |
| `tb_aes_round` | FIPS-197 C.3 round 1; random full and final rounds |
| `tb_aes_key_expand` | the full schedule, group by group, for the FIPS-197 A.3 key and 50 random keys |
| `tb_aes256_enc` | FIPS-197 C.3 vector (→ 8ea2b7ca516745bfeafc49904b496089), the built-in vector, 40 random blocks; 15-clock latency; `start` ignored while busy; outputs held |
| `tb_aes_result_flags` | each flag cleared by a mismatch in its own word only; hold and reset |
| `tb_aes256_top` | end to end at default parameters: self-test mode with all flags high, external data, flag mismatches, ignored `start`, 7 key reloads per block, final round taken once per block |

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_aes256_top rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes256_top.sv
./obj_dir/Vtb_aes256_top
```

Replace `tb_aes256_top` with any other testbench name. Each run takes well
under a second. The RTL also lints clean with `verilator --lint-only -Wall`.
