# RC5-32/12/16 block encryptor

RC5 encrypts a 64-bit block, held as two 32-bit words A and B, with a
table S of round keys that is expanded from a secret key. After A and B are
whitened with S[0] and S[1], every round does

    A = ((A xor B) <<< B) + S[2i]
    B = ((B xor A) <<< A) + S[2i+1]        i = 1 .. r

where `x <<< y` rotates x left by the low five bits of y. The rotations
depend on the data. They are the costly part of the cipher in hardware.
This design is a compact, multi-cycle implementation: one state machine
performs every step of the round as a separate clocked state, and the
data-dependent rotations run through 32-bit barrel shifters. A key-expansion
unit builds S from the secret key on chip.

The default configuration is RC5-32/12/16: 32-bit words (a 64-bit block),
12 rounds, a 16-byte key and a 26-word key table.

## Blocks

| module | role |
|---|---|
| `rc5_pkg` | word type, magic constants P32 = b7e15163 and Q32 = 9e3779b9, default sizes |
| `rc5_barrel_shifter` | combinational 32-bit rotate-left by 0..31 |
| `rc5_encrypt` | the encryption state machine |
| `rc5_key_expansion` | the RC5 key schedule, key bytes -> S table |
| `rc5_top` | the two units joined, with the handshakes gated |

Decryption is not implemented. The engine encrypts only.

## The encryption state machine (`rc5_encrypt`)

Each box of the algorithm's flow chart is one state, so each state does
exactly one simple operation. After the two whitening additions a round
runs through these states:

| state | operation |
|---|---|
| XOR1 | X1 <= A ^ B, Ibb <= B; leave if all rounds are done |
| WAIT1 | no operation; then choose the rotate-amount path for the A half |
| ROT1 *or* DIV1, MUL1, SUB1 | Rot <= Ibb mod 32 |
| SHF1 | X1 <= X1 <<< Rot (barrel shifter) |
| ADD1 | A <= X1 + S[2i] |
| XOR2 | X2 <= A ^ B, Iaa <= A; choose the path for the B half |
| ROT2 *or* DIV2, MUL2, SUB2 | Rott <= Iaa mod 32 |
| SHF2 | X2 <= X2 <<< Rott (barrel shifter) |
| ADD2 | B <= X2 + S[2i+1], next round |

**Rotate amount.** The amount is the controlling word modulo 32. When that
word is already below 32 it is copied (ROT1/ROT2, one cycle). Otherwise the
remainder is formed in three cycles: C = word/32, K = 32*C, Rot = word - K.
All three are shifts or one subtraction. The result equals the low five bits
of the word, which is what RC5 defines. Words are treated as unsigned
throughout. With signed arithmetic, words of 2^31 and above would give a
negative remainder.

**Latency.** The engine's latency depends on the data. From the clock edge
that samples `start` to the edge that raises `done`, counting both edges:

    cycles = 3 + sum over rounds of (9 + 2*[B >= 32] + 2*[A >= 32])

Here B is the word that enters the A half of the round and A is the word
that leaves it. For random data nearly every word is 32 or more, so a block
takes 159 cycles at 12 rounds. The minimum is 111 cycles.

**Round index.** The state machine counts completed rounds from 0 to r-1.
Round i (0-based) therefore uses S[2i+2] and S[2i+3]. This is the same as
the 1-based loop written above.

**Handshake.** `start` is accepted while `ready` is high, in the idle load
state, together with `pt_a` (A) and `pt_b` (B). `done` pulses for one cycle.
`ct_a` and `ct_b` are the A and B registers themselves, and they hold the
ciphertext until the next `start`. `s_tab` must not change while the engine
is busy. Reset is synchronous and active low.

Two assertions check that the remainder chain always lands in 0..31.

## The key schedule (`rc5_key_expansion`)

This unit follows the standard three steps:

1. The key bytes are packed little-endian into c = ceil(b/4) words L. K[0]
   is the low byte of L[0].
2. S[k] = P32 + k*Q32 for k = 0 .. t-1, where t = 2(r+1).
3. Then 3*max(t, c) mixing steps run, starting from A = B = i = j = 0:
   `A = S[i] = (S[i]+A+B) <<< 3`, `B = L[j] = (L[j]+A+B) <<< (A+B)`,
   then i and j advance modulo t and c.

S and L are register arrays. Steps 1 and 2 take a single SETUP cycle,
because packing is only wiring and every initial S word is a constant.
Step 3 performs one mixing step per clock. The fixed rotate by 3 is wiring,
and the variable rotate uses an `rc5_barrel_shifter`. `key_valid` falls
when `start` is accepted. It rises 2 + 3*max(t,c) edges later: 80 cycles
for RC5-32/12/16. The table stays on `s_tab` until the next key.

For key `91 5f 46 19 be 41 b2 51 63 55 a5 01 10 a9 ce 91` (K[0] first), the
intermediate values are:

- L = 19465f91 51b241be 01a55563 91cea910
- the initial table runs from S[0] = b7e15163 to S[24] = 8d14babb and
  S[25] = 2b4c3474
- the first four mixing steps give S[0..3] = bf0a8b1d 816b9c77 aba46177
  b4312645

The testbench checks these values.

## Top level (`rc5_top`)

Parameters: `ROUNDS` (default 12) and `KEY_BYTES` (default 16).

| port | dir | meaning |
|---|---|---|
| `key_start`, `key[KEY_BYTES]` | in | load and expand a key; accepted while `key_ready` |
| `key_ready` | out | both units idle |
| `key_valid` | out | an expanded table is available |
| `enc_start`, `pt_a`, `pt_b` | in | encrypt a block; accepted while `enc_ready` |
| `enc_ready` | out | engine idle and a valid table exists |
| `done`, `ct_a`, `ct_b` | out | ciphertext and its one-cycle strobe |

A new key is refused while a block is being encrypted, so the table never
changes under the engine. A block request is refused until a key has been
expanded.

Known-answer vectors (words written as 32-bit values, A first):

- key all zeros, plaintext 00000000 00000000 -> ciphertext eedba521 6d8f4b15
- key 915f4619be41b2516355a50110a9ce91, plaintext eedba521 6d8f4b15 ->
  ciphertext ac13c0f7 52892b5b

## Where this design departs from, or adds to, the original description

- The original flow chart starts its round counter at 0 but indexes
  S[2i]. That would reuse S[0]. The cipher definition (S[2]...S[2r+1] in
  the rounds) is followed instead.
- The flow chart loads the rotate-amount copy of A and tests it in the same
  step. Here the test uses the value being loaded, so the B half needs no
  extra empty state. The A half keeps the empty state of the chart.
- Words are unsigned in the remainder computation (see above).
- The original description mentions pipelining without further detail.
  Here each step of the chart has its own state and register. No two
  blocks are in flight at once, so the throughput is one block per
  111-159 cycles.
- The original describes the rotator as a 32-way selection among all
  rotations. Here it is five cascaded power-of-two rotate stages, which
  compute the same function.
- The key-expansion unit, the start/ready/done handshakes, the reset and
  the gating in the top level are additions of this design. The original
  specifies the key schedule only as an algorithm.
- The original implementation was synthesised for an Altera Stratix II
  (EP2S15F484C3). It reported 1787 combinational ALUTs, 440 registers and
  175.69 MHz. Its description does not include a key-schedule circuit. This RTL
  holds S and L in 960 flip-flops (about 1240 in all), so it is larger in
  registers, and its timing has not been measured on any FPGA.

## Verification

Every testbench in `tb/` checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. `rc5_ref_pkg` is a behavioural reference
model of the key schedule and the encryption. It also predicts the
engine's cycle count from the rotate paths taken.

| testbench | what it covers |
|---|---|
| `tb_rc5_barrel_shifter` | all 32 amounts, fixed and random words, two rotations from the key-schedule example |
| `tb_rc5_key_expansion` | the example's initial table and first mixing steps, full tables for the example, all-zero and random keys, 80-cycle latency, handshake |
| `tb_rc5_encrypt` | both known-answer vectors, random keys and blocks, a crafted block that takes the short path in both halves, latency of every block |
| `tb_rc5_top` | the whole design at default parameters: both vectors, eight random keys with three blocks each, a refused block request during expansion. It counts how often each mechanism occurred: key expansion, key reload, encryption, refused request, and the short and long path of each half. |
| `tb_rc5_top_32_16_10` | the design built as RC5-32/16/10 (16 rounds, 10-byte key, partly filled last key word) against the reference model |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/rc5_pkg.sv tb/rc5_ref_pkg.sv tb/tb_rc5_top.sv --top-module tb_rc5_top
    ./obj_dir/Vtb_rc5_top

Each testbench finishes in well under a second.

## Changing the design

- `ROUNDS` and `KEY_BYTES` can be set on `rc5_top`, `rc5_encrypt` and
  `rc5_key_expansion`. `KEY_BYTES` must be at least 1.
- The word size is fixed at 32 bits in `rc5_pkg`. The 16- and 64-bit
  variants of RC5 need different magic constants and a different rotator
  width.
