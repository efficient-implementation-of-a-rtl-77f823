# SEA(n,b) block cipher: a generic loop architecture

SEA (Scalable Encryption Algorithm) is a small Feistel block cipher meant
for constrained devices. Everything in it is parametric: the block and the
key are both `n` bits, the cipher works on `b`-bit words, and the number of
rounds `nr` follows from `n` and `b`. It uses only XOR, AND/OR, word and bit
rotations and word-wise addition mod 2^b. There are no tables.

This RTL is a loop architecture. One data round and one key-schedule round
sit between a set of registers, and both are evaluated in the same clock
cycle. A block therefore takes `nr` cycles, plus one cycle to load it. A
single module parameter set (`N`, `B`, and optionally `NR`) rebuilds the core
for any size the cipher allows. The same core encrypts and decrypts with the
same key. The only difference between the two modes is a multiplexer inside
the data round.

## Sizes

| symbol | parameter | meaning | default |
|---|---|---|---|
| n  | `N`  | block size and key size in bits | 48 |
| b  | `B`  | word size in bits | 8 |
| nb | (derived) `NB = N/(2B)` | words per half block | 3 |
| nr | `NR` | number of rounds, odd | 51 |

`N/(2B)` must be a whole multiple of 3, because the S-box works on triples of
words. An elaboration-time `$error` rejects other sizes. Among the parameter
sets the cipher is usually quoted with, (48,8), (72,12), (96,16), (108,18)
and (144,8) satisfy this rule, and all five are simulated. Sets such as
(126,8), (132,12), (152,11), (160,8) and (164,11) do not split into word
triples, so this design cannot build them.

By default `NR` comes from `sea_pkg::default_nr`: `3n/4 + 2(nb + floor(b/2))`,
raised to the next odd number. This gives 51 for (48,8), 75 for (72,12),
95 for (96,16), 105 for (108,18) and 135 for (144,8). `NR` can be overridden,
but it must be odd and at least 3.

Bit order: word `i` of a half block is bits `[i*b +: b]`. The input block is
`L0 & R0`, so `text_i[N-1:N/2]` is the left half. The key is `KL0 & KR0` in
the same way. The output is `R_nr & L_nr`.

## The data round

With `+` meaning word-wise addition mod 2^b:

```
f  = BitRot(S(R + K))
encrypt:  L' = R,   R' = WordRot(L) ^ f
decrypt:  L' = R,   R' = WordRot^-1(L ^ f)
```

* **S** (`sea_sbox`) is the 3-bit S-box {0,5,6,7,4,3,1,2}. It is applied to
  each bit column of each word triple (x3i, x3i+1, x3i+2), with x3i as the
  least significant bit. It is computed bitsliced, in three dependent steps:
  `x3i ^= x3i+2 & x3i+1`, then `x3i+1 ^= x3i+2 & x3i`, then
  `x3i+2 ^= x3i | x3i+1`. This costs three word-wide gates and three XORs per
  triple.
* **BitRot** rotates word 3i right by one bit, leaves word 3i+1 alone, and
  rotates word 3i+2 left by one bit.
* **WordRot** moves word i to position i+1, and the top word to position 0.

The decryption form is chosen so that decryption needs nothing outside the
round. A cipher-text is loaded exactly like a plaintext. The registers then
hold the encryption state with its halves swapped, and this round steps that
state back by one round. After `nr` rounds, the same `R & L` output order
gives back the plaintext.

## The key schedule and its two switches

This is the least obvious part of the design. The key round is a Feistel
round on the two key halves:

```
KL' = KR,   KR' = KL ^ WordRot(BitRot(S(KR + C(i))))
```

`C(i)` is zero except for word 0, which holds `i mod 2^b`. Let `M = floor(nr/2)`.
Over one block the controller (`sea_ctrl`) runs the key round as follows:

| round cycle i | key register update | key used by the data round |
|---|---|---|
| 1 .. M-1    | FK with C(i)                  | KR |
| M           | FK with C(M), then swap KL/KR | KR |
| M+1         | FK with C(nr-i)               | KR (the swapped value) |
| M+2 .. nr-1 | FK with C(nr-i)               | KL |
| nr          | swap KL/KR only               | KL |

A Feistel round run on swapped halves is its own inverse. So once the halves
are swapped at round M, the forward key round walks the schedule *back* to
the original key. The constants count down (M, M-1, ..., 1) to match. Two
things follow:

* The round keys form a palindrome: round `i` and round `nr+1-i` use the same
  key. Decryption needs its round keys in reverse order, which here is the
  same order. So decryption takes the original key and the same controller
  sequence. No "last round key" has to be precomputed.
* After the final swap in cycle `nr`, the key registers hold the original key
  again.

Both swaps are folded into the key round's output multiplexer (`key_op_t` in
`sea_pkg`), so they cost no extra cycles.

## Interface and timing (`sea_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; reset is asynchronous and active low |
| `start` | in | 1 | start a block; taken only while `busy` is low |
| `decrypt` | in | 1 | 0 encrypt, 1 decrypt; sampled with `start` |
| `text_i`, `key_i` | in | N | block and key; sampled with `start` |
| `busy` | out | 1 | high during the `nr` round cycles |
| `done` | out | 1 | one-cycle pulse after the last round |
| `text_o` | out | N | result; valid from `done` until the next accepted start |

* An accepted `start` is the load cycle.
* Rounds 1 .. nr follow on the next `nr` clock edges, and `done` rises
  `nr+1` cycles after the start.
* A `start` in the cycle where `done` is high is accepted, so blocks can run
  back to back every `nr+1` cycles. A `start` while `busy` is high is ignored.
* Throughput is `n * f_clk / (nr + 1)` bits per second. At (48,8) that is
  48/52 of a bit per clock cycle.

## Modules

| file | role |
|---|---|
| `rtl/sea_pkg.sv` | `key_op_t`, `default_nr()` |
| `rtl/sea_sbox.sv` | bitsliced S-box layer (combinational) |
| `rtl/sea_round.sv` | data round, both modes (combinational) |
| `rtl/sea_key_round.sv` | key round FK with the swap operations (combinational) |
| `rtl/sea_ctrl.sv` | round counter, key-schedule sequencing, KR/KL select, handshake |
| `rtl/sea_top.sv` | registers L, R, KL, KR and the mode bit; wires the above |

At (48,8), synthesis gives about 105 flip-flops: 96 for the block and key
registers, the mode bit and the controller.

## Verification

`tb/sea_ref_pkg.sv` holds a reference model, written separately from the
RTL. Its S-box is a lookup table rather than bitsliced logic. Its key
schedule is expanded in full into arrays, following the textbook loop
structure. Its decryption undoes encryption round by round, in reverse order.
The testbenches check the RTL against this model:

* `tb_sea_sbox`: the S-box layer, with all 3-bit values plus random words.
  It runs at two sizes.
* `tb_sea_round`: FE against the model. It also checks that the decryption
  round inverts FE.
* `tb_sea_key_round`: all four key operations.
* `tb_sea_ctrl`: the schedule table above, cycle by cycle, at `NR` = 51
  and 9. It also checks the `nr+1` latency, the one-cycle `done` and that a
  start while busy is ignored.
* `tb_sea_top`: end to end at the default parameters. It encrypts and
  decrypts random blocks, checks the round trip, the latency, that the key
  registers are restored, back-to-back blocks, an ignored start and reset.
  It counts every mechanism (both modes, both swaps, KL-keyed rounds,
  ignored start) and fails if any never happens.
* `tb_sea_configs`: the five buildable sizes listed above, side by side.

No published SEA test vectors are checked. Agreement with the reference
model shows that the RTL computes the cipher as described here. It does not
show bit-compatibility with other SEA implementations. Conventions that
could differ elsewhere include word and bit order, which S-box column bit is
least significant, and which side of the middle switch feeds round M+1.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_sea_top rtl/sea_pkg.sv tb/sea_ref_pkg.sv tb/tb_sea_top.sv
./obj_dir/Vtb_sea_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=F`.

## Choices made in this design

* **Default size.** (48,8) is the smallest of the usual parameter sets.
  Other sizes are a parameter change away.
* **Number of rounds.** `default_nr` uses the rule given above, rounded up
  to an odd number. Any other odd `NR` can be passed in.
* **Middle round key.** Round M+1 uses KR *after* the middle swap, which is
  the old KL. The schedule stays a palindrome either way.
* **Load cycle.** One load cycle comes before the rounds, so a block takes
  `nr+1` cycles. Computing round 1 straight from the inputs would save that
  cycle, at the cost of input multiplexers on the round logic.
* **Decryption.** Decryption is done on swapped halves, as described above,
  with the same key and key schedule as encryption.
* **Round constant.** The constant `C(i)` is truncated to `b` bits. This
  only matters if `M` is 2^b or more, which no usual size reaches.
* **Reset.** Reset is asynchronous and clears all registers. Verilator's
  `SYNCASYNCNET` lint note comes from the `disable iff (!rst_n)` in the
  controller's assertions. It is expected.
