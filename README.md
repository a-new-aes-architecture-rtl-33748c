# AES-128 with a per-frame dynamic key and a 4-bit S-box

AES is a symmetric cipher, so the sender and the receiver share one secret key, and a key
that stays fixed for a whole session is the obvious target. This design gives every 16-byte
frame a key of its own. Both ends agree on a 128-bit key once. After that, the n-th frame of
the session (n = 1, 2, ...) is encrypted under the agreed key with **each of its 16 bytes
raised by n, modulo 256**. The receiver counts the frames as they arrive, so it derives the
same key for each frame without any further key exchange.

The second change is to the substitution step. The 256-entry byte S-box of standard AES is
replaced by a 16-entry **4-bit S-box**, and it is applied to the two nibbles of each byte
separately. The rest of the cipher is standard AES-128: ShiftRows, MixColumns over GF(2^8),
AddRoundKey, the AES-128 key schedule and 10 rounds.

The top level, `aes_ext`, joins a transmitter and a receiver back to back. It takes four
frames (512 bits) per clock, encrypts them, decrypts them again, and returns the input on
`aesout`. The ciphertext between the two halves is also brought out, because in real use the
two halves sit at opposite ends of a link.

The cipher is **not compatible with standard AES**, because the S-box differs. It has not
been analysed as a cipher here. Treat it as an implementation of the scheme, not as a
vetted security primitive.

## The 4-bit S-box (`sbox4`)

Forward substitution of a nibble `x`:

1. `b = x^-1` in GF(2^4) with the polynomial x^4 + x + 1, where 0 maps to 0. The inverses
   of 0..F are `0 1 9 E D B 7 6 F 2 C 5 A 4 3 8`.
2. `d[i] = b[i] ^ b[(i+2)%4] ^ b[(i+3)%4] ^ C[i]`, where bit 0 is the LSB. This is the
   circulant matrix with rows 1011, 1101, 1110, 0111, plus a constant `C`.

The constant `C` is a parameter and defaults to 3. Only 3, 8, 0xA, 0xD and 0xF leave the
S-box without a fixed point (no x with S(x) = x). For `C = 3`:

| x    | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | A | B | C | D | E | F |
|------|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| S(x) | 3 | 4 | F | B | 2 | 1 | 7 | 0 | C | D | 5 | 9 | 6 | E | A | 8 |
| S^-1 | 7 | 5 | 4 | 0 | 1 | A | C | 6 | F | B | E | 3 | 8 | 9 | D | 2 |

For example, A inverts to C (1100). The matrix gives 0110, and adding C = 0011 gives 0101,
so S(A) = 5.

The inverse S-box undoes the constant first. It then applies the inverse matrix, whose rows
are 1110, 0111, 1011, 1101 (`b[i] = c[i] ^ c[i+1] ^ c[i+2]`), and finally the field inverse.
A byte `{h, l}` is substituted as `{S(h), S(l)}`. The key schedule's SubWord uses the same
substitution, so the whole cipher shares one S-box.

## Dynamic key (`dyn_keygen`)

The generator latches `keyin` while `rst` is high and clears an 8-bit frame counter. Eight
bits are enough, because the increment works on each byte modulo 256. Every cycle it offers
the keys for the next group of `FRAMES` frames: frame `f` of the group gets agreed key
+ (count + f + 1) in every byte. A cycle with `advance` set consumes the group, and the
counter moves on by `FRAMES`. Bytes wrap independently, so a byte of 0xFF becomes 0x00 for
frame 1 with no carry into its neighbour. `last_key` is the key of the latest consumed
frame. The top brings it out as `keyout`.

The transmitter and the receiver each have their own generator. They stay in step because
both are reset together with the same `keyin`, and both advance once per group, the receiver
on `cipher_valid`. If a group is lost between them, every later frame decrypts wrongly.

## Pipeline

```
aesin[511:0] --+-- lane 0..3: aes_encrypt (11 stages) --> cipher[511:0] --+-- lane 0..3: aes_decrypt (11 stages) --> aesout
               |      ^ per-frame key                                     |      ^ per-frame key
            dyn_keygen (transmitter)                                   dyn_keygen (receiver)
```

* `aes_encrypt`: stage 0 registers `plain ^ key`. Stages 1 to 10 are `enc_round`
  instances. Each one computes its round key from the previous one with `key_step`, applies
  SubBytes, ShiftRows, MixColumns (left out in round 10) and AddRoundKey, and registers the
  state and the round key together. Each block therefore carries its own key, and blocks
  under different keys can follow each other on every clock.
* `aes_decrypt`: the receiver has only the frame's cipher key, but it needs the round keys
  in reverse order. Stage 0 runs the key schedule forward through ten combinational
  `key_step`s to get round key 10, and registers `cipher ^ rk10` together with rk10. Stages
  1 to 10 are `dec_round` instances. Each one steps the schedule back by one round key
  (`key_step` with `INVERSE=1`, which undoes the XOR chain of a schedule step), then applies
  InvShiftRows, InvSubBytes, AddRoundKey and InvMixColumns (left out in the last stage).
* Timing: a group taken in with `in_valid` appears on `cipher` with `cipher_valid` 11
  cycles later, and on `aesout` with `out_valid` 22 cycles later. Throughput is one
  512-bit group per clock. `rst` is synchronous, active high, and clears only the valid
  bits and the key generators. The data registers need no reset.

Frame `f` of a group is `aesin[128f +: 128]`, and frame 0 is the earliest in the sequence.
Inside a frame the byte order is that of FIPS-197: byte 0, which is state row 0 column 0,
is bits [127:120], and bytes run down the columns.

## Top-level ports (`aes_ext`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst | in | 1 | clock; synchronous reset, which also loads `keyin` into both key generators |
| in_valid | in | 1 | `aesin` holds a group this cycle |
| aesin | in | 512 | four plaintext frames |
| keyin | in | 128 | agreed key, sampled while `rst` is high |
| cipher_valid, cipher | out | 1, 512 | ciphertext, 11 cycles after input |
| out_valid, aesout | out | 1, 512 | recovered plaintext, 22 cycles after input |
| keyout | out | 128 | transmitter's key for the latest frame taken in |

Parameters: `FRAMES` (frames per group, default 4) and `C` (S-box constant, default 3). In
the submodules, `INVERSE` selects the direction and `ROUND` the round index.

## Where this design makes its own choices

The scheme does not pin down the following points. The choices made here are:

* The first frame already uses key + 1, and each byte wraps modulo 256 on its own.
* The key schedule uses the 4-bit S-box as well as the data path.
* MixColumns is the standard GF(2^8) one, unchanged.
* One register per round (11 stages each way) and four frames encrypted in parallel. This
  is consistent with a 512-bit interface running one group per clock.
* `in_valid`, `out_valid`, `cipher` and `cipher_valid` are additions. The core interface
  is `aesin`, `keyin`, `clk`, `rst`, `aesout` and `keyout`.
* `keyout` reports the latest dynamic key.
* `keyin` is sampled only during reset.

Not built:

* The standard-S-box baselines.
* Any framing or transport between transmitter and receiver. The top wires them directly
  together.

## Files

* `rtl/aes_pkg.sv`: types, round constants, GF(2^8) helpers.
* `rtl/sbox4.sv`, `rtl/sub_bytes.sv`, `rtl/shift_rows.sv`, `rtl/mix_columns.sv`,
  `rtl/add_round_key.sv`, `rtl/key_step.sv`: the round functions.
* `rtl/enc_round.sv`, `rtl/dec_round.sv`, `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv`: the
  pipelines.
* `rtl/dyn_keygen.sv`, `rtl/aes_tx.sv`, `rtl/aes_rx.sv`, `rtl/aes_ext.sv`: the key
  sequence, both ends, and the top.
* `tb/aes_ref_pkg.sv`: an independent behavioural model. It derives the S-box by searching
  GF(2^4) for inverses. It also has a standard-AES mode, which checks the model itself
  against the FIPS-197 example vector.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_aes_ext` runs the top at its default size. It runs three sessions with different keys,
back-to-back groups and idle gaps, and key bytes that wrap past 0xFF. It checks ciphertext,
plaintext, latencies and `keyout`, and it counts each of those situations.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
    tb/tb_aes_encrypt.sv --top-module tb_aes_encrypt -o sim
./obj_dir/sim
```

Replace `aes_encrypt` with any other module name to run its testbench. The full-size top
testbench (`tb_aes_ext`) takes a few minutes to compile, because the design holds eight
AES pipelines.
