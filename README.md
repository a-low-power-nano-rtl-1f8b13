# Nano AES: a byte-serial, clock-gated AES-128 for image encryption

This is AES-128 built for minimum area and switching activity rather than
speed. The whole cipher runs through a datapath one byte wide. The 16-byte
state and the 16-byte round key sit in shift registers. Each clock, one byte
leaves the head of the state, passes through a single S-box, a byte-wide
MixColumns unit and the key XOR, and comes back in at the tail. ShiftRows
costs no logic: it is a one-clock permutation wired into the state register.
Round keys are computed in place, one round ahead, so only one 128-bit key is
stored. Every register group has its own gated clock, which stops whenever the
group has nothing to do. For example, the state register and the MixColumns
registers are not clocked at all while the next round key is being computed.

The top level pairs an encryption unit with a decryption unit of the same
style. The encryptor's ciphertext feeds the decryptor, so a stream of blocks
(in the intended application, the grey pixels of an image) is encrypted and
then recovered with the same key.

```
                +-------------------- aes_top_final --------------------+
 text_in[127:0] |  nano_aes_encrypt            nano_aes_decrypt         |
 key[127:0] ----+-> clock_gating(en)           clock_gating(en)         |
 ld, en, rst    |   -> aes_encrypt  --enc_data--> aes_decrypt           |
                |        |  enc_done --edge--> ld                       |
                +--------|--------------------------|--------------------+
                  enc_data, enc_done          dec_data, dec_done
```

## Top level: `aes_top_final`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `en` | in | 1 | enable of both module-level clock gates; with `en` low, nothing moves |
| `rst` | in | 1 | asynchronous reset, active high (resets the control units only) |
| `ld` | in | 1 | one-clock pulse that starts encrypting `text_in` with `key` |
| `key` | in | 128 | cipher key, byte 0 in bits [127:120] |
| `text_in` | in | 128 | plaintext block, byte 0 in bits [127:120] |
| `enc_data`, `enc_done` | out | 128, 1 | ciphertext, and a flag that it is valid |
| `dec_data`, `dec_done` | out | 128, 1 | block recovered by the decryptor, and its valid flag |

That is 518 pins in all.

Timing, counted in clocks with `en` high:

* `text_in` and `key` are read one byte per clock during the 16 clocks after
  `ld`. Hold them stable for that long.
* `enc_done` rises 386 clocks after `ld`. It stays high, with `enc_data`
  valid, until the next `ld`.
* The rising edge of `enc_done` starts the decryptor on `enc_data`.
  `dec_done` rises 723 clocks after that edge.
* The decryptor has finished reading `enc_data` 17 clocks after `enc_done`.
  After that the next block may be loaded.
* A new `enc_done` restarts the decryptor. To recover every block, give the
  next `ld` no sooner than about 337 clocks after `enc_done`. The image
  testbench uses 340, which gives 728 clocks per block for encrypt plus
  decrypt.

`ld` is accepted at any time and aborts the operation in progress.

## The encryption datapath (`aes_encrypt`)

```
 text_in byte ^ key byte ──┐
                           v
            ┌──> [mux] ─> State-Register ─> Sub-Bytes ─> Mix-Columns ─> (+) ──┬──> output register
            │             (16 x 8, SR wiring)  ^  (shared)    (8-bit, 4-clk)   ^    │
            └──────────────────────────────────│───────────────────────────────│────┘ (back to state)
                                               │ Out 2                  Out 1  │
 key byte ─> [mux] ─> Key-Register (16 x 8) ───┴───────────────────────────────┘
               ^      Out1 ^ S(Out2) ^ RCON   (bytes 0..3 of a new key)
               └───── Out1 ^ Out2             (bytes 4..15)
                      Out1                    (rotate)
```

Five units share the byte path:

* **State-Register** (`state_register`): sixteen byte registers. Register 0
  is the head and register 15 the tail. Each register has a 2:1 mux that
  picks either its neighbour (shift) or its ShiftRows source (permute).
* **Sub-Bytes** (`sub_bytes`): one 256-entry S-box table. It serves the
  state bytes during the rounds and the key bytes during key expansion. The
  two never need it in the same clock.
* **Mix-Columns** (`mix_columns`): 8 bits in and 8 bits out. See below.
* **Key-Register** (`key_register`): sixteen byte registers with Out 1 at the
  head and Out 2 at a selectable tap.
* **RCON** (`rcon`): the round constant 01, 02, …, 1b, 36. The control unit
  also uses it as the round counter: the value 36 means round 10.

The control unit (`enc_control_unit`) has a 4-bit byte counter and a 2-bit
drain counter. It steps through these phases:

| phase | clocks | what happens | clocks enabled |
|---|---|---|---|
| LOAD | 16 | `text_in ^ key` into the state, `key` into the Key-Register, RCON := 01 | state, key, RCON |
| KEYEXP | 16 | next round key computed in place | key |
| SHIFT | 1 | ShiftRows, all 16 bytes at once | state |
| DATA | 16 | bytes 0..15 leave the head into S-box and Mix-Columns | state, mix (key from clock 4) |
| DRAIN | 4 | last four Mix-Columns results return | state, mix, key (RCON on the last clock) |

The last four phases repeat ten times. In round 10, Mix-Columns is bypassed
and the results go into the output register. That makes
16 + 10 × 37 = 386 clocks per block.

ShiftRows comes before SubBytes here, which gives the same result: both act
on single bytes, so the byte permutation and the byte substitution commute.

### Timing inside a round: why 20 shifts

This is the trickiest part of the design.

* The state register shifts on every DATA and DRAIN clock, 20 shifts in all.
* Mix-Columns hands back byte *j* four clocks after byte *j* went in. Byte 0
  returns at DATA clock 4 and byte 15 at DRAIN clock 3.
* During the first four shifts, the tail takes whatever Mix-Columns is
  holding. Those four junk bytes are shifted out again during the four DRAIN
  clocks. So after 20 shifts the register holds exactly the 16 new bytes, in
  order.
* The Key-Register must line up with the Mix-Columns output. It is clocked
  only from DATA clock 4 to DRAIN clock 3, and its head is fed back to its
  tail. That is 16 rotations, so byte *j* of the key meets result byte *j*,
  and afterwards the key is back in place for the next expansion.

### Byte-serial MixColumns (`mix_columns`)

A column's four bytes a0..a3 arrive on consecutive clocks, row given by
`pos`. Each byte is multiplied by its column of the matrix and added into four
accumulators:

* forward: out_i ^= M[i][j]·a_j, with M[i][j] = {2,3,1,1}[(j−i) mod 4]
* inverse: coefficients {14,11,13,9}

After a3, the accumulators are copied to a 4-byte output buffer. The buffer
is read out byte by byte while the next column accumulates. The unit holds 64
flip-flops. Its latency is four clocks whether it mixes or passes bytes
through (`bypass`, used in the last round). The pos = 0 clock overwrites the
accumulators, so the unit needs no reset.

### Key expansion in the Key-Register

One KEYEXP pass turns round key *r−1* into round key *r*. On clock *j*,
Out 1 holds old byte k_j. The new byte enters at the tail:

* j = 0..3: k_j ⊕ S(Out 2) ⊕ (j = 0 ? RCON : 0). Out 2 reads register 13
  for j = 0, 1, 2, which holds k13, k14, k15, and register 9 for j = 3,
  which holds k12. This is SubWord(RotWord(w3)).
* j = 4..15: k_j ⊕ Out 2, with Out 2 read from register 12. Register 12
  holds the new byte made four clocks earlier.

After 16 clocks the new key sits in place. Only the last word ever goes
through the S-box, as the AES key schedule requires.

## The decryption core (`aes_decrypt`)

The decryption core uses the same building blocks, with each step inverted.

* The state register has InvShiftRows wiring (`INV = 1`).
* The round path is head → InvSub-Bytes → XOR Out 1 → InvMix-Columns → tail.
  Because the key is added before InvMixColumns, the key rotates during the
  16 DATA clocks rather than from DATA clock 4 onward.
* The last round bypasses InvMix-Columns.

The hard part is that decryption needs the round keys last first, while only
one key is stored. After loading, the core runs the forward KEYEXP pass ten
times to reach the round-10 key. It then runs one 16-clock AddRoundKey pass.
Each later round first recovers the previous key in place, in two passes:

* **INVKEY_A**, on k_j for j = 4..15: k_j ⊕= old k_(j−4). The old bytes are
  already overwritten by the time they are needed, so a 4-byte delay line
  supplies them. It is fed from Out 1 and has its own gated clock.
* **INVKEY_B**, on k_j for j = 0..3: k_j ⊕= S(Out 2) ⊕ RCON. It uses the
  same taps as forward expansion. RCON then steps back (divide by x).

The decryptor therefore holds a forward S-box for its key schedule and an
inverse S-box for its rounds. A block takes
16 + 160 + 16 + 10 × 53 = 722 clocks (`dec_control_unit`).

## Clock gating

`clock_gating` is a latch plus an AND gate. The latch is transparent while
`clk` is low, so the gated clock cannot glitch. Each core has one gate per
register group: State-Register, Mix-Columns registers, Key-Register and RCON,
plus the delay line in the decryptor. The data registers have no load
enables at all, because gating their clock is what makes them hold. The
control units run on the clock of their unit, which is gated again at module
level by `en` (`nano_aes_encrypt`, `nano_aes_decrypt`).

If you target an FPGA, replace `clock_gating` with the vendor's clock-buffer
enable primitive, or turn the gates into clock enables.

## S-box tables

`sub_bytes` and `inv_sub_bytes` are plain 256-entry lookup tables. Their
contents are not typed in. `aes_pkg` computes them at elaboration from the
definition:

* S(a) = A(a⁻¹) ⊕ 63, where a⁻¹ is the inverse in GF(2⁸) modulo
  x⁸+x⁴+x³+x+1, taken as a²⁵⁴ (0 maps to 0).
* A(b) = b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4).
* The inverse table is the inverse permutation of S.

## How far to trust it, and where it departs from the source

* **Verified** by simulation against an independent AES model and the
  FIPS-197 vectors:
  * encryption and decryption of random and known blocks;
  * the exact clock counts above;
  * behaviour with `en` toggled at random;
  * a full 256 × 256 grey test image (4096 blocks) encrypted and restored bit
    for bit.
* **Supported sizes**: AES-128 only. 192- and 256-bit keys would need a
  larger key register and more rounds.
* **The encryption core** follows the published architecture closely: its
  units, its byte datapath and its gating groups.
* **Choices made in this design**:
  * the cycle schedule and the latencies (386 and 722 clocks);
  * the Out 2 tap positions;
  * doing the initial AddRoundKey during the load;
  * the inner structure of the byte-wide MixColumns;
  * the latch-based gate;
  * the ld/done handshake;
  * using RCON as the round counter.
* **The decryption core** is entirely this design's own. The published design
  gives only the inverse algorithm and the name of the decryption unit.
* **S-box**: implemented as a plain lookup table. The published design
  mentions an optimised S-box but does not describe it.
* **Not included**: the image-to-bytes conversion. It runs in software on a
  host.
* **Not checked**: the FPGA results reported for the original design (about
  1066 flip-flops, 3900 LUTs and a 3.4 ns delay on a Xilinx part).

## Files

`rtl/`:

| file | contents |
|---|---|
| `aes_pkg.sv` | shared types, phase enum, GF(2⁸) helpers, table generators |
| `aes_top_final.sv` | top level |
| `nano_aes_encrypt.sv`, `nano_aes_decrypt.sv` | module-level clock gate and core |
| `aes_encrypt.sv`, `aes_decrypt.sv` | the byte-serial cores |
| `enc_control_unit.sv`, `dec_control_unit.sv` | sequencers |
| `state_register.sv`, `key_register.sv`, `mix_columns.sv`, `rcon.sv`, `sub_bytes.sv`, `inv_sub_bytes.sv`, `clock_gating.sv` | units |

`tb/` holds one self-checking testbench `tb_<module>.sv` per module.
`tb_aes_top_final.sv` runs the whole design end to end. It also counts that
every mechanism happened at least once: module gating, clocks stopped during
key expansion, (Inv)ShiftRows, the last-round bypasses, forward and inverse
key expansion, the chained start, and a restart. `tb_image_workload.sv` runs
the image. `aes_ref_pkg.sv` is the reference AES model. It generates its
S-box a different way from the RTL (a walk over powers of 3).

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top_final.sv \
    --top-module tb_aes_top_final -o sim
./obj_dir/sim
```

Replace `tb_aes_top_final` with any other testbench name. The whole image
workload takes about 3 million clocks, a few seconds of simulation.
