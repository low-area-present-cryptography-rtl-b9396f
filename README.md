# PRESENT-80 with per-block random keys

This is a small FPGA-oriented implementation of the PRESENT lightweight block cipher
(64-bit block, 80-bit key). It adds two things to the plain cipher:

* **A random key for every block.** Two true-random sources feed a small mixing network
  that produces a new 80-bit key every clock. When a plaintext block is loaded, the
  encryption core takes the key on offer in that clock and reports it on `key_used`,
  so that the block can later be decrypted.
* **A second key-update stage.** After the standard PRESENT-80 round-key update, each
  round key can be pushed through a further bit rotation and a full layer of S-boxes.
  The stage can be switched off (`stage2_en = 0`), which gives standard PRESENT-80
  and lets the published test vectors be checked.

S-boxes are built as dual-port 16 x 4 ROMs, each substituting two nibbles at once: 8 of
them cover the 64-bit state, 10 cover the 80-bit key in the second stage.

The architecture follows the design published as "Low Area PRESENT Cryptography in FPGA
Using TRNG-PRNG Key Generation". That description leaves many details open. The choices
made here are listed in [Departures and interpretations](#departures-and-interpretations).

## Block structure

```
                 +--------+   rn0   +------+  kdat1 (new key every clock)
 entropy ------> | trng 0 |-------->|      |------------+
                 +--------+         | prng |            |   key_in
                 +--------+   rn_b  |      |         key_sel --+
 entropy ------> | trng 1 |-------->|      |            v      v
                 +--------+         +------+          +-----------+
 load, idat, stage2_en --------------------------->   | present_  |--> odat, valid, ready
                                                       |   enc     |--> round
                                                       +-----------+    key_used
 dec_load, dec_idat, dec_key, stage2_en --------->    +-----------+
                                                       | present_  |--> dec_odat, dec_valid,
                                                       |   dec     |    dec_ready
                                                       +-----------+
```

| Module | Role |
|---|---|
| `present_trng_prng` | top level: wires the random sources, key generator and both cipher cores |
| `present_enc` | round-iterative encryption, one round per clock |
| `present_dec` | round-iterative decryption (inverse datapath, key schedule run backwards) |
| `sbox_layer` | 64-bit substitution from 8 `drom`s |
| `p_layer` | PRESENT bit permutation (forward or inverse) |
| `key_stage1` | PRESENT-80 key update step (forward or inverse) |
| `key_stage2` | second key stage: word rotation and 10 `drom`s (forward or inverse), bypassable |
| `drom` | dual-port S-box ROM (forward or inverse table) |
| `prng` | mixing network turning two random words into a key |
| `trng` | **behavioural model** of a true random source, for simulation only |
| `present_pkg` | shared types, S-box tables, rotation table |

## The encryption round

`present_enc` holds the state in `dreg` (64 bits) and the current round key in `kreg`
(80 bits). A load copies the plaintext and key in. Then each clock performs one round
(bit 0 is the least significant bit throughout):

```
dat1 = dreg ^ kreg[79:16]                       add round key: upper 64 key bits
dat2 = S-box on each of the 16 nibbles          8 dual-port ROMs, ROM g takes bits 8g+7:8g
dat3 = bit i of dat2 moved to 16*(i mod 4)+i/4  P-layer
dreg <= dat3
kreg <= key_stage2(key_stage1(kreg, round))     round = 1 .. 31
```

After 31 rounds, a 32nd step XORs the last round key into the state and registers the
ciphertext on `odat`.

**Timing.** A block is taken in the clock where `load` and `ready` are both high. `valid`
pulses 32 clocks later, and `odat` holds the ciphertext until the next result.
`ready` is low only during the 31 round clocks. A new block can therefore be loaded in
the same clock in which the previous result is written, so a stream runs at one block
per 32 clocks. A `load` while `ready` is low is ignored.

## The key update, and the second stage

**Stage 1** (`key_stage1`) is the PRESENT-80 key schedule step for round counter `r`:

```
t          = {k[18:0], k[79:19]}     rotate left by 61
t[79:76]   = S(t[79:76])
t[19:15]  ^= r
```

**Stage 2** (`key_stage2`, active when the block was loaded with `stage2_en = 1`) works
on the result as four 20-bit words, K1 = bits 79:60 down to K4 = bits 19:0:

1. In every word, bit j moves to bit `KROT[j]`, with the same table for all four words:

   | j | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 | 17 | 18 | 19 |
   |---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
   | KROT[j] | 14 | 10 | 9 | 13 | 16 | 11 | 8 | 2 | 17 | 5 | 18 | 3 | 15 | 1 | 19 | 4 | 7 | 12 | 0 | 6 |

2. All 20 nibbles of the rotated key go through the S-box. This takes 10 dual-port ROMs.
3. Each substituted nibble goes back to the position it came from. The result is the
   next round key.

The whole step is a bijection. `key_stage2` with `INVERSE = 1` undoes it: inverse
S-box on all nibbles, then the inverse rotation. `key_stage1` with `INVERSE = 1` undoes
stage 1. The decryption core relies on both.

With stage 2 on, the cipher is no longer standard PRESENT. Its round keys are a
different function of the 80-bit key. Encrypting and decrypting with the same
`stage2_en` setting still round-trips exactly. The testbenches check this on thousands
of blocks. No published test vectors exist for this mode.

## The random key generator

`prng` takes two 80-bit random words every clock: RN0, and a second word split into
RN1..RN4. It registers one 80-bit key per clock. Every quantity below is 20 bits wide,
and additions drop the carry:

```
T1..T4  = RN0[19:0], RN0[39:20], RN0[59:40], RN0[79:60]
RN1..4  = RN_B[19:0] .. RN_B[79:60]
sel     = cnt[0]                      cnt: free-running 2-bit counter, 0 after reset
M1 = sel ? T2 : T1                    M2 = sel ? T4 : T3
X1 = M1 ^ T1                          X2 = M2 ^ T4
A1 = X1 + RN1   A2 = M1 + RN2         A3 = X2 + RN3   A4 = M2 + RN4
X3 = ~(A1 ^ A2)                       X4 = ~(A3 ^ A4)
M3 = A1, X3, A4, X4                   for cnt = 0, 1, 2, 3
kdat1 = {X3, M3, X4, A4}
```

Notes for anyone judging its strength:

* When `sel` picks T1, X1 is zero, and likewise X2 when M2 = T4.
* The key is a deterministic function of the two random words. Its quality is only
  as good as the entropy source that replaces the `trng` model.
* `key_used` puts the key on output pins. That makes the design easy to use and test.
  A real deployment would instead route the key to wherever the receiver obtains it.

`trng` is a simulation model that draws `$urandom` on every clock edge. It cannot be
synthesized. For hardware, replace it with an entropy source that has the same ports,
a clock input and a `WIDTH`-bit word that changes every clock, such as a ring-oscillator
sampler.

## Decryption

`present_dec` needs the round keys in reverse order, but it is given the 80-bit key the
block was encrypted with (e.g. `key_used`). It proceeds as follows:

1. **KEYGEN, 31 clocks.** Runs the forward key schedule, including stage 2 if enabled,
   to reach the last round key K32.
2. **WHITEN, 1 clock.** `dreg ^= K32[79:16]`, and the key steps back to K31.
3. **ROUND, 31 clocks, r = 31 down to 1.** `dreg <= Sinv(Pinv(dreg)) ^ Kr[79:16]`, and
   the key steps back to K(r-1). The inverse substitution uses 8 `drom`s with the
   inverse table.

`dec_valid` pulses 63 clocks after the load. A new block can be loaded in the clock the
result is written, so a stream runs at one block per 63 clocks. `stage2_en` is shared
with the encryption side and sampled at each load. When you change it, let both cores
drain first.

## Top-level interface

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low reset.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `stage2_en` | in | 1 | second key stage on/off, sampled at every load of either core |
| `load` / `ready` | in / out | 1 / 1 | start encrypting `idat`; taken when `ready` is high |
| `idat` | in | 64 | plaintext block |
| `key_sel` | in | 1 | 1: use `key_in`; 0: use the generated random key |
| `key_in` | in | 80 | external key |
| `odat` / `valid` | out | 64 / 1 | ciphertext; `valid` is a one-clock pulse 32 clocks after the load |
| `key_used` | out | 80 | key of the most recently loaded block, valid from the clock after its load |
| `round` | out | 5 | encryption round counter, for observation |
| `dec_load` / `dec_ready` | in / out | 1 / 1 | start decrypting `dec_idat` with `dec_key` |
| `dec_idat`, `dec_key` | in | 64, 80 | ciphertext and the key it was encrypted with |
| `dec_odat` / `dec_valid` | out | 64 / 1 | plaintext; pulse 63 clocks after the load |

`key_used` changes as soon as the next block is loaded. When streaming back-to-back, that
happens in the same clock in which the previous ciphertext appears. So capture
`key_used` in the clock after each accepted load, not when `valid` pulses.

For image data, pack eight 8-bit pixels per block, first pixel in bits 63:56. A
128 x 128 image is 2048 blocks and takes 65,536 clocks to encrypt.

## Size

A generic coarse synthesis (yosys, no FPGA mapping) gives the following counts. The
S-box ROMs are kept as memory cells.

| Module | Flip-flop bits | ROM bits |
|---|---|---|
| `present_enc` | 218 | 2368 |
| `present_dec` | 219 | 3712 |
| `prng` | 82 | 0 |

The published implementation reports 48 flip-flops and 45 LUTs on a Spartan-6. That
cannot be reproduced by a design of this structure: the 64-bit state register and the
80-bit key register alone need 144 flip-flops. No attempt was made to match those
figures.

## Departures and interpretations

These points follow the published architecture:

* The datapath: a 64-bit path with `dreg`/`kreg`, the PRESENT S-box and P-layer.
* The PRESENT-80 key update.
* 8 dual-port ROMs for the state and 10 for the second key stage.
* The 20-bit rotation table.
* The structure of the key-mixing network: its multiplexers, XOR, adders, XNOR, the
  counter-selected output and the output concatenation.
* The 32-step encryption.

These points were chosen here because the description leaves them open or contradicts
itself:

* **Round counter values 1..31.** One passage says the counter runs from 0 to 31. The
  published ciphertext 5579C1387B228445 (key 0, plaintext 0) needs 1..31, as in
  standard PRESENT. The RTL reproduces that value.
* **Key-update nibble.** The text also mentions S-boxing a wider slice of the key. The
  equations S-box only bits 79:76, and the RTL does that.
* **Second-stage reassembly.** The final "rotation" that reassembles the 20 substituted
  nibbles is not specified. Here each nibble returns to the position it came from.
* **Bit direction of the 20-bit table.** Bit j moves *to* position `KROT[j]`.
* **First multiplexer select in `prng`.** It is driven by the low bit of the 2-bit counter.
* **Adder width.** The adders are 20 bits wide and drop their carry.
* **Bit order of the random words.** T1 and RN1 are the lowest 20 bits.
* **Registered key output.** The generated key is registered.
* **ROM read.** Asynchronous, so that a round takes one clock.
* **Ciphertext output.** The ciphertext is registered once, at the 32nd step. It is not
  shown combinationally every round.
* **External key path.** `key_sel`/`key_in` were added so that fixed keys, and the
  standard test vectors, can be used.
* **`key_used` output.** Added so that a randomly keyed block can be decrypted.
* **Handshakes.** `ready`/`valid` are this design's own.
* **Reset.** Asynchronous, active low, on all registers.
* **Decryption core.** The description says only that it is the reverse architecture.
  The KEYGEN/WHITEN/ROUND sequence above is this design's own.

Not built:

* The host-side conversion of images to and from binary text, and the image quality
  metrics (MSE, PSNR, SSIM). Decryption here is exact, so the MSE is 0.
* Board-level details such as driving LEDs with the output.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. The testbenches compare against `present_ref_pkg`, a
reference model written separately from the RTL. In it, the S-box is a hex constant, the
P-layer and rotation are literal tables, and decryption precomputes all round keys.

| Testbench | What it shows |
|---|---|
| `tb_drom`, `tb_sbox_layer`, `tb_p_layer` | exhaustive/random checks, forward and inverse, round trips |
| `tb_key_stage1`, `tb_key_stage2` | against the reference model; inverse undoes forward; stage-2 bypass |
| `tb_prng` | every generated key against the reference network, all four counter selections |
| `tb_trng` | the model gives a new, balanced word every clock |
| `tb_present_enc` | the four published PRESENT-80 vectors; random blocks with stage 2 on/off; 32-clock latency; streaming at one block per 32 clocks; loads while busy ignored |
| `tb_present_dec` | the same vectors decrypted; encrypt/decrypt round trips; 63-clock latency; streaming |
| `tb_present_trng_prng` | whole design: test vector through the top, 60 streamed blocks with random and external keys, stage 2 on then off, every key, ciphertext and decryption checked |
| `tb_image_workload` | a generated 128 x 128 grayscale image (2048 blocks) encrypted with stage 2 and fresh keys, then decrypted: exact recovery, 65,536 clocks for the encryption, repeated plaintext blocks give different ciphertexts |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/present_pkg.sv tb/present_ref_pkg.sv tb/tb_present_trng_prng.sv \
    --top-module tb_present_trng_prng
./obj_dir/Vtb_present_trng_prng
```

Replace the testbench name to run another. All of them finish in a few seconds.
