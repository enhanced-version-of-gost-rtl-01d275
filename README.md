# E-GOST: a nibble-serial GOST block cipher with a single S-box

GOST 28147-89 is a 64-bit Feistel block cipher with a 256-bit key and 32
rounds. Its round function is tiny: add a 32-bit key word to the right
half, push the sum through eight 4-bit S-boxes, rotate left by 11, and XOR
the result into the left half. The standard does not fix the S-boxes.
E-GOST, proposed by Aboshosha et al. ("Enhanced Version of GOST Cryptosystem
for Lightweight Applications"), uses one new 4x4 S-box in all eight places.
The authors chose it for better resistance to differential and linear
cryptanalysis. It also matters for hardware: a datapath that handles
one nibble per clock needs only one S-box and no S-box selection
multiplexer.

This repository holds synthesizable SystemVerilog for that nibble-serial,
fixed-key E-GOST encryption core, with self-checking testbenches. The core
has 77 flip-flops: 64 of state, one carry bit, a 3-bit NLFSR, a 5-bit round
counter and a 4-bit phase register. The rest is one 4-bit adder, one S-box
of 14 gates, one 4-bit XOR and the multiplexers. The key is hard-wired
through a parameter.

## The cipher

A 64-bit block is `{L, R}` with `L` the upper 32 bits. Round `i`
(0 to 31) computes

    F      = S(R + K_i mod 2^32) <<< 11      S applied to each of the 8 nibbles
    L, R  <= R, L ^ F                        (rounds 0..30)
    L     <= L ^ F                           (round 31: no swap)

and the ciphertext is the final `{L, R}`. The key is eight 32-bit words
`k0..k7`, with `k_j = KEY[32j+31:32j]`. Rounds 0-23 use `k0..k7` three
times over, and rounds 24-31 use `k7..k0`.

The E-GOST S-box, for x = 0..F:

    S(x) = 8 7 3 C D B 4 1 6 A 9 F 0 5 E 2

It is a permutation. Its largest difference-distribution entry is 4, and
no nonzero input difference gives a zero output difference. The S-box
testbench checks all of these properties on the circuit itself.

## The S-box as a 14-gate network (`egost_sbox`)

The S-box is not a lookup table. It is a straight-line program over five
one-bit registers `r0..r4`, originally written as a bit-sliced x86
instruction sequence. `r0..r3` start as `x0..x3`, and the program runs in
pairs of independent instructions:

    r4 = r1        | r1 &= r3
    r1 ^= r2       | r3 ^= r0
    r3 ^= r1       | r2 |= r4        -> r3 = S2
    r2 ^= r0       | r4 ^= r3
    r0 = r2        | r2 |= r4
    r2 ^= r1       | r1 &= r0        -> r2 = S1
    r4 ^= r1       | r0 ^= r2
    r0 ^= r4       | r4 = ~r4        -> r0 = S0, r4 = S3

In the RTL each assignment becomes a new net, so the S-box is 2 AND, 2 OR,
9 XOR and 1 NOT gate. The same network runs for every input, with no table
indexed by data. That is why the bit-sliced form was chosen as a guard
against side channels.

## One round in nine clocks

This is the part that needs care. The 11-bit rotation cannot be done on
4-bit pieces, so the core handles the two halves in different ways:

* **Round cycles 1-8 (serial).** State R puts out its bottom nibble and
  rotates right by 4, so it is unchanged after eight cycles. The nibble is
  added to the matching nibble of the round key. The carry is held in a
  flip-flop, which makes eight 4-bit additions one 32-bit addition mod
  2^32. The sum goes through the S-box and is XORed with the bottom nibble
  of State L. The result is shifted into the top of State L.
* **Swap cycle 9 (whole word).** State L moves to State R rotated left by
  11. State R moves to State L rotated right by 11.

The XOR in cycles 1-8 uses the S-box output *before* its rotation. This
works because State L never holds `L` itself: it holds `L >>> 11`.
Rotation distributes over XOR:

    L ^ (S <<< 11)  =  ((L >>> 11) ^ S) <<< 11

So after eight cycles State L holds `(L >>> 11) ^ S`. The left rotation in
the swap cycle turns that into the new right half `L ^ F`. In the same
cycle the old right half becomes the new left half and is stored in its
rotated form, `R >>> 11`. Nowhere is a rotated S-box output formed
explicitly.

In the published description, the equation for the new left half shows a
left rotation. The prose and the block diagram beside it rotate right. Only
the right rotation reproduces the GOST round, so the RTL rotates right.

The same swap cycle, done with no serial cycles before it, simply
exchanges the true halves. If the true state is taken as
`(State L <<< 11, State R)`, a bare swap maps `(L, R)` to `(R, L)`. The
load and unload sequences below use this to enter and leave the stored
form without any extra rotator.

## Loading and unloading a block

Data enters and leaves only through State R, one nibble per clock:

| cycles after `start` | phase     | what happens                                              |
|----------------------|-----------|-----------------------------------------------------------|
| 1-8                  | LOAD_L    | `P[63:32]` enters State R, least significant nibble first  |
| 9                    | LOAD_SWAP | moves to State L as `L0 >>> 11`                            |
| 10-17                | LOAD_R    | `P[31:0]` enters State R                                   |
| 18-305               | ROUND/SWAP| 32 rounds x (8 serial + 1 swap); `done` pulses in cycle 305 |
| 306-313              | OUT_R     | `C[63:32]` on `dout`, least significant nibble first       |
| 314                  | OUT_SWAP  | State L, rotated back left by 11, moves to State R         |
| 315-322              | OUT_L     | `C[31:0]` on `dout`                                        |

After the 32nd swap, State R holds the ciphertext's upper word and State L
holds its lower word, stored rotated. The output swap undoes the rotation.
A new `start` is accepted in the cycle after the last output nibble, so a
block takes 322 cycles end to end, 288 of them in the rounds.

### Ports of `egost_serial`

| port         | dir | width | meaning                                                    |
|--------------|-----|-------|------------------------------------------------------------|
| `clk`, `rst` | in  | 1     | clock; synchronous, active-high reset                      |
| `start`      | in  | 1     | begin a block; ignored unless `busy` is low                |
| `din`        | in  | 4     | plaintext nibble, taken on every clock with `din_ready` high |
| `din_ready`  | out | 1     | `din` is consumed this cycle                               |
| `dout`       | out | 4     | ciphertext nibble, valid with `dout_valid`                 |
| `dout_valid` | out | 1     | `dout` carries a ciphertext nibble                         |
| `busy`       | out | 1     | a block is in progress                                     |
| `done`       | out | 1     | one-cycle pulse when the 32 rounds are complete            |

Parameter: `KEY` (256 bits). The default is an arbitrary example value.

## Key selection and the serial counter

The key is fixed at elaboration, so each key bit is a constant. A 32-bit
8-to-1 multiplexer (`egost_round_key_mux`) picks the round's key word. The
controller drives its select with the schedule index: `r mod 8` for rounds
0-23, `7 - r mod 8` after that. A 4-bit 8-to-1 multiplexer
(`egost_chunk_mux`) then picks the nibble of that word for the current
serial cycle.

Its select comes straight from a 3-bit NLFSR (`egost_nlfsr`), which
replaces a binary nibble counter. The NLFSR shifts left with feedback
`s2 ^ s1 ^ (~s1 & ~s0)`. This runs through all eight states in the order
0,1,2,5,3,7,6,4. The chunk multiplexer's inputs are wired in that order,
so nibbles still arrive least significant first. State 4 ends each 8-cycle
pass. A 5-bit counter (`egost_round_counter`) counts the rounds.

## Module map

| module                | role                                                       |
|-----------------------|------------------------------------------------------------|
| `egost_pkg`           | nibble/word types, register-operation and phase enums, key-schedule and NLFSR functions |
| `egost_serial`        | top: wires everything below, plus the XOR into State L     |
| `egost_control`       | phase sequencer (the table above)                          |
| `egost_state_r`       | State R: shift-in, rotate, load `L <<< 11`                 |
| `egost_state_l`       | State L: shift-in, load `R >>> 11`                         |
| `egost_serial_adder`  | 4-bit adder with carry flip-flop                           |
| `egost_sbox`          | the S-box gate network                                     |
| `egost_round_key_mux` | 32-bit key word multiplexer, holds the `KEY` parameter     |
| `egost_chunk_mux`     | 4-bit key nibble multiplexer, NLFSR-ordered                |
| `egost_nlfsr`         | 3-bit serial counter                                       |
| `egost_round_counter` | 5-bit round counter                                        |

Assertions in `egost_control` and `egost_serial` check three rules:
`din_ready` and `dout_valid` are never high together, `done` comes only in
the last swap, and a whole-word swap never falls in the middle of an
8-cycle pass.

## What follows the published design and what does not

These parts follow the published design:

* the cipher;
* the S-box and its gate network;
* the 4-bit datapath with one S-box;
* State R and State L accessed one nibble at a time;
* eight serial cycles plus one swap cycle per round;
* the rotate-right store of the left half;
* the two key multiplexers;
* a fixed key;
* an NLFSR as serial counter, a 5-bit round counter and a carry flip-flop;
* the `done` output.

These are choices made for this RTL:

* the NLFSR feedback;
* nibble order and block bit order;
* the load/unload sequence through State R, and the handshake;
* the timing of `done`;
* synchronous active-high reset;
* the default key value.

Left out:

* **Decryption.** The serial architecture is described for encryption
  only.
* **A key register for run-time key changes.** The source mentions it only
  as a costlier option (256 more flip-flops).
* **The round-based and unrolled architectures.** They are only compared
  against.
* **The GOST variant with eight different S-boxes.** It is only compared
  against.

The published area of the serial core, 0.651 kGE, has not been checked,
because that needs a standard-cell library. This RTL spends 4 extra
flip-flops and some decoding on its phase register, which drives loading
and unloading.

There are no published E-GOST test vectors. Ciphertexts are therefore
checked against an independent word-level model (`tb/egost_ref_pkg.sv`).
That model uses the S-box table, not the gate network. An error shared by
the model and the RTL in block layout or key-word order would not be
caught. Both follow the conventions stated above.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, the end-to-end test at default parameters:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/egost_pkg.sv tb/egost_ref_pkg.sv tb/tb_egost_serial.sv \
        --top-module tb_egost_serial
    ./obj_dir/Vtb_egost_serial

| testbench               | what it shows                                                  |
|-------------------------|----------------------------------------------------------------|
| `tb_egost_serial`       | 45 blocks with the default key against the model. It checks `done` at cycle 305 and the last nibble at 322, with blocks back to back. It also covers a start while busy, which is ignored, and a mid-block reset. It counts each mechanism: load swap, forward and reversed key order, carries between nibbles, swaps and the output swap. |
| `tb_egost_serial_keys`  | four cores with other keys (zero, all-ones, single-bit words, random), 12 blocks each |
| `tb_egost_sbox`         | all 16 inputs; permutation; full difference table equals the published one |
| `tb_egost_serial_adder` | 32-bit sums through 8 nibbles, including carry across all nibbles and an idle cycle in the middle of a word |
| `tb_egost_state_r`, `tb_egost_state_l` | load, rotate, nibble order, swap rotations           |
| `tb_egost_round_key_mux`, `tb_egost_chunk_mux` | word and nibble selection                    |
| `tb_egost_nlfsr`, `tb_egost_round_counter` | sequence, period, last flags, hold, clear          |
| `tb_egost_control`      | the phase table above cycle by cycle, including the key index of every round |

## Changing it

* **A different key:** set `KEY` on `egost_serial`.
* **A different S-box:** replace the network in `egost_sbox` and the table
  in `tb/egost_ref_pkg.sv`. `tb_egost_sbox` checks the published difference
  table, so it must change too.
* **A different NLFSR:** change `nlfsr_next`, `nlfsr_pos` and `NLFSR_LAST`
  in `egost_pkg`, and rewire `egost_chunk_mux` to the new state order.
