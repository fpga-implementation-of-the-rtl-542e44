# AES with LFSR S-boxes and round-wise key expansion

This is synthesizable SystemVerilog for an AES-128/192/256 encryptor and
decryptor built to be small rather than fast. It departs from a textbook AES
core in two ways:

* **No S-box tables.** Each SubBytes byte is computed at run time. Two 8-bit
  LFSRs run in opposite directions and search for the byte's multiplicative
  inverse in GF(2^8). The affine transformation is then applied. A substitution
  takes up to 127 LFSR steps, and no 256-entry ROM is needed.
* **No stored key schedule.** The round keys are never expanded up front. The
  key expander keeps only the last Nk key words (at most 8 words, 256 bits).
  It slides that window forward to make the next round key just before the
  round needs it. For decryption it slides the window backwards.

The design follows the architecture published by Purohit, Deshpande and Ingale
("FPGA Implementation of the AES Algorithm with Lightweight LFSR-Based Approach
and Optimized Key Expansion", PKIA 2023). That work ran the design on two Intel
DE10-Lite boards. One board encrypts data that a PC sends over UART. The second
board decrypts it and sends the plaintext back to the PC. The top level here,
`aes_lfsr_system`, is that two-board chain.

## Finding an inverse with two LFSRs

This is the unusual part of the design, and the rest depends on it.

Take an 8-bit Galois LFSR whose feedback polynomial is the *primitive*
polynomial m'(x) = x^8 + x^4 + x^3 + x^2 + 1 (taps `0x1D`). One clock step
multiplies the state by x modulo m'(x). Starting from the seed s(0) = 1, the
state after t steps is s(t) = x^t. Because m'(x) is primitive, the state runs
through all 255 non-zero field elements and then repeats: s(t + 255) = s(t).

So every non-zero byte a is x^p for exactly one p, and its inverse is
x^(255-p) = s(255 - p). One LFSR could find p by stepping until it matches a,
then step on to 255 - p, which takes up to 254 steps. This design uses two
LFSRs instead:

* **LFSR I** (`lfsr_fwd`) steps forward and holds s(t).
* **LFSR II** (`lfsr_rev`) runs the inverse step (multiply by x^-1) from the
  same seed, so it holds s(-t) = s(255 - t).

At every step t the two LFSRs hold a pair of mutual inverses. Two comparators
check each LFSR against the input:

| match                           | meaning           | output (multiplexer) |
|---------------------------------|-------------------|----------------------|
| LFSR I == a, i.e. a = s(t)      | inverse s(255-t)  | state of LFSR II     |
| LFSR II == a, i.e. a = s(255-t) | inverse s(t)      | state of LFSR I      |

Between them the two LFSRs cover s(0..127) and s(128..254) within t <= 127.
The search therefore ends after min(p, 255 - p) <= 127 steps.

In the schematic of the LFSRs, LFSR I shifts from stage 1 towards stage 8.
Stage 8 feeds back into stage 1 and is added into stages 3, 4 and 5.
LFSR II shifts the other way: stage 1 feeds stage 8 and is added into stages
2, 3 and 4. In `lfsr_rev` this shows up as the taps `{1, POLY[7:1]}` = `0x8E`.

**Timing** (`lfsr_inverter`): `start` loads both LFSRs with the seed and
latches the input. Comparison starts on the next cycle. The result is
registered on a match, and `done` pulses 2 + min(p, 255 - p) cycles after
`start` (worst case 129). The input byte 0 has no inverse. As in AES, it gives
0 after one cycle, and the LFSRs do not run.

### Moving between the two fields

AES arithmetic uses m(x) = x^8 + x^4 + x^3 + x + 1 (`0x11B`), which is *not*
primitive, so the LFSRs cannot use it directly. The byte is mapped into the
m'(x) field before the search and mapped back after it (`gf_iso_map`). The
element x+1 (`0x03`) of the AES field is a root of m'(x), so sending x to x+1
is a field isomorphism. As a matrix over GF(2), bit i of the input contributes
the byte (x+1)^i. Its columns are `01 03 05 0F 11 33 55 FF`, and no reduction
is needed because every power has degree below 8. This matrix is its own
inverse, so the same block serves as the mapping and as the inverse mapping.
`aes_pkg::iso_map` computes the matrix from this formula rather than storing
it.

### From inverse to S-box

`lfsr_sbox` chains the steps. Forward: the byte goes through the mapping, the
LFSR inversion, the inverse mapping and the FIPS-197 affine transformation.
Inverse: the byte goes through the inverse affine transformation first, then
the same mapping, inversion and mapping back. One `inv` input selects the
direction, and the inversion hardware is shared.

`sub_bytes` puts `LANES` S-boxes side by side, 16 for a state and 4 for a key
word. All lanes start together but finish at different times, because the
search length depends on the data. A mask collects the finished lanes, and
`done` follows the slowest lane, at most 130 cycles after `start`.

## Round keys on demand

`key_expander` holds a window `win[0..Nk-1]` = w[j-Nk .. j-1], where j is the
index of the next word. For a request for round r it compares the window with
the round key w[4r .. 4r+3]:

* **Key not yet generated:** step forward. The step computes w[j] and drops
  w[j-Nk]:
  * w[i] = w[i-Nk] ^ w[i-1]
  * w[i] = w[i-Nk] ^ SubWord(RotWord(w[i-1])) ^ Rcon[i/Nk] when i mod Nk = 0
  * w[i] = w[i-Nk] ^ SubWord(w[i-1]) when Nk = 8 and i mod 8 = 4
* **Key already dropped:** step backward. The same rule, solved for
  w[i-Nk] with i = j-1, recovers the word that was dropped last.
* **Key in the window:** `rk_valid` pulses and `round_key` is read from the
  window.

A plain word costs one cycle. A word that needs SubWord uses four LFSR S-boxes
and costs up to about 131 cycles. In encryption the round keys are requested
in ascending order, and each round needs at most one SubWord. In decryption
the first request is for round Nr. That request walks the whole schedule
forward once (10, 8 or 13 SubWords). Every later request steps back 4 words.

The published design describes only the forward direction, with each key made
shortly before its round. The backward walk is this design's way to give
the decryptor its keys in reverse order without storing them. Rcon is computed
by repeated doubling (`aes_pkg::rcon`), not taken from a table.

## Rounds

`aes_encrypt` and `aes_decrypt` are iterative and hold a single 128-bit state
register. The key length is an input (`key_len_e`: `KEY128`, `KEY192`,
`KEY256`), so one build runs all three variants. The published work built the
three variants separately.

* **Encryption:** AddRoundKey with round key 0. Then for each round r = 1..Nr,
  SubBytes and the request for key r run at the same time. When both are
  done, ShiftRows, MixColumns (not in the last round) and AddRoundKey are
  applied in one cycle.
* **Decryption:** AddRoundKey with key Nr. Then for r = Nr-1 down to 0:
  InvShiftRows, InvSubBytes in parallel with the request for key r, then
  AddRoundKey and InvMixColumns (not for r = 0).

Both cores use a start/busy/done handshake. Byte 0 of a block sits in bits
[127:120] and the state is filled column by column. A key is left-justified
in a 256-bit port, with the first key byte in [255:248].

**Latency:** a round costs the slowest of its 16 S-box searches. With 16
random bytes that search is almost always close to the 127-step worst case.
The key generation of the round and about 3 cycles of handshake overlap with
or follow that search. The simulated totals from `start` to `done` are:

| key length | encryption      | decryption      |
|------------|-----------------|-----------------|
| 128        | 1,286 – 1,295   | 2,364 – 2,455   |
| 192        | 1,507 – 1,537   | 2,364 – 2,399   |
| 256        | 1,736 – 1,824   | 3,057 – 3,388   |

At 50 MHz this is about 5 Mbit/s for AES-128 encryption. Decryption is slower
because it first walks the key schedule forward to the last round key.

## The two-board link

`aes_enc_node` is the encrypting board and `aes_dec_node` the decrypting
board. Each has a `uart_rx`, an `aes_frame_rx` and a `uart_tx`. The UART
format is 8 data bits, no parity, 1 stop bit, LSB first. `CLKS_PER_BIT`
defaults to 434 (115200 baud from the board's 50 MHz clock).

A job frame is:

```
[key length in bytes: 16, 24 or 32] [key bytes, first first] [16 data bytes]
```

The encrypting board replies on the link with a frame of the same layout,
carrying the ciphertext. The decrypting board sends only the 16 plaintext
bytes back to the host. The status outputs flag the following events:

* `bad_header`: a header byte other than 16, 24 or 32.
* `line_err`: a UART character whose stop bit is 0.
* `overrun`: a frame that completes while the board is still working on the
  previous one. That frame is dropped.

The published work gives neither the frame layout, nor the bit rate, nor the
kind of link between the boards. These are this design's choices. In
`aes_lfsr_system` both boards share one clock and reset.

## Module map

```
aes_lfsr_system
├── aes_enc_node            encrypting board
│   ├── uart_rx, aes_frame_rx, uart_tx
│   └── aes_encrypt
│       ├── key_expander ── sub_bytes #(4) (SubWord)
│       ├── sub_bytes #(16) ── lfsr_sbox ×16
│       │                        ├── gf_iso_map ×2
│       │                        └── lfsr_inverter ── lfsr_fwd, lfsr_rev
│       ├── shift_rows, mix_columns
│       └── add_round_key ×2
└── aes_dec_node            decrypting board (same, with aes_decrypt and inverse blocks)
```

`aes_pkg` holds the shared types, the key-length enum and the field helpers
(`xtime`, `gf_mul`, `iso_map`, `affine`, `inv_affine`, `rcon`).

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. These testbenches compare
against an independent software model, `tb/aes_ref_pkg.sv`. That model is
plain FIPS-197: the S-box is a^254 followed by the affine map, and the key
schedule is expanded in full. The testbenches check the following:

* **LFSRs:** every state of a full period against integer arithmetic.
* **Mapping:** that it is a field isomorphism and its own inverse.
* **Inverter:** all 256 inputs, with the exact cycle count per input. The
  worst case is 129 cycles, that is 127 steps.
* **S-box:** all 256 entries in both directions.
* **Key expander:** ascending, descending and random requests for all three
  key lengths.
* **Cores:** FIPS-197 Appendix B and C vectors and random vectors, with a
  latency bound.
* **UARTs:** including a 3 % bit-rate error, a bad stop bit and a glitch.
* **Nodes:** whole frames, including bad headers and dropped frames.

`tb_aes_lfsr_system` runs the whole chain at its default 115200 baud. It sends
FIPS and random jobs for all three key lengths, a bad header, a broken
character and an overrun. It checks the ciphertext on the link and the
plaintext returned to the host. It also counts the mechanisms inside the
design: searches ended by each comparator, zero bytes, and backward key steps.
The test fails if any of these never happens.

Each testbench has been seen to fail against a deliberately broken copy of its
module.

What is not verified: timing closure and resource use on an FPGA. The
published results table (for example about 14,100 combinational functions and
3,540 registers for AES-128 encryption on the DE10-Lite) cannot be compared
directly. This RTL was not mapped to that device. Generic synthesis of the
whole two-board system gives about 3,400 flip-flops.

## Simulating

Every testbench stands alone. It prints `TB_RESULT checks=N failures=M` and
stops at a watchdog if something hangs. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_aes_encrypt \
    -Irtl -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
    tb/tb_aes_encrypt.sv -o sim && ./obj_dir/sim
```

Replace `tb_aes_encrypt` with any other `tb_*` module. The system testbench
takes about two minutes to build, because of the large unrolled datapath, and
a few seconds to run.

To change the design:

* **Bit rate:** set `CLKS_PER_BIT` on `aes_lfsr_system`.
* **Parallelism:** `sub_bytes` takes any `LANES`. A narrower SubBytes (fewer
  S-boxes, reused over several passes) would need a small change to the cores'
  round loop.
