# Folded SHA-256 with 4-2 adder compressors

This is a SHA-256 hasher that works on one message character at a time. Its round
logic is *folded*. A SHA-256 round needs seven 32-bit additions for the
working variables, plus three more for the message schedule word. Here
they all go through just **two shared word-level 4-2 adder compressors**,
which are used twice per round. Each round takes two clock cycles (folding
factor 2). Between the two cycles a register sits at the output of each
compressor. So the longest combinational path is one compressor row, one
carry-propagate adder, one operand multiplexer and one of the SHA
bit-functions, not a chain of five adders.

The hasher takes a message of 8-bit characters of any length. It pads the
message into 512-bit blocks, hashes the blocks one after another, and returns
the standard SHA-256 digest. For example, the single character `8'b11110000` hashes to
`fde502858306c235a3121e42326b53228b7ef4690eeed92a2b2eafe73c03a3ef`.

## The two-phase round

The SHA-256 round, with `W(t)` the schedule word and `K(t)` the round constant:

    T1 = H + Σ1(E) + Ch(E,F,G) + K(t) + W(t)
    T2 = Σ0(A) + Maj(A,B,C)
    A' = T1 + T2        E' = D + T1
    B'=A  C'=B  D'=C    F'=E  G'=F  H'=G
    W(t) = σ1(W(t-2)) + W(t-7) + σ0(W(t-15)) + W(t-16)      (t >= 16)

There are two compressors, called *left* and *right*. Each one adds four 32-bit
operands modulo 2^32. A 2:1 multiplexer picks each operand according to the
phase:

| phase | left compressor (a0 b0 c0 d0)     | result            | right compressor (a1 b1 c1 d1)           | result            |
|-------|-----------------------------------|-------------------|------------------------------------------|-------------------|
| 0     | H, K(t), Σ1(E), Ch(E,F,G)         | P → `l_sum_q`     | σ1(W(t-2)), W(t-7), σ0(W(t-15)), W(t-16) | W(t) → `r_sum_q`, and into the schedule window |
| 1     | 0, D, W(t), P                     | E' = D + T1       | P, W(t), Σ0(A), Maj(A,B,C)               | A' = T1 + T2      |

Why this is correct:

* P = T1 − W(t). P does not depend on W(t), so it can be formed in the same cycle as W(t).
* In phase 1 both compressors read P and W(t) from the two output registers:
  * E' = D + P + W(t) = D + T1.
  * A' = P + W(t) + Σ0(A) + Maj(A,B,C) = T1 + T2.
* At the end of phase 1, E' and A' enter the two register chains
  H←G←F←E←E' and D←C←B←A←A'. A..H do not change in phase 0, so the phase-0
  bit-functions see the state of round t.

The design's own choices:

* The pairing of operands per phase.
* The zero operand in the left compressor's phase-1 slot.
* Routing P into the right compressor in phase 1.

They follow from the published block diagram as far as it can be read. That
diagram shows:

* the multiplexer pairs K(t)/D, σ0(W(t-15))/Σ0(A) and W(t-16)/Maj;
* the right compressor's own result fed back to the W(t-7) multiplexer;
* the left result going to E and the right result to A.

The operand wires are named `a0 b0 c0 d0` (left) and `a1 b1 c1 d1` (right)
inside `sha256_folded_datapath`.

## The 4-2 adder compressor

* **`full_adder`**, the one-bit cell. It is built from an XOR and two
  multiplexers, with p = a⊕b:
  * sum = p ? ¬cin : cin
  * cout = p ? cin : a
* **`compressor42`**, the one-bit 4-2 compressor. It is two full adders:
  * The first adds a, b and c. Its carry leaves sideways as `cout`.
  * The second adds the first one's sum, d and the sideways `cin` from the
    bit below. It gives `sum` (weight 1) and `carry` (weight 2).
  * So a+b+c+d+cin = sum + 2·(carry + cout).
  * `cout` does not depend on `cin`, so a row of cells has no ripple
    path.
* **`csa42_adder`** is the word-level unit. It is a row of `WIDTH` (32)
  compressor cells:
  * Each cell's `cout` feeds the `cin` of the next bit.
  * The row produces a redundant pair: `sum_vec` and `carry_vec`, with
    `carry_vec` already shifted to its weight.
  * One carry-propagate adder turns the pair into the binary result `sum`.
  * Carries out of bit 31 are dropped, because the arithmetic is modulo 2^32.

  The final adder is needed because the working-variable registers hold plain
  binary words. The redundant pair is brought out only for testing.

## Message schedule

`sha256_msg_schedule` holds a 16-word window: `w[0]` is W(t-16) and `w[15]` is
W(t-1). It forms the right compressor's phase-0 operands from the taps
w[14], w[9], w[1] and w[0]. At the end of phase 0 the window shifts and takes
in the new W(t).

For t < 16, W(t) is simply the message word M(t). In those rounds the operands
are 0, 0, 0, w[0]. The compressor passes M(t) through and the window rotates.
After sixteen rotations the window is back in order, with M(0) oldest, ready for
t = 16. Loading a block is sixteen shifts with `load` high.

## Pre-processing

`sha256_padder` collects characters into a 64-byte buffer. It streams each
block as sixteen 32-bit words, M(0) first and big-endian:

* A full buffer of 64 characters goes out at once as a plain data block.
* At `byte_stop` the remaining r characters (0..63) are padded:
  * The byte `8'h80` (the appended 1 bit) follows them, then zeros.
  * The message length in bits, as a 64-bit big-endian number, fills the last
    eight bytes.
  * If r > 55 the length does not fit in that block, so one more block of
    zeros and the length follows.

Each block carries two flags: `first_blk` (start from the initial hash value)
and `last_blk` (its digest is the message digest). The core uses them to chain
the blocks: H(i) = A..H + H(i-1).

The length is counted in bytes in LEN_W − 3 = 61 bits, the standard's limit.
Past that count, `overflow_err` goes high and the message yields no digest. The
flag stays high until the next message begins. A test instance with `LEN_W = 10`
shows this at 128 characters.

## Interface and timing (`sha256_folded_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `data_in` | in | 8 | message character |
| `byte_rdy` | in | 1 | `data_in` is valid this clock |
| `byte_stop` | in | 1 | end of message (a clock of its own, after the last character) |
| `ready` | out | 1 | characters and `byte_stop` are accepted; ignored otherwise |
| `overflow_err` | out | 1 | the message was longer than the length field allows; no digest |
| `digest_valid` | out | 1 | one-clock pulse: `digest` holds the hash of the whole message |
| `digest` | out | 256 | H0‖H1‖…‖H7, H0 in bits 255:224; stays valid until the next block starts |

Timing:

* Characters may come on every clock while `ready` is high, and gaps are
  allowed.
* `ready` drops while a finished block waits for the core and is handed over.
  A block waits in the pre-processing stage until the core is idle. So the next
  characters can be typed in while the core is still hashing the previous
  block.
* With an idle core, the sequence is:
  1. one clock to leave collection;
  2. sixteen word clocks (`flag_0_15`);
  3. one clock of `padding_done`, which starts the core;
  4. 128 round clocks;
  5. one digest-update clock.
* For a message of at most 55 characters: if `byte_stop` is in cycle 0,
  `digest_valid` is in cycle 148.
* Each further block needs 18 hand-off clocks, during which `ready` is low,
  and 130 core clocks. Typing the next block's characters overlaps with the
  core's 130 clocks.

Inside, `sha256_core` (the part after pre-processing) has its own block
interface:

* `word_valid`/`word_in` load the sixteen words.
* `start` begins hashing.
* `done` comes 130 clocks after the start cycle.
* `first` selects the chaining value. With `first=1` it is the initial hash
  value H(0). With `first=0` it is the digest of the previous block.
* `last` marks the block whose `done` also raises `digest_valid`.

## Module hierarchy

    sha256_folded_top
    ├── sha256_padder            pre-processing: bytes -> padded 512-bit blocks, 16 words each
    └── sha256_core
        ├── sha256_fold_ctrl     idle / 64 rounds x 2 phases / update; 7-bit round counter
        ├── sha256_msg_schedule  16-word window and σ0/σ1 operands
        ├── sha256_k_rom         K(t), cube-root fractions of the first 64 primes
        ├── sha256_folded_datapath   operand muxes, two compressors, A..H, pipeline registers
        │   └── csa42_adder (x2) -> compressor42 (x32) -> full_adder (x2)
        └── sha256_digest_update H0..H7 registers, H(i) = A..H + H(i-1)
    sha256_pkg                   word/state types, H(0), σ/Σ/Ch/Maj functions

## How far it can be trusted, and where it departs

Every block has a self-checking testbench (`tb/tb_<module>.sv`). Each one
compares against values worked out independently:

* `tb/sha256_ref_pkg.sv` is a plain untimed SHA-256 model. It recomputes the
  constants from prime roots.
* Known digests: "", "abc", `8'hF0`, and the standard 56-character two-block
  vector.

The end-to-end test `tb_sha256_folded_top` runs at the default configuration.
It covers:

* the four known messages;
* messages at the block boundaries (55, 56, 63, 64, 119 and 120 characters);
* random messages of 0..300 characters, several arriving while the core was
  busy.

It also checks the 148-clock latency. The padder testbench compares every
streamed block with the reference padding. It also tests `overflow_err` on a
small-counter instance.

Points where this design fills in or departs from the published description:

* **Length field.** The padder appends the 64-bit length that SHA-256
  requires. The published description mentions only the appended 1 and
  zeros.
* **Multiple blocks.** Messages of several blocks, each chained on the one
  before, follow the published digest-update equation. The flags and
  handshakes that carry this out are this design's own.
* **Digest update.** It uses eight ordinary adders in one extra clock, not the
  shared compressors.
* **Chosen details.** The reset style, handshakes, exact cycle timing and
  overflow behaviour are this design's choices. The port names `byte_rdy`,
  `byte_stop`, `overflow_err`, `flag_0_15`, `padd_out` and `padding_done` are
  the published ones.
* **FPGA results.** The published figures (about 350 LUTs, 177 mW, 2.594 ns
  critical path, 200 ns to the digest) are not reproduced or checked here.

## Simulating

Any testbench builds with plain Verilator 5. Name the two packages and the
testbench; the modules are found by file name in `rtl/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/sha256_pkg.sv tb/sha256_ref_pkg.sv tb/tb_sha256_folded_top.sv \
        --top-module tb_sha256_folded_top
    ./obj_dir/Vtb_sha256_folded_top

Each testbench prints `TB_RESULT checks=N failures=M`. To lint a single module:

    verilator --lint-only -Wall -Irtl rtl/sha256_pkg.sv rtl/sha256_core.sv

Things to change:

* `LEN_W` on `sha256_padder` sets the width of the length count. The
  default, 64, is the standard's.
* `WIDTH` on `csa42_adder` sets the word width.
* The round operand schedule is the single `always_comb` block in
  `sha256_folded_datapath.sv`.
