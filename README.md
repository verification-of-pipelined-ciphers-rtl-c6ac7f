# Pipelined ciphers: KASUMI and WG in SystemVerilog

This repository holds synthesizable SystemVerilog for two ciphers. Each comes
as a simple reference version and as an optimized, pipelined version.

* **KASUMI** is a 64-bit block cipher with a 128-bit key. It has eight
  Feistel rounds built from the FL, FO and FI functions.
  * `kasumi_comb` is a purely combinational reference. It has no clock.
  * `kasumi_pipe` is a pipelined encryptor with 8, 16 or 32 stages, set by the
    `STAGES` parameter (default 8). It accepts one block per cycle. Each result
    comes out exactly `STAGES` cycles later, marked by `out_valid`.
* **WG (Welch-Gong)** is a stream cipher. An 11-word LFSR over GF(2^29) feeds a
  nonlinear permutation of the field. The trace of the permutation's output is
  the keystream bit. All field arithmetic is in a normal basis:
  * squaring is a rotation;
  * adding 1 inverts all bits;
  * the trace is the parity of the bits.
  * `wg_cipher` is the first design. It needs 11 cycles to load, then 44
    initialization cycles. After that it gives one keystream bit per cycle.
  * `wg_cipher_opt` is the optimized design:
    * all multipliers have two stages;
    * an 11-stage core re-uses three multipliers;
    * a 9-stage exponentiation block re-uses two multipliers;
    * the LFSR has a chip enable;
    * a new controller drives the valid and enable signals.

    It loads in 11 cycles and initializes in 44 × 12 = 528 cycles. After that
    it gives one keystream bit every two cycles, with a shorter critical path.
* `pipelined_ciphers_top` holds all four next to each other. Both WG generators
  share one load-word input.

## Files

* `rtl/` holds one module or package per file.
  * KASUMI: `kasumi_pkg` (S-boxes, constants), `kasumi_fi`, `kasumi_fl`,
    `kasumi_fo`, `kasumi_round`, `kasumi_keysched`, `kasumi_comb` and
    `kasumi_pipe`.
  * WG: `wg_pkg` (field constants, multiplication table), `wg_nb_mul`,
    `wg_pow1023`, `wg_pow1023_reuse`, `wg_core`, `wg_core_reuse`, `wg_trace`,
    `wg_lfsr`, `wg_fsm`, `wg_fsm_opt`, `wg_cipher` and `wg_cipher_opt`.
* `tb/` holds one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M` at the end. `wg_tb_pkg` holds the WG
  reference data and a slow reference for the field arithmetic.

## Interfaces in short

* All clocked blocks use the rising edge of `clk`.
* `rst` is synchronous and active high.
* `kasumi_pipe` has inputs `in_valid`, `din[63:0]` and `key[127:0]`, and
  outputs `out_valid` and `dout[63:0]`.
  * Each block carries its own key down the pipe.
  * The key can change with every block.
* `wg_cipher` and `wg_cipher_opt`:
  * After `rst`, `load` is high for 11 cycles. In those cycles `din[28:0]` is
    sampled once per cycle. Drive the word for LFSR stage S(11) first and the
    word for S(1) last.
  * Keystream bits appear on `ks` when `ks_valid` is high.
  * In the testbenches an 80-bit key and a 32-bit IV are placed into the words.
    Key bits go into bits 0–15 of S(1)–S(5), and repeated into S(9)–S(11),
    with the S(10) copy inverted. IV bits go into bits 16–23 of S(1)–S(4).
* The optimized WG blocks take a packet only on every other cycle. Their valid
  bits (`d_valid` in, `d_ready` out) mark the packets.

## How it was checked

* KASUMI:
  * FI, FL, FO, the key schedule and the full cipher are checked against the
    two full test vectors of the KASUMI standard and their intermediate round
    values.
  * The pipelines are compared with the combinational version on random
    blocks and keys with random idle cycles. The latency must be exactly
    `STAGES`.
* WG:
  * The arithmetic blocks are checked in two ways. One is data from an
    independent software model, which works in the polynomial basis and
    converts. The other is a slow reference in the testbench, which
    exponentiates by square-and-multiply.
  * The pipelined blocks are checked for their exact latency (9 and 11 cycles)
    and for their results.
  * The controllers are checked cycle by cycle for their phase lengths and
    for their enable and valid patterns.
  * The first WG design reproduces the software model's keystream.
  * The optimized WG design gives the same keystream, bit for bit, as the
    first design. It also meets the 528-cycle initialization, the position
    of the first bit, and the rate of one bit per two cycles.
  * The top-level testbench runs everything together at the default
    parameters. It counts each mechanism and fails if one never occurs. The
    mechanisms are pipeline bubbles, key changes, the WG phase switches,
    LFSR stalls, multiplier re-use passes and restarts.
* Every testbench was also run against a deliberately broken copy of its
  block, and each one reported failures.

## Where this design departs from, or adds to, the source description

* The field element gamma (the normal element and the LFSR feedback
  coefficient) is taken to include a beta^4 term. With it, gamma generates an
  optimal normal basis of type II, the multiplier type used here.
* The published 128-bit WG keystream fragment (key 8000…, IV 01234567) is
  **not** reproduced. Several conventions were tried: key and IV bit order,
  the meaning of "k17..32 + 1", and the word order. None matched. The WG
  designs are therefore checked against an independent software model, and
  the optimized WG against the first WG design. That comparison between the
  two designs is the verification method the source itself uses.
* How the multipliers are wired inside the re-used 9- and 11-stage blocks is
  reconstructed from their stage-by-stage schedule. Packets must be an even
  number of cycles apart, which the controller guarantees.
* The inside of the normal-basis multiplier and its split into two stages are
  this design's own. The source uses a multiplier from the literature and
  does not give its inside.
* `ks_valid` and the shared top level are additions.
* Not built:
  * KASUMI decryption;
  * the other published KASUMI architectures, used only for comparison;
  * the intermediate 4- and 5-stage WG pipelines, which were steps toward the
    final design;
  * the formal-verification scaffolding (completion functions), which is a
    proof method and not hardware.
