# RC5 / RC6 block-cipher engine with on-chip key scheduling

This is a small hardware engine for two related block ciphers, RC5 and RC6. Both get their
strength from *data-dependent rotations*: a word is rotated by an amount taken from another
data word, so the wiring of each round depends on the data. Both expand the user's secret
key into a table of round keys. The engine computes that table in hardware from the raw key,
so the host never handles round keys.

The default configuration processes **64-bit blocks with a 128-bit key and 12 rounds** for both
ciphers:

| cipher | notation     | word w | block    | rounds r | round keys | key     |
|--------|--------------|--------|----------|----------|------------|---------|
| RC5    | RC5-32/12/16 | 32     | 2w = 64  | 12       | 2r+2 = 26  | 16 B    |
| RC6    | RC6-16/12/16 | 16     | 4w = 64  | 12       | 2r+4 = 28  | 16 B    |

RC6 normally runs with w = 32 (128-bit block) and 20 rounds. Here it defaults to w = 16 so that
both ciphers share one 64-bit data path. Every module is parameterised, and the standard
RC6-32/20/16 is one parameter change away (see *Configurations*).

## The two ciphers, as built

All arithmetic is on w-bit words, modulo 2^w. `x <<< y` rotates x left by the low lg(w) bits
of y, and `>>>` rotates right.

**RC5** (`rc5_encrypt`, `rc5_decrypt`) keeps the block in two words A, B.

    encrypt:  A += S[0]; B += S[1]
              for i = 1..r:  A = ((A ^ B) <<< B) + S[2i]
                             B = ((B ^ A) <<< A) + S[2i+1]
    decrypt:  for i = r..1:  B = ((B - S[2i+1]) >>> A) ^ A
                             A = ((A - S[2i])   >>> B) ^ B
              B -= S[1]; A -= S[0]

**RC6** (`rc6_encrypt`, `rc6_decrypt`) keeps the block in four words A, B, C, D. It adds the
quadratic function `f(x) = (x(2x+1)) <<< lg w` (`rc6_f`), which spreads every bit of B and D
into the rotation amounts.

    encrypt:  B += S[0]; D += S[1]
              for i = 1..r:  t = f(B); u = f(D)
                             A = ((A ^ t) <<< u) + S[2i]
                             C = ((C ^ u) <<< t) + S[2i+1]
                             (A, B, C, D) = (B, C, D, A)
              A += S[2r+2]; C += S[2r+3]
    decrypt:  C -= S[2r+3]; A -= S[2r+2]
              for i = r..1:  (A, B, C, D) = (D, A, B, C)
                             u = f(D); t = f(B)
                             C = ((C - S[2i+1]) >>> t) ^ u
                             A = ((A - S[2i])   >>> u) ^ t
              D -= S[1]; B -= S[0]

Each datapath computes **one complete round per clock**. In RC5 both half-rounds are chained
in one cycle. In RC6 two `rc6_f` units work in parallel. The first whitening step happens
while the block is loaded, and the last one is folded into the final round. So a block takes
one load cycle plus r round cycles. Encryption and decryption are separate datapaths that
read the same round-key table.

A rotation by a variable amount is written as `(x << n) | (x >> (W-n))`. Synthesis maps this to
a barrel shifter. `rc6_f` forms x(2x+1) as 2x² + x, which needs one W×W multiplier. Only the low
W bits of its product are kept.

## Key schedule

The key schedule is the slowest part of the engine. It is also the part the host would
otherwise have to compute in software. `rc_key_expand` serves both ciphers. Only the table
length T differs: 2r+2 for RC5 and 2r+4 for RC6.

1. The key bytes are loaded little-endian into c = ⌈b / (w/8)⌉ words L[0..c-1]. Byte k of the
   `key` port is `key[8k +: 8]`.
2. S[i] = P_w + i·Q_w for i = 0..T-1. P_w and Q_w are the odd integers nearest to
   (e−2)·2^w and (φ−1)·2^w. For w = 32 they are B7E15163 and 9E3779B9, and for w = 16 they are
   B7E1 and 9E37. `rc_pkg` derives them for any w ≤ 64 from the 64-bit binary fractions.
3. Mixing runs 3·max(T, c) times, with A = B = i = j = 0 at the start:

        A = S[i] = (S[i] + A + B) <<< 3
        B = L[j] = (L[j] + A + B) <<< (A + B)
        i = (i+1) mod T;  j = (j+1) mod c

In hardware, steps 1 and 2 take the cycle in which `start` is sampled. The constant table
P + i·Q is formed in parallel in that cycle. After that, each clock performs one mixing step.
The table is stored in flip-flops, not in a RAM, so each cipher datapath can read two round
keys per cycle with no arbitration. This costs T·w flip-flops: 832 for RC5 and 448 for RC6.

| table | mixing steps  | cycles from `key_load` to `key_done` |
|-------|---------------|--------------------------------------|
| RC5   | 3·26 = 78     | 79                                   |
| RC6   | 3·28 = 84     | 85                                   |

## Host interface (`rc_top`)

`rc_top` contains `rc5_core` and `rc6_core`. Each core bundles one key schedule and the two
datapaths of its cipher. Both cores share the key port and the 64-bit data port.

| port                           | dir | meaning                                                     |
|--------------------------------|-----|-------------------------------------------------------------|
| `clk`, `rst_n`                 | in  | clock; synchronous active-low reset                         |
| `key_load`, `key[127:0]`       | in  | expand this key into both tables (ignored while `busy`)     |
| `key_busy`                     | out | at least one table is being built                           |
| `key_done`                     | out | pulse: the second table just finished                       |
| `key_valid`                    | out | both tables hold the current key                            |
| `start`, `alg`, `decrypt`, `din` | in | one block for `ALG_RC5`/`ALG_RC6`, in either direction   |
| `ready`                        | out | tables valid and no block in flight; `start` counts only now |
| `busy`                         | out | a block is in flight                                        |
| `done`, `done_alg`, `dout`     | out | pulse with the result and the cipher that produced it       |

The data layout puts word A in the low bits. RC5 uses `{B, A}` with 32-bit words. RC6 uses
`{D, C, B, A}` with 16-bit words. This is the usual byte order of RC5 and RC6, so published
test vectors apply directly once they are read as little-endian words.

Timing at the defaults:

    cycle 0      key_load=1
    cycle 85     key_done=1, key_valid=1, ready=1      (the RC5 table is ready at cycle 79)
    cycle n      start=1, alg, decrypt, din
    cycle n+14   done=1, dout valid                    (1 load + 12 rounds + 1 output register)

Only one block is in flight at a time, so the throughput is one 64-bit block every 14 cycles.
While not `ready`, `start` is dropped, not queued. While a block is in flight, `key_load` is
ignored. As a result the round-key table never changes under a running block. Assertions in
`rc5_core`, `rc6_core` and `rc_top` state these rules.

## Module map

    rc_top                    combined engine (host interface, result register)
    ├── rc5_core              RC5 unit
    │   ├── rc_key_expand     key schedule, T = 2r+2
    │   ├── rc5_encrypt
    │   └── rc5_decrypt
    └── rc6_core              RC6 unit
        ├── rc_key_expand     key schedule, T = 2r+4
        ├── rc6_encrypt  ── 2 × rc6_f
        └── rc6_decrypt  ── 2 × rc6_f
    rc_pkg                    magic constants, alg_e, helper functions

## Configurations

| parameter | module(s)  | default | notes                                            |
|-----------|------------|---------|--------------------------------------------------|
| `W5`, `R5`| `rc_top`   | 32, 12  | RC5 word size and rounds                         |
| `W6`, `R6`| `rc_top`   | 16, 12  | RC6 word size and rounds                         |
| `KB`      | all cores  | 16      | key length in bytes                              |
| `W`, `R`  | cores, datapaths | per cipher | W must be a power of two: 16, 32 or 64   |

`rc_top #(.W6(32), .R6(20))` gives the standard RC6-32/20/16. The data ports then widen to
128 bits, and RC5 uses the low 64. `R5 = 20` gives RC5 with 20 rounds. The key schedule
latency is 3·max(T, c) + 1 cycles, and the block latency is r + 1 cycles in a core and r + 2
cycles at the top.

## How this relates to the published RC5/RC6 description

This design implements the ciphers as usually defined. It follows a description of an FPGA
implementation that contains both ciphers, with the key schedule on chip. Points where that
description was ambiguous or self-contradictory, and how this design reads them:

* **RC6 word size and rounds.** A 64-bit RC6 block implies w = 16. The stated "12 rounds" is
  used for RC6 as well as for RC5. The RC6 standard (w = 32, r = 20) is supported by parameters.
* **Magic constant Q_w.** It is taken as Odd((φ−1)·2^w), the standard definition. φ−2 would be
  negative.
* **RC6 round-key combine.** The round keys are *added* after the rotation, not XORed. The
  data-flow diagrams and the published test vectors agree on this.
* **RC6 decryption input.** C is reduced by S[2r+3] and A by S[2r+2], which exactly inverts
  encryption.
* **RC6 key schedule.** It is the RC5 procedure with T = 2r+4.
* **Micro-architecture.** The following are this design's own choices: one round per clock,
  the round-key table in registers, the start/busy/done handshake, the shared ports and the
  reset style. The source gives no cycle-level timing. It reports a maximum clock of 43.7 MHz
  for its RC6 design on a Xilinx Virtex XCV1000. This RTL has not been timed on any device, so
  no frequency is claimed.

Not included: a mode in which round keys are loaded from outside instead of being expanded on
chip, pipelined or unrolled datapaths, and any block-cipher mode of operation (CBC, CTR, …).

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_rc_ref_pkg.sv` holds untimed
reference models of the key schedule and of both ciphers, written straight from the
definitions above. The testbenches anchor the RTL and these models to published
known-answer vectors:

* RC5-32/12/16, zero key, zero block → `21A5DBEE 154B8F6D`. Key
  `915F4619BE41B2516355A50110A9CE91`, block `21A5DBEE154B8F6D` → `F7C013AC 5B2B8952`.
* RC6-32/20/16, zero key, zero block → `8FC3A536 56B1F778 C129DF4E 9848A41E`. Key
  `0123456789ABCDEF0112233445566778`, block `02132435 46576879 8A9BACBD CEDFE0F1` →
  `524E192F 4715C623 1F51F636 7EA43F18`.

No published vectors exist for the 16-bit RC6 default. It is checked against the reference
model, which the 32-bit vectors validate. The testbenches also check every latency listed
above, and they check that starts and key loads are dropped when they should be. `tb_rc_top`
runs the whole engine at its default parameters. It loads several keys and sends mixed
RC5/RC6 encrypt/decrypt traffic. It counts each mechanism (both key schedules, the four
cipher/direction combinations, cipher switches, dropped starts, ignored key loads) and
fails if any of them never happened. `tb_rc_top_std` runs the engine in the standard
configurations, RC6-32/20/16 and RC5-32/20/16 (`W6 = 32, R6 = 20, R5 = 20`). In that
configuration it runs the RC6 known-answer vectors in both directions and checks random RC5
and RC6 blocks against the model.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/rc_pkg.sv tb/tb_rc_ref_pkg.sv tb/tb_rc_top.sv --top tb_rc_top
    ./obj_dir/Vtb_rc_top

To run another testbench, replace `tb_rc_top` with it: `tb_rc_top_std`, `tb_rc5_core`, `tb_rc6_core`,
`tb_rc_key_expand`, `tb_rc5_encrypt`, `tb_rc5_decrypt`, `tb_rc6_encrypt`, `tb_rc6_decrypt` or
`tb_rc6_f`. Verilator finds the other modules through `-Irtl`. Each testbench runs in well
under a second.

## Trust and limits

* The functional behaviour is checked against independent vectors for RC5-32/12/16 and
  RC6-32/20/16. It is checked against the reference model for the RC6-16/12/16 default.
* The RTL lints clean under Verilator `-Wall` and elaborates in Yosys (slang front end). It has
  not been placed and routed, and the combinational round (two chained add-rotate stages, or a
  multiplier followed by a rotator) will set the clock rate.
* This RTL does no side-channel hardening. The data-dependent rotators have
  data-independent timing, but their power is not masked.
