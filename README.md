# Iterated addition: a sequential multi-operand adder and a SHA-256 datapath

An iterated algorithm becomes hardware as two parts: registers that hold the
algorithm's state from one iteration to the next, and combinational logic
that computes the next state from the current one. One iteration runs per
clock cycle. This repository applies that idea to two designs:

* **A sequential multi-operand adder.** It adds a stream of operands, one per
  cycle, into an accumulator (`A <- 0; loop A <- A + X`).
* **A SHA-256 hashing unit.** It hashes a message given as padded 512-bit
  blocks. Each block takes 64 iterations of the message schedule and of the
  compression function, running in lock-step, one per cycle. A hash update
  then adds the result into the 256-bit hash.

The two designs are independent. `iterated_addition_top` places them side by
side. They share only clock and reset.

## The SHA-256 unit

```
                 blk[511:0]
                     |
             +-------v--------+  m0 = W_i   +------------------+
             | sha256_msg_    |------------>|                  |
             | sched          |             | sha256_compress  |  vars = a..h
             | 16 x rgst,     |  K(i)       | a..h registers,  |------+
             | sigma0, sigma1,|  +-------+  | T1/T2 logic      |      |
             | 4-input adder  |  | k_rom |->|                  |      |
             +----------------+  +---^---+  +--------^---------+      |
                    ^ ld_mreg        | i             | h_start        v
                    | upd_mreg       |     +---------+----------------------+
             +------+----------------+--+  | sha256_hash_update              |
             | sha256_ctrl              |->| H_0..H_7 registers,             |--> digest
             | IDLE -> ROUND x64 -> UPD |  | initial values, 8 adders        |
             +--------------------------+  +---------------------------------+
```

### Message schedule: a sliding window of 16 words

SHA-256 needs 64 message words W_0..W_63 per block. The first 16 are the
block itself. Each later one is
`W_t = sigma1(W_t-2) + W_t-7 + sigma0(W_t-15) + W_t-16`. Storing all 64 words
is not needed, because each new word depends only on the 16 words before it.
`sha256_msg_sched` therefore keeps a 16-register shift chain M_0..M_15
(`rgst` instances). Each iteration does three things:

* It shifts every word one place towards M_0.
* It writes `NEW_WORD = sigma1(M_14) + M_9 + sigma0(M_1) + M_0` into M_15.
* It delivers M_0 as `m0`.

After the block is loaded, M_0 holds W_0. After iteration t it holds
W_(t+1). So `m0` is exactly the word the compression function needs in
iteration t.

Each register has a 2-input multiplexer in front of it:

* `ld_mreg = 1` selects the word's slice of the block. M_0 gets
  `blk[511:480]` and M_15 gets `blk[31:0]`.
* `ld_mreg = 0` selects the shifted word, or `NEW_WORD` for M_15.

`upd_mreg` is the load enable of all sixteen registers. A block load
therefore needs both signals high. An iteration needs only `upd_mreg`. The
last few words the chain computes (W_64 and later) are never used. They cost
nothing, because the block's next load overwrites them.

### Compression function and hash chaining

`sha256_compress` holds the working variables a..h. For each block they
start from the current hash words. One iteration is a single combinational
stage:

```
T1 = h + Sigma1(e) + Ch(e,f,g) + K(i) + W_i
T2 = Sigma0(a) + Maj(a,b,c)
h<-g  g<-f  f<-e  e<-d+T1  d<-c  c<-b  b<-a  a<-T1+T2      (mod 2^32)
```

`sha256_k_rom` supplies K(i). It is the 64-entry constant table of the
SHA-256 standard, written as a combinational case statement. After iteration
63, `sha256_hash_update` adds a..h into H_0..H_7 word by word. The next block
of the same message starts from these updated words. A new message starts
from the standard's initial values (6a09e667 ... 5be0cd19).

The first block of a message needs no extra cycle for initialisation. While
`init` is high, the hash registers load the initial values. In the same
cycle, the `h_start` output passes those values straight to the compression
registers.

The functions Sigma0, Sigma1, Ch, Maj, sigma0, sigma1 and the right rotation
are in `sha256_pkg`. That package also defines `word_t` (32 bits) and
`hash_t`, which is eight words packed most significant first. H_0 (or a) is
element 7, in bits 255:224, and H_7 (or h) is element 0, in bits 31:0.

### Block interface and timing

| signal | dir | meaning |
|---|---|---|
| `blk[511:0]` | in | padded message block, first word in bits 511:480 |
| `blk_valid` | in | a block is offered |
| `blk_first` | in | first block of a message: start from the initial hash values |
| `blk_last` | in | last block of a message |
| `blk_ready` | out | the unit takes the offered block in this cycle |
| `digest[255:0]` | out | hash H_0..H_7, H_0 in bits 255:224 |
| `digest_valid` | out | `digest` is the hash of a complete message |

`sha256_ctrl` sequences each block through three states:

1. **Load cycle** (IDLE, with `blk_valid & blk_ready`). The schedule loads
   the block, a..h load their start values, and the hash registers
   initialise if `blk_first` is set.
2. **ROUND, 64 cycles.** The iteration index `i` runs from 0 to 63.
3. **UPDATE, 1 cycle.** The hash registers add a..h.

A block thus takes **66 cycles**. `blk_ready` returns 65 clock edges after
the edge that took the block. `digest_valid` rises at the same edge when
that block carried `blk_last`. It stays high, with `digest` stable, until
the next block is taken. `blk` only needs to be valid in the load cycle.

A one-block message needs both `blk_first` and `blk_last`. Padding (a 1 bit,
zeros, the 64-bit message length) is the sender's job. The testbench
reference package shows one way to do it (`ref_pad`).

The critical path is the T1/T2 chain: a five-operand addition and then one
more adder for `a` and `e`. Nothing is pipelined.

## The sequential multi-operand adder

`multi_operand_acc` has three parts:

* an input register X, which takes `x_in` every cycle;
* an adder;
* an accumulator register A, which is fed back to the adder.

Every cycle, `A <- A + X` (mod 2^W, default W = 32). `clr` is a synchronous
`A <- 0` and starts a new sum. Raise `clr` in the cycle of the first operand
and present one operand per cycle. An operand goes through X, so it reaches
A two edges after it was presented. After n operands starting in cycle c0,
`a_out` holds their sum after edge c0+n+1. The sum wraps silently on
overflow; there is no carry-out.

## Design choices beyond the algorithm

The algorithms, the SHA-256 functions and constants, and the shape of the
message-schedule datapath (register chain, multiplexers, sigma blocks, one
4-input adder) follow the standard construction. The rest is this design's
own choice:

* The block handshake (`blk_valid`/`blk_ready`, `blk_first`, `blk_last`) and
  the `digest_valid` behaviour.
* The separate load and update cycles, which make 66 cycles per block. The
  update could overlap the next block's load to reach 65.
* The `h_start` bypass for the first block.
* Resets: asynchronous and active low. They clear the registers, and the
  hash registers reset to the initial values.
* The accumulator's width (32), its `clr` input and its wrap-around
  behaviour. The accumulator is as wide as the operands.
* The controller as a whole. Only the control signals `ld_mreg` and
  `upd_mreg` are part of the schedule's datapath.

## Files

| file | content |
|---|---|
| `rtl/sha256_pkg.sv` | types, SHA-256 bit functions, initial hash values |
| `rtl/rgst.sv` | register with load enable (parameter `W`) |
| `rtl/sha256_sigma0.sv`, `rtl/sha256_sigma1.sv` | schedule functions sigma0(M_1), sigma1(M_14) |
| `rtl/sha256_msg_sched.sv` | message schedule |
| `rtl/sha256_k_rom.sv` | round constants K(0..63) |
| `rtl/sha256_compress.sv` | a..h registers and one iteration |
| `rtl/sha256_hash_update.sv` | H_0..H_7 registers, initialisation, update |
| `rtl/sha256_ctrl.sv` | sequencer and block handshake |
| `rtl/sha256_core.sv` | SHA-256 unit |
| `rtl/multi_operand_acc.sv` | sequential multi-operand adder (parameter `W`) |
| `rtl/iterated_addition_top.sv` | both designs side by side (parameter `ACC_W`) |
| `tb/sha256_ref_pkg.sv` | reference SHA-256 model and padding for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sha256_core \
    rtl/sha256_pkg.sv tb/sha256_ref_pkg.sv tb/tb_sha256_core.sv
./obj_dir/Vtb_sha256_core
```

Replace `tb_sha256_core` with any other testbench. Verilator finds the RTL
modules in `rtl/` by file name. Every testbench runs in a few seconds.

## How it is verified

The testbenches do not trust the RTL's tables. The reference package
computes the round constants and the initial hash values from their
definitions: the fractional parts of the cube and square roots of the first
primes. It also hashes in the textbook order, expanding all 64 words first.

* `tb_sha256_core` checks three published SHA-256 results: `"abc"`, the
  empty message, and the 56-byte two-block message
  `"abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"`. It then
  hashes 25 random messages of 0 to 300 bytes and compares them with the
  reference. It also checks the 66-cycle block time and `digest_valid`.
* `tb_sha256_msg_sched` compares every delivered word with the reference
  expansion, including pause cycles. `tb_sha256_compress` compares every
  iteration, and also the a..h values the standard's "abc" example reaches.
  `tb_sha256_ctrl` checks the strobes cycle by cycle.
  `tb_sha256_k_rom` checks all 64 constants.
* `tb_multi_operand_acc` checks running sums at widths 32 and 8.
* `tb_iterated_addition_top` runs both designs at their default parameters
  at once. It counts how often each mechanism occurs: accumulator clear and
  wrap-around, back-pressure on the block input, first and chained blocks,
  iterations, hash updates and digests. A mechanism that never occurs counts
  as a failure.

Each testbench was also run against a copy of its module with one deliberate
bug, such as a wrong rotation amount, a wrong tap, one iteration fewer, or a
flipped constant bit. Every such copy failed its testbench.

## Limits

* One block at a time. There is no input buffering and no overlap between
  blocks.
* No padding logic.
* SHA-224 and the other SHA-2 variants are not supported.
* The multi-operand adder has no valid signal. It adds whatever is on `x_in`
  every cycle until the next `clr`.
