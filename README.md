# Processor-driven decompression of deterministic scan tests

An SOC with an embedded processor can take over most of the work of scan test.
Instead of streaming every bit of every test vector from the tester, the tester
sends a compressed description of the test set into the processor's on-chip
memory. The processor rebuilds each vector there and feeds it to the scan chains
through small serializers. Less data crosses the tester interface, so tester
memory and test time both shrink. Scan shifting also runs at the system clock,
even when the tester is much slower.

The compression is simple. Each test vector is cut into N fixed-size blocks of
b bits. The next vector is described only by the blocks in which it differs
from the current one. Unspecified (X) bits of a test cube are filled from the
previous vector, so consecutive vectors often differ in only a few blocks.

This repository holds synthesizable SystemVerilog for the on-chip test logic
and self-checking testbenches for every block. The processor's decompression
program is implemented as a small hardwired controller (`decomp_ctrl`). It does
the same memory reads and writes and follows the same loop. The processor
itself, the tester and the logic of the cores under test are not part of the
RTL.

## Replacement words

A replacement word is one W-bit memory word with three fields, from the most
significant bit down:

| field | width | meaning |
|---|---|---|
| last flag | 1 | this is the final word of the current vector |
| block number | ceil(log2 N) | which block to replace |
| new block pattern | b | the new contents of that block |

The block size comes from filling the word: `1 + ceil(log2 N) + b = W`. At the
defaults (W = 32, N = 8) the block number has 3 bits and b = 28, so a vector is
8 x 28 = 224 scan bits. Shorter scan lengths are padded.

A vector that differs from its predecessor in x blocks costs x words. Only the
last of them has the last flag set. The first vector of a session must replace
every block, because the block store starts with unknown contents. If a vector
repeats its predecessor exactly, one word that rewrites any block with its own
value, plus the last flag, applies it again.

Example with N = 8. Vector t+1 differs from vector t in blocks 1, 2, 5 and 7,
so it is sent as four words:

```
last  block  pattern (28 bits)
  0    001   <new block 1>
  0    010   <new block 2>
  0    101   <new block 5>
  1    111   <new block 7>
```

Compression therefore depends on the order of the vectors. Ordering them to
minimise the total number of changed blocks is a minimum-cost Hamiltonian path
problem. It is solved off-line, on the tester side, and is outside this RTL.

## How data moves through the chip

```
 tester --tck, NCH bits/cycle--> mem_io_ctrl --W-bit words--> onchip_mem
                                       | words_avail / consume      ^  |
                                       v                            |  v
                                   decomp_ctrl  <--------------------  (port B)
                                       | ser_load[K], ser_data (shared bus)
            +--------------------------+--------------------------+
            v                          v                          v
        serializer 0               serializer 1      ...      serializer K-1
            v                          v                          v
        scan chain 0               scan chain 1      ...      scan chain K-1
            +----------- scan-out bits (masked by shift) ---------+--> misr
```

**On-chip memory** (`onchip_mem`) has two areas:

* The *replacement-word area* is M words at `REPL_BASE`. The tester writes it
  cyclically, modulo M, and the controller only reads it.
* The *current-block area* is N words at `BLK_BASE`. It holds the vector being
  built, one block in the low b bits of each word. The controller reads and
  writes it.

Port A is the tester's write-only port. Port B is the controller's read/write
port, with data one cycle after the request. The defaults are `DEPTH = 64`,
`REPL_BASE = 0`, `M = 16` and `BLK_BASE = 32`, which leaves room for up to 32
blocks.

**Memory I/O controller** (`mem_io_ctrl`). The tester has its own clock,
`tck`, which is slower than the system clock, and NCH data channels (default 8).
In the tester domain, W/NCH cycles with `tst_valid` high, most significant chunk
first, make up one word. A cycle with `tst_valid` low is a no-operation; this
is how a tester program slows itself down.

A finished word is held in a register and announced by toggling a request bit.
The toggle crosses into the system clock domain through a two-flop
synchronizer. Two to three system clocks after the tester edge, the word is
written into the next slot of the reserved area. The held word has to stay
stable until then, so W/NCH tester cycles must last longer than 4 system clocks.

The controller also counts written-but-unread words (`fill`). Two signals come
from that count:

* `words_avail` lets the decompression controller wait when the tester is
  behind.
* `overflow` is a sticky flag. It is set when a word arrives while all M slots
  still hold unread words, so one of them is lost.

**Serializers** (`serializer`). Each serializer is a b-bit shift register with a
bit counter. A load is accepted only while the serializer is idle. After a load
it shifts the block into its chain, most significant bit first, for exactly b
cycles, and holds `busy` high meanwhile. Its `shift_en` output is also the
chain's shift enable. A chain therefore moves only while its own serializer is
emptying, and the chains shift independently of each other.

**Scan chains** (`scan_chain`). The chains belong to the cores under test. Here
each one is a plain mux-D shift register with a parallel capture input. Chain j
receives blocks j, j+K, j+2K, ..., so its length is that block count times b.
The first block shifted in ends at the scan-out end. Read from the top bit
down, the chain's contents are its blocks in the order they were sent. The top
level exposes every chain's contents as `chain_q` (the stimulus to the cores)
and takes the cores' outputs as `cut_resp`.

**MISR** (`misr`). A 16-bit internal-XOR signature register with feedback
polynomial x^16 + x^14 + x^13 + x^11 + 1 (`POLY = 16'h6801`). It advances in
every cycle in which any chain shifts. Chain j's scan-out bit is XORed into bit
j, or 0 if that chain is not shifting in that cycle. A response is compacted
while the next vector shifts in. The last response of a session is therefore
compacted only if one more vector follows it; a tester that needs it appends a
dummy vector.

## The decompression loop

`decomp_ctrl` runs this loop, one state per memory access:

1. **FETCH.** If an unread word is available, read `REPL_BASE + index`. If none
   is available and `end_of_test` is high, stop (`done`). Otherwise wait; these
   cycles are counted in `starve_cycles`.
2. **DECODE.** The word arrives. Write its pattern to `BLK_BASE + block
   number`, pulse `consume` and advance the index modulo M. On a clear last
   flag go back to FETCH. At the default `U_CYCLES = 2` a word costs 2 cycles
   (u = 2). A larger `U_CYCLES` adds stall cycles between the read and the
   write. This models a processor whose instruction set needs more cycles
   per word.
3. **APPLY.** For i = 0 .. N-1, wait until serializer (i mod K) is idle, read
   block i, and load it into that serializer on the next cycle. Cycles spent
   waiting on a busy serializer are counted in `ser_wait_cycles`.
4. **DRAIN.** Wait until every serializer is idle.
5. **CAPTURE.** Pulse `capture` for one cycle; this is the system clock applied
   to the cores. The chains load the response. `vec_count` increments. Go back
   to FETCH.

The controller fills the serializers round-robin, so the K chains shift in
parallel. Applying a vector takes about `ceil(N/K) * b` cycles of shifting plus
a few cycles of download overhead. At the defaults this is 2 x 28 = 56 cycles
of shifting, and 66 cycles from the first block read to capture. The overhead
is 2 cycles per block download for the first K blocks, plus drain and capture.
A processor running the same loop in software would take more cycles per step.
Only the constants change: u, and the download cost per block. u is the
`U_CYCLES` parameter; the download cost is fixed at 2 cycles.

A session is started by a `start` pulse. The pulse also clears the I/O
controller's pointer and count and the MISR. The session ends when `end_of_test`
is high and every word has been processed.

## Keeping ahead of the tester

The tester writes the M-word area without any handshake, so the controller must
process every group of M words before the tester wraps around onto them. With
tester period T_T, n channels, system period T_p, and e of the M words carrying
the last flag, no word is overwritten if

```
(M*u + e*A) * T_p  <  (W*M/n) * T_T
```

where A is the cycles per vector application. The idealised form is
A = N*b/K; with this controller, A = 66 at the defaults. The worst case is e = M,
every word a complete vector. At the defaults that needs T_T of at least 18
system clocks. With a sparser last flag, a faster tester is fine. If the
condition cannot be met, the tester is slowed down, or the vectors are
reordered so that fewer words end a vector.

This RTL makes the condition observable with `fill` and `overflow`. It also
adds the opposite protection, which the loop needs in practice: when the
controller is faster than the tester, it waits on `words_avail` instead of
reading a slot that has not been written yet.

## Parameters

| parameter | default | notes |
|---|---|---|
| `W` | 32 | word size; sets b together with N |
| `N_BLK` | 8 | blocks per vector (at least 2, at least K) |
| `K` | 4 | scan chains and serializers |
| `M` | 16 | words in the replacement-word area |
| `NCH` | 8 | tester channels; W must be a multiple of it |
| `DEPTH` | 64 | memory words |
| `REPL_BASE`, `BLK_BASE` | 0, 32 | the two memory areas; must not overlap |
| `U_CYCLES` | 2 | controller cycles per replacement word (u); at least 2 |
| `MISR_W`, `MISR_POLY` | 16, 16'h6801 | signature register |

W = 32 and the 8-block, 28-bit layout are the reference configuration. K, M,
NCH, the memory map and the MISR are this implementation's choices. N need not
be a multiple of K; chains then differ in length, and `chain_q` / `cut_resp`
use the low bits of each chain's slot.

## Benchmark circuits

Published results for this scheme use W = 32 and these ISCAS circuits. A circuit
runs on the default build if its scan length fits in 8 x 28 = 224 bits.

| circuit | scan bits | blocks x b at W = 32 | default build |
|---|---|---|---|
| c2670 | 233 | 9 x 27 | needs `N_BLK = 9` |
| c5315 | 178 | 7 x 28 | fits |
| c7552 | 207 | 8 x 28 | fits |
| s5378 | 199 | 8 x 28 | fits |
| s9234 | 247 | 10 x 27 | needs `N_BLK = 10` |
| s13207 | 700 | 27 x 26 | needs `N_BLK = 27` |
| s15850 | 611 | 24 x 26 | needs `N_BLK = 24` |
| s38417 | 1664 | 70 x 24 | needs `N_BLK = 70` and `DEPTH = 128` |

The real test sets are not included. The testbenches use random test cubes of
these scan lengths and vector counts. The vector count is the original test
data size divided by the scan length: 151, 139, 303, 150, 198, 266, 141 and 149.
With about 8% of the bits specified per cube, the random cubes compress by only
17-24%. That figure reflects the synthetic cubes, not the circuits.

## Verification

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `serializer_tb` | bit stream, MSB first; exactly b shift cycles; back-to-back loads |
| `scan_chain_tb` | shifting against a reference; capture, and its priority over shift |
| `misr_tb` | per-cycle signature against a bit-level polynomial model; clear; LFSR period 65535 |
| `onchip_mem_tb` | both ports, simultaneous writes, read latency |
| `mem_io_ctrl_tb` | chunk assembly; modulo-M slots; fill count; overflow on word M+1; clear |
| `decomp_ctrl_tb` | block order and serializer mapping; no load into a busy serializer; one word per u cycles, run at u = 2 and u = 5; apply time within `ceil(N/K)*b + 2K + 4`; waiting on the tester and on serializers; `done` |
| `soc_test_top_tb` | the whole design at its default parameters |
| `table1_workloads_tb` | the whole design in the five larger benchmark configurations, one at u = 6 and one with K = 8 |

`soc_test_top_tb` first runs a directed two-vector session over all 224 bits.
The second vector differs from the first in blocks 001, 010, 101 and 111, each
replaced by the pattern `1011010011010011010001101010`. It must go out as
exactly four replacement words, and both vectors must appear in the chains at
their captures. It then runs three sessions: 139, 303 and 150 vectors at the
three benchmark scan lengths that fit. The tester runs at the slowest period that can
never overflow, about 18 system clocks. For
each session it checks:

* the contents of every chain at every capture;
* the final signature, against a model of the chains and the MISR;
* that there is no overflow;
* that every vector is applied;
* that the replacement-word area is reused modulo M;
* that the controller both waited for serializers and waited for the tester.

A further session repeats the 303-vector case with the tester period taken from
the condition in "Keeping ahead of the tester". e is the largest number of
last flags found in any M consecutive words of that stream, typically 5. The
resulting period is about 6 system clocks instead of 18, and the session must
still end without overflow.

The tester clock is not an integer multiple of the system clock, so the two
drift against each other. A last session runs the tester at about twice the
system period and checks that `overflow` rises.

`table1_workloads_tb` instantiates the top seven times, through the helper
`tb/workload_runner.sv`. Five instances use `N_BLK` = 9, 10, 24, 27 and 70, the
last with `DEPTH = 128`. They run the scan lengths and vector counts of c2670,
s9234, s15850, s13207 and s38417, with the same checks. The sixth runs c2670
again with `U_CYCLES = 6`, with the tester slowed to match. The seventh runs
s15850 with K = 8 chains. The bound on the apply phase drops from 168 to 98
cycles, so the no-overflow tester period drops from 43 to 26 system clocks; the
testbench checks that it drops. N = 9 and 10 leave the chains unequal in
length, which this covers as well. The whole run takes about 12 seconds.

`decomp_ctrl_tb` runs the helper `tb/decomp_ctrl_check.sv` twice, at u = 2
and u = 5.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/tdc_pkg.sv \
          tb/soc_test_top_tb.sv --top-module soc_test_top_tb -o sim
./obj_dir/sim
```

Swap in any other `tb/*_tb.sv` and its module name. `rtl/tdc_pkg.sv` holds the
field-width formula, the block-to-chain mapping and the controller's state type,
and goes first on the command line.

## Where this RTL departs from, or adds to, the scheme

* **Hardwired controller instead of processor software.** This is the largest
  departure. The memory traffic and the loop are the same. The cycle counts are
  those of the controller: u = `U_CYCLES` (default 2), and 2 cycles per block
  download.
* **A dedicated test-time tester port.** The tester interface is a simple
  word-assembling port with a toggle handshake, not the SOC's functional
  memory interface.
* **Added signals.** `words_avail`/`consume` flow control, the `fill` count,
  the `overflow` flag and the event counters are additions.
* **Choices where the scheme leaves details open.** The field order within the
  word, the MSB-first shifting, the MISR polynomial and its masking of idle
  chains, and the reset behaviour are implementation choices.
* **When a word's slot is freed.** The scheme's loop moves its read index on
  only after the vector has been applied. This controller advances the index,
  and frees the slot, as soon as the word is decoded. The block it carries is
  already in the current-block area then. The no-overflow condition is the same
  either way, since the apply time is counted against the same group of M words.
* **End of a session.** It is an `end_of_test` input, not an instruction in the
  data stream.
* **Program download.** The memory port A only ever writes the replacement-word
  area, because the processor program download is not modelled.
