# V2F instruction decompression core

Compressed program code saves memory. Most code compressors use fixed-to-variable codes (Huffman,
arithmetic coding), so the decompressor cannot tell where one codeword ends until it has decoded
it. That forces it to work sequentially. A **variable-to-fixed (V2F)** code turns this around. Each
codeword is exactly N bits long and stands for a run of program bits of varying length. The
compressed stream can therefore be cut into N-bit pieces without decoding anything. With a
memoryless code, all the pieces can be decoded at the same time. This suits VLIW processors, which
must fetch several operations per clock.

This repository holds synthesizable SystemVerilog for two decompression engines:

* a **memoryless V2F engine**. Its Tunstall codebook is fixed in logic for one instruction set. It
  decodes `LANES` codewords per clock with parallel lookup units.
* a **Markov V2F engine**. It keeps one codebook per state of a Markov model in a loadable RAM and
  decodes one codeword per clock.

Both engines sit between the compressed program memory and the instruction fetch or cache refill
path. Each one takes the byte address of a compressed block and returns the uncompressed block.
The coding schemes follow the paper *Code Compression for VLIW Processors Using Variable-to-fixed
Coding* (Xie, Wolf, Lekatsas, ISSS 2002). The paper does not design the datapath around the
decoders (fetch, buffering, packing, handshakes, widths), so that part is this design's own. The
sections below say which parts are which.

## How a V2F code works

**Tunstall tree.** Take the probability that a program bit is 0. It is about 0.83 for IA-64 code
and about 0.75 for TMS320C6x code. Start with a tree whose root has two leaves, `0` and `1`. Split
the most probable leaf into its two children, and repeat until the tree has 2^N leaves. Each leaf
is a bit string and gets one N-bit codeword. Every long enough bit string starts with exactly one
leaf. Compression walks the tree from the root, one program bit at a time. When the walk reaches a
leaf, the compressor emits that leaf's codeword and goes back to the root. Decompression is a
table lookup from codeword to string.

Example, N = 2 and P(0) = 0.8 (this design's default codeword numbering):

| codeword | string |
|---|---|
| 00 | `1` |
| 01 | `01` |
| 10 | `001` |
| 11 | `000` |

With this table, `000 01 001` compresses to `11 01 10`.

`v2f_pkg::tunstall_book(p0_permille, n)` builds this tree while the design elaborates. It uses
30-bit fixed-point probabilities. When two leaves are equally probable, the one stored first is
split. The codewords are numbered in descending lexicographic order of the leaf strings, which
gives the table above. The code is equally good under any numbering. The expected string lengths
for N = 2..6 at both probabilities are 2.519, 4.286, 5.706, 7.186 and 8.777 bits (P(0) = 0.83) and
2.312, 3.538, 4.752, 5.998 and 7.223 bits (P(0) = 0.75). The builder reproduces all ten, and the
decoder testbench checks them.

**Blocks.** Code is compressed one block at a time so that any block can be fetched on its own.
Two rules come with this:

* *End of block.* If the walk ends inside the tree at the end of a block, the compressor adds
  padding bits until it reaches a leaf. The decompressor knows the block's size, so it keeps the
  first `BLOCK_BITS` decoded bits and discards the rest.
* *Byte alignment.* Each compressed block is padded to a whole number of bytes, so every block
  starts on a byte boundary.

**Markov V2F.** A Markov model with D layers and W nodes per layer (a "D x W model") gives each
state its own probabilities. Each state gets its own Tunstall tree, built from the edge
probabilities. Each leaf also records the state the model reaches after that leaf's string. After
emitting a codeword, the compressor continues with the codebook of that next state. Every block
starts in state 0. In the paper's 4x4 example, state 0 has `1`→00 (next state 6), `01`→01 (10),
`001`→10 (14) and `000`→11 (12). Compression is better than with a memoryless code. The cost is
that a codeword can only be decoded after the one before it, because that one selects the
codebook.

**Low-power codeword assignment.** The numbering of codewords inside each codebook is free. It can
be chosen so that codewords that follow each other on the instruction bus differ in few bits. The
paper does this with a greedy algorithm over a codeword transition graph. That assignment is done
offline. In hardware it only changes the table contents: the memoryless decoders take any codebook
through their `BOOK` parameter, and the Markov codebook RAM holds any numbering. The Markov
testbenches load codebooks with random numberings.

## Memoryless engine (`v2f_memoryless_engine`)

```
  memory ──► v2f_stream_fetch ──► v2f_parallel_decoder ──► v2f_block_assembler ──► out
             (byte-aligned start,    (LANES x "D" lookup,     (pack to OUT_W words,
              bit buffer)             join strings)            cut at BLOCK_BITS)
```

* **`v2f_decoder_d`** is the lookup unit "D". It is combinational: codeword in, string out. The
  string is left-aligned, with zeros after its length. By default the table is
  `tunstall_book(830, 4)`, whose longest string is 12 bits.
* **`v2f_parallel_decoder`** holds `LANES` lookup units. Joining their outputs is the hard part.
  Lane *i*'s string must land right after the strings of lanes 0..*i*-1. The unit adds up the
  lengths, shifts each string right by the sum of the lengths before it, and ORs the shifted
  strings together. This is all combinational. The output is `LANES*MAX_LEN` bits wide (96 by
  default) with a total length.
* **`v2f_stream_fetch`** turns the block's bytes into a bit stream. It reads 32-bit words,
  starting with the word that holds the block's first byte, and drops the bytes before the block.
  The bits go into a left-aligned shift buffer of `WIN_W + 2*MEM_W` bits. A new read is issued
  whenever the buffer has room for the reads already in flight plus one more word. Up to two reads
  can be in flight, so a memory with one cycle of latency keeps a 32-bit-per-clock consumer busy.
  The fetcher does not know where the block ends. It keeps reading until told to stop, and the
  surplus is never decoded.
* **`v2f_block_assembler`** appends the decoded strings to an accumulator and hands out `OUT_W`-bit
  words. It accepts only the bits the block still lacks, which is how the end-of-block padding is
  dropped. Its `in_ready` also depends on whether a word leaves in the same cycle, so packing runs
  without bubbles.

**Rate.** The engine decodes one chunk of `LANES` codewords (32 compressed bits by default) in
each cycle where the fetch buffer holds a full chunk and the assembler has room. A block of C
codewords takes exactly ceil(C / `LANES`) decode cycles. The testbenches check this. At P(0) = 0.83
a 4-bit codeword stands for 5.7 bits on average, so 8 lanes produce about 46 program bits per
clock.

## Markov engine (`v2f_markov_engine`)

```
  memory ──► v2f_stream_fetch ──► v2f_markov_decoder ──► v2f_block_assembler ──► out
                                  (codebook RAM, state feedback)
```

* **`v2f_markov_codebook`** is a RAM of `STATES * 2^N` entries with a synchronous read. The entry
  for codeword `cw` in state `s` is at address `{s, cw}` and holds `{next_state, len, string}`,
  with the string left-aligned in `SEQ_W` bits. Write entries through `cb_we/cb_addr/cb_wdata`
  while no block is in progress.
* **`v2f_markov_decoder`** builds the read address from the current state and the incoming
  codeword. The RAM's output register is also the decoder's output register. Its `next_state`
  field feeds straight into the state part of the next read address, so the next codeword is
  looked up in the following clock. The result is one codeword per clock with no bubbles. When the
  output stalls, no read is issued and the RAM holds its data. `start` (and `flush`) send the
  state back to `INIT_STATE` (0).

## Top level (`v2f_decompression_core`)

The two engines sit side by side, and each has its own ports (`ml_*` for memoryless, `mk_*` for
Markov):

| port group | direction | meaning |
|---|---|---|
| `*_req_valid`, `*_req_ready`, `*_req_addr[MEM_AW+1:0]` | in/out/in | start a block at this byte address; ready only when the last block is fully delivered and no read is outstanding |
| `*_mem_req`, `*_mem_addr[MEM_AW-1:0]` | out | one-cycle read command for a 32-bit word |
| `*_mem_rvalid`, `*_mem_rdata[31:0]` | in | one answer per command, in order, after any latency |
| `*_out_valid`, `*_out_ready`, `*_out_data[OUT_W-1:0]`, `*_out_last` | out/in/out/out | the block's `BLOCK_BITS/OUT_W` words; `out_last` marks the final one |
| `mk_cb_we`, `mk_cb_addr`, `mk_cb_wdata` | in | Markov codebook load |

All state is reset by the synchronous, active-low `rst_n`. **Bit order:** both the compressed
stream and the uncompressed block are read most significant bit first. Byte 0 of a memory word is
bits `[31:24]`. The first bit of a block is bit `OUT_W-1` of its first output word.

**Markov codebook word** (`MK_EW = MK_ST_W + MK_LEN_W + MK_SEQ_W`, 9 + 5 + 16 = 30 bits by
default): `{next_state[MK_ST_W-1:0], len[MK_LEN_W-1:0], string[MK_SEQ_W-1:0]}`. The string's first
bit is the MSB of the string field, and bits after `len` are ignored.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N` | 4 | the paper's recommended codeword length |
| `P0_PERMILLE` | 830 | the paper's IA-64 zero-bit probability; use 750 for TMS320C6x |
| `MK_STATES` | 512 | the paper's IA-64 128x4 Markov model |
| `LANES` | 8 | this design (`LANES*N` = memory width; the paper's figure draws four decoders) |
| `MEM_W`, `MEM_AW` | 32, 16 | this design (256 KiB of compressed code) |
| `OUT_W` | 128 | this design (one IA-64 bundle) |
| `BLOCK_BITS` | 256 | this design (one C6x fetch packet, two IA-64 bundles); must be a multiple of `OUT_W` |
| `MK_SEQ_W` | 16 | this design: the longest string one Markov codeword may stand for |

## Departures and limits

* The paper gives the coding schemes, the parallel lookup structure and the idea of a codebook
  RAM with next-state feedback. Block size, memory and output widths, lane count, handshakes, bit
  order and the codebook word format are not given and are this design's choices.
* The paper does not say how a block's compressed address is found (for example an address
  table). Here the requester supplies the byte address.
* Markov strings are limited to `MK_SEQ_W` = 16 bits. The paper gives no bound. Whoever builds the
  Markov trees must keep to this limit (the testbench model does).
* `N` is fixed when the design elaborates. Codebooks for N = 2, 3, 5 or 6 need a rebuilt design.
  A 32x32 Markov model (1024 states) needs `MK_STATES = 1024`. The two workload testbenches
  `tb_v2f_workload_code_width` and `tb_v2f_workload_markov_width` elaborate the engines with
  these values and pass.
* The compressor, the Markov model statistics and the greedy low-toggle assignment are offline
  software and are not part of the RTL. The testbenches contain a behavioural encoder, a random
  Markov model and a version of the greedy assignment, used to make test data.
* The paper says a 4-bit decoder needs fewer than 100 gates. Generic yosys synthesis of
  `v2f_decoder_d` at its defaults (4-bit IA-64 code, 12-bit string and 6-bit length outputs),
  mapped to two-input gates by ABC, gives 35 gates. The paper's area figure for a 0.25 um cell
  library was not checked.

## Simulation

Every testbench in `tb/` checks its own results and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog. They use two helpers: `tb_v2f_util` (a
package with the reference encoder, a random layered Markov model and codebook packing) and
`tb_v2f_mem` (a word memory with random read latency).

| testbench | what it covers |
|---|---|
| `tb_v2f_decoder_d` | the paper's 2-bit example table; completeness, prefix-freeness, Tunstall optimality and the average string lengths above for ten codebooks |
| `tb_v2f_parallel_decoder` | all 256 inputs of a 4-lane 2-bit decoder; random chunks at the default size |
| `tb_v2f_stream_fetch` | bit-exact streams from random byte addresses, random consumption, stop and restart |
| `tb_v2f_block_assembler` | packing, truncation of the last string, garbage after each string's length, stalls |
| `tb_v2f_markov_codebook` | read latency and hold |
| `tb_v2f_markov_decoder` | the paper's state-0 codebook, random codebooks, one codeword per clock |
| `tb_v2f_memoryless_engine` (runs `tb_v2f_ml_run` twice), `tb_v2f_markov_engine` | whole blocks in random order, unaligned starts, padding, stalls, decode rate; the memoryless test also runs a 4-lane engine with the C6x code |
| `tb_v2f_decompression_core` | both engines at the default parameters at the same time, with a 512-state Markov model |
| `tb_v2f_workload_code_width` | the memoryless engine re-elaborated with 2-, 3-, 5- and 6-bit codewords for both source probabilities, eight engines in all (runs `tb_v2f_ml_run`); every word checked, compression ratio held against N / L |
| `tb_v2f_workload_markov_width` | the Markov engine re-elaborated with 2- and 3-bit codewords for a 32x4 and a 128x4 model, plus a 32x32 model (1024 states) with 4-bit codewords; five engines in all (runs `tb_v2f_mk_run`) |
| `tb_v2f_workload_tms` | TMS320C6x-style code on the default design: the P(0) = 0.75 Tunstall code loaded as a one-state Markov model, and a 32x4 (128-state) model |
| `tb_v2f_workload_bus_toggle` | the low-toggle study: six model sizes from 1x1 to 4x32, arbitrary vs greedy codeword numbering, toggles counted on the memory read bus |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/v2f_pkg.sv tb/tb_v2f_util.sv tb/tb_v2f_decompression_core.sv \
    --top-module tb_v2f_decompression_core -o sim
./obj_dir/sim
```

Each testbench finishes in a few seconds. The programs are synthetic: random bits or random
Markov sources, not real IA-64 or C6x binaries.

**Bus toggles.** `tb_v2f_workload_bus_toggle` implements the greedy renumbering in the testbench,
decompresses both numberings on the engine, and checks every word. On its synthetic sources, bus
toggles relative to the uncompressed program on a 32-bit bus fall as the model grows. Typical
runs move from about 1.4 (arbitrary numbering) and 1.35 (greedy) with one state to about 1.1 and
0.7 with 128 states. The paper reports the same trend for a real program. The testbench packs
blocks back to back at byte boundaries. The paper found it better for toggling to leave a
block's last word unfilled instead. Either layout works here, because a block may start at any
byte address.

**Compression.** With random 256-bit blocks at P(0) = 0.83, the memoryless code plus byte
padding gives a compressed-to-original size ratio of about 0.73. At P(0) = 0.75 it is about 0.86.
`tb_v2f_workload_code_width` prints the same figure for the other codeword widths. At
P(0) = 0.83 it gives 0.81, 0.72, 0.71 and 0.71 for N = 2, 3, 5 and 6. At P(0) = 0.75 it gives
0.89, 0.86, 0.86 and 0.86. The ideal value is N divided by the average string length. Byte
padding and the padded last string add two to three percent per 256-bit block.
