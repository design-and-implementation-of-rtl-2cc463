# (14,8) SEC-DED-DAEC-STEC protected memory

Radiation and noise can flip stored bits. In a dense memory, one particle
strike often upsets two or three neighbouring cells, not just one. A plain
SEC-DED code repairs a single flipped bit and reports two. This design adds
six check bits to every 8-bit data word, which gives a 14-bit codeword. The
decoder then:

- corrects any **single** error (SE);
- corrects any **double adjacent** error (DAE): two neighbouring codeword
  bits, 13 possible pairs;
- corrects a short list of **selected triple** patterns (STE). Only those
  whose syndrome is not already used by another pattern are kept;
- flags everything else: **DE** (a double error that is not adjacent,
  detected only) or **UE** (uncorrectable).

Decoding is a syndrome lookup. Six XOR trees give a 6-bit syndrome. A
64-entry table maps that syndrome to an error class and a correction vector,
and the vector is XORed onto the received word. The decoder is a two-stage
pipeline. The syndrome, and so error detection, is ready one cycle after the
input. The corrected data and the class flags are ready after two cycles. A
new word can enter every cycle.

The code follows the (14,8) SEC-DED-DAEC-STEC scheme of *Design and
Implementation of a SEC-DED-DAEC-STECC Error Control Code for Reliable Memory
System*. Its parity and syndrome equations, the lookup-table decoding, the
error classes and the 1-cycle/2-cycle timing come from that scheme. The
pipeline registers, the handshakes, the memory around the codec, and the
rules noted under "Where this design departs" are this design's own.

## The code

### Bit layout

Codeword bit *i* (1..14) sits at index *i*-1 of a `logic [13:0]`:

| codeword bits | 14 | 13 | 12 | 11 | 10 | 9 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| content | d8 | d7 | d6 | d5 | d4 | d3 | d2 | d1 | p1 | p2 | p3 | p4 | p5 | p6 |

So `encoded = {data, parity}`, with `data[i-1] = d_i` and
`parity = {p1,p2,p3,p4,p5,p6}`.

### Parity equations (encoder)

    p1 = d8 ^ d6 ^ d3 ^ d2          p4 = d8 ^ d5 ^ d3 ^ d1
    p2 = d7 ^ d6 ^ d5 ^ d4 ^ d2     p5 = d7 ^ d5
    p3 = d8 ^ d7 ^ d4 ^ d2 ^ d1     p6 = d6 ^ d4 ^ d3 ^ d1

### Syndrome (decoder)

Each syndrome bit repeats one parity check over the received word (`c_i` is
codeword bit *i*):

    s1 = c14^c12^c9^c8^c6          s4 = c14^c11^c9^c7^c3
    s2 = c13^c12^c11^c10^c8^c5     s5 = c13^c11^c2
    s3 = c14^c13^c10^c8^c7^c4      s6 = c12^c10^c9^c7^c1

The syndrome vector is written `{s1..s6}` with s1 on the left, as a 6-bit
value. A single error in bit *k* (1..6) then gives the value with only bit
*k* set: a bit-1 error gives `000001` and a bit-6 error gives `100000`.

A single error in each bit gives this syndrome (the columns of the
parity-check matrix, `ecc_pkg::H_COL`):

| bit | 1 | 2 | 3 | 4 | 5 | 6 | 7 (d1) | 8 (d2) | 9 (d3) | 10 (d4) | 11 (d5) | 12 (d6) | 13 (d7) | 14 (d8) |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| syndrome | 000001 | 000010 | 000100 | 001000 | 010000 | 100000 | 001101 | 111000 | 100101 | 011001 | 010110 | 110001 | 011010 | 101100 |

Every column is distinct and has odd weight: 1 for a parity bit, 3 for a
data bit. Two properties follow:

- a single error never gives a zero syndrome, and no two single errors look
  the same;
- any two errors give a non-zero syndrome of even weight, so they are never
  mistaken for a single error. Any three errors give an odd-weight syndrome,
  which can look exactly like a single error.

## The syndrome lookup table

The table is a 64-entry constant (`lut_t`, 17 bits per entry: a 3-bit class
and a 14-bit correction vector). The package function
`ecc_pkg::build_lut` builds it at elaboration, not from typed-in numbers. It
fills the table in this order:

1. Every entry starts as NONE for syndrome 0, DE for any other even-weight
   syndrome, and UE for an odd-weight one. The correction is zero.
2. The 14 single-error syndromes become SE, each with its one-bit correction.
3. The 13 adjacent pairs (*i*, *i*+1) become DAE, unless the syndrome is
   already taken.
4. Each selected triple in `TE_MASKS` becomes TE, unless the syndrome is
   already taken.

So when two patterns share a syndrome, SE wins over DAE, and DAE wins over
TE. A triple is only corrected if its syndrome belongs to it alone.

With the default parameters the table holds:

| class | entries | syndromes |
|---|---|---|
| NONE | 1 | 000000 |
| SE | 14 | the columns above |
| DAE | 13 | (1,2) 000011, (2,3) 000110, (3,4) 001100, (4,5) 011000, (5,6) 110000, (6,7) 101101, (7,8) 110101, (8,9) 011101, (9,10) 111100, (10,11) 001111, (11,12) 100111, (12,13) 101011, (13,14) 110110 |
| TE | 1 | (2,5,8) 101010 |
| DE | 18 | remaining even-weight syndromes |
| UE | 17 | remaining odd-weight syndromes |

### The selected triples

The default list has three triple patterns: bits (1,4,7), (2,5,8) and
(1,3,6). Under the equations above:

- (1,4,7) gives `000100`, the syndrome of a bit-3 error;
- (1,3,6) gives `100101`, the syndrome of a bit-9 error;
- (2,5,8) gives `101010`, which nothing else uses.

Only (2,5,8) is therefore corrected as a triple. The other two are read as
single errors, and the "correction" leaves a wrong word. The original
scheme's table printed other syndromes for these three triples: `101011`,
`110101` and `111001`. Those values have even weight, and no triple error of
this code can produce an even-weight syndrome. Two of them are in fact the
syndromes of adjacent pairs (12,13) and (7,8). This design trusts the
equations, which agree with each other, and keeps the printed triples only
as bit positions. To correct other triples, pass your own list through the
`NUM_TE`/`TE_MASKS` parameters of `ecc_decoder` (at most 8). Any pattern
whose syndrome is already taken is dropped.

## What the code really guarantees

Each of the 64 syndromes has a single meaning. A pattern that shares its
syndrome with a table entry is silently "corrected" into wrong data. The test
`tb_ecc_table3_coverage` applies every error pattern of weight 0 to 4 through
the memory and sorts each result into one of three outcomes:

| injected error | patterns | data restored | flagged (DE/UE) | wrong data, no flag |
|---|---|---|---|---|
| none | 1 | 1 | 0 | 0 |
| single | 14 | 14 | 0 | 0 |
| adjacent double | 13 | 13 | 0 | 0 |
| non-adjacent double | 78 | 0 | 54 | 24 |
| triple | 364 | 1 | 208 | 155 |
| four bits | 1001 | 0 | 550 | 451 |

Single errors and adjacent doubles are always corrected. The weak point is
**non-adjacent doubles**. 24 of the 78 have the same syndrome as an adjacent
pair, so they are miscorrected rather than reported. Classic SEC-DED would
detect all 78. Use this code where upsets of adjacent cells dominate, not as
a strict superset of SEC-DED. Of the four-bit patterns, 36 are codewords
themselves (zero syndrome), and the other 415 wrong ones are miscorrected.

## Pipeline and timing

```
            ecc_memory_system
 wr_data ─► ecc_encoder ──► ecc_memory ──► ecc_decoder ─► rd_data, se/de/dae/te/ue, err_flag
            (parity gen +    (DEPTH x 14,    stage 1: syndrome gen ─► reg
             1 register)      upset port)    stage 2: error corrector (LUT) ─► XOR ─► reg
```

| path | latency |
|---|---|
| `ecc_encoder`: data to codeword | 1 cycle |
| `ecc_decoder`: codeword to `syndrome`, `err_detected` | 1 cycle |
| `ecc_decoder`: codeword to `corrected`, class flags | 2 cycles |
| `ecc_memory_system`: `wr_en` to word stored in the array | 2 edges (encoder register, then array write) |
| `ecc_memory_system`: `rd_en` to `det_valid`/`syndrome` | 2 cycles |
| `ecc_memory_system`: `rd_en` to `rd_valid`/`rd_data` | 3 cycles |

All stages are pipelined, so the decoder takes a codeword every cycle. The
original scheme reports 182 MHz on an FPGA and a throughput of
14 bits × 182 MHz / 2 cycles = 1.27 Gbit/s, which counts one word per
correction latency. At the same clock this pipelined decoder would move one
word per cycle. The clock rate itself is an FPGA timing result and cannot be
checked by simulation.

Handshake: each stage passes a `valid` bit along. `rst_n` is synchronous,
active low, and clears only the valid bits; the data registers are not
reset. In the memory, a read of an address in the cycle after its write
returns the old word, because the write reaches the array one cycle late.
Leave at least two cycles between the write and a read of the same address.
An assertion in `ecc_memory_system` warns when this rule is broken.

## Modules

| file | role |
|---|---|
| `rtl/ecc_pkg.sv` | sizes (K=8, R=6, N=14), types, `err_type_e`, the syndrome columns `H_COL`, the default triples, `build_lut` |
| `rtl/ecc_parity_gen.sv` | the six parity XOR trees (combinational) |
| `rtl/ecc_encoder.sv` | parity generator + codeword register |
| `rtl/ecc_syndrome_gen.sv` | the six syndrome XOR trees (combinational) |
| `rtl/ecc_error_corrector.sv` | 64-entry lookup: syndrome to class, one-hot flags and correction vector (combinational) |
| `rtl/ecc_decoder.sv` | 2-stage decoder: syndrome gen, corrector, correction XOR, data extraction |
| `rtl/ecc_memory.sv` | `DEPTH` x 14-bit array, synchronous write and read, upset injection |
| `rtl/ecc_memory_system.sv` | top: encoder, memory and decoder, plus `err_flag = de \| ue` |

The top's upset port (`inj_en`, `inj_addr`, `inj_mask`) XORs a mask into one
stored word. It models particle strikes and lets the correction be tested in
place. If a write and an upset hit the same word in the same cycle, the word
is stored with the upset applied. The write and sense circuits of a real
SRAM are analog. Here they are the array's plain write and read ports.

Parameters: `DEPTH` (default 256 words) and `ADDR_W` on the memory and the
top. `NUM_TE` and `TE_MASKS` on the decoder and the corrector. The code
itself (K, R, N and the equations) is fixed.

## Where this design departs

- **Codeword order.** The original text says the codeword is formed as
  `{d1..d8, p1..p6}`. Its syndrome equations only match its parity
  equations with data d8..d1 in bits 14..7 and p1..p6 in bits 6..1, so that
  layout is used.
- **Parity-check matrix.** The matrix printed with the scheme has repeated
  columns and does not match the equations. The columns used here are
  derived from the equations.
- **Triple syndromes.** See "The selected triples": the printed triple
  syndromes cannot occur, so the syndromes are computed.
- **Table coverage.** The original table lists only bits 1 to 6 and the
  adjacent pairs among them, as examples. Here all 14 single errors and all
  13 adjacent pairs are corrected.
- **DE and UE.** These are told apart by syndrome parity: an unlisted even
  syndrome is DE, an unlisted odd one is UE.
- **Own choices.** The valid/reset handshake, the encoder register, the
  memory depth and ports, the upset port, the read-after-write spacing rule
  and full pipelining are all this design's.

## Simulating

Each testbench checks its block against a reference model in
`tb/ecc_ref_pkg.sv`. That model is written from the parity masks and finds
errors by searching patterns, not by table lookup. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_memory_system.sv \
    --top-module tb_ecc_memory_system
./obj_dir/Vtb_ecc_memory_system
```

| testbench | what it covers |
|---|---|
| `tb_ecc_parity_gen` | all 256 data words |
| `tb_ecc_syndrome_gen` | all 16384 14-bit words; every codeword gives syndrome 0 |
| `tb_ecc_error_corrector` | all 64 syndromes, the printed single and adjacent rows, the entry count per class |
| `tb_ecc_encoder` | all data words streamed with gaps; 1-cycle latency; reset |
| `tb_ecc_decoder` | every single, double and triple pattern, random 4-bit ones; back-to-back input; detection at +1 and correction at +2 |
| `tb_ecc_memory` | write/read, upsets, write and upset together, read during write |
| `tb_ecc_memory_system` | end to end at the default 256 words; every error class and mechanism counted; 3-cycle read latency |
| `tb_ecc_table3_coverage` | every pattern of weight 0 to 4 through the top; outcome counts as in the table above |

The simulator is two-state, so the testbenches never rely on X.
