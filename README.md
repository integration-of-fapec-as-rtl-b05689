# FAPEC compressor on a SpaceFibre virtual channel

This is a lossless compressor for streams of 16-bit samples, such as
instrument or detector data. Its 32-bit output goes straight into a
SpaceFibre virtual channel (VC). The compressor is FAPEC (Fully Adaptive
Prediction Error Coder):

- each sample is predicted from the previous one;
- the prediction errors of a block of 255 samples are collected in a
  histogram;
- the histogram chooses a coding table;
- the block is coded with the Prediction Error Coder (PEC) under that table.

The table travels in front of each block as a small header, so each block
can be decoded on its own.

The original compressor had a bit-serial output. This design has a 32-bit
parallel output instead, so it can feed the 32-bit user interface of a
SpaceFibre VC directly. The top level, `star_fire_fapec`, is the
compressed path of a two-port SpaceFibre test unit. On VC 2 of each port,
an incrementing test-pattern generator feeds a FAPEC instance. The words
that instance produces go to the VC 2 transmit input.

Everything is single-clock and uses the rising edge only. Reset is
synchronous and active high.

## Data path

```
 16-bit samples
      |
 precompressor        prediction = previous sample (0 at block start),
      |               residual = 17-bit sign + modulus
 hist_constructor ----> block memory (dual_port_mem, 2 x 255 x 17)
      |   \-----------> histogram memory (dual_port_mem, 2 x 37 x 8,
      |                 port B output pipelined)
 hist_boundary_extract  reads and clears a histogram bank, picks the PEC
      |                 variant and the segment boundaries
 table_constructor <--> bin_equiv_rom (highest modulus of each bin)
      |                 turns them into segment sizes and ceilings
 pec_coder   <--------- block memory, port B
      |                 header + one code word per residual, on four
      |                 parallel ports (table, LE, DS, LC) with lengths
 word_packer            16-bit assembly buffer -> 32-bit words
      |
 out_data / out_valid  (paused by vcb_half_full)
```

`fapec` (`rtl/fapec.sv`) wires these blocks together. `star_fire_fapec`
puts `data_generator` + `fapec` on each port.

### Double banking

The histogram memory and the block memory each have two banks. While
block *n* is parsed and coded from one bank, block *n+1* is accumulated
in the other. In `fapec`, the flags `bank_busy[1:0]` mark a block-memory
bank as occupied from the moment its block is complete until the coder
reports `block_coded`. The accumulator does not start a new block in a
busy bank; it stalls its input (`in_ready` low) instead. Without this
rule a fast source could overwrite a block that is still being coded.

## Throughput and latency

| Stage | Rate | Notes |
|---|---|---|
| precompressor | 1 sample / clock | two register stages |
| hist_constructor | 1 sample / 6 clocks | accept, bin, read, read data, increment, write back |
| hist_boundary_extract | about 2 x 37 + 4 clocks per block | reads 37 bins, then clears them |
| table_constructor | 3 ROM look-ups per block | |
| pec_coder | at most 1 code word / 3 clocks | find segment; build word; wait for Ready |
| word_packer | a word of up to 23 bits in 1 to 3 clocks | 16-bit buffer |

The histogram accumulator is the bottleneck. The whole compressor takes
at most one sample every 6 clocks, which is 10.4 Msample/s
(167 Mbit/s of raw samples) at 62.5 MHz. That clock is the one a
2.5 Gbit/s SpaceFibre link needs on its 32-bit interface.

| Workload | Fits? | Working |
|---|---|---|
| 2 Msample/s (the original target) | yes | 2 ≤ 10.4 Msample/s |
| ~12 Msample/s at 62.5 MHz | no | 12 Msample/s at 6 clocks per sample needs 72 MHz |
| A full 2 Gbit/s link of 16-bit samples | no | That is 125 Msample/s, 12 times short |

The generator therefore never offers more than one sample per 6 clocks.
The output side is never the limit: the worst case is 23 bits per 6
clocks, against 32 bits per clock on the VC interface.

## The coded stream

### Bit order

The stream is a sequence of bits, read as bytes with the earliest bit in
each byte's most significant position. A 32-bit output word holds four of
those bytes, the first in bits 7:0 and the last in bits 31:24. So bit 7 of
a word is its earliest bit, and bit 24 is its last. Written out least
significant byte first, the words give the byte stream of the reference
FAPEC coder. For example, the stream bytes `74 45 55 55` leave as the word
0x55554574.

Inside the design, every code word, the header and the packer's 16-bit
buffer keep their first bit in bit 0. The byte reordering is fixed wiring
at the packer's output.

Words run on across block boundaries: nothing is padded or flushed at the
end of a block. So the final bits of a stream stay in the packer until
more data arrives.

### Residuals and histogram bins

The residual of sample *x[n]* is *x[n] - x[n-1]*. At the first sample of
each block, *x[n-1]* counts as 0. The residual is carried as a sign bit
(1 = negative) plus a 16-bit modulus, so it is 17 bits wide. It is not
wrapped modulo 2^16.

The histogram has 37 bins, spaced roughly logarithmically
(`fapec_pkg::value_to_bin`):

- bins 0..15: moduli 0..15, one each;
- bins 16..33: octaves [2^4, 2^5) to [2^12, 2^13), each split into two halves;
- bins 34..36: the octaves from 2^13, 2^14 and 2^15, one each.

`fapec_pkg::bin_max(b)` gives the highest modulus in bin *b*.
`bin_equiv_rom` holds that function as a table.

### Segments

PEC codes a modulus according to which of four segments it falls into.
Segment *s* has a size in bits (*h*, *i*, *j*, *k* for s = 1..4). Its
ceiling C*s* is the largest modulus it covers. A modulus in segment *s* is
sent as its offset *v* inside the segment: for segment 1, *v* is the
modulus; for segment *s* > 1, *v* = modulus − C*(s−1)* − 1. The offset is
sent least significant bit first. There are three variants. Below, *s* is
the sign bit, `1^n`/`0^n` is a run of *n* ones/zeros, and bits are listed
in stream order:

| Segment | LE (low entropy) | DS (double smoothed) | LC (large coding) |
|---|---|---|---|
| 1 | `s v[h]` | `s v[h]` | `0 v[h]`, then `s` if v ≠ 0 |
| 2 | `1 0^h s v[i]` | `s 1^h v[i]` | `1 0 v[i] s` |
| 3 | `1 0^h s 1^i 0 v[j]` | `1 0^h s 0 v[j]` | `1 1 0 v[j] s` |
| 4 | `1 0^h s 1^i 1 v[k]` | `1 0^h s 1 v[k]` | `1 1 1 v[k] s` |

The longest words are 23 bits for LE and DS and 20 bits for LC.

Some field values double as escapes, which costs their segment one value:

- In LE, all ones in the i field leads on to segments 3 and 4. Segment 2 therefore holds 2^i − 1 values.
- In DS, all ones in the h field leads on to segment 2. Segment 1 therefore holds 2^h − 1 values.
- Every other segment holds 2^size values.

`fapec_pkg::seg_capacity` gives these counts (cap below). The ceilings
follow from the sizes alone:

- C1 = cap(segment 1, h) − 1
- C2 = C1 + cap(segment 2, i)
- C3 = C2 + cap(segment 3, j)

All three saturate at 65535. A decoder can therefore rebuild the ceilings
from the header.

### Header

Each field is sent most significant bit first:

- **LE**: `01`, bit 0 of h, bit 0 of i, j (2 bits), k (4 bits). 10 bits. h and i are 1 or 2, so one bit each tells them apart.
- **DS**: `00`, h (2 bits), i (2 bits), j (3 bits), k (4 bits). 13 bits.
- **LC**: `1`, h, i, j, k (4 bits each). 17 bits.

In all three, k = 16 is sent as 0.

### Choosing the table

`hist_boundary_extract` and `table_constructor` choose the table. The
calibration of the real FAPEC (how it maps a histogram onto a variant and
segment sizes) is not public. The rule here is this design's own: simple,
threshold-based, and always lossless. What it affects is the compression
ratio, not correctness.

1. Walk the 37 bins and accumulate their counts. Record:
   - the bins where the running count first reaches TH1, TH2 and TH3
     (in 256ths of the block: defaults 128, 230, 252);
   - the last non-empty bin.
2. The TH1 bin (the median) chooses the variant:

   | TH1 bin | Variant | h |
   |---|---|---|
   | 0..1 | LE | 1 |
   | 2..3 | LE | 2 |
   | 4..6 | DS | 3 |
   | higher | LC | just wide enough for the largest modulus of that bin, at most 15 |

3. The TH2 bin, the TH3 bin and the last non-empty bin give target moduli
   V2, V3 and V4 (through `bin_equiv_rom`). Segment 2 gets the smallest
   size *i* that its header field can carry for which C2 ≥ V2. Segments 3
   (*j*, C3 ≥ V3) and 4 (*k*, C3 + 2^k ≥ V4) follow the same way. The
   ranges are:
   - LE: h and i in 1..2, j in 1..3 (the reference coder's tables for a ramp also use j = 1);
   - DS: h in 1..3, i in 0..3, j in 0..7;
   - LC: h, i and j in 0..15;
   - all variants: k in 1..16.

   Segment 4 always reaches 65535, so every residual can be coded.

TH1..TH3 are parameters of `hist_boundary_extract`.

Example (the one the coder's testbench checks):

- Table: DS with h, i, j, k = 3, 2, 5, 12. Ceilings 6, 10, 42. Header 0x075C (13 bits).
- Residuals +2, −42, +19, −1091, −1, +5, +4, 0.
- Code words (value/length): 0x81/11, 0x861/18, 0x221/18, 0xB71/18, 0x7D1/11, 0x2F/6, 0x4/4, 0x0/4.

## Block interfaces

All blocks use a valid/ready (or valid/taken) handshake. A transfer
happens on a rising edge where both are high.

| Module | Role |
|---|---|
| `data_generator` | Incrementing pattern. +1 per transfer, transfers at least `MIN_GAP` (6) clocks apart. `start_value` is loaded during reset. |
| `precompressor` | Registers the sample (the source may change right after a transfer), then emits the residual. |
| `hist_constructor` | Port A of the histogram memory; write port of the block memory. Announces `done_valid`/`done_bank` per block. Waits for `hist_ready` and `bank_free`. |
| `dual_port_mem` | Single-clock RAM with two read/write ports, one clock of read latency. `B_PIPE=1` adds an output register on port B that advances only on port-B reads, so port-B data appears two reads after its address. Used this way for the histogram. |
| `bin_equiv_rom` | 64 x 16 constant table computed from `bin_max`, one clock of latency. |
| `hist_boundary_extract` | Port B of the histogram memory (pipelined). Clears both banks after reset before raising `hist_ready`. Clears each bank after parsing it. |
| `table_constructor` | Holds the table at the coder until `table_taken`, and keeps it until `block_coded`. |
| `pec_coder` | Reads the block memory (`raddr`, one clock of latency). Sends the header only while `ready` is high, then one code word per residual. Table port: `table_valid_out`, `table_num_bits`, `table_vector`. Code ports: `le_`/`ds_`/`lc_comp_val` and `_num_bits`, with `coding_variant_out` and `comp_sample_valid`. |
| `word_packer` | `ready` goes low while a word is being split or is waiting, and while `vcb_half_full` is high. A word that arrives with half-full high is held, not dropped. Once half-full has been high for a few clocks, no output word appears. `out_valid` is a one-clock pulse per 32-bit word. |

Top level `star_fire_fapec` (defaults NUM_PORTS = 2, BLOCK_SIZE = 255):

- inputs: `gen_enable[p]`, `gen_start[p]` (16 bits) and `vc2_half_full[p]`;
- outputs: `vc2_tx_valid[p]` and `vc2_tx_data[p]` (32 bits).

## What follows the original design and what does not

These follow the original FAPEC design:

- the pipeline order and block names;
- 16-bit samples, 17-bit residuals, 255-sample blocks and 37 bins;
- the four parallel coder output ports and their widths (23/23/20 bits), each with a bit count;
- the coder's 3-clock step;
- the packer's three stages with a 16-bit intermediate buffer;
- the histogram memory with a pipelined port B;
- the 6-clock accumulator rate and the generator limited to match it;
- two ports with FAPEC on VC 2;
- the output byte and bit order.

These are this design's own choices:

- **Table choice**: the variant and segment-size rule above, in place of the real FAPEC calibration.
- **Bin rule**: the mapping of moduli onto 37 bins.
- **Prediction reset**: the prediction restarts at 0 for every block.
- **Flow control**:
  - bank bookkeeping (`bank_busy`);
  - the header waits for `ready`;
  - the packer holds words while half-full is high.
- **Clock edges**: rising edge only. The original mixed clock edges.
- **Generator step**: the generator steps once per transfer, not once per clock, so its differences are exactly 1.

The code words, header and ceilings are FAPEC's own. The published
reference output for the incrementing pattern from 0 covers six blocks
(336 bytes, 84 words). This design reproduces it bit for bit; the
full-size testbench checks all 84 words. In that output every +1 residual
codes to `0 1` (LE, h = 1), so the steady-state words are 0x55555555 or
0xAAAAAAAA. Each block starts with a header and one long code word for
its first sample.

For other data, the tables chosen here can differ from the real
calibration's. The stream then stays valid and decodable, but it is not
identical to FAPEC's.

Not included:

- the SpaceFibre codec (VC buffers, link, lane and physical layers);
- SerDes;
- the SpaceWire router;
- the pattern generators and checkers on the other VCs;
- the host interface.

At the top level, the VC 2 input and its half-full flag are ports.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`. `tb/fapec_ref_pkg.sv` holds the
independent reference: the bin rule, the table rule, the encoder and a
full bit-stream decoder.

| Testbench | What it checks |
|---|---|
| `tb_star_fire_fapec` | Top level, default parameters. 24 blocks per port are decoded back to the incrementing count, including the 0xFFFF→0 wrap. Port 1 starts at 0, and its first 84 words must equal the reference coder's output. Rate between 6 and 7 enabled clocks per sample. Half-full holds and generator pauses must happen. Alternating-bit words. |
| `tb_fapec` | One compressor with 48 blocks over eight data shapes (slow and fast random walks, outliers, full-range noise, constant runs). Every residual is decoded. All three variants and all four segments must occur. Also checks both banks busy, half-full holds, no output after 6 clocks of half-full, and 6 clocks per sample. |
| `tb_pec_coder` | The worked example above, then 400 random tables against the reference encoder. 3 clocks per code word. |
| `tb_table_constructor` | The example table and 3000 random parser results. |
| `tb_word_packer` | 20000 random words against a bit queue. Splits over two and three clocks. Ready returns within 4 clocks. Half-full holds. |
| `tb_hist_boundary_extract` | 1500 random histograms against the reference rule. The bank is cleared; the other bank is left alone. |
| `tb_hist_constructor` | Bin counts and stored residuals per block. Exactly 6 clocks per residual. |
| `tb_precompressor`, `tb_data_generator`, `tb_bin_equiv_rom`, `tb_dual_port_mem` | The smaller blocks, with random stalls. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/fapec_pkg.sv tb/fapec_ref_pkg.sv tb/tb_star_fire_fapec.sv \
  --top-module tb_star_fire_fapec -o sim
./obj_dir/sim
```

Testbenches that use no reference model need only `rtl/fapec_pkg.sv` and
their own file. The full-size test runs in a few seconds.

## Changing it

- **Block size**: `BLOCK_SIZE` on `fapec`/`star_fire_fapec`. Histogram counts are 8 bits, so up to 255.
- **Table choice**:
  - TH1..TH3 are parameters of `hist_boundary_extract`;
  - the variant rule sits in one `always_comb` there.

  Any rule that yields sizes within the header ranges stays decodable.
- **Bin mapping**: change `value_to_bin` and `bin_max` in `fapec_pkg` together. The ROM and the reference model follow them.
