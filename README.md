# Energy-saving CNN accelerator datapaths

Most of the energy in a CNN accelerator goes to three things: wide
multipliers, traffic to off-chip DRAM, and extra precision added for safety.
This RTL holds three designs. Each removes one of those costs, and they sit
side by side in one top module, `cnn_accel_top`.

| Design | Prefix | Idea |
|---|---|---|
| Time-multiplexing (TMx) accelerator | `tmx_` | Quantized feature maps and weights mostly fit in 4 bits. Multiply with a narrow multiplier and spend extra cycles only on the rare *outliers*. Feature maps cross the DRAM interface compressed with grid-based run-length coding (GRLC). |
| Channel-loop-tiling-aware accelerator | `clt_` | Splitting a layer's input-channel loop into tiles forces partial sums to be stored at output precision, which costs accuracy. Store them one bit wider, and compress that extra bit almost to nothing. |
| Approximate FIR filter | `fir_` | A multiplier-less 4-tap filter whose adders drop their low-order carries. Less accuracy buys less energy. |

The three designs share only the clock and an active-low asynchronous reset.

---

## 1. Outlier-aware time multiplexing

### The multiplication schedule

An 8-bit operand is an *outlier* when it lies outside the 4-bit signed range
-8..7. `tmx_indicator` computes this once per value, together with a zero
flag, as the value is copied from the global buffer into a PE. The two flag
bits are stored next to the value.

The PE multiplies with a single signed 5x5-bit multiplier. A non-outlier is
used whole (sign-extended). An outlier is split into two parts:
- the low nibble, zero-extended (`PART_LO`);
- the high nibble, arithmetically shifted (`PART_HI`).

So `v = HI*16 + LO`. Each pair of operands is then scheduled as follows.

| IFM outlier | WGT outlier | Cycles | Partial products (shift) |
|---|---|---|---|
| no  | no  | 1 | a·b (0) |
| yes | no  | 2 | lo·b (0), hi·b (4) |
| no  | yes | 2 | a·lo (0), a·hi (4) |
| yes | yes | 4 | lo·lo (0), hi·lo (4), lo·hi (4), hi·hi (8) |

`tmx_indexer` is a 2-bit step counter. It turns the two indicator bits into
the part selects, the shift and a `last` flag. `tmx_mac` adds each shifted
product into a 24-bit accumulator.

In zero-skip mode (`zero_skip`), a pair with a zero operand costs one cycle,
and the multiplier stays idle. Each PE counts multiply cycles and skipped
pairs. The array sums these counts into `mult_cycles` and `skip_count`.

### Processing element and array

`tmx_pe` contains:
- a 256×8-bit IFM buffer and a 256×8-bit weight buffer, each entry 10 bits wide (value plus flags);
- the indexer and the MAC;
- a psum input mux;
- a 16-entry PSUM buffer.

A `start` computes `PSUM[addr] = init + Σ IFM[i]·WGT[i]` for `i < len`.
`init` is `psum_in` when `psum_init` is set, and otherwise the current PSUM
entry. This lets a long dot product continue where the previous piece left
off.

Timing is one start cycle plus 1, 2 or 4 cycles per pair. `done` pulses when
the PSUM entry has been written.

`tmx_pe_array` holds ROWS×COLS = 3×5 PEs. They share one write bus, and
`pe_sel` picks the PE. All PEs start together, and `done` comes one cycle
after the slowest PE finishes.

### Layer controller (`tmx_accel`)

A layer runs in four stages.

1. **Decode** (when `cfg_decomp` is set). `grlc_decoder` turns the
   compressed input map from `dram_in_*` into 2x3 tiles. The tiles are
   written into the global buffer (`sdp_ram`, 16K×8) as an `in_h × in_w`
   map at `in_base`.
2. **Passes** (`cfg_passes` of them). In pass p, PE k computes one output
   value. Its dot product runs over `chunks·len` pairs, with operand i at:
   - IFM: `ifm_base + p·ifm_pass_stride + k·ifm_stride + i`
   - weight: `wgt_base + p·wgt_pass_stride + k·wgt_stride + i`

   The host lays these vectors out (im2col). A stride of 0 lets all PEs
   share one vector. Vectors longer than the 256-entry buffers run in
   `chunks` pieces of `len`:
   - each piece is loaded and multiplied in turn;
   - the first piece starts from the bias: the byte at `bias_base + p·NPE + k`, shifted left by `relu_shift`;
   - later pieces continue from the PSUM buffer.
3. **Write-back.** Each result passes through `relu`: round half up by
   `relu_shift`, clamp negatives to 0, saturate to 127. The result goes to
   `out_base + p·NPE + k`.
4. **Encode.** The `out_h × out_w` output map is read in 2x3 tiles, with
   elements outside the map read as 0. `grlc_encoder` compresses the tiles
   onto `dram_out_*`, and `dram_out_eop` marks the final byte.

The host reads and writes the global buffer through `gb_ext_*` while
`busy` is low.

Cycle cost:
- loading: about 2·len+1 cycles per PE per chunk;
- compute: the slowest PE's time;
- write-back: 15 cycles per pass;
- compression: 7 cycles per tile, plus the encoder's output bytes.

For example, the end-to-end test runs 4 passes × 2 chunks × 64 pairs on 15
PEs in about 16.5k cycles. Loading dominates, because the global buffer has
one 8-bit read port.

## 2. Grid-based run-length compression (GRLC)

Feature maps after ReLU are sparse, and their non-zero values cluster. GRLC
cuts a map into 2-row × 3-column tiles, visited row-major.

- A zero tile produces no output. It only increments a 2-bit run counter.
- A non-zero tile produces a header byte `{run[7:6], mask[5:0]}`, followed
  by its non-zero values in element order. Mask bit i is element i, row-major:
  `e = 3·row + col`.
- A run of more than 3 zero tiles is cut by the header `{3, 000000}`, which
  stands for four zero tiles.
- The header `0x00` ends a packet. Zero tiles after the last non-zero tile
  are not sent. The decoder gets the map's tile count and fills them in.

Example: a zero tile, then a tile with values 5 (element 0) and 9
(element 4), then two zero tiles, then end of map. This encodes as
`0x51 0x05 0x09 0x00`: a header with run 1 and mask `010001`, the two
values, and end of packet.

`grlc_encoder` takes a tile per handshake and emits one byte per handshake.
`grlc_decoder` takes one byte per cycle and emits one tile per handshake.
`grlc_pkg` holds the tile type, the header struct and the constants.

## 3. Channel-loop tiling with extended partial sums

### The problem

When a layer's input channels do not fit on chip, they are processed in
tiles. Each output's partial sum (psum) is rounded to the 8-bit output
format between tiles, and the next tile continues from that rounded value.
This introduces two errors that add up over the tiles:
- a *rounding error* on nearly every psum;
- a rare but large *exceeding error* when the psum saturates.

Storing the psum with one extra fraction bit (`FP_EXT = 1`) removes most of
the loss. The cost is only the memory for that bit.

### Storing 9 bits in an 8-bit buffer

The psum is rounded by `psum_quantizer` to 9 bits at scale `shift-1`
(round half up, saturate, and flag `exceed`). `msb_split` then divides it:

- **Output buffer byte:** `{sign, bits 6..0}`. This is where an ordinary 8-bit output would sit.
- **Extension bit:** bit 7 XOR sign. This is 0 for every value in -128..127, so it is almost always 0.

The extension bits of all 48 lanes form a bit stream. `rle_encoder` packs it
into 16-bit words `{bit, 15-bit run length}`, for example
`000000 11111 00000` → `{0,6} {1,5} {0,5}`. A tile of ordinary psums costs
a single word.

At the start of the next tile:
- `rle_decoder` expands the words back into bits;
- `psum_recover` rebuilds the 9-bit value and shifts it back to accumulator scale.

### Controller (`clt_accel`)

The controller drives 6 PEs × 8 MACs (`clt_pe`), giving 48 lanes: 6 pixels
by 8 output channels. The host fills three buffers:
- the IFM buffer, 64 channels × 6 pixels;
- the weight buffer, 64 × 48;
- the 24-bit bias buffer.

It then issues one command per channel tile (`start`, with `first`,
`last`, `tc`, `shift`).

| Phase | Cycles | Action |
|---|---|---|
| init | 1 + 48 (+1 per RLE word) | biases (`first`) or recovered psums |
| MAC | `tc` (≤ 64) | channel c in cycle c, all 48 lanes |
| store | 48 + 3 | not `last`: 9-bit split + RLE; `last`: round to 8 bits |

The stored psums stay on chip in the output buffer and the compressed-MSB
buffer (49 words). `msb_words`, `exceed_count` and `recover_count` report
activity.

The extension is set by two parameters: `IP_EXT` integer bits and
`FP_EXT` fraction bits. Their sum must be at least 1. The testbench runs
three settings on the same kinds of layer, one of which has large values
that saturate often:

| Setting | Total error of the final outputs |
|---|---|
| `FP_EXT=1` (default) | 1638 |
| `FP_EXT=2` | 1600 |
| `IP_EXT=1, FP_EXT=1` | 55 |

The error is measured against an untiled convolution. Fraction bits remove
rounding error. Integer bits remove the saturation that dominates in a
large-valued layer.

## 4. Approximate adder/subtractor and FIR filter

`approx_addsub` splits an N-bit adder at bit AP.
- The upper bits use an exact adder.
- The lower AP bits have no carry chain. A generator chain runs from bit
  AP-1 down to bit 0, and generator k is set when generator k+1 is set or
  when `a[k] & b[k]`.
- Wherever the generator is set, the sum bit is 1. Elsewhere it is `a^b`.
- No carry leaves the lower part.

Example: N=8, AP=4. `0x6F + 0x1F` gives `0x7F` = 127, instead of 142.

Subtraction inverts B (one's complement) and adds no +1, except when
AP = 0. With AP = 0 the unit is exact.

`fir4_approx` computes `y = 105·x[n] + 831·x[n-1] + 621·x[n-2] + 815·x[n-3]`.
It uses six adders found by common-subexpression elimination, arranged in
three steps with AP = 11, 16 and 14 respectively:

```
x15 = x<<4 - x      x105 = x15<<3 - x15      x621 = x831 - x105<<1
x129 = x<<7 + x     x831 = x15<<6 - x129     x815 = x831 - x<<4
```

The products feed a transposed delay line with exact adders. The input is a
15-bit unsigned sample, and the output is 28-bit signed and registered (one
cycle).

On 2000 random samples the worst accuracy, `1 − |y − y_exact| / |y_exact|`,
is 88.3 %. Setting all three AP parameters to 0 gives the exact filter.

## 5. Choices made where the description is silent

- **Array size and buffers.**
  - The TMx array is 3×5 PEs with a 16-entry PSUM buffer per PE.
  - Accumulators are 24 bits.
  - The global buffer holds 16 KB.
- **TMx mapping.** The layer mapping (im2col vectors, passes, chunks, a bias
  byte scaled by the ReLU shift) and the whole controller sequence are this
  implementation's own.
- **Multiplier width.** The multiplier is 5×5 signed, so that an unsigned low
  nibble and a signed high nibble share one multiplier. A one-outlier pair
  takes 2 cycles and a two-outlier pair takes 4.
- **GRLC encoding details.**
  - Mask bit order is row-major.
  - The `{3,0}` header codes four zero tiles.
  - End of packet is `0x00`.
  - Trailing zero tiles are implicit.
- **RLE format.** The run length is stored directly, up to 32,767 per word.
- **MSB absolute value.** The "absolute value" of the extension bits is the
  XOR with the sign. This is lossless given the stored sign.
- **Stored psums stay on chip.** In the tiling-aware design, psums are kept
  in on-chip buffers instead of being written to external memory. The
  stored bits are the same either way.
- **FIR input.** The FIR input is unsigned, and the delay-line adders are
  exact.
- **Not included.** The search that picks the AP values, the host CPU and the
  DRAM are outside this RTL. Their connections are ports.

## 6. Limits

At default parameters, `cnn_accel_top` synthesizes with yosys to about
2.6k coarse cells, 5.3k flip-flop bits and 244k memory bits.

- The TMx global buffer must hold 15 IFM vectors and one weight vector per
  pass. That allows dot products up to about 1,000 terms, for example a
  3×3×64 convolution, but not a 3×3×256 one.
- Map dimensions are at most 255.
- The tiling-aware design handles any reduction length, in channel tiles of
  at most 64.

## 7. Files and simulation

- `rtl/`: one module or package per file.
  - `tmx_pkg` and `grlc_pkg` are packages.
  - `cnn_accel_top` is the top module.
- `tb/`: one self-checking testbench per module, named `<module>_tb`, plus
  the shared reference models in `tb_ref_pkg`.
  - Each testbench prints `TB_RESULT checks=N failures=M`.
  - Each has a watchdog.
  - All stimulus is random (`$urandom`).
- `tb/cnn_accel_top_tb.sv` runs all three designs at default parameters:
  - two TMx layers, with and without zero skip;
  - a tiled layer on the tiling-aware accelerator;
  - 3000 FIR samples.

  It checks all outputs against models. It also counts each mechanism
  (single and double outliers, zero skips, zero-tile runs, padding, end of
  packet, psum recovery, multi-word MSB streams, exceeding errors,
  approximate FIR outputs) and fails if one never happened.
- Two testbenches run slices of real layers at default parameters:
  - `tb/tmx_resnet_conv3x3_tb.sv`: 15 output pixels × 2 output channels
    of a 3×3×64 convolution (576-term dot products in 3 chunks of 192).
    About half the activations are zero and 15 % of the weights are
    outliers. The 17,280 pairs take 20,892 multiply cycles, or 10,520 with
    zero skipping; an 8-bit multiplier needs 17,280. The whole run takes
    about 36,000 cycles, mostly operand loading.
  - `tb/clt_resnet50_l38_tb.sv`: one lane group (48 outputs) of a 1×1
    layer with 1024 input channels, as 16 channel tiles of 64. The total
    error of the final outputs is 12 with one fraction bit of extension,
    against 39 for plain 8-bit partial sums.

To build and run a testbench:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/tmx_pkg.sv rtl/grlc_pkg.sv tb/tb_ref_pkg.sv \
  tb/cnn_accel_top_tb.sv --top-module cnn_accel_top_tb
./obj_dir/Vcnn_accel_top_tb
```

Some lint warnings remain:
- unused MAC outputs;
- `SYNCASYNCNET` on `rst_n`, because assertions use it in `disable iff`
  while the flip-flops reset asynchronously.
