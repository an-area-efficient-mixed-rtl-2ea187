# Mixed-precision ViT linear-layer accelerator with a shared 8-bit / 2x4-bit PE

This design accelerates the linear layers of a Vision Transformer: Q/K/V generation, attention
output projection and the two MLP layers. Most of those layers are quantized to 4 bits, either as
integers (INT4) or as powers of two (PoT4). A few layers stay at 8-bit integer (INT8) because they
hurt accuracy most. A common way to support both precisions is to add separate 8-bit accumulators
to a 4-bit array, but that hardware sits idle in 4-bit layers. This design uses one PE that does
the same work in both precisions:

* **8-bit mode:** the PE computes one 8-bit × 8-bit product per cycle.
* **4-bit mode:** two INT4 weights are packed into one 8-bit word. The same two multipliers and
  the same 32-bit accumulator then compute two independent 16-bit dot products per cycle.

A 48 × 64 array of these PEs (3,072 in all) is fed from an activation buffer and a weight buffer,
through small decoders on the array edge.

## Decode modes

A 2-bit *d-mode* says how the 8-bit words in both buffers are read:

| d-mode | activation | weight | PE work per cycle | result per PE |
|---|---|---|---|---|
| 0 | INT8 | INT8 | one 8×8 product | one 32-bit sum |
| 1 | INT4 (bits [3:0]) | two INT4, in bits [7:4] and [3:0] | two 8×4 products | two 16-bit sums |
| 2 | PoT4 (bits [3:0]) | two INT4, in bits [7:4] and [3:0] | two 8×4 products | two 16-bit sums |
| 3 | PoT4 (bits [3:0]) | PoT4 (bits [3:0]) | one 8×8 product | one 32-bit sum |

Number formats:
* **INT8 and INT4** are two's complement.
* **PoT4** is sign-magnitude. Bit 3 is the sign and bits [2:0] are a code `e`. Code `e = 0`
  means 0, and `e = 1..7` means 2^(e-1). The magnitudes are therefore 0, 1, 2, …, 64.

The exact PoT4 bit layout and the placement of a single 4-bit value in bits [3:0] of a word are
this design's choices. Only weights are ever packed, so in mode 2 the PoT4 operand is the
activation.

## Edge decoders (`operand_decoder` = `pot_decoder` + `sign_decoder`)

Every operand enters the array in sign-magnitude form: an unsigned 8-bit `mag` plus two sign bits
`sign_hi` and `sign_lo` (struct `dec_op_t` in `mpa_pkg`).

* **`pot_decoder`** turns a PoT4 code into a sign and an 8-bit magnitude by shifting a one left.
* **`sign_decoder`** handles the integer formats. It turns an INT8 into its magnitude (0..128)
  and sign. It turns a packed INT4 pair into `{|hi|, |lo|}` with one sign per nibble. In the
  PoT modes it passes the PoT decoder's output through.

There is one weight-side decoder per PE row (48) and one activation-side decoder per PE column
(64). A zero word decodes to magnitude 0 with positive signs in every mode. The array relies on
this: idle cycles simply feed zeros.

## The shared PE (`mp_pe`) — the part to understand

The PE multiplies the 8-bit activation magnitude `a` by the two nibbles of the 8-bit weight
operand `w`, in two unsigned 8×4 multipliers:

```
p_hi = a * w[7:4]      (12 bit)
p_lo = a * w[3:0]      (12 bit)
p8   = (p_hi << 4) + p_lo   = a * w   (16 bit, used in the 8x8 modes)
```

No multiplier ever sees a sign. Signs are applied in the accumulator instead, using
`-x = ~x + 1`: the PE conditionally inverts the addend bit by bit, and feeds the product's sign
(activation sign XOR weight sign) into the adder as its carry-in. The 32-bit accumulator is built
from two 16-bit adders:

* **4-bit modes.** `{0000, p_hi}` and `{0000, p_lo}` are each inverted by their own sign and
  concatenated into one 32-bit addend. The upper adder takes "carry high" (the high lane's sign)
  and the lower adder takes "carry low". The two halves are independent 16-bit two's-complement
  accumulators, and each wraps on overflow.
* **8-bit modes.** `{16'h0000, p8}` is inverted by the product's sign. The lower adder takes the
  sign as its carry-in. The lower adder's carry-out drives the upper adder's carry-in, so
  together the two adders form one 32-bit adder.

The mode only changes a multiplexer and the carry-in of the upper adder. The multipliers, the
inverters, both adders and the 32-bit register are shared by all four modes.

Each PE also registers its two operands and passes them on: the activation to the PE below, the
weight to the PE on the right. `clear` zeroes the accumulator. It performs one multiply-accumulate
per cycle.

## Array and dataflow (`pe_array`)

The array is **output-stationary** and systolic:
* Row `r` receives one weight word per cycle from the left.
* Column `c` receives one activation word per cycle from the top.
* PE(r,c) accumulates Σ_k W[r][k]·A[k][c].

Before decoding, the input words are skewed: row `r` is delayed by `r` cycles and column `c` by
`c` cycles. As a result, the k-th weight and the k-th activation meet in PE(r,c) `k + r + c`
cycles after the k-th word pair was presented.

In the 4-bit modes, each row's weight stream carries two output channels: the high and the low
INT4 of each word. One tile therefore produces 96 × 64 results in place of 48 × 64.

## Buffers, controller and top (`operand_buffer`, `mpa_ctrl`, `vit_mp_accel`)

The two buffers are simple dual-port memories. Each has one write port for loading and one
read port with one cycle of latency.

| buffer | words | bytes per word | size |
|---|---|---|---|
| activation | 4096 | 64 (one per column) | 256 KB |
| weight | 5461 | 48 (one per row) | 256 KB (16 B short) |

Together they make about 512 KB of on-chip storage.

The controller runs one tile at a time:

1. **Start.** On `start` it latches the d-mode, `K` and the two base addresses, and clears all
   accumulators.
2. **Read.** It reads `K` consecutive words from each buffer, one per cycle.
3. **Drain.** It waits `ROWS + COLS - 1` cycles for the data to reach the far corner of the
   array.
4. **Done.** It pulses `done`.

**Latency:** `done` comes exactly **K + ROWS + COLS** cycles after `start` (K + 112 at full
size). Results stay in the PEs until the next `start`.

To use the top, `vit_mp_accel`:

1. Write `K` activation words and `K` weight words.
2. Pulse `start` with `dmode_in`, `k_len`, `act_base` and `wgt_base`.
3. Wait for `done`.
4. Read each PE with `out_rd_en`, `out_row` and `out_col`. `out_rdata` is valid one cycle later.
   * In modes 0 and 3, `out_rdata` is one signed 32-bit sum.
   * In modes 1 and 2, `out_rdata[31:16]` is the dot product with the high INT4 weights, and
     `out_rdata[15:0]` the one with the low INT4 weights.

All files use `mpa_pkg` for the d-mode enum and the decoded-operand struct.

## What follows the source design and what is this design's own

These parts follow the source design:
* the four d-modes;
* packing two INT4 weights per word;
* decoders built from a PoT decoder and a sign decoder, 48 on the weight side and 64 on the
  activation side;
* the PE datapath: two unsigned 8×4 multipliers, `<<4` and add, bitwise NOT, a mux, and split
  16/16 adders with a high and a low carry;
* the 48 × 64 array;
* the 512 KB of buffers.

These are this design's own choices, because the source leaves them open:
* the PoT4 code and the bit positions of 4-bit values;
* the lower-to-upper carry chain in the 8-bit modes;
* 16-bit wrap-around in the 4-bit modes;
* the output-stationary skewed dataflow;
* how the 512 KB is split between the two buffers;
* the controller's sequence;
* the result read port;
* an asynchronous active-low reset.

Known limits:
* **No off-chip memory interface.** The buffers are loaded through plain write ports. Tiling a
  full ViT layer across several tiles is left to the host.
* **Accumulator range in the 4-bit modes.** A 16-bit half can overflow for large `K` with
  worst-case data. For example, PoT4 × INT4 products of magnitude up to 512 with K = 768 can
  exceed 32,767. No saturation is applied.
* **Quantization is offline.** Choosing which layers run in INT8 is a software step done before
  deployment. It is not hardware.

## Files

| file | contents |
|---|---|
| `rtl/mpa_pkg.sv` | d-mode enum, `dec_op_t`, `is_8x8()` |
| `rtl/pot_decoder.sv`, `rtl/sign_decoder.sv`, `rtl/operand_decoder.sv` | edge decoders |
| `rtl/mp_pe.sv` | shared mixed-precision PE |
| `rtl/pe_array.sv` | skew registers, decoders, PE grid |
| `rtl/operand_buffer.sv` | activation / weight buffer |
| `rtl/mpa_ctrl.sv` | controller |
| `rtl/vit_mp_accel.sv` | top |
| `tb/mpa_tb_pkg.sv` | reference value of a word in each d-mode |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_vit_mp_accel.sv` | end-to-end test, 4 × 5 array |
| `tb/tb_vit_mp_accel_full.sv` | end-to-end test at the full 48 × 64 size |

## Simulating

Each testbench checks the design against reference arithmetic worked out from the number formats.
It prints `TB_RESULT checks=N failures=M` and calls `$finish`. Here is how to run one (from the
folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -j 4 --top-module tb_vit_mp_accel \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mpa_pkg.sv tb/mpa_tb_pkg.sv tb/tb_vit_mp_accel.sv
./obj_dir/Vtb_vit_mp_accel
```

Swap in another testbench name the same way (`tb_mp_pe`, `tb_pe_array`, `tb_mpa_ctrl`, …).

* The end-to-end test runs every d-mode with random K and base addresses. It checks the
  K + ROWS + COLS latency and every PE result. It also confirms that packed operations, negative
  products in both lanes, and carries into the upper half in the 8-bit modes all occurred.
* The full-size test (`tb_vit_mp_accel_full`) runs the top at its default parameters on tiles
  shaped like ViT-Base layers (hidden size 768, MLP size 3072). It runs a K = 768 tile in mode 2,
  the same tile in mode 1, and a K = 3072 tile in mode 0. Each time it checks the latency and all
  3,072 PE results. It takes a few minutes to build and about ten seconds to run.

To change the array size or the buffer depths, override `ROWS`, `COLS`, `ACT_DEPTH` and
`WGT_DEPTH` on `vit_mp_accel`. The address and index widths follow from them.
