# Mixed-precision number converter for a bfloat16 DNN accelerator

Many SoCs pair a fixed-format DNN accelerator, here one that computes only in
bfloat16, with a block of reconfigurable logic. Large CNNs cannot keep all
their weights and intermediate results on chip. They spill them to off-chip
memory, and that traffic costs much of the inference energy. Storing those
tensors as small integers (2 to 16 bits, chosen per layer and per tensor)
shrinks the traffic a great deal. The precision can also be raised at runtime,
for example when the camera image degrades in rain or fog and the network
needs more accuracy.

The accelerator itself stays unchanged. This design is a **number converter**
that sits in the data stream between memory and accelerator and converts on
the fly:

```
                     conversion to bfloat16                          conversion back to integer
 memory --256b--> extractor --> 16 x dequant_unit --16x16b--> [ DNN ] --16x16b--> 16 x quant_unit --> compressor --256b--> memory
                  (ring buffer)  int -> bf16, * S             [accel]             * 1/S, bf16 -> int  (ring buffer)
                                        ^                                                ^
                                        +------------- cfg_regs (AXI-Lite) --------------+
                                                          ^
                                                   external controller (CPU)
```

Quantisation is zero-centred (zero offset 0). Each direction is therefore one
multiplication by a scale factor:

* memory to accelerator: `x_bf16 = x_int * S`
* accelerator to memory: `x_int = round(x_bf16 * (1/S))`, saturated to the precision

The controller writes the precision and the scale for each direction before
each tensor.

## Top level: `number_converter`

| Port group  | Direction | Width                          | Purpose |
|-------------|-----------|--------------------------------|---------|
| `s_axil_*`  | slave     | 4-bit address, 32-bit data     | AXI-Lite settings port for the controller |
| `s_mem_*`   | in        | 256-bit `tdata`, 32-bit `tkeep`| AXI-Stream of packed integers read from memory |
| `m_acc_*`   | out       | `N_UNITS*16` data, `N_UNITS*2` keep | bfloat16 values to the accelerator |
| `s_acc_*`   | in        | `N_UNITS*16` data, `N_UNITS*2` keep | bfloat16 results from the accelerator |
| `m_mem_*`   | out       | 256-bit `tdata`, 32-bit `tkeep`| AXI-Stream of packed integers written to memory |

Parameters: `N_UNITS = 16` conversion units per direction and `RING_WORDS = 4`
words per ring buffer. The memory bus width `BUS_W = 256` is a constant in
`mpc_pkg`. Reset `rst_n` is asynchronous and active low.

The two directions are independent pipelines. They share only the settings
registers.

## Memory format and tensor framing

A tensor in memory is a dense bit string of `bits`-wide two's-complement
integers. Element 0 sits in the least significant bits of the first 256-bit
word. Elements are not padded and may straddle word boundaries. So a 3-bit
tensor of 100 elements takes 300 bits: one full word plus 44 bits of a second.

* `tlast` marks the last word (or beat) of a tensor.
* On the memory side, `tkeep` marks the valid bytes of the last word. They must
  be contiguous, starting at byte 0. Other words are taken as full.
* On the accelerator side, `tkeep` marks the valid 16-bit lanes of the last
  beat, two bits per lane, contiguous from lane 0.

The extractor sends the accelerator `N_UNITS` values per beat. If fewer than
`N_UNITS * bits` bits remain at the end of a tensor, it sends one short final
beat. That beat carries `floor(remaining_bits / bits)` lanes, so a few zero
elements formed from the padding bits of the last byte can appear. The
compressor sends whole words. It ends a tensor with a zero-padded word whose
`tkeep` covers the bytes that hold data.

## The two ring buffers

**Extractor (`extractor.sv`).** Memory words are written into a ring of
`RING_WORDS` x 256 bits, one whole word per cycle. A read pointer with bit
granularity takes `N_UNITS * bits` bits per cycle, wrapping around the end of
the ring. The extractor cuts them into `N_UNITS` chunks and sign-extends each
chunk to 16 bits. A fill counter in bits decides two things:

* whether a new word fits (`fill + 256 <= capacity`; this does not depend on
  the output's ready)
* whether a full beat can be read

Once the last word of a tensor is in, no new word is accepted until the ring
has emptied. The read pointer then realigns to a word boundary, so the next
tensor starts cleanly.

**Compressor (`compressor.sv`).** It does the reverse. The low `bits` bits of
each valid lane are concatenated. The result is written at a bit-granular
write pointer into a `RING_WORDS` x 256-bit ring, using a rotated data and mask
pair. Whenever 256 bits are present, a word-aligned read sends them to memory.
After the last beat of a tensor, the remaining bits leave as the final word,
and both pointers return to zero.

With 16-bit integers both rings move one 256-bit word per cycle in each
direction. With narrower integers the memory side needs proportionally fewer
words.

## Integer to bfloat16: `dequant_unit`

This unit is a ten-stage pipeline, one value per cycle:

1. **Sign stage.** Record the sign and take the magnitude. The magnitude of
   -32768 fits in 16 unsigned bits.
2. **Stages 2 to 9, one per bfloat16 exponent bit, from bit 7 down to bit 0.**
   Stage *k* checks whether the top 2^k bits of the magnitude are zero. If so,
   it shifts the magnitude left by 2^k and adds 2^k to a leading-zero count.
   After stage 9 the magnitude is normalised, and the exponent is
   `127 + 15 - leading_zeros`. The stages for shifts of 128, 64, 32 and 16
   exceed the 16-bit word. They act only on a zero input.
3. **Stage 10.** Round the 16-bit normalised magnitude to the 8-bit bfloat16
   significand (round to nearest, ties to even). Then multiply by `S`.

The scale travels down the pipeline with its value, so a settings change never
affects values already in flight.

## bfloat16 to integer: `quant_unit`

This unit is also ten stages:

1. **Multiply by `1/S`.** The product is rounded to bfloat16. The division of
   the quantisation formula becomes this multiplication, because the
   controller programs the reciprocal.
2. **Stages 2 to 9: fixed-point shift.** The significand `1.m` is placed in a
   25-bit fixed-point word with 16 integer and 9 fraction bits, representing
   `1.m x 2^15`. That word is shifted right by `142 - exponent`, one stage per
   bit of the shift amount, from bit 7 down to bit 0.
3. **Stage 10: round, sign, saturate.** Round to nearest with ties away from
   zero, using the first fraction bit. Apply the sign. Saturate to
   `[-2^(bits-1), 2^(bits-1) - 1]`.

Special inputs:

* A product above 2^15, or infinity, saturates.
* NaN gives 0.
* Zero and subnormal values give 0.

## bfloat16 multiplication

Both units use `mpc_pkg::bf16_mul`. It multiplies the two 8-bit significands
(one small multiplier per unit), normalises by one bit and rounds to nearest
even. Subnormal operands count as zero. Subnormal results flush to signed
zero, and overflow gives infinity. A NaN operand, or infinity times zero,
gives the canonical NaN `0x7FC0`.

## Settings: `cfg_regs`

| Address | Register   | Bits   | Meaning | Reset |
|---------|------------|--------|---------|-------|
| 0x0     | `DQ_BITS`  | [4:0]  | precision of integers read from memory | 16 |
| 0x4     | `DQ_SCALE` | [15:0] | `S`, bfloat16 | 0x3F80 (1.0) |
| 0x8     | `Q_BITS`   | [4:0]  | precision of integers written to memory | 16 |
| 0xC     | `Q_SCALE`  | [15:0] | `1/S`, bfloat16 | 0x3F80 (1.0) |

Write strobes are honoured. Unaligned addresses answer SLVERR. Precisions
outside 2..16 are stored as written and clamped by the datapath.

Each direction samples its settings once per tensor:

* The extractor samples them when the first memory word of a tensor is
  accepted.
* The quantisation side samples them on the first accelerator beat after a
  `tlast`.

A write while a tensor streams therefore takes effect with the next tensor. The
controller can set a different precision for every layer and for weights and
activations, simply by rewriting the registers between tensors.

## Timing

* **Latency is 12 cycles in each direction.** The extractor takes 2 and a
  dequantisation unit 10. A quantisation unit takes 10 and the compressor 2.
  The latency counts from the input handshake to the output handshake when
  nothing stalls. The same latency holds at every precision.
* **Throughput is `N_UNITS` conversions per cycle per direction.** With 16
  units at the 300 MHz clock of the published prototype, that is 4.8 billion
  conversions per second.
* **Stalls.** All units of one direction share one enable. If the output
  handshake of a direction is stalled (`tready` low with a valid beat waiting),
  that whole direction freezes, and the back-pressure reaches the input
  `tready`. Bubbles are squeezed out only at the last pipeline stage.

## Relation to the published architecture

The following points follow the published design:

* extractor, dequantisation units, quantisation units and compressor, in that
  arrangement
* ring buffers on both memory sides and a 256-bit AXI-Stream memory connection
* 16 units per direction
* a nine-stage int-to-bfloat16 conversion (one sign stage and eight exponent
  stages), followed by the scale multiplication
* the zero-offset, multiply-only formulation
* runtime settings over AXI-Lite
* per-block latencies of 2/10/10/2 cycles and 12 per direction

The following are this design's own choices. The published description leaves
them open:

* the insides of the quantisation unit's conversion stages
* rounding: ties to even in bfloat16, ties away from zero when converting to
  integer
* saturation, and the handling of zero, subnormal, infinity and NaN
* the dense little-endian memory layout
* tensor framing with `tlast` and `tkeep`
* the ring size of four words
* latching the settings per tensor
* the register map, and one AXI-Lite port serving both directions
* the shared stall enable

Not included: the DNN accelerator, the off-chip memory, the DMA engines and
network-on-chip connection, and the controller software. They connect to the
top-level ports. The 300 MHz clock target and the FPGA resource figures
(roughly 29k LUTs and 32 DSPs for the converter) have not been checked against
this RTL.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_dequant_unit` | random integers and scales, including underflow and overflow; 10-cycle latency; random stalls |
| `tb_quant_unit` | random values and precisions 2..16; ties, infinities, NaN and saturation; 10-cycle latency; stalls |
| `tb_extractor` | random tensors of every precision with input gaps and output back-pressure; short final beats; settings held within a tensor; 2-cycle latency; one beat per cycle at 16 bits |
| `tb_compressor` | random lane counts and precisions; final-word `tkeep` and `tlast`; 2-cycle latency; one word per cycle at 16 bits |
| `tb_cfg_regs` | reset values, byte strobes, read-back, SLVERR, held write response |
| `tb_number_converter` | the whole converter at its default size, with a loop-back accelerator model (described below) |
| `tb_layer_schedule` | a mixed-precision layer schedule at the default size (described below) |

The reference models in `tb/tb_ref_pkg.sv` compute in double precision rather
than bit-level logic. A product of two bfloat16 values is exact in a double,
so each reference result is rounded once, as in the hardware.

`tb_number_converter` runs the whole converter at its default size. The
loop-back accelerator model echoes every beat back. The testbench then checks:

* every bfloat16 beat and every packed memory word
* both 12-cycle latencies
* 16 conversions per cycle in each direction

It also counts that each mechanism actually happened:

* stalls on all four streams
* a precision change between tensors
* short final beats and words
* saturation
* settings writes during a tensor

`tb_layer_schedule` plays the traffic of an inference. It runs eight layers.
Each layer reads its weights and its input activations, each at its own
precision and scale. At the same time it writes the layer's outputs, which an
accelerator model produces, at a third precision. The tensor sizes and
precisions are made up for illustration; they are not taken from a real
network. The settings are rewritten between tensors over the one AXI-Lite
port. The testbench checks:

* every value in both directions
* that each tensor flows at one 16-value beat per cycle on the accelerator side
* the 12-cycle latency of both directions, at every precision in the schedule
  (2, 3, 4, 5, 6, 8 and 16 bits)

It then reports the memory words moved against bfloat16 storage. For this
schedule that is 671 words instead of 1,689, or 61% less.

Running one testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/mpc_pkg.sv tb/tb_ref_pkg.sv tb/tb_number_converter.sv \
  --top-module tb_number_converter -o sim
./obj_dir/sim
```

Replace the testbench name to run the others. The full converter test takes
about 10 seconds.

## Files

* `rtl/mpc_pkg.sv`: constants, types, `bf16_mul`
* `rtl/extractor.sv`, `rtl/dequant_unit.sv`: memory to accelerator
* `rtl/quant_unit.sv`, `rtl/compressor.sv`: accelerator to memory
* `rtl/cfg_regs.sv`: AXI-Lite settings
* `rtl/number_converter.sv`: top level
* `tb/`: the testbenches above and the reference package
