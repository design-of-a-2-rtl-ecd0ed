# 8x8 2-D IDCT with distributed-arithmetic CORDIC rotators and signed-digit arithmetic

This is an 8x8 inverse discrete cosine transform processor for video and
image decoding. It takes 12-bit DCT coefficients and produces 9-bit pixels at
64 results per 80 clock cycles. That is 80 Mpixel/s at a 100 MHz clock.

The design has no multipliers. The 8-point IDCT is factored into six plane
rotations (CORDIC form), and each rotation is computed by distributed
arithmetic (DA). Two input bits of each operand form a ROM address, and the
ROM outputs are accumulated. Carries would normally limit the speed of this
accumulation. Here all arithmetic between the ROMs and the final outputs is
redundant signed-digit arithmetic, so no carry ever travels more than one
digit position. Results flow most significant digit first (MSDF) from the
rotators through two layers of on-line adders into on-the-fly converters.
Those converters produce ordinary two's complement words as the last digit
arrives.

The 2-D transform uses row-column decomposition. A row 1-D core feeds a
64-word transpose memory, and a column 1-D core reads from it. Both cores
are instances of the same module.

## The processor: `idct2d_top`

```
din(12) --> [ row idct1d_core ] --16--> [ transpose_ram 64x16 ] --16--> [ column idct1d_core ] --> round/saturate --> dout(9)
                  ^                          ^        ^                        ^
                  +---------------------- idct_ctrl --+------------------------+
```

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `start` | in | 1 | high in the cycle of a block's first coefficient |
| `din` | in | 12 | coefficient, two's complement |
| `ready` | out | 1 | high for each valid output word |
| `dout` | out | 9 | pixel, two's complement, saturated to -256..255 |

**Input schedule.** Each row of 8 coefficients arrives in consecutive
cycles, followed by 2 idle cycles. A block therefore takes 80 cycles. `start`
may repeat every 80 cycles, so blocks can run back to back. Longer gaps
between blocks are also allowed. An assertion in `idct_ctrl` flags a `start`
that comes sooner than 80 cycles.

**Output schedule.** The first pixel appears 115 cycles after `start`. Pixels
leave column by column: x(0,c) to x(7,c), then 2 idle cycles, for c = 0..7.
The output is therefore the transpose of the input order.

**Parameters.**

| Parameter | Default | Meaning |
|---|---|---|
| `IN_W` | 12 | coefficient width |
| `OUT_W` | 9 | pixel width |
| `INT_W` | 16 | width of the intermediate results and of the transpose memory |
| `ROM_W` | 14 | accumulator window in binary signed digits (see the rotator section) |

## Number representation

- **Binary signed digit (BSD).** A pair of bits `{p, m}` with value p - m,
  so each digit is -1, 0 or +1.
- **Radix-4 digit.** Two BSD digits `{hi, lo}` with value 2*hi + lo, in the
  range -3..3. This is the `r4_t` type in `idct_pkg`.

Every stream between the rotators and the converters carries one radix-4
digit per cycle, MSDF. A 1-D core works in frames of 10 cycles, one frame per
8-point vector:

| Frame cycle | Digit stream (per word) |
|---|---|
| 0 | idle (zero) |
| 1 | k0, always zero |
| 2..9 | k1..k8 |

The rotators' ROM words carry three leading zero bits, so k0 of every rotator
output is zero. That leading zero gives the two on-line adder layers the room
to grow their result by one digit each without overflow. Digit k8 comes out
of a ninth accumulation cycle, taken from what the accumulator still holds.
It buys about two bits of accuracy at no cost in throughput.

## The 1-D core: `idct1d_core`

```
x(i) = 1/2 * sum_u C(u) X(u) cos((2i+1) u pi / 16),   C(0) = 1/sqrt(2), C(u>0) = 1
```

The core computes one 8-point IDCT per 10-cycle frame. Its parts are:

1. **`piso_reg`.** An 8-word register captures the inputs as they arrive.
   `load` copies all eight into shift registers. Each shift register then
   emits two bits per cycle, MSB first, so a word becomes 8 digits. The
   sign bit is the first digit. The shift registers are 16 bits wide, so
   12-bit row inputs are padded with zeros below the LSB.

2. **Six `da_rotator`s.** Each computes, for its angle phi and with the
   IDCT's 1/2 folded in:

   ```
   P = (p cos(phi) - q sin(phi)) / 2
   Q = (q cos(phi) + p sin(phi)) / 2
   ```

   | Rotator | phi | p | q |
   |---|---|---|---|
   | R0 | pi/4 | X0 | X4 |
   | R1 | pi/8 | X6 | X2 |
   | R2 | 3pi/16 | X5 | X3 |
   | R3 | pi/16 | X3 | X5 |
   | R4 | 3pi/16 | X1 | X7 |
   | R5 | pi/16 | X7 | X1 |

3. **`butterfly_array`.** Two layers of radix-4 on-line adders (16 in all)
   combine the twelve rotator outputs:

   ```
   e0 = a00 + a02    e1 = b00 - b02    e2 = b00 + b02    e3 = a00 - a02
   o0 = a11 + a03    o1 = b01 - a13    o2 = a01 - b13    o3 = b03 - b11
   x(i) = e_i + o_i,   x(7-i) = e_i - o_i
   ```

   Here aNN is a rotator's Q output and bNN its P output. Each adder has a
   latency of 2 cycles.

4. **`rnnc_bank`.** Eight redundant-to-nonredundant converters turn the
   eight digit streams into two's complement words. Their results are held in
   registers and sent out one per cycle on a 16-bit bus, x(0) first.

**Timing.** Results x(0)..x(7) leave 16 to 23 cycles after `load`, marked by
`dout_valid` and `dout_idx`. The output LSB is 2^-14 of the input read as a
fraction: an input word w stands for w / 2^(IN_W-1).

## Inside a DA rotator

This is the least obvious part of the design.

**Address decoding (`addr_decoder`).** In each cycle the current two-bit
digit of p and of q form a 4-bit address. Most digits are unsigned (0..3).
The first digit of a two's complement word carries the sign, so its value is
-2..1. For that digit only, the decoder maps the signed pair onto the
unsigned table:

- If both digits are ≥ 0, the address is used as it is.
- If both digits are ≤ 0, the decoder looks up their magnitudes and negates
  both results.
- If the signs differ, the decoder looks up the magnitudes and exchanges the
  P and Q tables. The negative operand's term is negated. The rotation
  identities make this exact.

**ROMs (`da_rom`).** There are two ROMs per rotator, each with 16 entries,
holding the magnitudes:

```
|round((x cos - y sin) / 2 * 2^(ROM_W-5))|
|round((y cos + x sin) / 2 * 2^(ROM_W-5))|
```

The tables are computed during elaboration from 16-bit cosines and sines.

**Operation decoder (`op_decoder`).** It supplies each accumulator's
add/subtract control, one per accumulator. This control combines each
entry's sign with the negation flags from the address decoder.

**Accumulator (`hsd_accumulator`).** It holds a window of `ROM_W` binary
signed digits. Each cycle it does the following:

- A row of plus-plus-minus cells (`ppm_cell`) adds or subtracts the unsigned
  ROM word. This step is carry-free: a transfer moves one position only.
- The *guard* logic reads the integer digit and the four leading fraction
  digits, a value between -14 and +14 quarters.
- It emits the radix-4 output digit round-half-toward-zero(V/4), which lies
  in -3..3.
- It recodes the remainder (-2..2 quarters) into the two leading positions
  of the next window.
- The window then shifts left by two digits.

Every ROM word is below 1/8 of the window, which keeps the window below 3/4.
Assertions check both the guard range and that the first output digit of
each word is zero. Subtraction negates the window, adds the word and negates
the sum, so a single row of cells serves both operations.

Each output digit stands for the whole accumulated value above it. The
stream is exact except for what remains in the window after the ninth
cycle.

## On-line adder and converter

**`ol_adder_r4`** adds two radix-4 SD streams, MSDF. It uses a layer of PPM
cells followed by a layer of MMP cells (`mmp_cell`: minus-minus-plus). A
subtraction simply swaps the positive and negative components of y. Output
digit k appears 2 cycles after input digit k. The result is exact when the
stream begins with a zero digit, which the frame guarantees.

**`rnnc`** converts on the fly. It keeps two registers, X0 (the value so far)
and X1 = X0 - 1. Each digit appends to one of them, depending on the digit's
sign, so the conversion never propagates a carry. The converters in the bank
are 18 bits wide and so are exact. Their results then saturate to 16 bits.

## Transpose memory and control

**`transpose_ram`** is a 64x16 dual-port memory. Writes happen on one port.
Reads happen on the other with one cycle of latency.

**`idct_ctrl`** shares the single 64-word memory between consecutive blocks.
It does this by alternating the addressing:

| Block | Row result (r, c) written to | Column reads |
|---|---|---|
| even | 8r + c | addresses 8r + c, column by column |
| odd | 8c + r | addresses 8c + r |

A location is always read before the next block writes it. Column reading
starts once element 52 (row 6, column 4) of a block has been written. At that
point every later read finds its data already in place. The controller also
drives the write and `load` strobes of both PISO registers.

## Scaling and rounding

- **Row core.** It reads a coefficient X as X/2048 and returns r = 8 × (row
  IDCT value), an integer in 16 bits.
- **Column core.** It receives 2r, saturated to 16 bits, and returns c = 8 ×
  (2-D IDCT value).
- **Output.** The pixel is c/8, rounded to nearest with ties to even, then
  saturated to 9 bits.

Ties to even matters here. At 1/8 resolution one result in eight is an exact
tie, and rounding ties upward would bias every pixel by +1/16.

## Accuracy

The following figures are from simulation against a double-precision
reference.

| Configuration | Result |
|---|---|
| 1-D core, `ROM_W` = 14 | max error 23 LSB (LSB = 2^-14 of full scale) |
| 1-D core, `ROM_W` = 18 | max error about 3 LSB |
| 2-D processor at defaults, random blocks | most pixels exact or off by 1; peak error 4 |

**IEEE Std 1180-1990.** The 2-D processor does **not** meet the standard,
even with `ROM_W` = 18 or 22. With 18, the overall mean square error is about
0.08, against a limit of 0.02. The overall mean error is about 0.017, against
a limit of 0.0015. The limiting factor is the column core's output. It
resolves only 1/8 pixel, and it comes from a truncated 9-digit stream. A
longer frame (more digits per result) would be needed to close the gap. The
original design is reported to meet the standard, so this is a departure in
accuracy, not only in structure.

## Where this RTL departs from the original description

- **Frame and input gaps.** The 10-cycle frame and the 2 idle input cycles
  per row are derived from the specified rate of 80 Mpixel/s at 100 MHz.
- **Ninth digit.** The ninth accumulation cycle (digit k8) is an addition
  of this design.
- **Guard rule.** The guard's rounding rule, and with it the third leading
  zero bit of the ROM words, is this design's choice. The original requires
  two leading zeros.
- **Add/subtract controls.** Each rotator has two add/subtract controls, one
  per accumulator, not one. The P and Q terms for the same address can have
  different signs.
- **Butterfly pairings.** The odd-half pairings of the first butterfly layer
  were derived from the rotation identities, so that the outputs equal the
  IDCT exactly.
- **Shift register width.** The PISO shift registers are 16 bits wide rather
  than 12. This lets one module serve both cores.
- **Converter output buffering.** The converters' staggered output buffering
  is replaced by one holding register per converter plus a select counter.
  The output timing is the same: one result per cycle.
- **Clocking.** One clock drives everything, including both memory ports.
  The original clocks the two ports from complementary clocks.
- **Choices not taken from the original.** These are the scaling between the
  cores, the rounding and saturation, the output order, the memory
  addressing and `ready` as a per-word strobe.
- **Self-test wrapper.** It tests one block per run, its memories are
  filled through write ports, and it runs from the same clock as the
  processor.

## Built-in self-test: `selftest_harness`

At 100 MHz, a processor is hard to drive from external test equipment. The
wrapper `selftest_harness` therefore holds the test in the same FPGA as the
processor, and it is the top level of the FPGA design. It has four parts:

- RAM-T holds one 8x8 block of coefficients.
- RAM-E holds the 64 expected pixels, in the processor's output order
  (column by column).
- The test control logic replays RAM-T into the processor when
  `test_start` is pulsed. It uses the processor's input schedule, with
  START on the first coefficient.
- The comparator checks each `ready` word against RAM-E.

After the 64th comparison, `test_done` rises. `comp_res` (meant for an LED)
goes high if no word differed. Both memories are loaded through their write
ports (`t_*`, `e_*`) before the test starts.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
cd rtl
verilator --binary --timing --assert -Wno-fatal \
  idct_pkg.sv ppm_cell.sv mmp_cell.sv ol_adder_r4.sv butterfly_array.sv \
  rnnc.sv rnnc_bank.sv piso_reg.sv addr_decoder.sv op_decoder.sv da_rom.sv \
  hsd_accumulator.sv da_rotator.sv idct1d_core.sv transpose_ram.sv \
  idct_ctrl.sv idct2d_top.sv selftest_harness.sv \
  ../tb/tb_idct2d_top.sv --top-module tb_idct2d_top
./obj_dir/Vtb_idct2d_top
```

| Testbench | What it checks |
|---|---|
| `tb_idct2d_top` | Runs the processor at its default parameters over 300 blocks. Checks every pixel against a double-precision IDCT (tolerance 5). Checks the 115-cycle latency and the output rate. Counts each mechanism it relies on, and fails if any of them never occurs: operand exchange and negation, subtraction, guard recoding, saturation at both stages, both memory address patterns, back-to-back blocks and idle gaps. |
| `tb_selftest_harness` | Runs the self-test wrapper at its default parameters. Checks the replay and the START alignment, and checks the pixels against the reference. Then checks that the comparator passes when RAM-E holds the right results and fails when one word is wrong. |
| `tb_idct2d_ieee1180` | Runs the IEEE 1180 procedure: 6 × 10000 blocks, about one minute. It reports the shortfall described above as failures. |
| Other `tb_<module>` benches | Each tests one module in isolation against an independent model. |

The `ROM_W` parameter is the easiest knob to change. Each extra pair of
digits cuts the 1-D error by roughly 3×, at the cost of two more
accumulator positions per rotator.
