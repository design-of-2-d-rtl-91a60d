# 2-D lifting DWT processor (5/3 and 9/7) for 64 x 64 images

This is a small hardware processor that computes the multi-level
two-dimensional discrete wavelet transform (DWT) of a grey-scale image, as
used by JPEG 2000-style compression. It supports both wavelets of that
standard: the reversible integer 5/3 and the 9/7. Both are computed with the
*lifting scheme*. Lifting splits a signal into even and odd samples, then
alternately corrects the odd samples from their even neighbours (the detail
or high-pass band, H) and the even samples from their odd neighbours (the
approximation or low-pass band, L). It needs only adders and shifts for 5/3,
and four constant multiplications per sample pair for 9/7. It works in place
and needs no extra storage.

The processor follows a published architecture for a memory-efficient 2-D
DWT with these units:

- a bus interface unit;
- a control unit built as a finite state machine;
- a RAM unit;
- a transform module, made of an even/odd split stage and H-band and L-band
  lifting blocks;
- an output accumulator.

That description gives the lifting equations, the way these units cooperate
and the level-by-level order of work. It says little about widths, timing,
the bus or the exact arithmetic. Those choices are this design's, and each
one is listed below under "Where this design makes its own choices".

## The transform

For one line `X[0..N-1]` (N even), the 5/3 wavelet is

    H[n] = X[2n+1] - floor((X[2n]   + X[2n+2]) / 2)      (predict, H band)
    L[n] = X[2n]   + floor((H[n-1]  + H[n])    / 4)      (update,  L band)

The 9/7 wavelet alternates the same two kinds of step twice. Each step uses
its own constant:

    odd  += alpha * (left even + right even)      alpha = -1.586134342
    even += beta  * (left odd  + right odd)       beta  = -0.052980118
    odd  += gamma * (left even + right even)      gamma =  0.882911075
    even += delta * (left odd  + right odd)       delta =  0.443506852

At the line ends the signal is extended symmetrically: `X[N] = X[N-2]` and
`H[-1] = H[0]`. The 9/7 path has no final K scaling: the low band comes out
about 1.23 times larger per dimension than in a scaled 9/7 transform, and the
high band smaller by the same factor.

A 2-D level transforms every row, then every column of the result. The
low half of each line is written to the left or top, and the high half to
the right or bottom. After one level the image holds four quadrants:

    +------+------+
    | LL1  | HL1  |      level 2 repeats the same steps on LL1 only,
    +------+------+      splitting it into LL2 HL2 / LH2 HH2,
    | LH1  | HH1  |      and so on, up to 6 levels for 64 x 64
    +------+------+

## How a line is computed (`dwt_1d_unit`)

The transform module takes one line of `len` samples (even, 2..64), one per
cycle. `even_odd_split` counts the samples and writes sample `2i` into
`even[i]` and sample `2i+1` into `odd[i]`. These are two banks of 32 temporary
registers, and reset clears them. After the last sample the split raises
`load`, and the unit runs its passes in place over the banks, one sample per
cycle:

| wavelet | passes (h = len/2 cycles each)                          |
|---------|---------------------------------------------------------|
| 5/3     | H (`band_h_proc`, predict), L (`band_l_proc`, update)   |
| 9/7     | H (alpha), L (beta), H (gamma), L (delta)               |

An H pass only reads the even bank and only writes the odd bank, and an L
pass does the opposite. Updating sample by sample in place is therefore
exact. The symmetric extension is a multiplexer on the neighbour index at
`n = h-1` (H pass) and `n = 0` (L pass). Last, the unit sends out `even[0..h-1]`
(L band) and then `odd[0..h-1]` (H band) on `len` consecutive cycles.

Number formats:

- RAM words are 16-bit signed integers.
- The datapath is 32 bits wide.
- In 5/3 mode the banks hold plain integers, so the transform is exactly the
  integer lifting above.
- In 9/7 mode samples are loaded with 8 fractional bits. The constants are
  signed Q1.14 (`round(c * 16384)`), and each product is rounded to the
  nearest datapath LSB. On output each coefficient is rounded to the nearest
  integer and saturated to 16 bits.

Because the RAM holds integers, the 9/7 result is rounded after every 1-D
pass. Against a double-precision transform that is rounded the same way, the
processor agrees to within 2 LSB after two levels.

The timing of one line, with P = 2 passes for 5/3 and 4 for 9/7:

- the first output comes `P*len/2 + 2` cycles after the last input sample;
- `in_ready` is low from the end of the input until the output is finished.

## How an image is computed (`control_unit`)

The control unit owns the single-port RAM (`ram_unit`, 4096 x 16 bits, one
cycle read latency). While it is idle, it passes the bus interface's pixel
writes through to the RAM. On `start` it latches the filter and the level
count L. A count of 0 runs one level, and a count above 6 runs 6 levels. It
then runs, for level l = 1..L with `S = 64 >> (l-1)`:

1. the row pass: for each of the S rows of the top-left S x S square, read
   S words, stream them into the transform module, and write the S results
   back to the same row;
2. the column pass: the same for each of the S columns;
3. halve S.

After level L it reads the whole 64 x 64 RAM in raster order into the output
accumulator. A read is issued only if the accumulator will have room for it,
so a slow consumer only stalls the readout. It then raises `done`.

The cycle counts are exact when the output is always ready. A line of S
samples takes `2*S + 2 + P*S/2` cycles, a level takes `2*S` lines, and the
readout with its final step takes 4097 cycles:

| run                  | cycles from start to done |
|----------------------|---------------------------|
| 5/3, 1 level         | 24 832 + 4 097 = 28 929   |
| 5/3, 2 levels        | 31 104 + 4 097 = 35 201   |
| 9/7, 1 level         | 33 024 + 4 097 = 37 121   |

## Host interface (`bus_interface_unit`, `output_accumulator`)

The bus is synchronous. A write happens on a clock edge where `bus_sel` and
`bus_we` are both high. Reads are combinational on `bus_rdata`.

| addr | name   | write                                            | read              |
|------|--------|--------------------------------------------------|-------------------|
| 0    | CTRL   | bit 0 = 1: start                                 | `{done, busy}`    |
| 1    | CONFIG | bit 0: 0 = 5/3, 1 = 9/7; bits 3:1: levels        | configuration     |
| 2    | PIXEL  | `wdata[7:0]` to RAM[pointer], pointer += 1       | 0                 |
| 3    | ADDR   | pixel pointer                                    | pointer           |

The processor ignores every write while it is busy.

One operation goes like this:

1. Write CONFIG.
2. Write ADDR = 0.
3. Write the 4096 pixels to PIXEL in raster order. One write per cycle is
   allowed.
4. Write CTRL = 1.
5. Take 4096 words from `out_data` on every cycle where both `out_avail` and
   `out_ready` are high.

The words come out in raster order, in the pyramid layout shown above.
`out_avail` is the accumulator's "data available" flag. The accumulator is a
4-word FIFO.

## Files

| file                        | contents                                                   |
|-----------------------------|------------------------------------------------------------|
| `rtl/dwt_pkg.sv`            | widths, fixed-point constants, filter enum, register map   |
| `rtl/dwt2d_top.sv`          | top level, wires the five units together                   |
| `rtl/bus_interface_unit.sv` | register-mapped host port                                  |
| `rtl/control_unit.sv`       | level / pass / line sequencer, RAM port owner              |
| `rtl/ram_unit.sv`           | 4096 x 16 single-port RAM                                  |
| `rtl/dwt_1d_unit.sv`        | 1-D lifting transform of one line                          |
| `rtl/even_odd_split.sv`     | split stage: sample routing and `load`                     |
| `rtl/band_h_proc.sv`        | H-band lifting step (predict, alpha, gamma)                |
| `rtl/band_l_proc.sv`        | L-band lifting step (update, beta, delta)                  |
| `rtl/output_accumulator.sv` | output FIFO with the available flag                        |
| `tb/tb_*.sv`                | one self-checking testbench per module                     |
| `tb/tb_line_model.sv`       | stand-in transform module used by `tb_control_unit`        |

The top's parameters are `IMG_SIZE` (64, must be a power of two and at least
`2**MAX_LEVELS`), `MAX_LEVELS` (6) and `ACC_DEPTH` (4). `IMG_SIZE` sets the RAM
depth and the length of the line banks together.

## Verification

Each testbench computes its expected values on its own. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_dwt2d_top` runs the whole processor at its default size. It builds a
  synthetic 64 x 64 8-bit image (smooth shading, texture and a sharp edge)
  and makes five runs:
  - 5/3 with 2 levels;
  - 9/7 with 2 levels and random output back-pressure;
  - 5/3 with the level field set to 7, which is clamped to 6 levels;
  - 9/7 with 1 level;
  - 5/3 with 1 level.

  It compares every output word with a reference model in the testbench:
  exact integer lifting for 5/3, and double precision for 9/7 with a
  tolerance of 3. It checks the cycle counts in the table above. It also
  confirms that the following happened: both filters, more than one level,
  the level clamp, a full accumulator, writes ignored while busy, and status
  reads.
- `tb_dwt_1d_unit` sends lines of length 2 to 64 in both modes. It checks the
  values, the latency and the handshake. Assertions in the unit reject a
  sample offered while `in_ready` is low and an odd or out-of-range `len`.
- `tb_control_unit` replaces the transform module with a line model that
  reverses each line and adds one. This catches any row or column addressing
  error and counts the passes applied. The test uses a 16 x 16 image, levels
  0, 1, 3 and 7, and random accumulator room.
- The remaining testbenches check the split stage, the two lifting steps
  (random operands against real arithmetic), the RAM, the FIFO (against a
  queue model) and the register map.

To simulate one of them with Verilator (the example is the top):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dwt_pkg.sv tb/tb_dwt2d_top.sv --top-module tb_dwt2d_top
    ./obj_dir/Vtb_dwt2d_top

The full-size end-to-end test runs in well under a second.

## Where this design makes its own choices

These points are not fixed by the architecture this design follows. Treat
them as this implementation's decisions:

- **Image source.** The image is written into the RAM over the bus before
  start, and level 1 reads it back from the RAM like every later level. The
  original bus interface "selects pixels from the input image" for level 1.
- **Pass order and layout.** Each level does rows first, then columns, in
  place, in the pyramid layout. Every sub-band stays in the single RAM, and
  all of them are streamed out once at the end, not level by level.
- **5/3 rounding.** Both steps use floor, implemented as an arithmetic right
  shift, exactly as the equations above are written. The JPEG 2000 update
  step also has an offset: it adds 2 before the division by 4. This design
  leaves that offset out, so its 5/3 L coefficients can differ from a strict
  JPEG 2000 coder.
- **9/7 constants and scaling.** The constant values are the standard ones,
  as the architecture names the steps but not their values. There is no K
  scaling step. The whole 9/7 number format is this design's own.
- **Boundary handling.** Whole-sample symmetric extension, as in JPEG 2000.
- **Host side.** The bus, the register map and the ignore-while-busy rule are
  this design's own, and so are the FIFO form, depth and ready handshake of
  the output accumulator.
- **Timing.** The serial one-sample-per-cycle schedule, and with it every
  cycle count, is this design's own. The original design is reported to run
  at 108 MHz on a Xilinx FPGA. This RTL has not been synthesised for any
  device, and nothing here confirms that clock rate or the original's
  resource and power figures.
- **Test image.** The tests use a generated image, not the standard "Lena"
  photograph.
