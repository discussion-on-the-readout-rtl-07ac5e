# CLICTD digital readout: pixel matrix, slow control and serial link

CLICTD is a monolithic tracking chip. Its sensor cells are 30 × 300 µm²
"strixels", each split into ten front-ends (sub-pixels) so that charge is
collected quickly. This RTL is the digital part of the chip. The analog
front-ends report hits to it, and it does the following:

* measures each pixel's time of arrival (ToA, 8 bits, 10 ns steps) and time
  over threshold (ToT, 5 bits) during a shutter window;
* stores one hit bit per front-end;
* holds each pixel's configuration: 51 bits, loaded in three stages;
* reads the matrix out over one 8b/10b-coded DDR serial link. Pixel-level
  zero compression sends 24 bits for a hit pixel and a single bit for an
  empty one.

The main idea is **one 24-bit shift chain per pixel that is used for three
jobs**. While counting, the chain bits are LFSR counters and hit flags.
During configuration they carry the configuration data into the pixel.
During readout they carry the measurements out, and zeros shifted in behind
them clear the pixel for the next frame. The hit flag at the end of the chain
decides whether the pixel's other 23 bits take part in the readout at all.

## Pixel chain and readout format

```
 din ─► hit bits h0..h9 ─► ToA r0..r7 ─► ToT r8..r12 ─► MUX ─► HF D-FF ─► dout
  │                                                      ▲ ▲
  └──────────────────── bypass ──────────────────────────┘ └── HF latch
```

* **Counting** (`count_readout = 1`):
  * `h[i]` is set when front-end `i` fires (unmasked) while the shutter is
    open.
  * The 13 counter bits step as LFSRs: separate 8-bit and 5-bit LFSRs in
    nominal mode, one 13-bit LFSR in long-counter and photon modes.
  * The HF flip-flop is set by the first hit.
* **Readout** (`count_readout = 0`): every `shift_en` moves the chain one
  place towards `dout`. A pixel therefore emits, MSB first:

  | bits | 23 | 22..18 | 17..10 | 9..0 |
  |---|---|---|---|---|
  | content | hit flag | ToT[4:0] (or 13-bit counter [12:8]) | ToA[7:0] (counter [7:0]) | hit bits h9..h0 |

  With compression on, a pixel whose latched hit flag is 0 routes `din`
  straight into its HF flip-flop. It then adds exactly one `0` bit to the
  column stream, and its own chain stays still (clock-gated). The **HF
  latch** follows the flip-flop while counting and freezes when
  `count_readout` drops. This keeps the multiplexer choice stable while the
  flip-flop itself shifts data.
* **Counter values are LFSR states, not binary.** A receiver decodes them by
  table lookup. The polynomials are x^8+x^6+x^5+x^4+1 (ToA),
  x^5+x^3+1 (ToT) and x^13+x^4+x^3+x+1 (long counter and photon counter).
  All use XNOR feedback, so the all-zero state that readout leaves behind is
  a valid start state. ToA and ToT wrap after 255 and 31 steps.

A column chains `NROWS` pixels. Data enter at the top row and leave from
row 0, so the lowest row is read first. After a column's total chain length
of shifts, every active bit holds a zero.

### Measurement modes (global)

| `mode` | ToA/counter | ToT |
|---|---|---|
| 0 nominal | clocks from first hit to shutter close (8-bit) | ToT clock strobes while the first hit stays high (5-bit) |
| 1 long counter | same as nominal, 13-bit | — |
| 2 photon counting | rising hit edges during the shutter (13-bit) | — |

There is no multi-hit capability: only the first hit of a shutter window is
timed. The ToT clock is the counting clock divided by 1, 2, 4 or 8.

**Timing.** Discriminator outputs pass a two-flop synchroniser. A hit that
rises before clock edge *t* starts the ToA counter at edge *t+2*. ToA is
therefore `T − t − 2` for a shutter that is high for edges 0…T−1. A hit
bit needs the discriminator high across at least one clock edge.

## Configuration

Each pixel has 51 configuration bits:

* per front-end: a 3-bit threshold DAC, a mask bit and an analog test pulse
  enable;
* one digital test-pulse enable, which replaces the front-end OR by the
  global `test_pulse` input.

The bits are loaded in three stages of 17. In each stage 24 bits are shifted
through each pixel. The 17 configuration positions are `h6..h9` followed by
the 13 counter bits. The low hit bits and the hit flag are don't-care.
`conf[s]` high makes stage `s` follow the chain, and `conf[s]` low holds it.
Stage `s`, position `k` is pixel bit `17s+k`. Front-end `i` uses bits
`5i+2..5i` (DAC), `5i+3` (mask) and `5i+4` (test-pulse enable). Bit 50 is
the digital test-pulse enable.

The stage holders are clock-enabled registers, not transparent latches, so
keep `conf[s]` high for at least one clock after the last shift. Over I2C
this is always the case.

A matrix shift during configuration loads every column at once from the
**configuration word register**, which holds one bit per column. One stage
of the whole matrix takes `24 × NROWS` matrix shifts, each preceded by
writing the configuration word. The first bit shifted ends in the bottom
pixel's hit-flag position. A readout should follow every stage. It clears
the matrix and returns the bits just written, so the load can be verified
(the top-level testbench does this).

## Slow control (I2C)

The slave uses a 7-bit address (default `0x2A`) and has no clock stretching.
SCL and SDA are oversampled by the system clock.

* Write: `S addr+W reg data…`. Every data byte goes to the same register,
  which lets configuration words be streamed.
* Read: `S addr+W reg Sr addr+R data…`.

| addr | name | access | content |
|---|---|---|---|
| 0x00 | GCFG | rw | [1:0] mode, [2] compression, [4:3] ToT divider (reset: compression on, nominal) |
| 0x01 | MCTRL | rw | [0] count_readout, [3:1] conf[2:0] |
| 0x02 | CFGDATA | w | each byte is shifted into the configuration word register. The last byte written lands in columns 7..0; bit 7 is the higher column. |
| 0x03 | CFGSHIFT | w | one matrix shift with the configuration word as column inputs |
| 0x04 | ROCTRL | w | bit 0: start readout |
| 0x05 | STATUS | r | [0] readout busy, [1] readout finished since last start |

## Readout path

```
columns ─► end-of-column (per column) ─► readout_ctrl ─► enc_8b10b ─► serializer_ddr ─► ser_dout[1:0]
```

* **End of column**: follows the bit leaving its column. It reads a pixel's
  first bit as the hit flag. That pixel is then 1 bit long (compressed, no
  hit) or 24 bits. The block raises `done` after `NROWS` pixels.
* **readout_ctrl**: reads columns in groups of `NPAR` (default 2), lowest
  group first. Each step shifts every unfinished column of the group once
  and appends one bit per lane to a byte; lane 0 takes the more significant
  position. A finished column contributes zeros. A full byte waits for the
  link, and **the matrix stalls meanwhile** (`ro_stall`). Each group starts
  on a byte boundary.
* **Frame**: K27.7, the data bytes, then K29.7. K28.5 is sent whenever
  nothing else is ready, including gaps inside a frame, which a receiver
  drops.
* **Receiving a frame**: split each byte into lanes and parse each lane
  pixel by pixel until it has `NROWS` pixels. The rest of that group's
  bytes are padding.
* **serializer_ddr**: sends two bits per clock, `ser_dout[1]` in the first
  half-period and `ser_dout[0]` in the second. A 10-bit symbol therefore
  takes 5 clocks, and a 320 MHz clock gives 640 Mbit/s. The DDR multiplexer
  on the clock level and the differential driver are pad cells outside this
  RTL.

### Rates

For the full-size 500 × 50 matrix at 3 % occupancy, the compressed frame is
750 × 24 + 24 250 × 1 = 42.25 kbit. With the 8b/10b overhead that is
82.5 µs at 640 Mbit/s. An uncompressed frame is 600 kbit, or 1.17 ms. The
target is < 800 µs, which is why compression is used. Configuring the full
matrix at 400 kHz I2C takes about 5.7 s with this register interface.

## Clocking and reset

There is one clock, `clk`:

* during counting it is the 100 MHz ToA clock;
* during configuration and readout it is the readout clock.

Choosing its readout frequency (for example 320 MHz for a 640 Mbit/s link)
is left to the integration. All flip-flops use an asynchronous active-low
reset `rst_n`. Readout must be started with `count_readout = 0`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `clictd_top` | `NCOLS` | 100 | columns (3 mm at 30 µm; 500 for 1.5 cm) |
| | `NROWS` | 10 | rows (3 mm at 300 µm; 50 for 1.5 cm) |
| | `NPAR` | 2 | columns read in parallel (must divide 8 and `NCOLS`) |
| | `I2C_ADDR` | 7'h2A | slave address |

The defaults are the first-prototype matrix of about 3 × 3 mm². The
full-size 500 × 50 matrix is a parameter setting. It elaborates into 25 000
pixels, and linting or building it with verilator needs well over 10 GB of
memory.

## What this design chose where the CLICTD description is silent

* LFSR polynomials, the bit order of the 51 configuration bits, the register
  map and the I2C address.
* Hits are sampled on the clock (asynchronous set is not modelled).
* The stage latches are modelled as registers.
* The readout: lane interleaving, zero padding, frame symbols, back-pressure
  stalling, and a single clock for counting and readout.
* Uncompressed readout gives 24 bits per pixel, because the hit flag is part
  of the chain.
* Only pixel-level compression is built. Column-level compression (one bit
  for an empty column) is not part of this design.
* The analog front-end, the SDA tri-state pad and the differential driver
  are not included. The top brings their signals out as ports: `disc`,
  `fe_cfg`, `sda_i`/`sda_oe` and `ser_dout`.

## Files

* `rtl/clictd_pkg.sv`: constants, types (`mode_e`, `global_cfg_t`,
  `fe_cfg_t`), LFSR functions and K codes.
* Pixel: `pixel_hit_logic`, `pixel_asm`, `pixel_counter`, `pixel_hit_bits`,
  `pixel_hit_flag`, `pixel_conf`, `pixel`.
* Matrix: `column`, `eoc`, `cfg_word_reg`, `tot_clk_div`.
* Periphery: `i2c_slave`, `slow_ctrl_regs`, `readout_ctrl`, `enc_8b10b`,
  `serializer_ddr`.
* Top: `clictd_top`.
* `tb/`: one self-checking testbench per module (`<module>_tb.sv`) and the
  shared references in `tb/tb_util_pkg.sv`. Two testbenches exercise the
  whole chip:
  * `clictd_top_tb` (4 × 3 matrix): I2C configuration with read-back, then
    nominal and photon-counting acquisitions. It decodes the link and checks
    every pixel, and counts stalls, bypasses, masking, test pulses and
    fillers.
  * `clictd_full_tb`: one acquisition and readout of the default 100 × 10
    chip at 3 % occupancy.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  --top-module clictd_top_tb rtl/clictd_pkg.sv tb/tb_util_pkg.sv \
  tb/clictd_top_tb.sv -y rtl -y tb
./obj_dir/Vclictd_top_tb
```

`clictd_full_tb` builds and runs in under a minute.
