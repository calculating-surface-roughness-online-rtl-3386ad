# Evolvable image operator for surface-roughness inspection

Camera images of machined surfaces are often noisy and unevenly lit. That
makes it hard to estimate surface roughness from them. This design is a
streaming image filter whose *function is not fixed*. It is a small array of
8-bit processing elements (PEs). A configuration word chooses how the PEs are
wired and what each one computes. An outside genetic algorithm searches over
these configuration words (the "chromosomes") for the filter that cleans up a
given kind of image best. The chip then applies the chosen filter to every
pixel at one pixel per clock.

The RTL here covers the part that runs in the logic:

- the neighbourhood former;
- the reconfigurable PE array, called the virtual reconfigurable circuit (VRC);
- the store for its configuration word.

The genetic algorithm itself is software on a host or embedded processor.
Surface features and roughness are also worked out in software, from the
filtered images. Neither is part of this RTL.

```
pixel stream ──► window_gen ──3x3 neighbourhood──► vrc (25 PEs) ──► filtered pixel stream
 (raster,        2 line buffers                     ▲
  ≤1 px/clk)     + 3x3 register window              │ 25 triplets
                                                   vrc_cfg ◄── triplet writes + commit
                                                               (from the genetic algorithm)
```

## The processing element

Each PE sees a bus of sixteen 8-bit lines (128 bits). Three fields set it, and
together they form a 12-bit *triplet*:

| field | bits | meaning |
|-------|------|---------|
| cfg1  | 4    | bus line used as operand X |
| cfg2  | 4    | bus line used as operand Y |
| cfg3  | 4    | function code, below |

| code | result | code | result |
|------|--------|------|--------|
| 0  | X >> 1 | 8  | (X + Y + 1) >> 1 |
| 1  | X >> 2 | 9  | X & 0x0F |
| 2  | ~X | 10 | X & 0xF0 |
| 3  | X & Y | 11 | X \| 0x0F |
| 4  | X \| Y | 12 | X \| 0xF0 |
| 5  | X ^ Y | 13 | (X & 0x0F) \| (Y & 0xF0) |
| 6  | X + Y, low 8 bits | 14 | (X & 0x0F) ^ (Y & 0xF0) |
| 7  | (X + Y) >> 1 | 15 | (X & 0x0F) & (Y & 0xF0) |

- Sums are formed on 9 bits, so the two averages never overflow.
- Code 6 wraps modulo 256. It does not saturate.
- Codes 13 and 14 give the same result, and code 15 is always 0. This is
  because the two nibble masks do not overlap.
- Because of these duplicates, the 16 codes cover only 15 distinct functions.
  That is harmless for a genetic search.

Each PE registers its result (`rtl/pe.sv`, `rtl/pe_func.sv`).

## The array and how its PEs are connected

This is the part that is hardest to get right when changing the design.
`rtl/vrc.sv` has `COLS` = 6 columns of `ROWS` = 4 PEs, plus one output PE:
25 PEs in all. The input of the array is the 3x3 neighbourhood of a pixel,
nine pixels `I0..I8` in row-major order, with `I4` as the centre. This input
counts as *stage 0*. Column c is stage c, and the output PE is stage 7.

A PE reads only the **two stages before it**. Its 16-line bus is filled like
this:

| PE in | bus lines 0.. | then | candidates |
|-------|---------------|------|------------|
| column 1 | I0..I8 | – | 9 |
| column 2 | column 1, PEs 0..3 | I0..I8 | 13 |
| columns 3..6 | column c-1, PEs 0..3 | column c-2, PEs 0..3 | 8 |
| output PE | column 6, PEs 0..3 | column 5, PEs 0..3 | 8 |

Spare lines repeat the candidates cyclically: line k carries candidate
`k mod N`. So every 4-bit select value names a real signal, and a genetic
algorithm may write any bit pattern. The configuration word is 25 triplets,
300 bits. PE r of column c (both counted from 0) is triplet `c*4 + r`, and
the output PE is triplet 24.

**Timing.** Every column is a pipeline stage. Operands taken from two stages
back pass through a one-clock delay register. This keeps all the operands of
a PE from the same pixel. The array:

- takes one neighbourhood per clock and never stalls;
- delivers the result 7 clocks after the neighbourhood is presented;
- carries a valid bit and a last-of-frame bit alongside the data.

A PE count per column up to 7 still fits the 16-line bus. The elaboration
checks `ROWS + 9 ≤ 16`.

## Neighbourhoods from the pixel stream

`rtl/window_gen.sv` takes pixels in raster order, at most one per clock, with
`pix_valid`. Pulling `pix_sof` high with a pixel marks that pixel as the first
of a frame. This restarts the row and column counters. Frames may also simply
follow each other.

Two line buffers of `WIDTH` pixels hold the previous two rows. A 3x3 register
window shifts by one column per pixel. After the pixel at row r, column c
(r, c ≥ 2), the neighbourhood centred on (r-1, c-1) is presented on the next
clock.

Only interior pixels produce output. An H x W frame therefore gives
(H-2) x (W-2) output pixels, in raster order. The defaults are 640 x 512,
the resolution of the camera in the reference set-up.

## Loading a configuration

`rtl/vrc_cfg.sv` keeps two banks of 25 triplets:

1. The host writes triplets into the **shadow** bank with `cfg_we`,
   `cfg_addr` (0..24) and `cfg_wdata`. Writes to higher addresses are ignored.
2. The host pulses `cfg_commit`.
3. The whole shadow bank is copied into the **active** bank on the first clock
   on which the chip is idle: no frame is partly received, no pixel is
   arriving, and the array pipeline is empty.
4. `cfg_pending` is high until the copy happens, and `cfg_done` pulses on that
   clock.

This way a frame is never filtered by two configurations. A commit asked for
in the middle of a frame takes effect after that frame. Note that a stream
with no gap between frames never becomes idle. Reset clears both banks.

## Top level and timing summary

`rtl/ehw_top.sv` connects the three parts. All its ports are plain signals:
the pixel stream in, the configuration port, and the filtered pixel stream
out (`out_valid`, `out_pix`, `out_last` on the last pixel of a frame).

- **Throughput:** one pixel per clock. A 30 MS/s video stream needs a clock
  of at least 30 MHz.
- **Latency:** an output pixel appears 8 clocks after the input pixel that
  completes its neighbourhood is presented: 1 clock in `window_gen`, 7 in the
  array.
- **Parameters:** `WIDTH`, `HEIGHT`, `ROWS` and `COLS`. `NPE` and `ADDR_W`
  follow from them.
- **Types:** shared types (`pixel_t`, the `func_e` function codes, the
  `triplet_t` struct) are in `rtl/ehw_pkg.sv`.

## What follows the reference design and what does not

These follow the evolvable-hardware filter this RTL implements:

- the PE: two 16-way multiplexers on a 128-bit bus, then the function unit;
- the 16 function codes;
- the triplet configuration;
- 25 PEs in columns of four, feeding a single output PE;
- each PE reading from the two preceding columns;
- the 640 x 512 frame size.

These are choices made here, where the reference says nothing:

- **The column count.** The reference gives 25 PEs and draws columns of 4 PEs
  plus an output PE, which implies 6 columns. The number of columns is not
  stated directly.
- **The neighbourhood.** It is 3x3, only interior pixels produce output, and
  it comes from line buffers.
- **Which image axis is the line length.** 640 pixels per line was taken.
- **Operand order.** cfg1 feeds X and cfg2 feeds Y.
- **Out-of-range selects.** The reference forbids selects beyond the
  candidate count. Here they wrap onto repeated bus lines instead.
- **Wrapping addition.** Code 6 wraps modulo 256 rather than saturating.
- **Pipelining.** Each PE has a register, and there are alignment delays. The
  reference PE is drawn as a purely combinational path.
- **The configuration port.** It uses triplet-wide writes, a shadow bank and a
  commit that waits for idle. Reset clears the configuration.

The reference system also has parts that are not here:

- the genetic algorithm (population 16, crossover rate 0.9, mutation rate
  0.01), which runs as processor software;
- the fitness measure used to rank chromosomes, which is not specified;
- the board's video ADC/DAC, SRAM, flash, PCI interface and embedded
  processor;
- the regression from image features to roughness.

The reference implements the array on a Xilinx Virtex-family FPGA. This RTL
is not tied to any device: the line buffers are plain arrays with
asynchronous reads, which map to distributed RAM.

## Verification

Each block has a self-checking testbench in `tb/`. The testbenches compare
against an integer reference model (`tb/ehw_ref_pkg.sv`). That model
evaluates the function table and the array stage by stage, picking operands
by `select mod candidates`.

| testbench | what it checks |
|-----------|----------------|
| `tb_pe_func` | all 16 codes, corner and random operands |
| `tb_pe` | random buses and triplets, one-clock latency |
| `tb_vrc` | 30 random configurations × 300 neighbourhoods with gaps, 7-clock latency, `out_last` |
| `tb_vrc_cfg` | shadow writes, commit deferred while busy, immediate commit when idle, ignored out-of-range writes |
| `tb_window_gen` | 9 x 6 frames: every neighbourhood, counts, `win_last`, `idle`, restart by `in_sof` |
| `tb_ehw_top` | 12 x 8 frames end to end (see below) |
| `tb_ehw_top_full` | the same scenario at the default 640 x 512 size, two full frames (651,425 checks, a few seconds) |
| `tb_ehw_noise_filter` | a 64 x 48 image with linearly falling brightness and impulse noise, through a hand-built 3x3 smoothing configuration: every pixel is checked against the filter formula, and the error against the clean image must go down |

The two end-to-end testbenches share `tb/ehw_top_tb_body.svh`. Each run:

- commits once while idle and reconfigures in the middle of each frame;
- inserts idle input clocks and restarts a frame part-way;
- checks every output pixel, its 8-clock latency and the end-of-frame flag.

They count each mechanism: immediate and deferred commits, input gaps,
restarts, selects that wrap, and every function code configured. A mechanism
that never occurs counts as a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ehw_pkg.sv tb/ehw_ref_pkg.sv -y rtl -y tb \
    tb/tb_ehw_top_full.sv --top-module tb_ehw_top_full --Mdir obj
./obj/Vtb_ehw_top_full
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
