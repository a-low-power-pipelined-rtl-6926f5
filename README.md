# RNS 2-D Discrete Wavelet Transform Processor

This is a 2-D discrete wavelet transform (DWT) processor for 8-bit greyscale
images. It applies one level of the 9/7 biorthogonal (Daubechies/CDF)
analysis filter bank along rows and then along columns. Each image comes out
as the four sub-bands LL, HL, LH and HH.

The design targets low power. All filter arithmetic is done in a residue
number system (RNS) with the moduli {255, 256, 257}:

- Each filter works as three independent 8/9-bit channels with no carries
  between them.
- Multiplications by the constant coefficients are table look-ups.
- The filter datapath is cut into a four-stage pipeline. It can therefore
  reach the throughput it needs at a lower clock rate (and supply voltage).

Two filter banks do the work: bank 0 filters rows and bank 1 filters
columns. They share one set of multiplier tables, and each bank uses a
single binary converter for both of its outputs. Images and intermediate
results live in an external DDR SDRAM. Images are processed a few lines at
a time through small on-chip buffers.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The
testbenches need a simulator with `--timing` support, such as Verilator 5.

## Residue arithmetic in this design

A signed integer X with -M/2 <= X < M/2, where M = 255*256*257 = 16,776,960
(about 24 bits), is held as three residues: X mod 255, X mod 256 and X mod
257. Addition and multiplication act on each residue on its own. The three
channels of a filter are therefore three small, carry-free filters.

The moduli have the form {2^8-1, 2^8, 2^8+1}, which keeps the conversions
cheap:

- **Forward conversion** (`rns_fwd_conv`):
  - The input is a 16-bit two's-complement value. Adding 2^15 makes it
    non-negative.
  - Modulo 255: since 2^8 = 1, the residue is the sum of the two bytes with
    the carry folded back in.
  - Modulo 257: since 2^8 = -1, the residue is the low byte minus the high
    byte.
  - The 2^15 offset is then subtracted again modulo m (128 for 255, 129 for
    257).
  - Modulo 256: the residue is just the low byte.
- **Reverse conversion** (`rns_rev_conv`), with a, b, c the residues mod
  256, 255, 257:
  - Write X = a + 256*Y with 0 <= Y < 65535.
  - Then Y = b - a (mod 255) and Y = a - c (mod 257).
  - Y = u + 255*v, where v = 128*(w - u) mod 257, because 128 is the inverse
    of 255 modulo 257. The product by 128 is a shift folded modulo 257.
  - A final compare against M/2, with a subtraction of M, gives the signed
    result.
- **Multipliers** (`rns_mod_lut`):
  - Each distinct coefficient gets a 256 x 8-bit constant table per channel.
    The symmetric 9-tap LP filter has 5 distinct coefficients and the 7-tap
    HP filter has 4. Over 3 channels that makes 27 tables.
  - In the modulo-257 channel a product can be 256, which needs a 9th bit.
    Exactly one table address gives 256, so the 9th bit is a comparator on
    that address rather than stored data.
  - A mod-257 input residue of 256 (that is, -1) is decoded separately.

### Coefficients and word lengths

The 9/7 analysis coefficients are scaled by 2^10 and rounded:

| filter | centre | ±1 | ±2 | ±3 | ±4 |
|---|---|---|---|---|---|
| low-pass (9 taps)  | 617  | 273  | -80 | -17 | 27 |
| high-pass (7 taps) | 1142 | -605 | -59 | 93  |    |

- The LP gain at DC is 1023/1024. The HP gain is 0 at DC and 2 at the
  Nyquist frequency.
- After each pass the binary result is rounded to an integer by dropping the
  10 fraction bits. It is then saturated to 16 bits and stored.
- The worst case inside the filter is a column pass on row results of up to
  ±663. That gives about 1.8 M, far inside the ±8.39 M range of the RNS.
- The scale factor, the rounding points and the 16-bit storage width are
  choices of this implementation. The original design states only that a
  24-bit dynamic range suffices.

## The filter unit: four pipeline stages

`rns_fir_unit` holds both banks. The filter rate is a clock enable, `step`,
which is high in one system clock out of `DIV`. The default `DIV = 4`
(100 MHz control clock, 25 MHz filter rate). On every step each bank takes
one sample.

```
 stage 1   input ff -> forward converters -> residue ff           (per bank)
 stage 2   27 shared tables -> product ff                          (time-shared)
 stage 3   transposed FIR chains, 6 per bank: {LP,HP} x {255,256,257}
 stage 4   down-sample by 2 -> mux -> ff -> reverse converter -> ff
```

**Stage 3.** The sub-filters (`rns_subfilter`) use the transposed form.
Every product of the newest sample goes into a chain of registers with
modular adders between them, so the output is available one step after the
products.

**Stage 2: table sharing.** The table look-up is much faster than the
reverse converter, so the two banks use the tables in turn within one
filter period:

- In system clock 0 after a step, the table addresses come from bank 0's
  residues, and the results are captured in bank 0's product registers.
- In system clock 1, bank 1 does the same.
- Stage 3 then consumes both banks' products at the next step.

This is why `DIV` must be at least 3.

**Stage 4: down-sampling and converter sharing** (`rns_fir_bank`). Every
other output is discarded, so the converter would sit idle half the time.
Instead, it serves both of the bank's filters:

- On a kept step, the LP residues go into the converter's input register,
  and the HP residues are parked in a hold register.
- On the next, discarded step, the parked HP residues are converted.

The bank therefore emits L, H, L, H, one value per step. `y_hp` says which
filter each value came from.

**Which steps are kept.** The feeder tags each sample with `keep`, and the
tag travels down the pipeline with the sample. This replaces a free-running
divide-by-two clock. The LP and HP results are taken at the same input
sample. With 9 and 7 taps, L[i] is then centred on x[2i] and H[i] on
x[2i+1], the usual alignment for this filter pair.

**Latency.** The L result of the sample taken at step k is on `y` after
step k+4, so a consumer reads it at step k+5. The H result follows one step
later.

## Feeding the banks: buffers and symmetric extension

`dwt_buffer_unit` sits between the SDRAM and the filter unit. It has four
buffers of 4·N 16-bit words:

| buffer | holds | layout |
|---|---|---|
| ibuf0 | 4 image rows for bank 0 | row r, column c at r·N + c |
| ibuf1 | a strip of 4 columns for bank 1 | row r, strip column c at r·4 + c |
| obuf0 | 4 row results | L half left, H half right |
| obuf1 | 4 column results | L half top, H half bottom |

Every SDRAM transfer is a burst of 4 consecutive words, and the image is
stored row-major. A burst therefore brings either 4 pixels of one row or
one row of a 4-column strip. In both cases the buffer fills in order, so one
auto-incrementing pointer per direction is enough. The pointers are cleared
by the main controller.

The DDR data path moves two 16-bit words per system clock in each direction.
This models the two clock edges of a DDR bus.

**Passes.** One pass sends one line to each enabled bank: N+8 samples,
x[-4] to x[N+3]. The ends are mirrored about the first and last sample:
x[-p] = x[p] and x[N-1+p] = x[N-1-p]. Samples at even positions from the
8th on are tagged `keep`. Results are rounded, saturated and written to
their L or H position. `pass_done` rises when both banks have delivered
their N results.

## Scheduling two banks across images

The main controller (`dwt_main_ctrl`) is a single FSM. After reset it:

1. Holds the other units in reset for 16 clocks.
2. Waits for the SDRAM to be initialised.
3. Waits for a host command carrying the number of images.

A job then runs in three phases:

1. **Download.** Pixels are gathered 4 rows at a time in obuf0 and written
   to that image's input area in SDRAM.
2. **Transform.** This takes nimg+1 processing cycles. In cycle X, bank 0
   filters the rows of image X while bank 1 filters all N columns of the
   row-transformed image X-1: first the L half, then the H half. Bank 1
   consumes exactly as many samples as bank 0 produces, so both banks are
   busy in every cycle except the first (rows only) and the last (columns
   only). Each cycle is done in groups of 4 rows and 4 columns:
   - read 4 rows of image X into ibuf0;
   - read a 4-column strip of image X-1's row results into ibuf1;
   - run 4 passes through both banks;
   - write the row results to an intermediate area in SDRAM and the column
     results to the image's output area.

   There are two intermediate areas, used alternately, so cycle X writes
   one area while it reads the other.
3. **Upload.** Output areas are read back 4 rows at a time and streamed to
   the host.

SDRAM map, in units of N·N words: input areas `0 .. MAX_IMG-1`, output areas
`MAX_IMG .. 2·MAX_IMG-1`, intermediate areas `2·MAX_IMG` and `2·MAX_IMG+1`.

The phases do not overlap in time. The controller waits for each burst
before issuing the next, and for the reads before it starts the passes.

## Interfaces

**Host** (`host_if`, valid/ready handshakes):

- `cmd_valid`/`cmd_ready`/`cmd_nimg` starts a job of 1 to MAX_IMG images.
  The command is accepted only while the processor is idle.
- The host then streams nimg·N·N pixels into `h_in_*`: row-major, image by
  image.
- The host reads the same number of 16-bit signed coefficients from
  `h_out_*`. Per image they come row-major as
  `[LL | HL]` over `[LH | HH]`, each quadrant N/2 x N/2. The letter before
  the bar is the row (horizontal) filter and the letter after it is the
  column filter.
- `h_busy` is high during initialisation after reset and while a job runs;
  `cmd_ready` is low then, so a command waits until the memory is ready.
  `h_done` rises when the job ends and stays high until the next command.
- The download and upload streams each pass through a 4-entry FIFO.

**External memory** (`sdram_ctrl`), a reduced command interface:

- `mem_ready`: the memory has finished its own initialisation.
- `mem_cmd`: NOP, READ, WRITE or REFRESH, with `mem_addr` the word address
  of a 4-word burst.
- Read data arrive as two word pairs on `mem_dq_in`, CAS_LAT (2) and
  CAS_LAT+1 clocks after the READ.
- Write data are driven on `mem_dq_out` in the two clocks after the WRITE.
- A REFRESH is inserted every 780 clocks (7.8 µs at 100 MHz).
- Row activation, precharge, mode-register set-up and the real DDR
  electrical interface are not modelled. A real DDR part needs a controller
  and PHY that handle these.

**Clocking and reset.** There is one clock, `clk`, and an asynchronous
active-low `rst_n`. The original design takes its clocks from an FPGA clock
manager. Here the 25 MHz filter rate is the `step` enable instead.

## Parameters (top level `dwt_processor`)

| parameter | default | meaning |
|---|---|---|
| N | 32 | image width and height, a multiple of 4, at least 8 |
| MAX_IMG | 4 | image areas reserved in SDRAM, and the largest job |
| IMG_W | 4 | width of the image-count field |
| DIV | 4 | system clocks per filter step (≥ 3) |
| ADDR_W | 24 | SDRAM word-address width |
| CAS_LAT | 2 | SDRAM read latency in clocks |

Larger images need only a larger N: the controller and the datapath do not
change, and the buffers grow as 4·N words.

## Performance

At the defaults, with 3 images of 32x32, the transform phase takes 37,130
clocks (371 µs at 100 MHz) for the 4 processing cycles. That is about
93 µs per image in steady state.

A pass lasts N+8 samples plus about 6 steps of pipeline drain. The SDRAM
bursts are not overlapped with the passes, and they account for somewhat
less than half of each group's time.

Built with N = 512 (`tb_dwt_processor_512`), a processing cycle with both
banks busy takes 2,269,086 clocks, or 22.7 ms at 100 MHz. That is the
steady-state cost of one 512x512 image, about 44 images per second, so a
24 frame/s stream fits with room to spare. Host download and upload are
not included: they run at the host's pace, one pixel or coefficient per
clock at most.

## How this departs from the original design

- Coefficient scaling, rounding after each pass, and the 16-bit stored word
  are this implementation's choices.
- The insides of the forward and reverse converters are built for this
  moduli set from first principles. The original uses converters from
  earlier published work.
- One clock with enables replaces the separate clocks of a DCM. The
  down-sampling phase follows a `keep` tag on the data instead of a
  divided clock.
- The SDRAM controller and memory protocol are minimal. DDR transfers are
  modelled as two words per clock.
- Only one decomposition level is done. Further levels of the LL band would
  need the controller to run again on a quarter-size image. That is not
  built.
- The on-chip buffers are 1 KB at N = 32. The original FPGA build used 4 KB
  of block RAM for this unit.
- Clock management is not included.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| tb_rns_fwd_conv | residues of corner and random 16-bit values |
| tb_rns_mod_lut | all table entries, the 9th-bit output, input residue 256 |
| tb_rns_rev_conv | random values over the whole signed range |
| tb_rns_subfilter | modular convolution, one-step latency, hold when idle |
| tb_rns_fir_bank | L/H interleaving, values and latency against integer 9/7 |
| tb_rns_fir_unit | both banks at once (table sharing), values, latency, step period |
| tb_dwt_buffer_unit | DDR fill/drain, symmetric extension, stored rounded results, host path |
| tb_sdram_ctrl | initialisation, beat timing, data integrity, refresh period |
| tb_host_if | start command, stream order under stalls, busy/done |
| tb_dwt_main_ctrl | exact burst address and pass sequence for two images |
| tb_dwt_processor | end to end at the default parameters (3 images of 32x32) |
| tb_dwt_processor_512 | end to end built for 512x512 (2 images), frame-rate budget |

`tb_dwt_processor` compares every output coefficient with a bit-exact
integer model. It also requires each mechanism to occur at least once:

- overlapped passes (rows of one image with columns of the previous);
- row-only and column-only passes;
- steps in which both banks use the shared tables;
- mirrored samples;
- L and H results;
- SDRAM refreshes;
- stalls on both host streams.

`tb/ddr_sdram_model.sv` is a behavioural memory model used by the
testbenches. It is not synthesizable.

To run a testbench with Verilator, from the directory above `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dwt_pkg.sv \
    tb/tb_dwt_processor.sv --top-module tb_dwt_processor -Mdir obj
./obj/Vtb_dwt_processor
```

Replace the testbench name to run any other. The 32x32 end-to-end test
takes well under a second, the 512x512 one about 6 seconds.

Both end-to-end tests also check that a command is taken only after the
memory has been initialised, and the average time per image: at most
205 µs for 32x32, and at most 1/24 s for a steady-state 512x512 image.

## Files

- `rtl/dwt_pkg.sv`: moduli, coefficients, widths, memory command type,
  modular add.
- `rtl/rns_fwd_conv.sv`, `rtl/rns_mod_lut.sv`, `rtl/rns_subfilter.sv`,
  `rtl/rns_rev_conv.sv`: RNS building blocks.
- `rtl/rns_fir_bank.sv`: one filter bank, stages 3 and 4.
- `rtl/rns_fir_unit.sv`: both banks with the shared tables, stages 1 and 2.
- `rtl/dwt_buffer_unit.sv`: buffers, DDR data path, symmetric extension.
- `rtl/sdram_ctrl.sv`: SDRAM controller.
- `rtl/host_if.sv` and `rtl/sync_fifo.sv`: host interface and its FIFOs.
- `rtl/dwt_main_ctrl.sv`: main controller.
- `rtl/dwt_processor.sv`: top level.
