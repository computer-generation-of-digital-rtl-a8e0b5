# Microcoded digital filter bank processor

A filter bank is many small recursive filters, all running on the same input
at the same sample rate: for example 16 band-pass channels, each followed by
a rectifier and a low-pass smoother, as in the front end of a speech
recogniser or a stereo spectrum display. This RTL builds such a bank without
any multiplier:

- Every coefficient is fixed and written in canonical signed digit form.
- A multiply is therefore a few shift-and-add steps, one per nonzero digit.
- A small horizontally microcoded processor performs these steps.
- The whole bank is one straight-line program with no branches. It runs
  once per input sample.

Changing the bank means changing only the contents of the control store,
plus a handful of size parameters.

The default configuration is the 16 channel speech-recognition chip:

| Parameter       | Default | Meaning                                   |
|-----------------|---------|-------------------------------------------|
| `W`             | 20      | data word width, two's complement         |
| `RAM_WORDS`     | 64      | data RAM words per processor              |
| `ROM_WORDS`     | 192     | control store words per processor         |
| `PROG_LEN`      | 192     | clock cycles per sample period            |
| `DECIM`         | 8       | decimation ratio (1 = no index register)  |
| `NPROC`         | 2       | processors sharing one program counter    |
| `MAX_SHIFT`     | 5       | largest right shift of the barrel shifter |
| `FIFO_DEPTH/DW` | 16 / 12 | companion output buffer                   |

The clock rate is the sample rate times the cycles per sample. At 14 kHz and
192 cycles per sample, the chip needs a 2.688 MHz clock.

## Block structure

```
fb_top
 |- fb_chip                 the filter bank chip
 |   |- fb_controller       shared sequencer
 |   |   |- fb_pc           program counter, 0 .. PROG_LEN-1, no branches
 |   |   |- fb_rom   [p]    control store + output register, one per processor
 |   |   `- fb_index_reg[p] address decoder + decimation index register
 |   `- fb_datapath  [p]    one per processor
 |       |- fb_ram          data RAM, write-through read port
 |       |- fb_shifter      shifter input register + arithmetic barrel shifter
 |       |- fb_complementor true / invert / absolute value
 |       `- fb_sat_adder    saturating adder
 |- fb_fifo                 16 x 12 circular output buffer (separate chip)
 `- fb_clockgen             two-phase clock generator (board logic)
fb_pkg                      control word struct and constants
```

All processors run in lock step from the same program counter. Each has its
own control store and its own RAM, so each computes its own share of the
channels. The processors share the input pins and the output bus.

## The data path

One control word executes per clock. The path of a value is:

```
RAM --> shifter input register --> barrel shifter (>> 0..5) --> complementor --> adder A
          ^          |                  |                          |
          '-- recirculate --------------'                          '--> adder B (one's complement)
                     '----------------------------------------------> adder B (unshifted)
                                                      accumulator --> adder B
adder --> saturate --> accumulator --> memory bus --> write latch --> RAM
                                            |   ^
                                  pout  <---'   '--- parallel input register <-- pin
```

### Multiplies

A multiply by a constant is a chain of terms `acc += ±(x >> k)`.

- The shifter input register can reload its own shifted output
  (`shiftsrc`). Successive digits therefore need only the difference of
  their shifts, and a digit 12 places down costs two or three words.
- Shifts larger than 5 places are split into pre-shift words that do no
  addition.

### Complementor

The complementor gives `x`, `-x` or `|x|`. The absolute value makes the
full-wave rectifier between a band-pass filter and its smoothing low-pass.

Negation is exact here: the complementor inverts the bits and sets the
adder's carry-in.

### Adder B input

The B input of the adder is selected as follows:

| bsel | accb* | B input                                              |
|------|-------|------------------------------------------------------|
| 00   | -     | 0 (start a new sum)                                  |
| 01   | -     | complementor output (one's complement)               |
| 10   | -     | shifter input register, unshifted: `x + (x >> k)` in one word |
| 11   | 0     | accumulator (continue a sum)                         |
| 11   | 1     | 0                                                    |

### Saturation

The adder saturates to the largest positive or negative word instead of
wrapping. This matters in recursive sections driven by full-scale input.

## Control word

The control word is 22 bits, `fb_pkg::cw_t`, listed MSB first:

| Field       | Bits | Meaning                                                 |
|-------------|------|---------------------------------------------------------|
| `addr`      | 7    | RAM address or index-register command (see below)       |
| `memwrite`  | 1    | 1 = write RAM this cycle                                |
| `wrlatch`   | 1    | 1 = write latch loads the memory bus (acts one word late) |
| `shiftsrc`  | 1    | 1 = shifter register recirculates (acts one word late)  |
| `nshift`    | 3    | 5 − shift distance                                      |
| `inv1`      | 1    | absolute value (with `inv2` = 0)                        |
| `inv2`      | 1    | negate                                                  |
| `bsel1/2`   | 2    | adder B select                                          |
| `zeroa_n`   | 1    | 0 = adder A input is zero                               |
| `xmitacc_n` | 1    | 0 = accumulator drives the memory bus                   |
| `accb_n`    | 1    | 0 = accumulator feeds adder B (with bsel = 11)          |
| `xmitin2_n` | 1    | 0 = input strobe; second cycle puts the input on the bus |
| `iobusen`   | 1    | 1 = memory bus drives the output pins, output strobe high |

`CW_IDLE` is the word the store output register holds during reset: no
write, no addition, recirculate with shift 0.

## Micro code timing

Writing micro code by hand is the hardest part, so these rules are exact.
Word `t` is the control word that executes in clock `t`.

1. **Reads take one word.** A RAM read in word `t` (or the word written in
   word `t`, since the RAM is write-through) is in the shifter register in
   word `t+1`. The shifted value is therefore usable by the adder in `t+1`.
2. **Sums take one word.** The adder result of word `t` is in the
   accumulator in word `t+1`.
3. **`shiftsrc` is applied at the clock edge.** The shifter register loads
   the RAM word or its own shifted output at the end of word `t`. So
   recirculation set in word `t` shapes the operand seen in `t+1`.
4. **Writing needs the write latch.**
   - Set `wrlatch` in the word that makes the last addition of a result.
   - In the next word, the result is in the accumulator, which drives the
     memory bus (`xmitacc_n` = 0). The latch loads it, and a `memwrite` in
     that word writes it directly.
   - Any later `memwrite` made while the latch is not loading writes the
     held value. This lets the RAM write wait while the accumulator is
     already busy with the next sum.
5. **Input takes two words** with `xmitin2_n` = 0. The pins are sampled at
   the end of the first word. The sample is on the memory bus (and can be
   latched) in the second.
6. **Output takes one word** with `iobusen` = 1. `pout` carries the memory
   bus for that clock and `out_stb[p]` is high. Two processors must not
   output in the same clock; an assertion in `fb_chip` checks this.
7. The store output is registered. Word 0 of the program executes one clock
   after the program counter addresses it, and `first` is aligned with that
   execution.

## Addressing and decimation

The 7-bit `addr` field takes three forms:

| Field      | Action                                              |
|------------|-----------------------------------------------------|
| `0aaaaaa`  | plain address                                       |
| `110aaaa`  | address `{index, low field bits}`                   |
| `111xxxx`  | same address, and step the index at the end of the word |

The low part has `log2(RAM_WORDS) − log2(DECIM)` bits: three at the
defaults.

Decimation by N uses one post-decimation filter that serves N channels:

- Each sample it runs on the state of one channel, selected by the index.
- The index counts down from `DECIM-1` to 0, then reloads.
- `lastch` is high in the first cycle of a sample while the index is 0. It
  marks the start of a new round of channel outputs.

Each processor has its own index register, and `lastch` follows processor
0's. When both processors decimate, their programs should step the index
in the same word, so that both select the same channel.

## Companion parts

**`fb_fifo`** is the 16 × 12 output buffer:

- Writes go through a one-hot write pointer. Each rising `wshift` writes the
  selected row and moves the pointer on.
- `wclear` is the pointer's serial input. It restarts the pointer at row 0.
  Held high across a write, it leaves two rows selected, so both are
  written.
- Reads: `rclear_n` resets the read pointer. Each falling `rshift_n`
  advances it. It wraps after row 15, and `sync_n` goes low at the wrap.
- The addressed row is always on `dout`. The tri-state pads become
  `dout_oe` = `paden`.

The intended board wiring is:

- `din` = `pout[W-1 -: 12]`
- `wclear` = `lastch`
- `wshift` = `out_stb[0] ^ out_stb[1]`

**`fb_clockgen`** is three flip-flops on a 4× clock, with a 3-input NOR
feeding the first. The ring runs 000 → 100 → 010 → 001 → 000:

- `ph1` is the first stage and `ph2` the third.
- Each phase is high for one of every four input clocks, and one idle clock
  separates the two phases.
- The chip RTL itself uses one clock edge per word, so `fb_clockgen` stands
  beside it and does not clock it.

## Departures and choices

Choices made here where the source design leaves the detail open:

- **Clocking.** It is synchronous, with a single edge per word. The
  original chips used two-phase dynamic logic.
- **Reset.** It clears the accumulator, write latch, input register, program
  counter, index register and FIFO pointers. RAM and control store contents
  are not reset.
- **Loading the store.** The control store is a RAM with a load port
  (`ld_en`, `ld_proc`, `ld_addr`, `ld_data`); the original was a mask ROM.
  `fb_rom` can also read a hex file (`INIT_FILE`).
- **Idle bus.** An undriven memory bus reads 0. `pout` is 0 when no output
  is enabled, and the processor outputs are ORed.
- **Pad direction.** On the original chips `paden` is an input pin, which
  the board normally ties to the OR of the output strobes. Here the chip
  produces that OR itself. Input and output use separate `pin` and `pout`
  buses instead of one bidirectional bus. The data inversions at the input
  and output pads cancel, so they are left out.
- **Index direction.** The index register counts down, as the description of
  `lastch` requires, although the control field is called "increment".
- **Width.** It is 20 bits, the width of the fabricated speech-recognition
  chip. A published example of the same bank used 18 bits.
- **Not built:**
  - the pads and other analog cells;
  - serial input and output ports, of which the original cell library
    gives only the names;
  - the tester and tester adapter;
  - the compiler that turns a filter description into micro code and layout.

## Simulation

The testbenches need only `verilator` (5.x). Packages come first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/fb_pkg.sv tb/fb_ucode_pkg.sv tb/tb_fb_top.sv --top-module tb_fb_top
./obj_dir/Vtb_fb_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench            | What it checks |
|----------------------|----------------|
| `tb_fb_top`          | Full size, all defaults. Loads the demonstration bank into both stores and runs 72 samples of random and full-scale input. Checks every output value and its cycle, the 192-cycle period, strobes, `lastch`, the FIFO wired to the chip and read back through all rows, and the clock phases. Fails if any mechanism (recirculation, pre-shift, subtraction, rectification, saturation, each B source, held write latch, index step, FIFO wrap and sync) never occurred. |
| `tb_fb_chip`         | The same at W=16, 32-word RAM, 96 cycles per sample, decimation by 4. |
| `tb_fb_speech`       | Full size. A 16 channel, 112-pole speech front end (own coefficients). Each channel is a four-pole band-pass made of two cascaded two-pole resonators, a rectifier and a one-pole low pass; after decimation by 8 each channel gets a two-pole low pass. It needs 189 and 190 of the 192 words. |
| `tb_fb_hifi`         | Full size. A 16 channel, 80-pole stereo spectrum analyzer bank (own coefficients). Each channel is a two-pole resonator, a rectifier and a one-pole low pass; after decimation by 8 each channel gets a two-pole low pass. It needs 137 and 147 of the 192 words. |
| `tb_fb_layouts`      | The 8 and 16 channel layout size: W=16, 64-word RAMs, 128-word stores, decimation by 8. A 16 channel bank of one resonator, a rectifier and a one-pole low pass per channel, then a two-pole low pass after decimation. It needs 117 and 118 of the 128 words. |
| `tb_fb_bpf4`         | Smallest configuration (one processor, 10-bit words, 8-word RAM, 32-word store, no decimation). A four-pole band-pass made of two cascaded resonators, in 21 of 32 words. |
| `tb_fb_datapath`     | 12 000 random legal control words against an independent cycle model. |
| `tb_fb_controller`   | Both stores, word alignment, address decoding, index stepping, `lastch`. |
| `tb_fb_pc`, `tb_fb_rom`, `tb_fb_index_reg`, `tb_fb_ram`, `tb_fb_shifter`, `tb_fb_complementor`, `tb_fb_sat_adder`, `tb_fb_fifo`, `tb_fb_clockgen` | One block each, against integer models. |

`tb/fb_ucode_pkg.sv` is the micro code assembler used by the system tests:

- It builds control words from symbolic fields.
- It assembles first- and second-order recursive sections from their
  canonical signed digit coefficients.
- It computes the expected outputs from the difference equations, using
  integer arithmetic with floor shifts and saturation.

It is the place to start when writing a new bank.

A second-order section takes three words plus one per coefficient digit
(and any pre-shift words):

1. Read `y1`.
2. Copy `y1` through the accumulator into the write latch while reading
   `y2`.
3. Run the `a2` terms on `y2`. The first of these words writes the latched
   `y1` over `y2`.
4. Run the `a1` terms on `y1`. The last of these words reads `x`.
5. Run the gain terms on `x`, then write `y1` back.

The whole state shift therefore costs one word.

## How far to trust it

Every block has a self-checking testbench. Each testbench was also run
against a deliberately broken copy of its module and reported failures.

The full-size system test compares every output sample with a reference
model written separately from the RTL, to the bit and to the cycle. The
reference shares only the control word format with the RTL.

Not covered:

- The published speech-recognition micro code itself is not included. The
  test bank has the same section types but its own coefficients.
- Nothing checks timing against a gate-level or analog model.
