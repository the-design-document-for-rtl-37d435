# WM8731 audio peripheral for a two-player FPGA fighting game

In this game the rules, physics, combat and drawing all run as C software on
the ARM cores (HPS) of a Cyclone V SoC board (DE1-SoC). Sound is the one output
that has to run at a steady rate whether or not a game frame is late. It is
therefore handled by a small custom peripheral in the FPGA fabric, in a single
50 MHz clock domain. Software writes 16-bit stereo samples into two FIFOs
through four memory-mapped registers. The peripheral then does the rest:

- it configures the Wolfson WM8731 codec over I2C after reset;
- it generates the codec's clocks;
- it sends one sample pair per audio frame to the codec's DAC in I2S format.

Software builds sounds such as menu music, hit effects and the game-over jingle
from sample data and streams them in, once or in a loop. The peripheral knows
nothing about the game.

The RTL here is that peripheral, `fighter_audio_wm8731`, and its parts.

## System context

```
 USB keyboards ─► HPS (C software): input parsing, game loop ~60 FPS,
                  fighter state machines, combat, software renderer ─► /dev/fb0
                        │
                        │ lightweight HPS-to-FPGA bridge, Avalon-MM, base 0xFF203040
                        ▼
        ┌──────────────── fighter_audio_wm8731 ─────────────────┐
        │ audio_avalon_slave ─► audio_ctrl_regs                 │
        │        │ sample writes                                │
        │        ├─► audio_sample_fifo (left, 128x16) ──┐       │
        │        └─► audio_sample_fifo (right,128x16) ──┴► audio_serializer ─► AUD_DACDAT
        │ audio_clock_gen ─► AUD_XCK, AUD_BCLK, AUD_DACLRCK (and bit timing to serializer)
        │ wm8731_i2c_init ─► I2C_SCLK / I2C_SDAT                │
        └───────────────────────────────────────────────────────┘
                                      ▼
                               WM8731 codec ─► headphone
```

This repository contains no RTL for the following:

- The game itself. It is software. That includes the fighter animation-state
  selection, which picks KO, HIT, ATTACK, JUMP, GUARD, CROUCH, WALK or IDLE in
  that priority order.
- The board-level top and the HPS system. These are board and tool files.
- A VGA renderer. Video currently goes through the Linux framebuffer. A
  hardware renderer fed by a 22-word "fighter MMIO" register block is planned,
  but its word layout is not yet defined.

## Register interface

The peripheral has four 32-bit word registers. It uses a 2-bit word address, a
read latency of one cycle, and no wait states.

| Offset | Name            | Access | Contents |
|--------|-----------------|--------|----------|
| 0x00   | control/status  | W      | bit 0 play enable; bit 1 = 1: flush both FIFOs; bit 2 = 1: clear the sticky flags |
| 0x00   |                 | R      | bit 0 play enable, 8 codec ready, 9 I2C error, 10 overflow (sticky), 11 underrun (sticky), 12 left FIFO empty, 13 right FIFO empty |
| 0x04   | FIFO space      | R      | [31:24] free words in the left FIFO, [23:16] free words in the right FIFO (0..128) |
| 0x08   | left sample     | W      | `writedata[15:0]` is pushed into the left FIFO |
| 0x0C   | right sample    | W      | `writedata[15:0]` is pushed into the right FIFO |

The four offsets and their purpose (codec status, FIFO capacity, sample data)
are fixed by the system. The bit layout inside 0x00 and 0x04 is this design's
own. It is defined in one place, `rtl/fighter_audio_pkg.sv`.

Error behaviour:

- A sample written to a full FIFO is dropped and sets **overflow**.
- A frame that starts with playback enabled but with either FIFO empty is
  played as silence and sets **underrun**. In that case neither FIFO is popped,
  so the two channels never slip against each other.
- Both flags stay set until software writes bit 2 of 0x00.

A driver's steady state:

1. After reset, poll 0x00 until *codec ready* (bit 8) is set. This takes about
   3.3 ms.
2. Read 0x04 and write that many left/right sample pairs.
3. Set *play enable*.
4. Keep topping up from 0x04. "Play once", "start loop" and "stop loop" are
   software decisions about which samples to write. Stopping a sound at once
   is a write of 0 to play enable, then a write of the flush bit.

## Timing of the sample stream

This is the part to get right when changing parameters or writing a driver.

**Clock ratios.** `audio_clock_gen` counts the 50 MHz clock and derives all
codec clocks from one counter. Every output comes straight from a flip-flop.
Nothing inside the FPGA is clocked by these outputs.

| Signal | Divider           | Frequency  | Notes |
|--------|-------------------|------------|-------|
| XCK    | 4 system cycles   | 12.5 MHz   | master clock = 256 × sample rate |
| BCLK   | 16 system cycles  | 3.125 MHz  | low for the first 8 cycles of each bit |
| LRCK   | 64 BCLK periods   | 48.83 kHz  | low half = left channel, high half = right channel |

The codec is programmed for normal mode at 256 fs, so it follows whatever
frame rate the FPGA supplies. The nominal sample rate is 48 kHz, and the real
rate is 1.7 % higher. Sound data prepared for exactly 48 kHz plays slightly
sharp. To change that, use a PLL-derived 12.288 MHz clock, or change the
dividers.

**Bit slots.** Each frame has 64 bit slots, numbered 0–63 from the falling
LRCK edge. The clock generator marks each slot boundary with `shift_tick`.
That signal is high in the system cycle before BCLK falls, and comes with the
number of the slot that is starting (`next_slot`). The serialiser updates
DACDAT on that same edge, so the data is stable half a bit later when the
codec samples it on the rising BCLK edge.

**I2S placement.**

- The left sample occupies slots 1–16, MSB first. This is one bit clock after
  LRCK falls, which is the I2S delay bit.
- The right sample occupies slots 33–48.
- All other slots are zero.

**Frame start.** At slot 0 the serialiser pops one word from each FIFO if both
have one, and latches them for the whole frame. The FIFOs are show-ahead: the
head word is already on `rd_data`, so the latch and the pop happen in the same
cycle.

**Buffering budget.**

- Each 128-word FIFO holds 2.62 ms of audio.
- The game loop runs at about 60 FPS, which is 16.7 ms per frame. A loop that
  refills the FIFOs only once per game frame will underrun: it would need 814
  words per channel.
- Software must refill at least every 2.6 ms, for example from its own thread
  or timer.
- Each sample costs one 32-bit bus write per channel, about 98 k writes per
  second, which the lightweight bridge handles easily.

## Codec set-up (`wm8731_i2c_init`)

After reset the initialiser writes the eleven words below to the codec at I2C
address 0x34. It then raises *codec ready*. The serialiser stays silent until
that point, even if play enable is already set.

| # | Reg | Value | Meaning |
|---|-----|-------|---------|
| 0 | R15 | 0x000 | reset |
| 1 | R0  | 0x080 | left line-in muted |
| 2 | R1  | 0x080 | right line-in muted |
| 3 | R2  | 0x079 | left headphone 0 dB |
| 4 | R3  | 0x079 | right headphone 0 dB |
| 5 | R4  | 0x012 | DAC to output, microphone muted |
| 6 | R5  | 0x000 | DAC soft-mute off |
| 7 | R6  | 0x000 | everything powered |
| 8 | R7  | 0x002 | I2S, 16-bit, codec is clock slave |
| 9 | R8  | 0x000 | normal mode, 256 fs |
| 10| R9  | 0x001 | interface active |

**Bus timing.** SCL runs at 100 kHz (`SCL_QUARTER` = 125 system cycles per
quarter period).

- Each bit takes four quarters: set up SDA while SCL is low, raise SCL, sample
  SDA, drop SCL.
- One register write is START, three bytes each followed by an acknowledge
  slot, STOP, then one bit-time of idle bus. That makes 120 quarter periods.
- The whole table takes 11 × 120 × 125 = 165,000 cycles.

**Missing acknowledge.** If the codec does not acknowledge a byte, the sticky
*I2C error* bit is set, the sequence still finishes, and there is no retry.

**Pins.** SCL is driven push-pull, because the FPGA is the only master. SDA is
split into `i2c_sdat_oe` (1 = pull low) and `i2c_sdat_in`. The board top turns
them into the open-drain pin: `assign I2C_SDAT = i2c_sdat_oe ? 1'b0 : 1'bz;
assign i2c_sdat_in = I2C_SDAT;`.

## Files

| File | Content |
|------|---------|
| `rtl/fighter_audio_pkg.sv` | register map, bit positions, `reg_write_t`, codec set-up table |
| `rtl/fighter_audio_wm8731.sv` | top: the peripheral |
| `rtl/audio_avalon_slave.sv` | bus decode, read mux, Avalon rule assertion |
| `rtl/audio_ctrl_regs.sv` | play enable, flush, sticky flags, status and FIFO-space words |
| `rtl/audio_sample_fifo.sv` | 128 × 16 show-ahead FIFO (two instances) |
| `rtl/audio_clock_gen.sv` | XCK/BCLK/LRCK and slot timing |
| `rtl/audio_serializer.sv` | frame-start pop, I2S bit placement, underrun detection |
| `rtl/wm8731_i2c_init.sv` | I2C write sequencer |
| `tb/wm8731_model.sv` | behavioural codec: I2C slave register file and I2S DAC receiver |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level parameters, with their defaults:

- `FIFO_DEPTH` = 128, at most 255 so the count fits its 8-bit field.
- `SAMPLE_BITS` = 16.
- `MCLK_DIV` = 4, `BCLK_DIV` = 16 and `FRAME_BITS` = 64. `BCLK_DIV` must be a
  multiple of `MCLK_DIV`. A frame needs at least 34 bits.
- `SCL_QUARTER` = 125.

The codec set-up assumes 16-bit I2S at 256 fs. If you change the sample width
or the clock ratios, change the table in the package to match.

## Verification

Each testbench drives its module and compares the outputs with values computed
independently in the testbench. At the end it prints
`TB_RESULT checks=N failures=M`.

- **FIFO:** random traffic against a queue model, including full, empty and
  flush.
- **Bus slave:** every address is read and written; the strobes and read data
  are checked with latency 1.
- **Registers:** each bit of both words is checked against a model.
- **Clock generator:** every half period is measured; LRCK changes only on
  falling BCLK edges.
- **Serialiser:** every DACDAT bit is checked against the I2S slot layout, for
  played, starved and disabled frames.
- **I2C initialiser:** the writes received by the codec model are checked
  against the table, along with the exact completion time. A second codec that
  never acknowledges must cause the error flag.
- **End to end** (`tb_fighter_audio_wm8731`), at the default parameters, about
  13 ms of simulated time. It covers codec start-up, filling to overflow,
  playback of 128 pairs with the LRCK period checked (1024 cycles), draining to
  underrun, disable and flush, and 300 pairs streamed with top-ups while
  playing. Each of these mechanisms is counted and must occur.
- **Buffering budget** (`tb_workload_refill`), at the default parameters,
  118 ms of simulated time. It tests the arithmetic under *Timing of the
  sample stream*:
  - Refilling once per 60 FPS game frame plays exactly 128 pairs per game
    frame, followed by 685–686 silent frames.
  - Refilling every 2 ms plays without a gap, one pair per 1024 cycles.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fighter_audio_pkg.sv tb/tb_fighter_audio_wm8731.sv --top-module tb_fighter_audio_wm8731
./obj_dir/Vtb_fighter_audio_wm8731
```

Lint warnings that remain are deliberate:

- Unused package constants in modules that do not need them.
- Outputs left open at the top (FIFO word counts and the initialiser's busy
  flag).
- `SYNCASYNCNET` on `rst_n`. The reset is asynchronous in the flip-flops and
  also used as `disable iff` in the assertions.

## What to trust and what was chosen here

Fixed by the system:

- the blocks and their division of work;
- the 128 × 16 left and right FIFOs;
- the 16-bit stereo stream;
- the 32-bit Avalon-MM slave at 0xFF203040 with registers at 0x00, 0x04,
  0x08 and 0x0C;
- I2C set-up of the WM8731;
- codec clocks made by clock division in the FPGA.

Chosen in this implementation, and worth reviewing against a real driver:

- the bit layout of the control/status and FIFO-space registers;
- the sticky flags and the flush bit;
- read latency 1;
- silence on underrun and the paired pop;
- I2S framing;
- the clock ratios, which give 48.83 kHz instead of 48 kHz;
- the codec register values;
- 100 kHz I2C with no retry.

Simulation covers only the codec's digital ports, through a behavioural model.
The analogue output and the real chip's I2C timing limits have not been
checked on hardware.
