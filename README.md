# Digital PWM drive for an AMOLED panel on foil

An AMOLED pixel normally sets its brightness through the analog gate voltage of its drive
transistor. For the current to be accurate, that transistor has to sit in saturation, and with
thin-film transistors on plastic foil this takes several volts of headroom. That headroom is
lost as static power in every lit pixel. This design uses the drive transistor only as an
on/off switch instead. The panel's supply can then drop, and the column current of a lit pixel
is set outside the panel by a current DAC per column. Brightness becomes a question of time: an
8-bit intensity is shown by keeping the pixel on for a proportional share of each frame
(pulse-width modulation).

The hard part is the select linedriver on the foil, which is built from n-type transistors only.
Plain PWM with one select pulse per subframe wastes part of the frame. Here each line is selected
twice in most subframes, and both select pulses travel through **one** shift register at the
same time. The register and its three-phase clocking are arranged so that two lines are never
selected in the same clock slot.

The RTL covers:

- the drive electronics: the timing controller, the frame buffer, the data-line encoder and the
  column current bookkeeping;
- a cycle-level digital equivalent of the linedriver on foil: 16 blocks of 10 line drivers,
  160 select lines;
- a behavioural model of the 64 x 160 pixel matrix, so that the light output can be checked end
  to end.

## Frame, subframes and the encoding table

A frame has 8 subframes. In subframes 1 to 7 every select line is driven twice: first by the
"first" pulse, and then, a fixed number of line slots later, by the "second" pulse. In subframe 8
it is driven once. Each drive writes one bit into the pixel: the pixel is on from that drive
until the next one. The bit written is given by this table, where b7..b0 is the pixel
intensity:

| subframe | delay between drives (lines) | first drive writes | second drive writes |
|---|---|---|---|
| 1 | 10  | 0  | b7 |
| 2 | 10  | b0 | b7 |
| 3 | 20  | b1 | b7 |
| 4 | 40  | b2 | b7 |
| 5 | 80  | b3 | b6 |
| 6 | 80  | b7 | b6 |
| 7 | 160 | b4 | b6 |
| 8 | (320, whole subframe) | b5 | — |

A subframe is 320 line slots long. The first drive holds for the delay, and the second drive
holds for the rest of the subframe. Adding up the line slots per bit gives b0:10, b1:20, b2:40,
b3:80, b4:160, b5:320, b6:240+240+160 = 640 and b7:310+310+300+280+80 = 1280. These are binary
weights. The pixel is dark only during the 10 slots of subframe 1 that carry the constant 0, so
the duty cycle at full scale is 2550/2560.

The table is in `amoled_pwm_pkg` (`first_bit`, `second_bit`, `delay_lines`). The module
`pwm_bit_encoder` applies it to a whole line of 64 pixels.

## The linedriver: one shift register, three clocks, two pulses

**Clocks and slots.** The linedriver has three clocks, A, B and C. They pulse in turn, one pulse
per *slot*. In the RTL a slot is one cycle of the master clock `clk`, and the three clocks are
one-cycle enables (`ph = {C, B, A}`). A select line is high for exactly one slot.

**Stages.** A line driver passes a pulse on the clock it was given, after a fixed number of
clock pulses:

- `ld_stage3` takes the previous select pulse on its clk3. It moves it on at clk1 and at clk2.
  At the next clk3 pulse it passes that pulse to its own select line, 3 slots later.
- `ld_stage2` takes the previous select pulse on clk1 and moves it on at clk2. It passes the
  clk3 pulse to its own line, 2 slots later.

In both stages the following select line and a panel `reset` clear the stage.

**Blocks.** A block (`ld_block`) holds one 2-pulse stage followed by nine 3-pulse stages. Every
stage in a block has the same clk3, so all ten lines of a block are selected on the same clock.
The 2-pulse stage moves the phase by one clock, so successive blocks drive on A, C, B, A, C, B,
and so on. This is `block_phase(b) = 2b mod 3`.

**Timing.** A pulse that enters the register in slot t0 (on clock B) selects line k = 10b + i
in slot

    t0 + 2 + 29*b + 3*i

so a whole block takes 29 slots. The top line (k = 159) is reached 464 slots after t0.

### Why two pulses never select two lines at once

The second pulse of a subframe enters the register some number of slots S after the first.
Both pulses must enter on clock B, so S is a multiple of 3. When the two pulses are at different
lines, those lines fire in the same slot only in one case: they are a multiple of three blocks
apart (87 slots, which brings the clock phase back round), and the offset within those blocks
makes up the rest. Work through the formula above and you get a simple rule. Two lines collide
exactly when S lies within 27 slots of a multiple of 87.

A delay of D = 10·2^k lines would take the first pulse exactly 29·2^k slots to cover. That
number is never a multiple of 3, so it can never be the spacing. The controller takes the
nearest multiple of 3 (`second_start_pulses`):

| delay (lines) | 10 | 20 | 40 | 80 | 160 |
|---|---|---|---|---|---|
| travel time 2.9·D (slots) | 29 | 58 | 116 | 232 | 464 |
| start spacing S (slots) | 30 | 57 | 117 | 231 | 465 |
| distance from nearest multiple of 87 | 30 | 30 | 30 | 30 | 30 |

Each spacing lies 30 slots from the nearest multiple of 87, which is outside the ±27 window, so
no collision can happen. This only works because every delay is 10 lines times a power of two,
which is never a multiple of 30 lines. For a 10-line delay, line n is driven for the second time
one slot after line n+10 is driven for the first time. `line_driver` asserts that at most one
select line is high in any slot, and the testbenches exercise every spacing.

## Drive electronics

**`pwm_timing_ctrl`** counts slots, subframes (`SUBFRAME_PULSES` slots each) and frames
(8 subframes). It produces the clocks A, B and C. It raises `start` in slot 1 of every subframe,
and again S slots later in subframes 1 to 7. The register on the foil gives nothing back, so the
controller runs two trackers, one per pulse, which mirror the timing formula above. Every select
event is announced in three steps:

| slot | output | what happens |
|---|---|---|
| t-2 | `rd_valid`, `rd_line`, `rd_bitsel` | frame buffer read is issued |
| t-1 | `enc_load`, `enc_bitsel` | data-line register is loaded |
| t | `ev_valid`, `ev_line` | the select line fires; column counts are updated |

Two announcements never fall in the same slot (asserted). `both_active` shows when both pulses
are travelling through the register.

**`frame_buffer`** holds the 160 x 64 x 8-bit image. A host writes one pixel per cycle, and the
display side reads one whole line per cycle with one cycle of latency. There is a single copy of
the image: a write shows up at the next drive of that pixel's line.

**`pwm_bit_encoder`** chooses, for each column, the table bit for the current drive. It registers
the result onto the data lines, which hold their value between loads.

**`column_current_ctrl`** supplies the current DACs. A lit pixel draws one reference current
(2 µA in the reference panel), so each column's DAC code is the number of lit pixels in that
column. The block keeps a shadow of all 10,240 pixel states. At every select event it adds
new − old per column and stores the new line. The codes are valid one slot after the event.
Lines not yet written since reset count as dark.

**`pixel_array`** is a behavioural model, not logic for synthesis. Each pixel is a transparent
latch: it follows its data line while its select line is high. The latches stand for the
storage capacitors and are intended. Its power-up state is unknown, and subframe 1 writes every
pixel.

**`amoled_pwm_top`** connects all of these blocks. It also asserts that every announced event
matches a select line that really fires, and that no select line fires unannounced.

## Departures and choices to be aware of

- **Subframe length.** The reference panel runs at 200 kHz and 200 subframes/s, which is about
  1000 pulses per subframe. A subframe of 320 line slots at 3 pulses each is 960. The default
  `SUBFRAME_PULSES = 960` keeps the 320-slot structure, which gives 26 frames/s at 200 kHz.
  `SUBFRAME_PULSES = 999` gives 25.0 frames/s. It stretches every second drive and subframe 8 by
  39 slots, so the bit weights are no longer binary: the high bits gain weight, and the on-time
  departs from value x 30 slots by up to 342 slots. The value must be a multiple of 3 and more
  than 945.
- **On-time linearity.** Because the spacings are rounded to multiples of 3, the measured
  on-time per bit at 960 slots/subframe is:

  | bit | b0 | b1 | b2 | b3 | b4 | b5 | b6 | b7 |
  |---|---|---|---|---|---|---|---|---|
  | on-time (slots) | 30 | 57 | 117 | 231 | 465 | 960 | 1953 | 3837 |
  | exact binary (slots) | 30 | 60 | 120 | 240 | 480 | 960 | 1920 | 3840 |

  The error is at most 33 slots, about 1.1 LSB, and the response stays monotonic. The
  end-to-end testbench checks every pixel against both.
- **Stage models.** The line drivers are modelled at clock-pulse level: capture, two transfers
  and an output gated by clk3. Bootstrapping, rise times, supply voltage and the frequency limits
  of the thin-film circuit are not modelled. The roles given to `reset` (synchronous clear) and
  to the next select line (clears the stage) are this design's reading of the stage ports.
- **Position of the 2-pulse stage.** It is taken as the first line of each block, where the
  pulse arrives from the previous block.
- **External electronics.** The reference set-up spreads this logic over several FPGAs. Here it
  is one synchronous design. The frame buffer organisation, the announcement pipeline, the
  shadow memory and the 12-bit DAC code are this design's choices.
- **Not included.** The current DACs and everything analog or process-related (OLED stack,
  thin-film transistors, bond pads) are left out. The 16-bit extension of the encoding table for
  larger panels is also not built, because its table is not defined.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `amoled_pwm_top`, `line_driver`, `pwm_timing_ctrl` | `N_BLOCKS` | 16 | linedriver blocks |
| same | `LINES_PER_BLOCK` | 10 | lines per block (one 2-pulse stage) |
| `amoled_pwm_top`, `pwm_bit_encoder`, ... | `N_COLS` | 64 | columns / data lines / DACs |
| `amoled_pwm_top`, `pwm_timing_ctrl` | `SUBFRAME_PULSES` | 960 | slots per subframe |
| `amoled_pwm_top`, `column_current_ctrl` | `DAC_W` | 12 | DAC code width |

The spacing rule needs delays that are multiples of the block size. The collision argument above
assumes 10-line blocks (29 slots per block).

## Simulating

Every testbench in `tb/` checks itself. It prints `TB_RESULT checks=N failures=M` and has a
watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/amoled_pwm_pkg.sv \
        tb/tb_amoled_pwm_top.sv --top-module tb_amoled_pwm_top -Mdir obj
    ./obj/Vtb_amoled_pwm_top

Modules are found by file name (`-y rtl -y tb` also works). The testbenches are:

| testbench | checks |
|---|---|
| `tb_amoled_pwm_top` | Runs the full-size design for four frames with a random image. It checks each pixel's on-time per frame against the table, each DAC code against the lit pixels, and a host write during operation. It also counts that the key mechanisms happen: two pulses in flight, all three clocks, block boundaries, single-drive subframe 8. Takes about 10 s to build and 1 s to run. |
| `tb_pwm_frame_example` | One intensity pattern (10011001 and its complement) over three frames at full size. For every line it checks the pixel state after each of the 15 drives of a frame and the time to the next drive (30, 930, 30, 930, 57, 903, 117, 843, 231, 729, 231, 729, 465, 495, 960 slots). |
| `tb_line_driver`, `tb_ld_block` | Every select line in every slot, against the timing formula, for all start spacings. |
| `tb_ld_stage3`, `tb_ld_stage2` | Delay, the wrong-phase input being ignored, clearing by the next line and by reset. |
| `tb_pwm_timing_ctrl` | Clocks, start pulses, subframe and frame counters, and every announcement (line and bit) over two frames. |
| `tb_pwm_bit_encoder` | Every table entry on random lines. |
| `tb_frame_buffer` | Fill and read back, latency, hold, single-pixel writes. |
| `tb_column_current_ctrl` | Random line writes against a reference count. |
| `tb_pixel_array` | Latch behaviour of the pixel model. |
