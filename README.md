# Switch-colour VGA controller for a 12-bit VGA port

This design drives a VGA monitor at 640x480, 60 Hz, from an FPGA board
that has a 12-bit resistor-ladder VGA output (4 bits each of red, green and
blue) and a 100 MHz oscillator. It paints the whole visible screen in one
colour, set on twelve slide switches. That gives 4096 colours. It is the
smallest complete VGA system: a pixel clock, a raster timing generator with
sync pulses and blanking, and a colour stage. The timing generator is the
part worth reusing. Its pixel and line counters are the (column, row)
address a frame buffer or pattern generator would use, and it also holds
the constants for 800x600 and 1280x1024 modes.

```
 fpga_clk 100 MHz ─► clk_divider ─► 25 MHz pixel clock
                                        │
                                        ▼
                                   vga_timing ──► h_count, v_count (pixel address, unused here)
                                        │ hsync, vsync, video_on
switches r1..r4 g1..g4 b1..b4 ─►   vga_pattern ─► r1..r4 g1..g4 b1..b4, h_sync, v_sync
                                                        │ (FPGA pins)
                                                        ▼
                                  3 x vga_dac (resistor ladders, 75 Ω load) ─► RED, GREEN, BLUE
```

`vga_top` is the FPGA (everything above the pins) and is synthesizable.
`vga_board` adds the three resistor DACs as behavioural models, so one
simulation covers the path from clock and switches to the voltages at
the monitor.

## The raster: what the monitor needs

A VGA monitor gets no pixel clock and no addresses. It finds its place on
the screen only from two sync pulses. Each line is 800 pixel times:

| region        | pixels | time at 25 MHz | `h_count`  |
|---------------|-------:|---------------:|------------|
| visible       | 640    | 25.6 µs        | 0 – 639    |
| front porch   | 16     | 0.64 µs        | 640 – 655  |
| sync pulse    | 96     | 3.84 µs        | 656 – 751  |
| back porch    | 48     | 1.92 µs        | 752 – 799  |
| **line**      | 800    | 32 µs          |            |

and each frame is 521 lines:

| region        | lines | time      | `v_count`  |
|---------------|------:|----------:|------------|
| visible       | 480   | 15.36 ms  | 0 – 479    |
| front porch   | 10    | 320 µs    | 480 – 489  |
| sync pulse    | 2     | 64 µs     | 490 – 491  |
| back porch    | 29    | 928 µs    | 492 – 520  |
| **frame**     | 521   | 16.67 ms  |            |

One frame is 416,800 pixel clocks, so the refresh rate is 59.98 Hz. Both
sync pulses are active low in this mode. During the porches and the sync
pulses the colour outputs must be black: the monitor uses that time to
retrace the beam and to measure the black level.

## vga_timing: counters and decoders

`vga_timing` has two counters on the pixel clock. `h_count` steps every
clock and wraps after the last back-porch pixel. `v_count` steps once per
line, on the clock where `h_count` wraps, and wraps after the last
back-porch line. Counting starts at the first visible pixel, so both
counters are the coordinates of the pixel being drawn. `hsync`, `vsync`
and `video_on` come from comparing the counts with the ends of the regions.
`video_on` is high only when both counts are in their visible regions.

The non-obvious detail is alignment. The three decoded outputs are
registered, and they are decoded from the *next* counter values. So on every
clock, `h_count`, `v_count`, `hsync`, `vsync` and `video_on` all describe
the same pixel, and no combinational decode reaches a pin. Reset
(asynchronous, active high) puts the counters at pixel (0, 0), the top-left
visible pixel. An assertion checks that the counters never leave the frame.

A video mode is a `vga_pkg::timing_t` value: the last count of each region
horizontally and vertically, plus the two sync polarities. Three modes are
defined:

| constant          | pixel clock | line (clocks)     | frame (lines)   | sync |
|-------------------|------------:|-------------------|-----------------|------|
| `VGA_640X480`     | 25 MHz      | 640/16/96/48 = 800 | 480/10/2/29 = 521 | −/− |
| `SVGA_800X600`    | 40 MHz      | 800/40/128/88 = 1056 | 600/1/4/23 = 628 | +/+ |
| `SXGA_1280X1024`  | 110 MHz     | 1280/52/120/256 = 1708 | 1024/3/5/42 = 1074 | +/+ |

The 800x600 and 1280x1024 region ends are kept as 12-bit (horizontal) and
11-bit (vertical) binary constants, which sets the counter widths
`H_W = 12` and `V_W = 11`. For those two modes this design chooses
positive sync polarity, as the common VESA definitions do. The top level
uses only 640x480. The other two modes need a 40 MHz or 110 MHz pixel
clock, which the divide-by-four clock cannot make. They are checked on
`vga_timing` alone.

## clk_divider: the pixel clock

A 2-bit counter on the 100 MHz clock, cleared asynchronously by reset. Its
bit 1 is a 25 MHz square wave with a 50 % duty cycle, and it clocks the rest
of the design. After reset is released it first rises on the second
`fpga_clk` edge. Using a counter bit as a clock is how this design works.
On an FPGA the tools place that net on a global clock buffer. If you need
a single clock domain, make a clock enable from `temp == 2'b01` and clock
everything from `fpga_clk`. That change affects only this module and the
clock inputs of the other two.

## vga_pattern: colour and blanking

On each pixel clock `vga_pattern` registers the switch colour when
`video_on` is high, and black when it is low. It registers `hsync` and
`vsync` in the same clock edge, so all fourteen VGA outputs leave from
flip-flops together, one pixel clock after the counters. In reset the
colour is black and both syncs are at their idle level. A pattern
generator or frame-buffer read would replace this module. It would take
`h_count`/`v_count` from `vga_timing`, and any read latency would need the
same number of delay stages on the syncs and `video_on`.

## vga_top pins

| pin | direction | meaning |
|-----|-----------|---------|
| `fpga_clk` | in | 100 MHz board clock |
| `reset` | in | active high, asynchronous |
| `r1_sw`..`r4_sw`, `g1_sw`..`g4_sw`, `b1_sw`..`b4_sw` | in | colour switches |
| `r1`..`r4`, `g1`..`g4`, `b1`..`b4` | out | colour bits to the resistor ladders |
| `h_sync`, `v_sync` | out | sync, active low |

Within each colour, index 1 is the most significant bit: the switch word
reads `r1r2r3r4_g1g2g3g4_b1b2b3b4` as a binary number, and `r1` drives the
510 Ω resistor. Each colour pin copies the switch of the same name during
the visible time and is 0 otherwise. The switches go to the pixel-clock
flip-flops with no synchronizer. That is harmless for hand-set switches,
but add two flip-flops per bit if the colour comes from another clock
domain.

Known pin locations on a Nexys4 DDR-class board (all LVCMOS33): `fpga_clk`
E3, `reset` F17, `r1_sw` J15, `r2_sw` L16, `r3_sw` M13, `g1_sw` R17,
`g2_sw` R18, `g3_sw` U18, `b1_sw` T8, `b2_sw` U8. The VGA port uses
RED0–3 = A3, B4, C5, A4; GRN0–3 = C6, A5, B6, A6; BLU0–3 = B7, C7, D7, D8;
HSYNC = B11; VSYNC = B12. Here RED3 is the MSB, so `r1` goes to A4 and
`r4` to A3. Take the remaining switch pins from the board's manual.

## vga_dac: the resistor ladder (behavioural model)

Each colour wire is driven by four FPGA pins through 4 kΩ (bit 0), 2 kΩ,
1 kΩ and 510 Ω (bit 3), into the monitor's 75 Ω termination. The wire
voltage is

    V = 3.3 V · Σ(bitᵢ / Rᵢ) / (Σ 1/Rᵢ + 1/75 Ω)

which gives 16 levels from 0 V to 0.718 V, about 48 mV apart. The steps are
nearly equal, but not exactly, because 510 Ω is not exactly half of 1 kΩ.
The model assumes ideal 3.3 V drivers and has no delay. It has real-valued
outputs and is for simulation only. The 100 Ω series resistors on HS and
VS are not modelled.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs.

| testbench | what it shows |
|-----------|---------------|
| `tb_clk_divider` | output level on every input edge, period of 4, 100 cycles in 400, asynchronous clear, restart |
| `tb_vga_timing` | two full 640x480 frames, compared clock by clock with a reference built from the region lengths; HS period 800 / pulse 96, VS period 416,800 / pulse 1,600 clocks, 307,200 visible pixels per frame |
| `tb_vga_timing_modes` | one frame each of 800x600 and 1280x1024, same checks (uses helper `vga_timing_checker`) |
| `tb_vga_pattern` | 5,000 random colour/enable/sync cycles and the eight primary colours, shown and blanked |
| `tb_vga_dac` | all 16 codes against a separate superposition calculation; 0 V, ~0.7 V full scale, monotonic, step sizes |
| `tb_vga_top` | from the pins: colour inside the visible window, black outside, lit clocks per frame, sync periods, reset in mid-frame |
| `tb_vga_board` | whole board at default parameters: nine colours (white, red, green, blue, yellow, magenta, cyan, black, `0000_0001_1111`), one frame each, DAC voltages checked on every 100 MHz clock |

The two end-to-end testbenches use `vga_sync_monitor`, a model of the
monitor's side. It knows nothing of the design's counters. It locks onto the
HS and VS edges, checks their periods and widths, and works out from the
edges alone where the visible window is. The window starts 144 pixels after
each HS edge, and its rows are those after the 31st to 510th HS pulse that
follow a VS edge. Colours are therefore checked through the same timing a
real monitor uses.

To run one, for example the full board test (about 20 s):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/vga_pkg.sv tb/tb_vga_board.sv --top-module tb_vga_board
    ./obj_dir/Vtb_vga_board

Every testbench drives `reset` from 0 to 1 shortly after time 0. A
two-state simulator needs that rising edge to apply an asynchronous reset
to flip-flops whose clock is held still during reset.

## Size

After generic synthesis, `vga_top` has 42 flip-flops: 2 in the divider,
12 + 11 counter bits, 3 decoded timing bits, 12 colour bits and 2 sync
bits. It has 28 pins. A published Vivado implementation of the same
function reports 35 flip-flops, 55 LUTs, 28 I/O and 2 BUFGs. The
difference in flip-flops comes from the registered colour/sync outputs and
the 12/11-bit counters that this design keeps for the larger modes.

## Departures and choices

- Region order: counting starts at the first visible pixel, with the
  porches and the pulse after it. This is the same periodic waveform as
  starting from the sync pulse.
- The 800x600 and 1280x1024 constant sets include one more horizontal
  value (903 and 1391), which is the midpoint of the sync pulse. Nothing in
  this design needs it, so it is not stored. The row counter steps when the
  line wraps, which is once per HS pulse.
- Sync polarity, reset polarity and style, output registering and the
  bit order of the switches are this design's choices, described above.
- Out of scope: frame memory, palettes, text modes and the other features
  of the original VGA adapter. The counters are ready to address a frame
  buffer, but no buffer is included.
