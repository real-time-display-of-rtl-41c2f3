# Real-time HDMI display for a multiprocessor spiking neural network

The design watches a spiking neural network emulator while it runs and draws its activity on a
1920x1080 HDMI monitor. Every emulated millisecond, the emulator pushes two kinds of data into
FIFOs:

- the identifiers of the neurons that fired;
- the membrane potentials of four chosen neurons.

The display logic drains both FIFOs on the emulator clock and stores the data in dual-clock
block memories: one column per millisecond, 1024 columns deep. A picture generator on the pixel
clock walks those memories in step with the raster scan. It draws the following:

- a raster plot: one dot per spike, time left to right, neuron number top to bottom;
- four membrane-potential curves;
- text: board, network size, monitored neurons and running time.

The picture then goes out through the HDMI transmitter. At power-up the logic configures that
chip over I2C.

The picture must not change while it is being scanned. So spikes first collect in a small
32-column buffer. During vertical blanking the whole buffer is copied into the display memory,
and only then does the picture generator take the new "newest column" time.

## Clock domains

| Domain | Clock | Contents |
|---|---|---|
| Pixel | `i_pix_clk`, 150 MHz for 1080p | Position counters, sync generation, colour conversion, transmitter pins, I2C setup, picture generator, button |
| Emulator | `i_heens_clk` | Spike reader with its buffer, potential reader, run-time counter |

The two domains share only three things:

- **Dual-clock memories.** The emulator side writes them and the pixel side reads them.
- **"Frame finished" (pixel → emulator).** This is one event, carried by a toggle synchroniser
  (`cdc_sync`).
- **"Transfer done" (emulator → pixel).** This event carries a 65-bit snapshot: the data-present
  flag, the newest column time, and the days/hours/minutes/seconds digits. The snapshot is held
  stable until the toggle has crossed.

Each reset input is synchronised into its own domain.

## Spike path

`spike_fifo_reader` follows the emulator's distribution-phase flag `i_ph_dist`. Each phase is one
time step t and owns buffer column t mod 32. The state machine works like this:

1. It clears that column.
2. It pops each 18-bit neuron address. The address holds chip, virtualisation level, row and
   column.
3. It turns the address into a linear index. This takes one clock:
   `col + NB_COLUMN*(row + NB_ROW*(virt + NB_VIRT*chip))`.
4. It sets that bit with a read-modify-write on the 968-bit buffer word.

When a frame ends, the reader waits two clocks. It then copies the 32 buffer words into the
1024x968 spike memory, one per clock, and reports the newest complete time.

At a 1 ms step and 60 Hz refresh, a frame spans about 17 steps. The 32-slot buffer therefore has
room to spare. A 0.5 ms step would need 34 slots and would not fit.

## Potential path

`potential_fifo_reader` reads four signed 16-bit potentials per time step and maps each to a
plot row from 0 to 179. The mapping is `((v + 8000) * 2347) >> 16`, saturated. It takes two
pipeline states. The four bytes are packed into one 32-bit word at address t mod 1024. This path
has no transfer buffer: a time step's word is written once and never changes.

## Picture generation

`screen_generator` owns the layout. It uses these sub-blocks:

- **`raster_plot`.** Reads three memory columns around the current x: previous, current and next.
  This lets each spike be drawn as a five-pixel plus sign. The oldest column is shown on the left
  once the memory has wrapped. Around the plot it draws a black frame, ticks and tick labels.
  With fewer than 256 neurons (ZedBoard, 200), the push button (`button_switch`) switches to an
  extended view of four lines per neuron.
- **`potential_plot`.** Four stacked 180-line plots with 2-line black borders, each with a dotted
  threshold line. Their curves are blue, red, green and orange, and share the raster plot's time
  axis.
- **Text blocks.**
  - `text_generator`: horizontal text.
  - `text_generator_rotated`: vertical axis labels.
  - `integer_text_generator`: numbers without leading zeros.
  - `neuron_info_text`: the description of each monitored neuron.
  - All of them read one 8x16 character table, `font_rom`. It is a constant table, and
    `font8x16.hex` holds the same data for the testbenches.
- **`exec_time_counter`.** Counts seconds, minutes, hours and days of emulated time. The screen
  shows only the units that are non-zero, counting from the largest.

The generator registers its colour, along with the counters it was computed for, so the HDMI
block can align sync and data. New data from a transfer is latched when it arrives and applied
at the next frame start.

## HDMI link and transmitter setup

- `position_counters`: the raster scan; the visible area comes first, then front porch, sync and
  back porch.
- `rgb_generator`: turns the counters into registered DE/HSYNC/VSYNC and blanks the colour.
- `convert_rgb_ycbcr`: HDTV coefficients in two pipeline stages, built from shift-and-add
  constants.
- `hdmi_output`: maps the video onto the 36-bit transmitter bus.
  - ZC706: RGB 4:4:4.
  - ZedBoard: YCbCr 4:2:2, with Y on D[23:16] and Cb/Cr alternating on D[15:8].
- `config_hdmi_chip_i2c` with `i2c_sender`: writes the transmitter's register table at about
  293 kHz (150 MHz / 512). On ZC706 it first selects channel 1 of the PCA9548 I2C switch.
- `color_bands`: a vertical colour-band test picture, selected by `i_test_bands`.

## Parameters of `snn_display_top`

| Parameter | Default | Meaning |
|---|---|---|
| `BOARD` | `BOARD_ZEDBOARD` | Pin mapping and colour format (`BOARD_ZC706` gives RGB) |
| `RES` | `RES_1920X1080` | Video timing |
| `NB_COLUMN`, `NB_ROW`, `NB_VIRT`, `NB_CHIPS` | 5, 5, 8, 1 | Network size: 200 neurons; memories hold up to 968 (11x11x8) |
| `CLK_DIV_LOG2` | 9 | I2C clock divider |
| `BTN_DIV_LOG2` | 21 | Button sampling divider (about 14 ms) |
| `MS_PER_S` | 1000 | Time steps per displayed second |

## Simulation

Each testbench checks itself. It ends with a `TB_RESULT checks=N failures=M` line and has a
watchdog. An example with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl +libext+.sv --top-module tb_raster_plot \
  rtl/hdmi_resolution_pkg.sv rtl/neurons_pkg.sv rtl/plot_pkg.sv \
  tb/fifo_model.sv tb/i2c_monitor.sv tb/tb_raster_plot.sv
./obj_dir/Vtb_raster_plot
```

Run it from the directory that holds `rtl/` and `tb/`, because the font table is loaded by that
relative path.

The two system testbenches drive the whole top level. Each uses a model of the emulator's FIFOs
and phases, an I2C monitor, and counters for every mechanism.

- **`tb_snn_display_top`.** ZC706, with small dividers so that many frames fit. It checks:
  - spike dots and potential points;
  - saturation;
  - the view toggle;
  - colour bands;
  - I2C frames;
  - text changes.
- **`tb_snn_display_full`.** All parameters at their defaults (ZedBoard, 1080p, 200 neurons),
  over 9 frames. It includes a held button press and the band test.

## Differences from the original design, and what is left out

- **Board variants.** Both boards are one design selected by `BOARD`, not two projects.
- **Clocks.** They enter as ports. The PLL that makes 150 MHz is not included.
- **Monitored neurons.** The emulator, its FIFOs and its processor registers are outside the
  design. The monitored neurons enter through `i_mon`. The testbenches contain behavioural FIFO
  and emulator models.
- **Spike transfer.** A frame-end request is served from the reader's idle state as well as from
  its FIFO-empty state, so a transfer is never skipped.
- **Potential path.** It has no 32-slot buffer.
- **Font.** Only the letter A follows the original font. The other characters on screen are
  simple 5x7 shapes.
- **Layout.** Plot positions, spacing, tick placement and the potential-to-pixel scale are my own
  choices where the original gives no numbers.
- **Acknowledges.** The I2C master does not check them.
- **Cb/Cr phase.** The alternation restarts with Cb at every line, because it is cleared
  outside DE.
- **Other resolutions.** Other timings are available in `hdmi_resolution_pkg`. The plot layout
  needs at least 1472 visible columns, so only 1080p shows the full picture.
