# FPGA front end for an assisted cupping diagnosis system

Cupping therapy leaves marks on the skin. Their colour and the conditions
under which they formed carry diagnostic meaning in traditional Chinese
medicine. This design is the FPGA half of a system that measures those things
objectively. It:

- reads skin-side temperature and humidity (DHT11) and cup temperature and
  pressure (BMP280) once per second, aligned to a common timestamp;
- corrects the cheap DHT11 temperature and fuses it with the BMP280 one;
- runs a PID loop that drives the cup's vacuum pump;
- captures 640x480 RGB565 images of the cupping mark from an OV5640 camera;
- cleans the images with a 3x3 colour median filter and a luminance
  histogram equalisation;
- streams the image, one row per UDP datagram, over gigabit Ethernet (RGMII);
- sends the sensor record over a UART.

A host PC does the rest: colour-space conversion, a small back-propagation
neural network (18 inputs, 25 hidden, 6 constitution classes) and the user
interface. That software is not part of this repository.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). External chips are
modelled only in the testbenches.

## Structure and clock domains

```
            clk_sys (100 MHz)                                  eth_clk (125 MHz)
  +-------------------------------------------------+      +---------------------------+
  | sync_trigger --pps/trig--> dht11_ctrl ----+     |      |                           |
  |      |                     bmp280_ctrl ---+     |      |  pingpong_buf             |
  |      |                      (i2c_master)  v     |      |      |                    |
  |      +--timestamp------> acq_sync_ctrl (2x sync_fifo)  |  udp_image_tx (2x crc32)  |
  |                                   |             |      |      |                    |
  |                             temp_fusion         |      |  gmii_to_rgmii --> RGMII  |
  |                                   |             |      +------^--------------------+
  |  uart_rx --> uart_sensor_link --> uart_tx       |             |
  |                 | set point, pump enable, dT    |       async_fifo (17 bit,
  |            pressure_pid --> pump PWM            |       Gray pointers)
  |  sccb_config (i2c_master) --> OV5640 registers  |             ^
  +----------------------|--------------------------+             |
                         | cfg_done          cam_pclk             |
                         v   +--------------------------------------------+
                             | dvp_capture -> median_filter_rgb -> hist_eq|
                             +--------------------------------------------+
```

`cupping_fpga_top` has three clocks. `clk_sys` is the 100 MHz system clock,
which on a board comes from a PLL fed by a 50 MHz crystal. `cam_pclk` is the
camera's pixel clock. `eth_clk` is the 125 MHz transmit clock. One
asynchronous active-low reset is synchronised into each domain by
`reset_sync`.

Only two signals cross between domains:

- `cam_cfg_done`, a level, through a two-flop synchroniser in `dvp_capture`;
- the pixel stream, through `async_fifo`.

## Sensor path: getting two slow sensors to agree on "when"

The DHT11 and BMP280 have nothing in common. One is a bit-banged single-wire
device that takes about 23 ms to answer. The other is an I2C device that
needs a 10 ms conversion. The aim is that each record sent to the host holds
two readings started by the same trigger.

1. `sync_trigger` divides `clk_sys` into a one-clock second pulse (`pps`).
   - It counts the pulses into a 32-bit timestamp.
   - From the pulse it derives one trigger per sensor. Each trigger may be
     delayed by a fixed number of clocks (`DHT_OFFSET`, `BMP_OFFSET`, both 0
     by default).
   - The first pulse comes immediately after reset.
2. `acq_sync_ctrl` owns one small `sync_fifo` per sensor (16 x 48 bit).
   - On the trigger it writes the timestamp into the first free slot of both
     FIFOs.
   - As each sensor finishes, its result goes into its own FIFO behind the
     timestamp.
   - Only when both have finished, or after a 0.5 s timeout, does it read
     the two FIFOs in the same clocks: both timestamps first, then both
     results.
   - It then emits one `sensor_rec_t` (see `cupping_pkg`). The record carries
     the per-sensor ok flags and a `ts_match` bit, which says that the two
     timestamps read back agree.
   - A trigger that arrives while a collection is still open is counted in
     `missed_trig`.
3. `dht11_ctrl` drives the single bus.
   - Host side: an 18 ms start pulse, then release.
   - Sensor response: 80 us low and 80 us high.
   - Data: 40 bits. Each bit is a 0 or 1 depending on whether its high time
     exceeds 40 us.
   - It checks the checksum. A missing answer times out after 1 ms of
     silence.
4. `bmp280_ctrl` uses the generic `i2c_master` at address 0x76.
   - After reset it reads the twelve trimming words `dig_T1..T3` and
     `dig_P1..P9` once, in four 6-byte reads.
   - On each trigger it writes `ctrl_meas = 0x25` (forced mode), waits
     `MEAS_WAIT_US`, then burst-reads the six data registers.
   - It applies the integer temperature compensation from the BMP280 data
     sheet, giving 0.01 C.
   - It then applies the data sheet's 64-bit pressure compensation, giving
     whole pascals (`press_pa`). The one division in that formula runs on a
     64-step sequential restoring divider, so a result is ready 66 clocks
     after the read. The data sheet example (raw 415148, t_fine 128422)
     gives 100653 Pa, and the testbench checks exactly that.
   - The raw 20-bit pressure word is also output (`press_raw`). It goes to
     the pump PID; the compensated value goes into the sensor record.

### Temperature fusion

`temp_fusion` implements two steps.

1. A zero-bias correction of the DHT11: `T_cal = T_dht - dT`.
2. A fixed weighted mean: `T_f = w1*T_bmp + w2*T_cal`, with w1 = 0.9412 and
   w2 = 0.0588.

Details:

- Temperatures are signed 16-bit in units of 0.01 C.
- The weights are unsigned Q0.16 constants (61683 and 3853).
- The 36-bit product sum is shifted right by 16.
- Latency is two clocks.
- `dT` is a run-time input. The host sets it over the UART, and it is 0 at
  reset.

Example: T_bmp = 25.08 C, T_dht = 26.30 C and dT = 0.30 C give
T_f = 25.13 C.

## Image path

The pipeline runs in the camera clock domain and handles one pixel per
clock.

- **`dvp_capture`** pairs the two DVP bytes of each RGB565 pixel, high byte
  first. It starts passing frames only at the first `vsync` after
  `cam_cfg_done`, so no half-configured or partial frame leaks through. Its
  output is the `per_frame_vsync/href/clken` + `per_img_rgb` stream that the
  two filters share.
- **`median_filter_rgb`** splits each pixel into R, G and B. Two line buffers
  per image width build a 3x3 window per channel, with border pixels
  replicated. Each channel goes through a three-level comparator network:
  1. Sort each row of the window into max/med/min.
  2. Take the minimum of the maxima, the median of the medians and the
     maximum of the minima.
  3. Take the median of those three values, which is the median of all nine.

  All comparisons use the combinational `sort3`, with registers between the
  levels. Output pixel (x, y) is the median centred on (x-1, y-1), five
  clocks after input (x, y). The image therefore moves one pixel right and
  down.
- **`hist_eq`** equalises luminance only, so hues are preserved.
  1. Each pixel is expanded to 8 bits per channel by bit replication.
  2. It is converted to YCbCr with the 256x integer form of BT.601:
     `Y = (77R+150G+29B)>>8`, `Cb = (128B-85G-43R+32768)>>8`,
     `Cr = (128R-107G-21B+32768)>>8`.
  3. Y is counted in a 256-bin histogram RAM. The read-modify-write runs at
     one pixel per clock, with forwarding for equal back-to-back values.

  After the last pixel of a frame (pixel IMG_W*IMG_H), a sweep runs over the
  256 bins. For each bin it:
  - accumulates the cumulative count;
  - computes `LUT[i] = floor(255 * cdf(i) / (IMG_W*IMG_H))` with an 8-step
    restoring divider;
  - clears the bin.

  The next frame's Y goes through this LUT and is converted back with
  `R = Y' + 359(Cr-128)/256`, `G = Y' - (88(Cb-128)+183(Cr-128))/256` and
  `B = Y' + 454(Cb-128)/256`. The results are clamped and repacked to
  RGB565.

### Timing consequences you need to know

- **The mapping for frame n comes from frame n-1.** The filter output
  therefore stays silent for the whole first frame after reset. The first
  valid pixel leaves one frame period after the first pixel entered. At
  640x480 and about 79 frames per second, that is the 12.6 ms first-frame
  latency this architecture is specified for.
- **The sweep needs vertical blanking.** It takes about 11 clocks per bin,
  roughly 2,800 pixel clocks in all. If a pixel arrives earlier, the
  `lut_overrun` status output latches, and a simulation assertion fires.
- **Throughput.** For 79.37 frames/s, 307,200 pixels must pass every
  12.6 ms. The DVP bus needs two camera clocks per pixel, so this needs a
  camera clock of about 49 MHz. The full-size test runs at 50 MHz.

### Into the Ethernet clock

- `async_fifo` (2048 x 17, Gray-coded pointers, two-flop synchronisers)
  carries each pixel.
  - Bit 16 marks the first pixel of a frame, so the receiving side
    re-synchronises its row counter every frame.
  - The top's `img_fifo_overflow` output latches if the FIFO is ever full
    when a pixel arrives.
- `pingpong_buf` fills one 640-pixel row bank while the other is being sent.
  - It stops popping the FIFO while both banks are busy, which is how
    back-pressure works.

### UDP datagram per row

`udp_image_tx` sends one frame per row, one byte per `eth_clk`. In order:

1. Preamble and SFD.
2. MAC header, type 0x0800.
3. IPv4 header: TTL 64, UDP, don't-fragment, identification counting
   frames, checksum computed in hardware.
4. UDP header, checksum 0.
5. The payload:

| bytes | field |
|---|---|
| 2 | magic 0x5AA5 |
| 2 | row number (0..IMG_H-1) |
| 2 | image width |
| 2 | image height |
| 2*IMG_W | RGB565 pixels, high byte first |
| 4 | CRC-32 (IEEE, reflected) of the bytes above, low byte first |

6. The Ethernet FCS.
7. 12 idle clocks of inter-frame gap.

Sizes and defaults:

- At 640 pixels a frame is 1346 bytes on the wire. Its 1292-byte payload
  fits a standard 1500-byte MTU.
- A whole image takes about 5.2 ms at 125 MHz.
- Header fields are big-endian.
- The MAC/IP addresses and ports are parameters. The defaults are broadcast
  MAC, 192.168.1.10 to 192.168.1.100, and port 1234.

`gmii_to_rgmii` turns the GMII byte stream into RGMII:

- Low nibble and TX_EN on the high clock phase.
- High nibble and TX_EN^TX_ER on the low phase.
- The high half is re-registered on the falling edge.
- Generic flip-flops stand in for an FPGA's DDR output cells.
- TX clock-to-data skew is left to the PHY's internal delay.

## Host UART link

8N1 at 115200 baud (`uart_tx`, `uart_rx`). `uart_sensor_link` frames the
traffic.

**FPGA to host**, one 17-byte frame per aligned record:

```
AA 55 | timestamp(4) | T_fused(2) | T_dht_cal(2) | humidity(2) | pressure_Pa(3) | status | sum
```

- Fields are MSB first.
- Temperatures are in 0.01 C.
- Humidity is `{integer, decimal}` as the DHT11 reports it.
- Pressure is the compensated value in whole pascals.
- `status = {5'b0, ts_match, bmp_ok, dht_ok}`.
- `sum` is the 8-bit sum of the 16 bytes before it.
- A record that arrives while the previous frame is still going out is
  dropped and counted.

**Host to FPGA**, 6-byte command frames: `AA 55 | cmd | value(2) | sum`.

| cmd | meaning |
|---|---|
| 0x01 | pressure set point; `value` becomes bits 19:4 of the 20-bit raw-pressure set point |
| 0x02 | pump enable (bit 0) |
| 0x03 | DHT11 zero-bias `dT`, signed, 0.01 C |

Frames with a bad sum or an unknown command are ignored and counted.

## Pump control

`pressure_pid` runs once per BMP280 sample (1 Hz) on raw ADC units:

- `e = setpoint - press_raw`;
- `u = (64e + 4*I + 16*(e - e_prev)) / 256`, with the integral clamped to
  +/-2^20;
- the duty is clamped to 10 bits and drives a free-running PWM with a period
  of 1024 clocks.

The BMP280 raw word rises as pressure falls, so a positive error means "not
enough vacuum". Disabling the pump clears the controller state. The gains
and the loop rate are starting values, to be tuned on the real pneumatics.

## Camera configuration

`sccb_config` writes a 13-entry register table to the OV5640 (SCCB address
0x3C, 16-bit register addresses). It reuses `i2c_master`, whose ninth-bit
acknowledge is only reported in this mode.

1. Software reset, followed by a `CAM_WAIT_US` pause.
2. RGB565 output format (0x4300 = 0x61).
3. A 640x480 output window.

`cam_cfg_done` rises at the end, and `nack_seen` records any missing
acknowledge. This is not a complete OV5640 bring-up. The vendor's start-up
list (clocking, PLL, timing, ISP) is several hundred registers long and has
to be merged in for real hardware.

## Top-level interface (`cupping_fpga_top`)

| port | dir | meaning |
|---|---|---|
| `clk_sys`, `cam_pclk`, `eth_clk`, `rst_n` | in | clocks and async reset |
| `dht_oe`, `dht_in` | out/in | DHT11 bus: drive-low enable and line level (open drain) |
| `bmp_scl_oe`, `bmp_sda_oe`, `bmp_sda_in` | out/in | BMP280 I2C, open drain |
| `cam_scl_oe`, `cam_sda_oe`, `cam_sda_in` | out/in | OV5640 SCCB, open drain |
| `cam_vsync`, `cam_href`, `cam_data[7:0]` | in | OV5640 DVP |
| `uart_txd`, `uart_rxd` | out/in | host UART |
| `pump_pwm` | out | air pump drive |
| `rgmii_txc`, `rgmii_txd[3:0]`, `rgmii_tx_ctl` | out | to the Ethernet PHY |
| `pps`, `cam_cfg_done`, `lut_valid`, `lut_overrun`, `img_fifo_overflow`, `frames_sent[7:0]`, `cmds_ok[7:0]`, `pump_duty[9:0]` | out | status for bring-up |

The open-drain buses are split into enables and inputs. A board wrapper adds
the pads. Parameters and their defaults:

| parameter | default |
|---|---|
| `CLK_HZ` | 100 MHz |
| `I2C_HZ` | 100 kHz |
| `BAUD` | 115200 |
| `MEAS_WAIT_US` | 10 ms |
| `CAM_WAIT_US` | 5 ms |
| `IMG_W` x `IMG_H` | 640 x 480 |
| `FIFO_AW` | 11 (2048-entry pixel FIFO) |

At the defaults, coarse synthesis gives about 2,400 cells, 2,500 flip-flop
bits and 84 kbit of memory (line buffers, histogram, FIFOs, row banks).

## Departures and limits

These points are design choices, not part of the system's published
description:

- field layouts of both serial frames and the UDP payload (magic word, row
  number);
- the frame-delayed equalisation;
- the border handling of the median filter;
- the divider;
- the inverse colour transform;
- the sensor timeouts;
- the PID structure and gains;
- the FIFO sizes;
- the RGMII nibble order.

**Not built:**

- the PLL (the top takes the 100 MHz clock as an input);
- ARP and any Ethernet receive path (the destination MAC is a parameter);
- the full OV5640 register list;
- everything on the host (image decoding, Lab conversion, normalisation,
  the BP network, the GUI and the database).

**Known behaviour:**

- The first camera frame after reset is never transmitted.
- The median output is shifted by one pixel.
- `rst_n` must stay low for a few cycles of the slowest of the three
  clocks. Each domain's reset synchroniser clears only on that domain's
  clock edge.
- `pps` and the triggers are held high while reset is asserted. The
  downstream blocks are in reset too, so nothing acts on them.
- Lint reports some multi-driven-reset (SYNCASYNCNET) notes. They come from
  memories and from signals used both in logic and in assertion
  `disable iff` clauses, and are harmless.
- The error flags and counters (`missed_trig`, the UART `rx_errors` and
  `tx_dropped` counts, the camera `nack_seen`) are produced inside the top
  but not taken to pins, because the board's debug outputs are not
  described. They are visible in simulation.

## Verification

Every block has a self-checking testbench in `tb/`. Each one:

- compares against values computed independently (bit-serial CRC, software
  median and equalisation models, data-sheet compensation examples);
- checks cycle counts where timing matters;
- prints `TB_RESULT checks=N failures=M`.

The external parts are behavioural models in `tb/`:

- `dht11_model`;
- `i2c_slave_model`, a register-file I2C/SCCB slave used for both the
  BMP280 and the OV5640;
- `eth_frame_checker`, which checks preamble, headers, IPv4 checksum,
  payload CRC and FCS residue;
- `cupping_env`, the whole board around the top.

System tests:

- **`tb_cupping_top`**: 10 MHz system clock, 32x8 image, four camera frames,
  about 10 s of run time. It counts each mechanism once and fails on any
  that never happened:
  - second pulse;
  - DHT11 read and BMP280 read;
  - aligned record with matching timestamps;
  - fusion;
  - UART frame, with its fields checked against the sensor models
    (fused temperature 25.13 °C, humidity 55 %, pressure 100653 Pa);
  - all three host commands;
  - PID drive;
  - camera configuration;
  - median and equalisation output;
  - the suppressed first frame;
  - start-of-frame crossing;
  - both ping-pong banks;
  - every UDP row with the exact expected pixel value.
- **`tb_cupping_full`**: every top parameter at its default. It uses
  640x480, 100 MHz, 115200 baud, three frames (960 UDP rows checked) and one
  full sensor record, and takes about 20 s of run time.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cupping_top \
    -Irtl -Itb rtl/cupping_pkg.sv tb/tb_cupping_top.sv
./obj_dir/Vtb_cupping_top
```

Replace the module name for any other testbench. The module list is in the
file names: `rtl/<module>.sv` and `tb/<testbench>.sv`.
