# Ultrasonic positioning system: FPGA logic

This design finds the position of a hand-held ultrasonic transmitter in a plane by
timing sound. The transmitter fires a 40 kHz burst. At the same instant it pulls a
wire into the FPGA. Two receivers a known distance `a` apart each turn the arriving
sound into a digital pulse. The FPGA measures the time from the wire pulse to each
receiver pulse. With a known speed of sound those two times give the distances `r1`
and `r2` from the transmitter to the two receivers. Two circles then meet at the
transmitter (trilateration):

```
receiver 1 at (0, 0), receiver 2 at (a, 0)

x = a/2 + (r1^2 - r2^2) / (2a)
y = sqrt(r1^2 - x^2)        (the working area is limited to y > 0, so the
                             second intersection is discarded)
```

The FPGA side is a small processor system. Peripherals capture the pulses, time
them and interrupt the processor. The processor works out the coordinates and prints
them on a serial terminal. A custom display driver shows a picture from a
framebuffer on a 320x240 LCD.

This repository holds the synthesizable SystemVerilog of the FPGA fabric: bus, GPIOs,
interrupt controller, timer, UART, framebuffer and display driver. The processor core
and its software are not included. The self-checking testbenches model them.

## How a measurement runs

```
 transmitter ──send wire──────────────► GPIO1 bit 0 ─┐
 receiver 1 ──filtered, rectified pulse► GPIO1 bit 1 ─┼─► gpio_in ─irq─┐
 receiver 2 ──filtered, rectified pulse► GPIO1 bit 2 ─┘               ├─► intc ─► cpu_irq
 BTN1, BTN2 ───────────────────────────► GPIO2 ──────────► gpio_in ─irq┘
                                          tof_timer (free-running clock counter)
```

1. The send pulse's rising edge sets bit 0 of GPIO1's EDGE register. GPIO1 raises its
   interrupt, and the interrupt controller passes it to `cpu_irq`.
2. The software reads `INTC.ISR` (source 0 = GPIO1) and `GPIO1.EDGE` (bit 0 = send).
   It writes 3 to `TIMER.CTRL`, which clears the counter and starts it.
3. Each receiver pulse sets its EDGE bit in the same way. The software reads
   `TIMER.COUNT`. The count is the time of flight in clock cycles (20 ns each at
   50 MHz). The send path and the receive path have the same interrupt delay, so
   it mostly cancels.
4. The transmitter sends a burst, not a single edge, so further edges arrive on all
   three lines. The software ignores every edge after the first of a measurement.
   The edge register needs clearing anyway (write ones to `EDGE`, then to `INTC.IAR`).
5. Distance = speed x time. The speed of sound is calibrated on site. Place the
   receivers together and the transmitter 500 mm away, measure, and press BTN1. Move
   the transmitter to 200 mm, measure, and press BTN2. The speed is then
   300 mm / (t500 - t200). The buttons come in through GPIO2 (interrupt source 1).
6. The software averages the last few results and prints the coordinates over the
   UART.

Steps 2-6 are software. The hardware only guarantees that edges are caught (they are
latched, so a short pulse is never missed), that the counter is exact to one clock,
and that the counter stops at all-ones instead of wrapping if no echo arrives.

## The display driver

This block is the hardest one to follow. The panel has no frame memory. It must be
fed the whole picture continuously, over 12 wires:

| pin | meaning |
|-----|---------|
| `D7..D0` | colour data, 8 bits per shift |
| `CP` | shift clock: one data byte per pulse |
| `LOAD` | latch the line just shifted in, move to the next line |
| `FRM` | high while the first line of a frame is sent |

### Pixel format

The panel takes 3 bits per pixel (R, G, B), packed with no gaps, most significant
bit first:

```
byte 0: D7=R1 D6=G1 D5=B1 D4=R2 D3=G2 D2=B2 D1=R3 D0=G3
byte 1: D7=B3 D6=R4 D5=G4 D4=B4 D3=R5 D2=G5 D1=B5 D0=R6
...
byte 119: D7=G318 D6=B318 D5=R319 D4=G319 D3=B319 D2=R320 D1=G320 D0=B320
```

So 8 pixels take exactly 3 bytes, and a 320-pixel line takes 120 bytes (120 CP pulses).

The framebuffer stores only **one bit per pixel**: 40 bytes per line and 9600 bytes
per screen. The leftmost pixel is bit 7 of a byte. On the way out the driver widens
each framebuffer byte into its 3 display bytes. A set bit becomes `FG_RGB` (white by
default) and a clear bit `BG_RGB` (black). The framebuffer is therefore monochrome
while the panel is colour. To give the picture colour, change the two parameters.

### Line and frame sequence

```
row 0:   [byte 0][byte 1] ... [byte 119][LOAD]   FRM high for this whole row
row 1:   [byte 0] ...         [byte 119][LOAD]   FRM low
...
row 239: [byte 0] ...         [byte 119][LOAD]   then row 0 again
```

Each slot is one period of the enable strobe. In a data slot, `D` changes at the start
of the slot and `CP` is high for the middle half of the slot. In the LOAD slot, `D`
holds its value, `CP` stays low and `LOAD` is high for the middle half. `FRM` changes
only at slot boundaries. So `FRM` rises after the LOAD that closes the previous frame
and falls after the LOAD that ends row 0. After reset the first thing sent is a LOAD
slot, then row 0.

### Pipeline

The four stages of `display_driver`:

| module | job |
|--------|-----|
| `comb_proc` | divides the clock by `CLK_HZ/ENABLE_HZ` (16: 50 MHz to 3.125 MHz) into `enable`, and gives the `cp_win` window for CP/LOAD |
| `adr_count` | column (0..120, where 120 is the LOAD slot), row (0..239), sub-byte (0..2) and framebuffer address, all counters that step on `enable` |
| `sync_proc` | registers the position and address once per enable. The address goes to BRAM port A |
| `sync_out` | one enable later it takes the BRAM byte, selects display byte `sub` of its 24-bit colour expansion, and drives the pins |

A position reaches the pins two enables after the counters produce it. The BRAM's one
clock of read latency is hidden inside one enable period (16 clocks), which is why
`CLK_DIV` must be at least 4.

### Timing numbers

One frame is 240 x 121 = 29,040 enable periods = 464,640 clocks. At 50 MHz that is
107.6 frames/s. The source design aims for "about 70 Hz" from a 3 MHz enable. That
figure does not follow from 120 bytes per line, and this implementation does not
reproduce it. Set `ENABLE_HZ` to 2,000,000 for 69 Hz if the panel needs a slower
shift clock.

## Processor bus and register map

A simple single-master bus (`usps_pkg::bus_req_t`) stands in for the processor's
peripheral bus. A request is one clock cycle with `sel=1`. The address is a 16-bit
byte address. Register slaves answer with `ack` and `rdata` in the same cycle. The
framebuffer answers one cycle later. The master must wait for `ack` before it issues
the next request (an assertion in `plb_bus` checks this for framebuffer reads).

| address | register | access |
|---------|----------|--------|
| 0x0000 | GPIO1 DATA: synchronised levels {rx2, rx1, send} | R |
| 0x0004 | GPIO1 EDGE: latched rising edges | R, write 1 to clear |
| 0x0008 | GPIO1 IER: interrupt enable per pin | R/W |
| 0x0100-0x0108 | GPIO2 (BTN2, BTN1), same layout | |
| 0x0200-0x02FF | SPI slave, outside this design (`spi_*` ports) | |
| 0x0300 | TIMER CTRL: bit 0 run, bit 1 clear (write) | R/W |
| 0x0304 | TIMER COUNT: 32-bit clock count | R |
| 0x0400 | UART TX: write a byte to send (dropped while busy) | W |
| 0x0404 | UART STAT: bit 0 busy | R |
| 0x0500 | INTC ISR: bit 0 GPIO1, bit 1 GPIO2, latched rising edges | R |
| 0x0504 | INTC IER | R/W |
| 0x0508 | INTC IAR: write 1 to acknowledge | W |
| 0x050C | INTC MER: bit 0 master enable | R/W |
| 0x8000-0xA57F | framebuffer, byte = 8 pixels, address = row*40 + column/8 | R/W |

Unmapped register addresses read 0 and are acknowledged at once. The SPI range is
acknowledged only when the external slave drives `spi_ack`.

## Files

| file | contents |
|------|----------|
| `rtl/usps_pkg.sv` | bus request type, slave enum, register offsets |
| `rtl/usps_top.sv` | top level, wiring only |
| `rtl/plb_bus.sv` | address decode, read multiplexer, framebuffer ack delay |
| `rtl/gpio_in.sv` | input port with synchroniser, edge capture, interrupt |
| `rtl/intc.sv` | interrupt controller |
| `rtl/tof_timer.sv` | time-of-flight counter |
| `rtl/uart_lite.sv` | 8N1 transmitter |
| `rtl/frame_bram.sv` | dual-port 9600x8 RAM |
| `rtl/display_driver.sv` | wraps the four display stages below |
| `rtl/comb_proc.sv`, `rtl/adr_count.sv`, `rtl/sync_proc.sv`, `rtl/sync_out.sv` | display stages |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Top-level parameters: `CLK_HZ` (50 MHz), `ENABLE_HZ` (3 MHz), `BAUD` (9600), `H_PIXELS`
(320) and `V_LINES` (240). `H_PIXELS` must be a multiple of 8.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, and each has
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_usps_top rtl/usps_pkg.sv tb/tb_usps_top.sv
./obj_dir/Vtb_usps_top
```

Replace `tb_usps_top` with any other testbench name. All registers that are read
have a reset, so the design also simulates with random initial values
(`+verilator+rand+reset+2`).

`tb_usps_top` runs the whole design at its default parameters. It takes about
5 seconds and covers about 1.5 M clock cycles. The testbench plays the transmitter
and receivers (sound at 343 m/s, receivers 600 mm apart), the processor software,
the LCD and a serial terminal. It runs the calibration with both buttons and then
measures three positions. It checks each time of flight against the true value
(within 20 clocks) and each computed position (within 2 mm). It also marks the
positions in the framebuffer, compares a complete displayed frame pixel by pixel,
checks the UART bytes and one SPI access, and counts each of these events.

`tb_ranging_sweep` also runs the full design. Both receivers sit at the origin and
the transmitter moves from 0 to 800 mm in 50 mm steps and then to 1500 mm. After
calibration, every distance must come out within 1 mm; the run shows errors of
about 0.02 mm.

The module testbenches check cycle-exact behaviour. They cover the enable period and CP
window, the counter sequence over a whole frame, the pixel packing against a
bit-by-bit model, the frame period (464,640 clocks), the timer count to one clock,
and the UART bit timing.

## How far to trust it

What comes from the source design: the system structure (one transmitter, two
receivers, timer started by the send pulse and read by receiver interrupts,
interrupts ORed into one processor input with a readable origin, GPIO1/GPIO2
interrupts, UART terminal, dual-access BRAM), the display interface (12 signals,
320x240, 3 bits per pixel, 9600-byte screen image, FRM on the first line, LOAD
between lines, the bit order of the data bytes), the four display-driver stages, and
the 3 MHz enable.

This design's own choices, which the source leaves open:

- the 50 MHz system clock and the active-low asynchronous reset;
- the bus protocol and the address map, in place of the vendor's processor bus;
- the register layout of the GPIO, interrupt controller, timer and UART. These are
  minimal versions of the usual processor-system peripherals, not register-compatible
  copies of them;
- one bit per pixel in the framebuffer, widened to the panel's 3 bits with fixed
  colours. The source's byte counts (40 bytes per line, 9600 per screen) only add up
  this way;
- the position and width of the CP and LOAD pulses inside a slot, and a LOAD slot of
  one enable period;
- the timer saturating instead of wrapping; UART transmit only, 9600 baud, 8N1.

Known differences from the source:

- The refresh rate is 107.6 Hz, not about 70 Hz (see *Timing numbers*).
- In the original block diagram, the BRAM's read data goes straight to the panel.
  Here it passes through `sync_out`, which widens each stored byte into 3 panel bytes
  and registers it. This follows from storing one bit per pixel, which the 9600-byte
  screen size calls for.
- The panel's setup and hold times were not available. With the default divider, CP
  is high for 160 ns. `D` is stable 100 ns before CP rises and 60 ns after it
  falls. Check these against the panel's data sheet.

## Not included

- The processor core, its program memory and the software: trilateration,
  calibration and averaging over the last 8 results. The processor reaches the
  fabric through the `cpu_*` ports.
- The SPI controller for a planned radio link, which the source system never used.
  Its bus slot is brought out as the `spi_*` ports.
- The transmitter (microcontroller generating 40 kHz bursts, RS-232 line drivers as
  high-voltage speaker drivers) and the receivers (microphone, active high-pass
  filter, rectifier, Zener clamp to 3.6 V). These are analog and board-level circuits.
  The FPGA sees only their digital pulses.
- The LCD panel and the clock manager.
