# Line-memory-free system interface for a system-on-glass qVGA panel

This design is the digital side of a display interface for a panel whose
driving electronics are built on the glass in low-temperature poly-silicon
(LTPS) thin-film transistors. Two properties of LTPS drive it:

* **Logic is slow.** About 15 MHz is the ceiling.
* **Devices vary a lot.** A PLL cannot be built reliably, and an LVDS
  receiver's input offset can be larger than the LVDS signal itself.

A conventional timing controller receives red, green and blue in parallel at
a high link rate. It recovers the clock with a PLL and re-orders the data in a
**line memory**. On glass, that memory would take a large area. This design
removes both the PLL and the line memory:

1. **Colour-sequential transfer.** The data driver has 240 channels. Each
   channel feeds three sub-pixel columns (R, G, B) through 1:3 switches
   selected by PSC, so it drives one colour of a line at a time. The graphics
   controller therefore sends sub-pixels in exactly that order: the 240 red
   values of a line, a gap, the 240 green values, a gap, the 240 blue values.
   One 6-bit sub-pixel goes per clock, one bit on each of six LVDS lanes.
   Since data arrive in the order they are used and at the rate they are
   used, nothing needs buffering. The price is a dot clock three times the
   usual qVGA 5 MHz, 15 MHz, and a 240-channel shift register where 80
   would otherwise do.
2. **Source-synchronous clocking.** The controller forwards its clock (MCLK)
   and a data-enable (DE) on two more LVDS lanes. On the glass, plain D
   flip-flops clocked by the received MCLK capture the data, as a DDR memory
   interface does. Line and frame timing are not encoded in the data. The
   timing controller derives them from DE alone.
3. **Digital offset calibration at power-up.** Before normal operation, each
   receiver's inputs are shorted. A binary search over a trim code cancels
   its offset. The code is then kept, so no time is set aside later for
   offset cancellation.

Target: qVGA (240 × 320), 6-bit grey scale, 60 frames/s at 15 MHz.

## Block diagram

```
 graphics controller side                  | glass side
                                           |
 frame buffer <- fb_x/fb_y                 |  lvds_offset_cal (cal_clk)  -> trim[8], cal_en
      | fb_rgb                             |        ^ comp[8]
 gc_serializer --tx_d[5:0]--> 6 x lvds_tx ===> 6 x lvds_rx --+
              --tx_de-------> lvds_tx    ===> lvds_rx -------+--> rx_capture (D flip-flops on mclk_rx)
              --tx_mclk-----> lvds_tx    ===> lvds_rx --> mclk_rx     |
                                           |                          v d_q, de_q
                                           |                  timing_generator
                                           |         hst,d,sle,hle |        | vst, vclk
                                           |               data_driver   scan_driver
                                           |        hold[240] + psc |        | gate[320]
                                           |       (output stages and pixel array: analog, outside)
```

`sog_top` wires all of this. Its outputs `hold`, `psc` and `gate` are where
the analog parts begin:

* `hold` goes to the output stages (D/A converters and column buffers);
* `psc` drives the 1:3 column switches;
* `gate` drives the gate lines of the pixel array.

## Link and frame format

| item | value | origin |
|---|---|---|
| data lanes | 6 (one bit of the 6-bit sub-pixel each; bit *i* on lane TX*i*) | document |
| other lanes | MCLK, DE | document |
| sub-pixels per colour period | 240 (DE high) | document |
| gap after each colour | 20 clocks (DE low) | this design |
| line | 3 × (240 + 20) = 780 clocks | follows |
| vertical blanking | 400 extra clocks of DE low, before line 0 | this design |
| frame | 320 × 780 + 400 = 250,000 clocks = 60.0 frames/s at 15 MHz | follows |

The 20- and 400-clock blanking lengths were picked so that a 60 Hz frame at
15 MHz comes out exactly. All four sizes are parameters. The transmitter
changes data on the falling edge of MCLK and the receiver samples on the
rising edge, so each bit is sampled in its middle.

## Timing controller (`timing_generator`)

This is the part that replaces the sync codes and the PLL, and the part to
understand before changing anything. It sees only the captured DE and data,
clocked by the received MCLK. All its outputs are registered, and the data
are delayed by one clock (`d_out`) so that they line up with HST.

Per colour period (DE high for 240 clocks):

```
MCLK   _|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_|‾|_
DE_in  ___|‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾|____________
d_out  -------< D0 >< D1 > ... < D239 >------
HST    -------|‾‾‾‾|_____ ... ________________      (with D0)
SLE    ____________________ ... _____|‾‾‾‾|_______  (240 clocks after HST)
HLE    ____________________ ... __________|‾‾‾‾|__  (one clock after SLE)
PSC    == previous ==|== colour of this period ====
```

* **Frame start.** DE held low for at least `VBLANK_MIN` (64) clocks means
  vertical blanking. The next DE rise is red of line 0: the colour count
  restarts at red and VST rises. VST stays high until the next DE rise.
  Until the first blanking after reset has been seen, no control pulses
  come out. So a receiver that starts in mid-frame waits for the next frame.
* **Colour.** Each later DE rise advances the colour R → G → B → R.
  `psc` takes the new colour at the DE rise (00 red, 01 green, 10 blue).
* **Scan clock.** VClk rises at each red DE rise, i.e. once per line, and
  falls at the green DE rise. The scan driver shifts on the rising edge and
  sees VST high only at the first line of a frame.

Both SLE and HLE mark "one colour completely transferred". The document does
not fix their order, their width, the VClk duty cycle or the VST width. The
choices above are this design's.

## Data driver (`data_driver`)

* **Shift register.** HST starts a single token, which advances one channel
  per MCLK (Hclk is MCLK).
* **Sampling latch.** Channel 0 samples the bus with HST. Channel *i*
  samples one clock after channel *i − 1*. HST opens the sampling window and
  SLE closes it.
* **Holding latch.** HLE copies all 240 sampled values into the holding
  latch at once. The holding latch presents one colour to the output stages
  for the whole of the following colour period, while the next colour is
  being sampled.

`hold` therefore shows colour *c* of line *y* from just after that colour's
HLE to the next HLE. During that time `psc` is already *c* and the gate of
line *y* is on. The top-level testbench writes the panel model exactly
there: column 3·i + PSC of the selected row.

## Scan driver (`scan_driver`)

A 320-stage shift register. VST enters stage 0 on a VClk rise, and the token
moves one line per VClk rise, so gate line *k* is on for line time *k*.
It runs on MCLK and detects VClk rises, rather than using VClk as a clock.

## LVDS receivers and offset calibration

`lvds_tx` and `lvds_rx` are **behavioural models** of analog circuits. They
use `real` voltages in millivolts and are not synthesizable.

* **Transmitter.** 350 mV differential swing around 1.2 V. These are usual
  LVDS levels, not values from the source design.
* **Receiver.** It has a fixed input offset (`OFFSET_MV`). A 7-bit trim code
  adds (code − 64) × 10 mV, so it can cancel offsets from −640 mV to
  +630 mV. `cal_en` shorts the two inputs.

`lvds_offset_cal` is synthesizable logic on its own clock, `cal_clk`. The
received MCLK is useless until the MCLK receiver itself is calibrated, so it
cannot run the calibration. After reset it calibrates all eight receivers in
parallel:

* the trim starts at mid-code;
* for each of the 7 bits, MSB first, it sets the bit, waits `SETTLE` (4)
  clocks, and clears the bit again if the comparator still reads 1;
* the result is the largest code whose remaining offset is ≤ 0, so the
  residual lies in (−10 mV, 0].

This meets the source's goal of under 15 mV, well within the 100 mV that
error-free reception needs. It takes 7 × 5 = 35 `cal_clk` cycles. `cal_done`
then rises, and `sog_top` releases the glass-side logic from reset through
a two-flop synchroniser on the received MCLK.

`sog_top`'s `RX_OFFSET_MV` parameter holds example offsets of up to ±510 mV.
Several of these exceed the signal swing, so the link would fail without
calibration.

## What follows the source design, and what does not

Taken from the source design:

* colour-sequential order on six lanes with DE and a forwarded MCLK;
* no PLL, and data captured by flip-flops on the received clock;
* no line memory;
* HST/VST started by DE, SLE/HLE at the end of each colour, PSC codes
  00/01/10, PSC changing while DE is high;
* 240-channel shift register, sampling latch and holding latch;
* offset compensated digitally at power-up and the result reused;
* 15 MHz, 6-bit, qVGA at 60 frames/s.

This design's own choices:

* blanking lengths and the 64-clock blanking-detection threshold;
* pulse widths and order (HLE one clock after SLE);
* VClk duty and VST width;
* the token-addressed sampling latch and SLE as the window close;
* the binary-search calibration, trim width and step, settling time and
  separate calibration clock;
* the falling-edge launch;
* the frame-buffer read port of the controller side (combinational read).

Not built, because they are analog or external:

* output stages (D/A converters and column buffers);
* the 1:3 column switches and the pixel array;
* the graphics controller itself and its frame memory;
* the on-glass DC-DC converter.

Of these, only the transmit order of the graphics controller is designed
here (`gc_serializer`).

## Files

| file | content |
|---|---|
| `rtl/sog_pkg.sv` | panel sizes, blanking lengths, trim width, colour/PSC enum |
| `rtl/sog_top.sv` | whole system |
| `rtl/gc_serializer.sv` | controller-side colour-sequential transmitter |
| `rtl/lvds_tx.sv`, `rtl/lvds_rx.sv` | behavioural LVDS driver and trimmed receiver |
| `rtl/lvds_offset_cal.sv` | power-up offset calibration |
| `rtl/rx_capture.sv` | source-synchronous capture flip-flops |
| `rtl/timing_generator.sv` | HST, SLE, HLE, PSC, VST, VClk from DE |
| `rtl/data_driver.sv` | shift register, sampling latch, holding latch |
| `rtl/scan_driver.sv` | gate-line shift register |
| `tb/tb_<block>.sv` | self-checking testbench per block |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sog_pkg.sv tb/tb_sog_top.sv \
          --top-module tb_sog_top -Mdir obj_top
./obj_top/Vtb_sog_top
```

Swap in any other `tb_<block>` the same way. `tb_sog_top` runs the full
default size (240 channels, 320 lines) for two frames in a few seconds. It
checks:

* that the calibrated trims cancel every lane's offset to within 10 mV;
* that the 320 × 720 sub-pixel array built by a panel model equals the frame
  buffer after each frame;
* that exactly one gate line is on at every HLE;
* the 240-clock HST-to-SLE time, the 780-clock line and the 250,000-clock
  frame (60 frames/s at 15 MHz);
* that each mechanism occurred: calibration, VST, HST, SLE, HLE, all three
  PSC colours, VClk, all 320 gate lines.

The block testbenches use smaller sizes through parameters. They cover
re-synchronisation after a frame that ends on a stray colour period, junk
on the bus outside the sampling window, and data that arrive with no
preceding blanking.

## Changing it

* **Panel size.** Change `CH`/`LINES` on `sog_top`, which are passed to the
  transmitter, data driver and scan driver. Keep `VBLANK` larger than the
  timing generator's `VBLANK_MIN` and `HGAP` smaller than it, or frame
  detection breaks.
* **Frame rate.** Set by the clock period and `HGAP`/`VBLANK`; nothing on
  the glass side depends on the exact line length.
* **Grey depth.** `GRAY_BITS` in `sog_pkg` sets the lane count and latch
  width.
