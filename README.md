# Ukucorn FPGA: strum capture, 1024-point FFT and spectrum link to a Raspberry Pi

The Ukucorn is a ukulele that teaches chords. LEDs under the fretboard show the
chord to play. A piezo contact microphone on the body picks up the strum. The
instrument moves on to the next chord only when the strum contains the right
notes.

This RTL is the FPGA in that loop. It waits until the Pi is ready, then keeps
sampling a 10-bit SPI ADC (MCP3002). The first sample above a trigger level
starts a capture of 1024 samples at about 4.88 kHz. The FPGA runs a radix-2
FFT on the capture and computes a 16-bit squared magnitude for every bin. The
Pi then reads these 1024 words over SPI. At this sample rate the bins are
4.77 Hz apart, which is fine enough to separate neighbouring notes between
C4 (261.6 Hz) and C5. Chord recognition and the LED matrix are software on the
Pi and are not part of this RTL.

```
            +----------------+   sample   +---------------+  bank 0, bit-reversed
 MCP3002 -->| adc_spi_master |----------->| sample_loader |------------+
  (SPI)     +----------------+            +---------------+            v
                                                          +---------------------------+
                                                          | fft_core                  |
                                                          |  fft_agu -> fft_data_block|
                                                          |  twiddle_rom -> fft_bfu   |
                                                          +---------------------------+
                                                                       | spectrum
            +--------------+   16-bit   +---------+   +-------------+  |
 Pi <-------| pi_spi_slave |<-----------| spi RAM |<--| mag_compute |<-+
  (SPI)     +--------------+            +---------+   +-------------+
                         ukucorn_ctrl: listen > idle > load > fft > compute > send
```

## One pass through the controller

`ukucorn_ctrl` runs one capture per pass through six states:

| state   | what happens | leaves when |
|---------|--------------|-------------|
| listen  | nothing (reset state) | the Pi raises `pi_ready` |
| idle    | the ADC converts continuously; each sample is compared with 520 (about 1.68 V of 3.3 V) | a sample is **above** 520 |
| load    | the next 1024 samples are written to FFT bank 0 at bit-reversed addresses | the 1024th sample is stored |
| fft     | 10 levels of 512 butterflies | the FFT signals done |
| compute | squared magnitudes of all bins are written to the SPI RAM | the pass is done |
| send    | `spi_read` is high; the Pi clocks out 2048 bytes | the Pi raises `spi_stop` |

With the default clocks, one pass takes this long after the trigger:

* load: 1024 samples x 1024 core clocks, about 210 ms;
* fft: 5151 core clocks, about 1 ms;
* compute: 514 core clocks;
* send: 2048 bytes at the Pi's SPI clock, about 41 ms at 400 kHz.

## The FFT engine (`fft_core`)

This is the part that needs the most care. The engine is an in-place radix-2
decimation-in-time FFT that completes one butterfly per clock. Its parts are:

* **Input order.** `sample_loader` writes sample *n* to address bitrev(*n*),
  with the 10-bit code as the real part and 0 as the imaginary part. Because
  the input is bit-reversed, the output comes out in natural order.

* **Addressing (`fft_agu`).** A level counter *i* (0..9) and a butterfly
  counter *j* (0..511) drive the addresses. Butterfly *j* of level *i* works
  on the two words at rot*ᵢ*(2*j*) and rot*ᵢ*(2*j*+1). Here rot*ᵢ* rotates the
  10-bit address left by *i*. The two addresses differ only in bit *i*, so
  they are the usual pair *p* and *p* + 2*ⁱ*. Their low *i* bits hold the
  butterfly's position *m* inside its group. Those bits are the top *i* bits
  of *j*. Masking *j* down to its top *i* bits therefore gives the twiddle
  index *m*·N/2*ⁱ*⁺¹ directly. No multiplier is needed.

* **Ping-pong banks (`fft_data_block`).** There are two two-port RAMs of
  1024 x 32 bits. Level *i* reads bank *i*[0] and writes the other bank, so a
  level never overwrites data it has yet to read. Each clock reads a pair of
  words and the twiddle factor, which takes one clock because RAM and ROM are
  synchronous. In the next clock the butterfly output is written to the same
  two addresses in the other bank. With an even number of levels, the last
  level writes bank 0, and the spectrum is read from there.

* **Flush counter.** At the end of each level a 2-bit counter *k* counts
  1, 2, 3 before the next level starts, so the last write lands before the
  next level reads. A level therefore takes N/2 + 3 = 515 clocks. The whole
  transform takes 10·515 clocks, and `done` comes 5151 clocks after `start`.

* **Arithmetic (`fft_bfu`, `twiddle_rom`).** Values are 16-bit two's
  complement. Twiddles are Q1.15: round(32767·cos) and round(−32767·sin) of
  2πk/1024. The product B·W is kept as bits [30:15] of the 32-bit result,
  i.e. truncated. A' = A + T and B' = A − T wrap at 16 bits. There is **no
  scaling between levels.** The samples are unsigned, so the DC bin
  (about 500 x 1024) always wraps. Every other bin is only ever multiplied by
  its own twiddles, so it is not affected by the DC bin wrapping. A tone stays
  exact while its amplitude × 512 fits in 16 bits, i.e. up to about 64 codes
  peak. Truncation costs about one LSB per level, and that error doubles from
  level to level. As a result, the DC bin reads about 20 % low and strong
  bins read a few percent low. This is fine for finding peaks.

* **Magnitude (`mag_compute`).** The Pi receives (re² + im²) >> 15, cut to
  16 bits. This is the squared magnitude, not its square root. Two bins are
  processed per clock.

## The two SPI links

**ADC (`adc_spi_master`).** `adc_clk` is the core clock divided by 64
(78.1 kHz). A frame is 16 ADC clocks:

* in clocks 0..3, the FPGA sends the configuration start=1, single-ended=1,
  channel=0, MSB-first=1;
* in clock 4, the ADC sends its null bit;
* in clocks 5..14, the ADC sends B9..B0, which the FPGA samples on rising
  edges;
* in clock 15, chip select goes high for one ADC clock, which starts the next
  conversion.

The result is one sample every 1024 core clocks (4882.8 samples/s).

**Raspberry Pi (`pi_spi_slave`).** The Pi is the master. It uses SPI mode 0,
MSB first, and there is no chip select. The slave sends each 16-bit word of
the SPI RAM as two bytes: first bits [15:8] (`spi_cycle` = 1), then bits
[7:0] (`spi_cycle` = 0). After the second byte, `spi_addr` advances. Bytes
are framed by counting eight clocks from the start of the send state, so the
Pi must clock whole bytes. The slave does not use the bits the Pi sends on
MOSI; they are only shifted into `rx_byte`. The Pi's `sclk` is sampled by the
5 MHz core clock, so it may run at up to about a tenth of the core clock
(500 kHz). Tested rates are 400 kHz with the 5 MHz core (full size) and 2 MHz
with a 20 MHz core (reduced test).

## Clocks and reset

`clk_40m` is the board clock. `clk_div` divides it by 8 into the 5 MHz core
clock, which runs every other register. `reset` is asynchronous and active
high. It clears the divider at once, which holds the core clock low while
reset lasts. The synchroniser is set asynchronously by `reset` and releases
two core clocks after it. Every core register resets synchronously, on the
first core clocks after `reset` falls. Until then the state outputs are not
defined. RAM contents are not reset. A capture always rewrites all 1024
words before they are read.

## Where this RTL departs from the original description

The original Ukucorn report comes with its own SystemVerilog. This RTL is a
rewrite of the same hardware, with these differences:

* **Pi SPI clocking.** The original slave runs on the Pi's `sclk`, and the
  spiRam clock is switched between `sclk` and the core clock. Here `sclk` is
  oversampled in the core clock domain, so the design has one clock domain
  after the divider.
* **ADC SPI clocking.** The ADC master likewise uses the divided ADC clock
  only as a pin, with its edges used as enables.
* **Result bank.** The original reads the FFT result from bank 1, but its last
  (tenth) level writes bank 0. This RTL reads the bank that the last level
  actually writes.
* **Start/done pulses.** Blocks are started by one-clock pulses from the
  controller on state entry, and report a one-clock `done`. The original
  derives them from state levels and their edges. The AGU's write enable is a registered
  "read valid" rather than a decode of *j* and *k*; the timing is the same.
* **Twiddle table.** The original does not publish its twiddle table. The
  values used here (scale 32767, round half away from zero) are this design's
  choice. The table is `rtl/twiddle_rom.hex`, one `{re,im}` word per line,
  computed with the formula above. Its address is scaled by 1024/N, so the
  same file serves smaller test sizes.
* **Trigger and samples stored.** The trigger is 520 codes, as in the original
  code. The description calls it "about 1.6 V" (exactly 1.6 V would be 496).
  The sample that fires the trigger is not stored; the next 1024 are.
* **Byte order on the Pi link.** The high byte goes first, which matches how
  the Pi software assembles the word.
* **Pi SPI clock rate.** The description quotes both 400 kHz and 200 kHz;
  either works.
* **spi_stop.** On `spi_stop` the controller returns to listen, not to idle,
  so the Pi must raise `pi_ready` again.

Not built, because it is not logic in the FPGA:

* the piezo microphone and its 4th-order low-pass filter and amplifier;
* the ADC itself (a behavioural model of its SPI side is in
  `tb/mcp3002_model.sv`);
* the Raspberry Pi, its chord-recognition software and the 4 x 5 LED matrix
  it multiplexes.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ukucorn_top` | `LOGN` | 10 | N = 2^LOGN points (≤ 10, the twiddle table's size) |
| | `CLK_DIV_LOG2` | 3 | core clock = 40 MHz / 2^3 |
| | `ADC_SCLK_DIV_LOG2` | 6 | ADC clock = core / 2^6 |
| | `TRIGGER` | 520 | capture starts on a sample above this |
| | `TW_FILE` | `rtl/twiddle_rom.hex` | twiddle table, path relative to the simulator's working directory |

Sample rate = 40 MHz / 2^CLK_DIV_LOG2 / 2^ADC_SCLK_DIV_LOG2 / 16.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=… failures=…`. The main ones:

* `tb_fft_core` runs tones, a two-tone mix, a step and random data through
  the 1024-point core. It compares every bin bit for bit with a textbook FFT
  (`tb/fft_ref_pkg.sv`) that uses the same fixed-point rules. It also compares
  the strong bins with a floating-point DFT, and checks the 5151-clock latency.
* `tb_fft_core_32` builds the core for 32 points, the size used to bring a
  design like this up in simulation. It checks all bins bit for bit, and
  against a floating-point DFT within 3 %, for five test vectors. Five levels
  is odd, so this test also covers reading the result from bank 1.
* `tb_fft_agu` checks every address, twiddle index, bank and write of the
  sequence against the textbook butterfly order, for N = 32 and N = 1024.
* `tb_adc_spi_master` checks the ADC master against `mcp3002_model`: codes,
  configuration bits, chip-select width, ADC clock period and sample spacing.
* `tb_ukucorn_top` runs two complete rounds at N = 256 with faster clocks. It
  uses `tb/e2e_harness.sv`, a board model with the ADC model fed by a
  synthetic C6 strum and a Pi model acting as SPI master. The harness rebuilds
  the captured samples from the ADC log and checks all magnitudes the Pi
  receives bit for bit. It checks that the four strongest bins are the four
  open strings. It also counts that every mechanism happened: listen wait,
  ignored quiet samples, trigger, capture, FFT, magnitudes, send, stop,
  re-arm.
* `tb_ukucorn_top_full` does one round with every parameter at its default:
  40 MHz clock, 1024 points, 4883 samples/s, Pi at 400 kHz. That is about
  0.27 s of simulated time and runs in a few seconds.
* `tb_ukucorn_strings` is the instrument test at the default size. It plucks
  each open string alone, then strums the chord (five captures). The Pi reads
  at 200 kHz here, the other rate the original design quotes. Each single
  string must peak within 1.5 bins of its frequency. With the synthetic
  signal, the peaks land at bins 55, 69, 82 and 92 (262.3, 329.0, 391.0 and
  438.7 Hz for 261.63, 329.63, 392 and 440 Hz).

To run a testbench with Verilator from the repository root (the twiddle file
is opened by a path relative to it):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ukucorn_pkg.sv \
  tb/tb_ukucorn_top_full.sv --top-module tb_ukucorn_top_full -o sim
./obj_dir/sim
```

Replace the file and the top module to run any other testbench.

## Files

`rtl/`:

* `ukucorn_pkg.sv`: state encoding, complex type and default sizes;
* `ukucorn_top.sv`: the top level;
* `ukucorn_ctrl.sv`: the controller;
* `clk_div.sv`: the core clock divider;
* `adc_spi_master.sv`, `sample_loader.sv`: the capture path;
* `fft_core.sv`, `fft_agu.sv`, `fft_data_block.sv`, `tp_ram.sv`,
  `twiddle_rom.sv` (with `twiddle_rom.hex`), `fft_bfu.sv`: the FFT;
* `mag_compute.sv`, `pi_spi_slave.sv`: the path to the Pi.

`tb/` holds the testbenches and these helpers:

* `mcp3002_model.sv`: behavioural model of the ADC's SPI side;
* `e2e_harness.sv`: board model for the top-level tests;
* `fft_ref_pkg.sv`: bit-exact FFT reference;
* `agu_run.sv`: helper for `tb_fft_agu`.
