# Room EQ correction peripheral

This design is an FPGA peripheral for the DE1-SoC board. It measures how a room
colours sound and then corrects the audio in real time. It works in two phases.

**Calibration.**
1. The FPGA plays a 5-second logarithmic sine sweep (20 Hz to 20 kHz) out of
   the codec's line output.
2. It records what a microphone on the line input hears.
3. It passes an 8192-sample window of that recording through an FFT core and
   keeps the 4097 half-spectrum bins.
4. Software on the ARM side (the HPS) reads the bins and designs an inverse
   filter: 128 taps per channel in Q1.23.
5. The HPS writes the taps back into the FPGA.

**Real-time correction.** From then on, every stereo sample from the codec runs
through a 128-tap FIR filter inside the FPGA and goes back out to the DAC. The
HPS takes no part in the audio path.

The fixed numbers are:
- 48 kHz, 24-bit audio;
- an 8192-point FFT;
- 128 FIR taps per channel in Q1.23.

The 50 MHz system clock leaves about 1041 cycles per audio frame. Everything
that runs at the sample rate is in the fabric. Codec set-up over I2C and the
filter design are software and are not part of this RTL.

## The three data paths

```
                         +----------------------+
 HPS (Avalon-MM) <-----> |      avalon_csr      | --> irq
                         +----------------------+
                           | ctrl        ^ status, bins, capture words
                           v             |
                  calibration_sequencer  |   (IDLE/SWEEP/CAPTURE/FFT/DONE/ERROR)
                           |
 sweep-out    sweep_generator (sine_lut) --------------+
                                                       v
 real-time    i2s_rx --> fir_engine (coef_ram,   --> i2s_tx --> DACDAT
              ^          delay_line_ram)
 ADCDAT ------+
              +--> capture_writer --> [dcfifo] --> capture_reader --> fft_engine
 calibration                                          [FFT core]       |
                                                     fft_result_ram <--+
```

- **Sweep-out.** A start written to `CTRL` moves the sequencer into SWEEP. The
  sweep generator then hands the I2S transmitter one sample per frame. The same
  sample goes to both DAC channels.
- **Calibration.** The left ADC channel is the microphone. From the start of the
  sweep, the capture writer pushes the first 8192 mic samples into the dual-clock
  FIFO. After the sweep, the capture reader streams them as one AvalonST packet
  (valid/ready, sop/eop) into the FFT core. `fft_engine` then writes bins
  0..4096 and the block exponent into `fft_result_ram`.
- **Real-time.** Each received stereo frame crosses into the system clock and
  runs through the FIR. The result crosses back and is sent on the next free
  frame. While a sweep is playing, the sweep takes priority over this path.

The PLL, the dual-clock FIFO (Altera `dcfifo`) and the FFT core (Altera FFT IP)
are vendor parts. They are not in `rtl/`: the top module `room_eq_peripheral`
brings their signals out as ports (see *External parts*).

## Clock domains and crossings

Two clocks run the design.

| Clock | Frequency | Runs |
|---|---|---|
| `clk` | 50 MHz | register file, sequencer, capture reader, FFT wrapper and result RAM, FIR |
| `xck` | 12.288 MHz (from the PLL) | I2S clock divider, transmitter, receiver, sweep generator, capture writer |

`i2s_clock_div` divides XCK by 4 to get BCLK (3.072 MHz), and BCLK by 64 to get
LRCK (48 kHz). Both are registered outputs. The blocks that use them do not
clock on BCLK. They act on one-cycle strobes (`bclk_rise`, `bclk_fall`,
`lr_toggle`) in the XCK domain, so the whole codec side is a single clock
domain.

Everything that crosses between the two domains:

- **Single-bit levels** go through `cdc_sync`, a two-flop synchronizer. The
  crossing bits are:
  - sweep request and capture enable (clk to xck);
  - sweep done and capture overflow (xck to clk);
  - the XCK-side copy of the reset, which powers up asserted.

  The sequencer only acts on levels, so these bits carry no pulses.
- **Mic samples for the FFT** cross in the external `dcfifo`. The write side is
  on XCK and the read side on clk, in show-ahead mode.
- **The stereo word of each frame** crosses in `sample_cdc`, in both
  directions: ADC to FIR and FIR to DAC.
  - The source holds the word and flips a toggle bit.
  - The toggle crosses through `cdc_sync`.
  - The destination copies the word, which has been stable for several cycles
    by then.

  A frame is 256 XCK or about 1041 clk cycles long, so the word never changes
  during the handshake.
- **SWEEP_LEN** (32 bits) goes straight into the sweep generator. It is
  written by the HPS before a start and is read only when the sweep starts.

A soft reset is `CTRL` bit 2. It clears the calibration side in the clk domain:
- the sequencer;
- the capture reader;
- the FFT wrapper;
- the FIFO, through `capfifo_aclr`;
- the FFT core, through `fft_core_reset`.

The FIR path and the I2S side keep running.

## Calibration sequence

The sequencer has the states below. The `STATUS[10:8]` encoding is given in
brackets.

```
IDLE(0) --start_sweep--> SWEEP(1) --SWEEP_LEN samples emitted--> CAPTURE(2)
CAPTURE --8192 samples streamed--> FFT(3) --FFT complete--> DONE(4)
CAPTURE --capture overflow--> ERROR(5)
DONE, ERROR --soft_reset--> IDLE          (soft_reset also aborts SWEEP/CAPTURE/FFT)
```

Timing details that matter when using it:

- **When capture happens.** Capture is enabled through SWEEP and CAPTURE, so
  recording starts with the sweep. The window is the first 8192 samples after
  the start: 0.17 s of a 5 s sweep, which covers roughly 20–25 Hz. The sweep
  keeps playing to its end. Only when SWEEP_LEN samples have been emitted does
  the sequencer enter CAPTURE and drain the FIFO into the FFT. The FIFO
  therefore has to hold the whole window, which is why it is 8192 deep.
- **Overflow.** If the FIFO is full when a mic sample is due, the writer sets
  `capture_overflow` and stops. In CAPTURE, an overflow takes priority: the
  sequencer goes to ERROR and does not drain. The words captured so far stay in
  the FIFO, and the HPS can read them through `CAPTURE_DATA` for debugging.
- **Flags.** `sweep_done`, `capture_overflow` and `fft_done` are sticky. A new
  start or a soft reset clears them.
- **Starting again.** `start_sweep` is taken only in IDLE. After DONE or ERROR
  the driver writes a soft reset and then starts again.
- **The FFT wrapper** is armed on the first CAPTURE cycle. It forwards the
  packet and sets the imaginary input to 0. It keeps the result bins whose index
  is at most N/2 and takes the exponent from the first result beat. It reports
  completion on the last result beat.

The sweep follows a geometric-increment phase accumulator:

```
inc   <- inc * k,  k = exp(ln(F1/F0) / SWEEP_N)
phase <- phase + inc
out   =  sine(phase)
```

- `k - 1` is about 2.9e-5, too small for a plain 32-bit increment. The increment
  therefore carries 16 extra fraction bits below the 32-bit phase. The multiply
  is done as `inc + (inc * K_FRAC) >> 32`.
- `K_FRAC` and the start increment are computed at elaboration from
  `FS, F0, F1, SWEEP_N`.
- A run-time `SWEEP_LEN` different from `SWEEP_N` changes where the sweep ends,
  not how fast it rises.
- The 13 most significant phase bits index `sine_lut`. This is a 2049 × 23-bit
  quarter-wave table, also computed at elaboration as
  `round((2^23-1) * sin(pi/2 * i/2048))`, with mirroring for the other
  quadrants.
- The output is full scale.

## Real-time FIR

`fir_engine` computes `y[n] = sum_{k=0..127} h[k] * x[n-k]` for each channel.
It has one multiplier per channel, and the two channels run side by side.

**Timing and arithmetic.**
- Each sample takes 128 MAC cycles plus a 3-stage pipeline: address, RAM read,
  then the registered 24×24 product into a 56-bit accumulator.
- `out_valid` comes 131 cycles after `in_valid`, well inside the 1041-cycle
  frame.
- The sum is rounded half-up at bit 23 and saturated to Q1.23.

**Memories.**
- The delay line (`delay_line_ram`, 128 × 48 bits) is circular and indexed mod
  128.
- The taps sit in `coef_ram`, two banks of 128 × 24 bits.
- Through `COEF_DATA`, indices 0–127 are the left taps and 128–255 the right
  taps, with index k holding h[k].
- The delay line is cleared after reset, which takes 128 cycles.

**Modes.**
- `CTRL.bypass` passes the input to the output one cycle later.
- Otherwise, `CTRL.fir_enable` low gives silence.
- `STATUS.fir_ready` means the engine is enabled and its delay line has been
  cleared.

The whole ADC-to-DAC path adds a fixed latency of a few frames.

## Register map

The bus is an Avalon-MM slave with word addresses. It has no wait states and a
fixed read latency of 2 cycles, marked by `avs_readdatavalid`.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0 | CTRL | R/W | [0] start_sweep (write 1 pulses it, reads 0), [1] fir_enable, [2] soft_reset (pulse), [3] bypass |
| 1 | STATUS | R | [0] sweep_done, [1] capture_overflow, [2] fft_done, [3] fir_ready, [4] busy, [10:8] state |
| 2 | IRQ_MASK | R/W | [3:0] enables for STATUS[3:0]; `irq = |(STATUS[3:0] & IRQ_MASK)` |
| 3 | SWEEP_LEN | R/W | sweep length in samples, reset 240000 |
| 4 | CAPTURE_ADDR | R/W | count of captured words read |
| 5 | CAPTURE_DATA | R | next captured sample, sign-extended; the read pops the FIFO and increments CAPTURE_ADDR |
| 6 | FFT_ADDR | R/W | bin index 0..4096 |
| 7 | FFT_DATA_RE | R | real part of bin FFT_ADDR, sign-extended |
| 8 | FFT_DATA_IM | R | imaginary part; the read increments FFT_ADDR (wraps after 4096) |
| 9 | FFT_EXPONENT | R | block exponent of the frame, sign-extended |
| 10 | COEF_ADDR | R/W | tap index 0..255 |
| 11 | COEF_DATA | W | writes the tap at COEF_ADDR and increments it |
| 12 | VERSION | R | 0x00010000 |
| 13 | SAMPLE_RATE | R | 48000 |
| 14 | TAP_COUNT | R | 128 |
| 15 | SCRATCH | R/W | free |

A driver uses the registers in this order:
1. Write `IRQ_MASK = 4` (optional).
2. Write `CTRL = 1`.
3. Wait for `STATUS.fft_done` or the irq.
4. Write `FFT_ADDR = 0`, read `FFT_EXPONENT`, then read RE and IM 4097 times.
5. Design the filter.
6. Write `COEF_ADDR = 0`, then write `COEF_DATA` 256 times.
7. Write `CTRL = 2` to enable the FIR.

The bins are scaled by the block exponent: the true value is
`bin * 2^exponent`, with the exponent as the core delivers it.

## External parts

| Part | Ports on the top | What this RTL expects |
|---|---|---|
| PLL | `xck` input | 12.288 MHz; it is also driven out as `aud_xck` |
| Capture FIFO (dcfifo) | `capfifo_aclr, _wrreq, _data, _wrfull, _rdreq, _q, _rdempty` | 24 bits wide, 8192 deep, write clock `xck`, read clock `clk`, show-ahead (`q` is the head word, `rdreq` acknowledges it) |
| FFT core | `fft_core_reset`, `fft_sink_*`, `fft_inverse`, `fft_source_*` | 8192-point, streaming AvalonST, block floating point, natural output order, 24-bit data and 6-bit exponent, reset active high |
| Codec | `aud_xck, aud_bclk, aud_daclrck, aud_adclrck, aud_dacdat, aud_adcdat` | I2S slave mode, 24 bits. The FPGA is master, and ADC and DAC share LRCK (low = left). Data begins one BCLK after the LRCK edge, MSB first, in a 32-bit slot. |

The codec's I2C set-up (I2S format, 24 bits, 48 kHz, line input) is left to
software.

## Departures and limits

- **The bus is Avalon-MM, not AXI.** The block is named and built as an
  Avalon-MM slave, as a Platform Designer component. The HPS reaches it through
  the HPS-to-FPGA AXI bridge.
- **The FFT window is the first 8192 samples of the sweep.** The sweep is
  240000 samples long, but only the start of the room's response to it is
  transformed. This covers roughly 20–25 Hz. Using a different part of the
  sweep, or averaging several windows, would need a change to `capture_writer`.
- **The capture can only be read in order.** `CAPTURE_DATA` reads work only
  while the sequencer is not draining the FIFO. That is the case before CAPTURE
  or after an overflow, but not after a successful run, when the samples have
  gone into the FFT. `CAPTURE_ADDR` counts reads but cannot seek.
- **Soft reset works from every state.** It also aborts a running calibration,
  not only DONE and ERROR.
- **DONE is left only by a soft reset.** A new start is accepted only in IDLE.
- **The FIR uses two multipliers, one per channel.** Each works 128 cycles per
  sample. A single shared multiplier would need 256 cycles, which would also fit
  in a frame.
- **Choices not fixed by the specification.** These include:
  - the microphone channel (left);
  - sweep on both output channels;
  - rounding and saturation;
  - the bypass and enable meaning;
  - tap order;
  - the register offsets and bit positions.

## Simulation

Every block in `rtl/` has a self-checking testbench `tb/tb_<block>.sv`.
- Each one prints `TB_RESULT checks=N failures=M`.
- Each one has a watchdog.
- Reference values are computed independently in the testbench, for example a
  real-valued sine, a software FIR, or an I2S bit-level model.

Behavioural models of the external parts are in `tb/`:
- `wm8731_model.sv`: the codec's I2S side;
- `dcfifo_model.sv`: a FIFO whose usable depth can be limited at run time to
  force an overflow;
- `fft_core_model.sv`: a radix-2 FFT with block exponent, checked against the
  packet framing.

Two end-to-end testbenches share `tb/tb_room_eq_body.svh`:

- `tb_room_eq_peripheral`: the top with an FFT length of 64 and a 100-sample
  sweep. It runs in under a second.
- `tb_room_eq_full`: the top at its default parameters (8192-point FFT, 128
  taps, full 240000-sample sweep). It simulates 5 s of audio time in about
  2.5 minutes.

Both run the same four phases:
1. An overflow run. The FIFO is limited, the sequencer ends in ERROR, and the
   captured words are read back and compared with the mic stream.
2. A complete calibration in codec loopback:
   - the DAC carries exactly SWEEP_LEN sweep frames;
   - the FFT input is N consecutive mic samples;
   - all bins and the exponent read through the registers match the core;
   - the irq fires.
3. 256 coefficients are written and the FIR is enabled. The DAC must equal a
   software FIR of the ADC input.
4. Bypass.

Each of these mechanisms is counted. A testbench fails if any of them never
happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/room_eq_pkg.sv \
    tb/tb_room_eq_full.sv --top-module tb_room_eq_full -Mdir obj_full
./obj_full/Vtb_room_eq_full
```

The unit testbenches build the same way, with the package first and the
testbench as the top; the modules they use are found through `-Irtl -Itb`.
The simulator has only two states, so every register that is read has a reset
value. The testbenches also pass with `+verilator+rand+reset+2`.
