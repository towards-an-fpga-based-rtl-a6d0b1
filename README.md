# Ultra-low-latency audio DSP on an FPGA: one-sample processing core with an I2S codec link

Audio processing on a PC or a phone adds milliseconds of delay because samples are
grouped into buffers. This design does not use buffers. Each audio sample that arrives
from the codec is processed on its own, by dedicated logic, and the result goes back to
the codec in the next sample period. With a codec running at 768 kHz and 16-bit samples,
the programmable logic adds two sample periods, 2.6 µs, between the analog-to-digital and
digital-to-analog converters. In a complete system of this kind, a low-latency codec
brings the round trip from analog input to analog output to about 11 µs.

The RTL is the programmable-logic side of an ARM + FPGA system-on-chip (a Zynq-7010 class
device):

```
            I2S (bclk, ws, sd_rx[], sd_tx[])                 AXI4-Lite
  codec <----------------------------------> i2s_transceiver      ARM  (not in the RTL)
                                               |  ^                |
                                rx frame, tick |  | tx frame       v
                                               v  |          axil_ctrl_regs
                                              faust_ip <---- control words
                                          (one DSP program)
```

The DSP work is split by rate:

* **Initialisation and control rate.** Constants, and anything that depends only on user
  controls (a frequency knob, for example), are computed in software on the ARM. The ARM
  writes the results into a small control register file. It does this in a loop, as often
  as it can.
* **Audio rate.** Only the per-sample arithmetic is done in logic. The program's
  "compute one sample" step runs once per audio frame, inside `faust_ip`.

In the example program, a sine oscillator, the ARM computes `sin` and `cos` of the phase
step, so the logic only needs four multiplications and three additions per sample.

## Where the latency comes from

The timing of the audio path is the key to this design. All counts below are in I2S
frames, where one frame is one stereo sample period (`2*BIT_DEPTH` bit clocks):

| frame | codec → FPGA (`sd_rx`)     | inside the FPGA                                                     | FPGA → codec (`sd_tx`) |
|-------|----------------------------|---------------------------------------------------------------------|------------------------|
| n     | sample x[n] is shifted in  | —                                                                   | y[n-2]                 |
| end n | —                          | `rx_valid` pulse: x[n] is available in parallel; the FAUST IP starts computing y[n] and publishes y[n-1] | —                      |
| n+1   | x[n+1]                     | y[n] is computed (1–2 clock cycles) and held inside the IP          | y[n-1]                 |
| end n+1 | —                        | tick: y[n] is published to the transceiver                          | —                      |
| n+2   | x[n+2]                     | transceiver loads y[n] at the first falling bclk edge               | **y[n]**               |

The MSB of y[n] leaves exactly two frames after the MSB of x[n] arrived:

* **One frame in the transceiver.** A sample cannot be used before its last bit is in.
* **One frame in the FAUST IP.** The IP always publishes its result at the next sample
  tick, never earlier. Its latency is therefore one sample, whatever the program's own
  cycle count.

The fixed latency holds as long as the computation finishes within one frame. With the
defaults, a frame is 160 clock cycles. The pass-through program takes 1 cycle and the
oscillator takes 2. If a program is still busy at the next tick, that tick is an
**overrun**: the new input is dropped, the output repeats its last value, and `overrun_o`
pulses and a counter increments.

A codec model sees the delay from its own falling bclk edge (when it drives the MSB) to
its own rising edge (when it samples the MSB of the echo). That delay is two frames plus
the low phase of bclk. The end-to-end testbench checks this exact number of clock cycles.

## I2S transceiver (`i2s_transceiver`)

The FPGA is the I2S bus master. It generates one bit clock (`bclk_o`) and one word select
(`ws_o`). Any number of data lines (`NUM_LINES`) share these two signals, and each line
carries one stereo pair in each direction. Adding a stereo pair therefore costs one pin
per direction.

* **Frame.** A left slot (`ws = 0`) is followed by a right slot (`ws = 1`). Each slot is
  exactly `BIT_DEPTH` bits, so `f_bclk = fs × 2 × BIT_DEPTH`. Samples of any width ≥ 2
  work. Sending 16-bit samples instead of 24-bit ones allows a higher frame rate at the
  same bclk.
* **Bit timing (Philips I2S).**
  * `ws` and `sd_tx` change on the falling edge of bclk.
  * `ws` changes one bit clock before the MSB of a slot.
  * Data is sent MSB first.
  * `sd_rx` is sampled on the rising edge of bclk.
* **Clocking.** bclk is `clk / BCLK_DIV`. It is low for `BCLK_DIV - BCLK_DIV/2` cycles
  and high for `BCLK_DIV/2` cycles, so odd dividers work. Everything stays in the single
  `clk` domain.
* **Parallel side.**
  * `rx_sample_o` / `rx_valid_o`: all channels of a frame, one cycle after the rising edge
    that sampled the last right-channel bit.
  * `tx_sample_i`: captured on the first falling edge of each frame, marked by
    `tx_load_o`.
  * Channel `c` of line `l` is index `2*l + c`, with `c = 0` for left.

## FAUST IP (`faust_ip`) and its programs

`faust_ip` wraps a single "compute one sample" core. The `PROGRAM` parameter
(`syfala_pkg::faust_prog_e`) chooses the core. On each `sample_tick_i` pulse:

1. `out_o` takes the core's previous result.
2. The core starts on `in_i` and takes a copy of the control words. A sample never sees
   a partly updated word. An update that spans several words is applied at once only if
   the ARM writes all of them within one frame.

A core has a start/idle/done handshake, and produces one result per start. Status
outputs give the number of samples computed, the number of overruns, and the cycle count
of the last computation (the figure that has to stay below one frame).

**`faust_passthrough_core`** copies inputs to outputs in one cycle. It is the program for
latency measurements.

**`faust_nlf2_core`** is a sine oscillator. It is a second-order normalised waveguide
resonator with radius 1, excited by a unit impulse on its first sample:

```
rec0' = s*rec1 + c*rec0
rec1' = imp + c*rec1 - s*rec0        imp = 1 on the first sample only
out[0] = out[1] = rec1'              ->  out[n] = cos(n*th)
```

The ARM computes the control words: `ctrl[0] = th = 2π·freq/fs` (not used in logic),
`ctrl[1] = sin(th)` and `ctrl[2] = cos(th)`. The default frequency is 440 Hz. The core
uses four multipliers in parallel in the first cycle, and does the sums and the state
update in the second.

**Number format.** The original tool flow computes in single-precision float. This RTL
uses signed fixed point Q2.30 (32 bits, range [-2, 2)) for the control words and the two
state registers. Products are 64 bits wide, and the results are truncated back to Q2.30.
The output is scaled so that 1.0 is `2^(BIT_DEPTH-1)`, then saturated, so the peak of the
cosine is the largest positive code.

## Control registers (`axil_ctrl_regs`)

The ARM writes the control words over an AXI4-Lite slave port. All words are 32 bits and
addresses are byte addresses.

| address      | register                                   | access              |
|--------------|--------------------------------------------|---------------------|
| `0x00 + 4*i` | control word `i`, for `i < CTRL_WORDS`     | read/write, byte strobes honoured |
| `0x80`       | samples computed                           | read only           |
| `0x84`       | overruns                                   | read only           |
| `0x88`       | clock cycles of the last computation       | read only           |

Other addresses, and writes to read-only registers, return SLVERR; a read of an unmapped
address returns 0. Handshakes:

* **Writes.** A write is accepted in the cycle where `awvalid` and `wvalid` are both high
  and no response is pending. `bvalid` follows one cycle later.
* **Reads.** A read address is accepted while no read data is pending. `rvalid` follows
  one cycle later.

Assertions check that the master holds each valid until its handshake.

## Parameters and clocking (`syfala_top`)

| parameter    | default          | meaning |
|--------------|------------------|---------|
| `PROGRAM`    | `PROG_NLF2_OSC`  | DSP program: `PROG_NLF2_OSC` or `PROG_PASSTHROUGH` |
| `BIT_DEPTH`  | 16               | bits per sample and per I2S slot |
| `NUM_LINES`  | 1                | I2S data lines per direction (2 inputs × 2 outputs per line) |
| `BCLK_DIV`   | 5                | clk cycles per bclk period |
| `CTRL_WORDS` | 3                | control words |
| `ADDR_W`     | 8                | AXI4-Lite address width |

A single clock runs everything. The defaults assume `clk = 122.88 MHz`, which gives
bclk = 24.576 MHz and fs = 768 kHz with 16-bit samples, the fastest configuration. For
other rates, choose `clk` and `BCLK_DIV` so that `clk = fs × 2 × BIT_DEPTH × BCLK_DIV`.
Two examples:

* 48 kHz / 24-bit: `clk = 110.592 MHz`, `BCLK_DIV = 48`.
* 48 kHz / 16-bit: `clk = 122.88 MHz`, `BCLK_DIV = 80`.

The reset `rst_n` is active low and asynchronous. All state resets to zero or idle; bclk
starts high, and the first falling edge begins frame 0.

## How far the design goes, and where it departs from the original system

Outside the RTL:

* **The ARM processor.** It runs the control-rate code, reads physical controls (through
  an SPI ADC) or a host GUI (through a UART), and drives the AXI4-Lite port.
* **The codec.** Its I2S port is modelled in the testbenches.
* **External DDR memory.** The original flow uses it for large arrays such as long delay
  lines. The programs here keep all their state on chip, so there is no memory master
  port.

This design's own choices:

* fixed point instead of float;
* one clock domain instead of a separate audio clock, with bclk made by an integer
  divider;
* the FPGA as I2S master;
* the overrun policy;
* the status counters and the register map.

The original system is generated from a high-level DSP language. Only two programs are
provided here, written by hand in the same one-sample form. Any other program must be
written as a core with the same start/idle/done handshake and added to `faust_ip`.

Not demonstrated end to end: an overrun in the complete system. Both cores finish far
inside one frame, even at the smallest divider, so overruns are exercised only in the
`faust_ip` unit test.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The testbenches:

| testbench                    | what it exercises |
|------------------------------|-------------------|
| `tb_i2s_transceiver`         | Three configurations: 16-bit with one line and div 5; 24-bit with two lines and div 4; 8-bit with div 2. Received and sent frames against codec models, bclk period, frame period. |
| `tb_faust_passthrough_core`  | Random 4-channel samples, one-cycle done, output hold. |
| `tb_faust_nlf2_core`         | Output against `cos(n·th)` within 2 LSB, two-cycle timing, frequency change with phase continuity. |
| `tb_faust_ip`                | One-sample latency for both programs, output held between ticks, counters, a forced overrun. |
| `tb_axil_ctrl_regs`          | Random writes with partial strobes, read-back, status registers, SLVERR cases. |
| `tb_syfala_top`              | End to end. The pass-through with 24-bit samples on two lines and at 16-bit checks the exact two-frame loop delay in clock cycles. The oscillator checks a control update while running, with the ARM model rewriting the control words in a loop between updates. |
| `tb_syfala_top_full`         | The top exactly as configured by default: 2 ms of a 440 Hz tone at 768 kHz, a change to 1000 Hz, continuous best-effort rewrites of the control words, status read-back. |

Helper models in `tb/`:

* `i2s_codec_model`: the codec's I2S port.
* `axil_master_model`: an AXI4-Lite master standing in for the ARM.
* `i2s_bench` and `top_bench`: parameterised benches.

To run a testbench with Verilator (the package must come first):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/syfala_pkg.sv tb/tb_syfala_top.sv --top-module tb_syfala_top
./obj_dir/Vtb_syfala_top
```

Replace the testbench name to run any other. Each testbench finishes in well under a
second.

## Files

* `rtl/syfala_pkg.sv`: shared types (control word, program selector) and constants.
* `rtl/i2s_transceiver.sv`, `rtl/faust_ip.sv`, `rtl/faust_passthrough_core.sv`,
  `rtl/faust_nlf2_core.sv`, `rtl/axil_ctrl_regs.sv`: the blocks.
* `rtl/syfala_top.sv`: the top level.
* `tb/`: the testbenches and models listed above.
