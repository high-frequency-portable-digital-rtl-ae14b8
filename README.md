# Two-ADC time-interleaved capture logic for a portable oscilloscope

A cheap oscilloscope is usually limited by its converter. This design gets
twice the rate of one converter by running two 8-bit AD7822 ADCs (2 Msps
each) on the same input and triggering them alternately, half a sampling
period apart. An FPGA on a 40 MHz clock does the timing, merges the two
result streams into one, and stores 16384 consecutive 8-bit samples in a
dual-clock RAM at 3.33 Msps. A small host computer starts a capture and then
reads the samples over a 500 kHz SPI link, at its own pace, from the other
port of the RAM.

The SystemVerilog here is the FPGA part. The analog front end (op-amp probe
buffer, 3rd-order Butterworth RLC anti-aliasing filter, inverting and
summing stages), the two converters and the host are outside it; their
connections are ports of `scope_top`.

```
 probe -> buffer -> RLC filter -> invert -> x1/2 + 1 V --+--> AD7822 #1 --+
                                                        +--> AD7822 #2 --+
                                                                         |
  FPGA (scope_top)                                                       v
  interleave_timer --phase--> adc_interface x2 --> interleave_mux --> sample_ram
        |                                        (40 MHz)   write_ctrl  |  (sclk)
        +---------------------------------------------------------------+--> spi_slave <--> host
```

## The sampling frame

Everything in the 40 MHz domain runs off one modulo-24 phase counter
(`interleave_timer`). One AD7822 cannot be retriggered sooner than about 540 ns
(22 to 23 clock cycles), so each converter gets one trigger per 24-cycle
frame (600 ns). Converter 2 is triggered half a frame after converter 1. The
two together give one sample every 12 cycles: 300 ns, or 3.33 Msps.

| phase | converter 1 | converter 2 | mux (`interleave_mux`) | RAM write (`write_ctrl`) |
|------:|-------------|-------------|------------------------|--------------------------|
| 0     | CONVST low  | converting (since phase 12) |        | writes converter 1's result |
| 11    | converting  | conversion finished | takes converter 2's result |                 |
| 12    | converting  | CONVST low  |                        | writes converter 2's result |
| 23    | conversion finished | converting | takes converter 1's result |                |

A converter has 23 cycles (575 ns) from its trigger to the hand-over, and
its conversions overlap with the other converter's. The conversion, the EOC
pulse and the capture of the result must all fit in that window. The
testbench models use 400 ns to EOC and a 100 ns EOC pulse.

Each converter's result is handed to the mux in the last cycle before that
converter is triggered again, when its conversion has surely finished. It is
written to the RAM one cycle later. A sample is therefore stored 24 cycles
(two sample periods) after its conversion began, and the stored stream is in
time order: converter 1, converter 2, converter 1, ...

Reading a converter (`adc_interface`): the AD7822 runs in its standalone
mode, with RD and CS tied to EOC, so it drives its data bus only while EOC
is low. The interface registers EOC and the bus once (they are asynchronous
to the clock). It keeps the bus value from every cycle after the first in
which EOC is seen low. This way it never keeps a value from the cycle in
which the bus turns on. The result stays in a register until the next
conversion. The CONVST pulse is one clock (25 ns) long and comes from a
register, so the pin cannot glitch.

## A capture, seen from the host

1. With `sclk` running, the host raises `starter`. The SPI slave
   synchronizes the pin to `sclk` and turns its rising edge into a
   one-cycle `start` pulse. The pulse clears the read address. It is also
   synchronized into the 40 MHz domain, where it clears the write address.
2. The write controller stores one sample per slot until 16384 samples are
   in (196,608 cycles, 4.9 ms). Then the top bit of its address counter,
   `full`, stops all writes. The capture is frozen until the next start
   request.
3. `full` is synchronized into the `sclk` domain. From then on each 16-bit
   SPI transfer (`cs_n` low for 16 `sclk` cycles) returns the next sample
   in its low byte, MSB first. The high byte is zero. The slave loads its
   shift register on the 9th rising edge of the transfer and steps the read
   address. `miso` changes on rising edges, so the host should sample it on
   falling edges. A transfer made before the RAM is full returns zero and
   does not advance the address.
4. After 16384 transfers the read address stops at 16384, and further
   transfers repeat word 0. A new start request rewinds the read address
   and starts a fresh capture.

The host must therefore wait at least 4.92 ms, plus a few `sclk` periods
for the synchronizers, between raising `starter` and reading the first word.

One capture is 16384 samples = 4.92 ms of signal: 491 periods of a 100 kHz
input, with 33.3 samples per period. Reading it out at 500 kHz takes about
0.5 s.

**The start request is seen only on `sclk` edges.** A host whose SPI clock
runs only during transfers has to clock at least three `sclk` cycles while
`starter` is high. A dummy transfer does this, and so do three more after it
falls. Otherwise the request is lost and the RAM keeps the previous capture.

## Clock domains

| domain | clock | contents |
|--------|-------|----------|
| sampling | `clk`, 40 MHz | phase counter, converter interfaces, mux, write controller, RAM write port |
| host | `sclk`, 500 kHz | starter synchronizer and edge detector, bit counter, shift register, read address, RAM read port |

Only two single-bit signals cross, each through a two-flop synchronizer
(`sync2`). The start pulse lasts one `sclk` period, which is 80 `clk`
cycles, so it cannot be missed going into the fast domain. The full flag is
a level. Addresses never cross: each domain has its own counter. The RAM's
read port registers its address and its output (two `sclk` edges of
latency), which is much shorter than one 16-bit transfer.

`rst` is synchronous in both domains. Hold it for at least three edges of
each clock.

## Files

| file | content |
|------|---------|
| `rtl/scope_pkg.sv` | shared constants: frame length 24, sample width 8, depth 16384, SPI word 16 bits |
| `rtl/interleave_timer.sv` | modulo-24 phase counter |
| `rtl/adc_interface.sv` | CONVST generation and result capture for one AD7822 (parameter `TRIGGER_PHASE`) |
| `rtl/interleave_mux.sv` | registered mux that merges the two result streams |
| `rtl/write_ctrl.sv` | write address, write enable and full flag |
| `rtl/sample_ram.sv` | 16384 x 8 simple dual-port RAM, separate write and read clocks |
| `rtl/spi_slave.sv` | start-request detection and serial read-out |
| `rtl/sync2.sv` | two-flop synchronizer |
| `rtl/scope_top.sv` | the FPGA top level |
| `tb/ad7822_model.sv` | behavioural converter model (testbench only) |
| `tb/tb_*.sv`, `tb/scope_tb_common.svh` | self-checking testbenches |

Parameters (all default to the values above): `FRAME_CYCLES`, `SAMPLE_W`,
`RAM_DEPTH` (a power of two) and `FRAME_BITS`. The two trigger phases are
always 0 and `FRAME_CYCLES/2`. With a faster clock, `FRAME_CYCLES` sets how
many cycles a converter gets per conversion.

## Where this implementation makes its own choices

The overall structure, the 24-cycle frame with triggers at 0 and 12, the mux
and write phases, the 16384-word two-clock RAM, the two synchronizers, the
rising-edge start detector and the SPI framing all follow the original
design. The following points differ from it or fill gaps in it:

- **Result capture.** The original latched the bus at the end of the frame,
  after EOC had gone high again. That is when a standalone AD7822 no longer
  drives the bus. The original prototype also showed occasional full-scale
  samples. Here the bus is captured while EOC is low.
- **Write counter.** The write counter stops at a full RAM; it does not wrap.
  The held full flag is what allows the SPI side to read. No sample is
  written while a start request is active.
- **Re-arming.** Every start request clears both address counters, so
  captures can be repeated without resetting the FPGA (given `sclk` edges, see
  above). The testbenches make two and three captures in a row.
- **Resets.** The shift register, mux output, synchronizers and converter
  interfaces all have synchronous resets. The RAM starts cleared.
- **Debug and observation outputs.** `led` shows the mux output. `done` and
  `sel` on the sub-blocks are for observation only.

Not covered by any RTL: triggering on signal level, averaging, AC coupling
and adjustable gain. These are planned features of the instrument, not part
of this design. The analog bandwidth limits (about 500 kHz filter corner,
op-amp gain-bandwidth, breadboard) are also outside the RTL. They are why a
100 kHz square wave is not reproduced with sharp edges, even though the
digital capture is exact.

## Verification

Each block has a self-checking testbench that ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_interleave_timer` | counts 0..23 and wraps; reset in mid-frame |
| `tb_adc_interface` | both trigger phases, one-cycle CONVST, each conversion's random code captured before the hand-over, one `done` per conversion, idle bus never captured |
| `tb_interleave_mux` | takes converter 1 only at phase 23 and converter 2 only at 11, holds otherwise |
| `tb_sample_ram` | cleared at power-up, full write/read pass, partial overwrite, two-edge read latency, unrelated clocks |
| `tb_write_ctrl` | write phases, address sequence, full after exactly 64 writes at one per 12 cycles, no writes when full, restart during and after a capture |
| `tb_spi_slave` | one start pulse per rising edge, nothing loaded before full, word i in transfer i's low byte, address saturation, re-read after a new request |
| `tb_scope_top` | end to end, 512-word RAM, 2.5 MHz `sclk`, ramp input, two captures |
| `tb_scope_full` | default parameters, 500 kHz `sclk`: one full capture of a 100 kHz, 5 Vpp sine |
| `tb_scope_waveforms` | default parameters: 100 kHz sine, square and sawtooth at 2.5 Vpp, one full capture each |

The end-to-end benches drive two converter models and log, independently of
the design, the code each conversion sampled. Each capture read back over
SPI must equal a run of consecutive logged conversions. That run must start
within a few samples of the start request. The benches also check the fill
time (16384 x 12 cycles), the alternation and 12-cycle spacing of the
triggers, no writes while full, a read before full and one past the end.
The waveform benches also check the code range (48..208 for 5 Vpp,
88..168 for 2.5 Vpp, from v/4 + 1 V over a 0..2 V, 8-bit converter) and
one period per 33.3 samples.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/scope_pkg.sv \
    tb/tb_scope_full.sv --top-module tb_scope_full -Mdir obj -o sim
./obj/sim
```

Replace the testbench name as needed. The full-size benches take about 15 s
per capture.
