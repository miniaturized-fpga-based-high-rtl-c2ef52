# Delta-modulation equivalent-time TDR: FPGA logic

A time-domain reflectometer (TDR) sends a voltage step into a cable or probe and
records the voltage at its input. Every impedance change along the line shows
up as a step in the recorded waveform, and its time position gives the
distance. A resolution of a few picoseconds normally needs a sampling
oscilloscope. This design gets there with a small FPGA, a comparator, two D/A
converters and an SRAM. It rests on two ideas:

* **Equivalent-time sampling.** The excitation is a 1 MHz square wave. The
  sampling trigger runs a little slower, at 1 MHz − 1 Hz. One sample is taken
  per period, and each falls t_res = 1/f_trigger − 1/f_pulse ≈ 1 ps later in
  the waveform than the one before. After one second, one full period has been
  scanned at an effective rate of 1 THz.
* **Delta modulation instead of an A/D converter.** A latched comparator checks
  whether the line voltage x is above a feedback voltage y. An up/down counter
  moves y one step towards x after every sample. So y follows the waveform, and
  one bit per sample (x > y) is enough to rebuild it. At 10-bit amplitude
  resolution that is a tenth of the data an A/D converter would produce.

The RTL covers the digital part: excitation divider, trigger DDS, sampling
loop, bit packing, SRAM controller and the SPI register interface to the
housekeeping microcontroller. The block structure, clock rates, accumulator
width, loop timing and memory size follow the published design of Trebbels,
Kern, Fellhauer, Huebner and Zengerle ("Miniaturized FPGA-Based
High-Resolution Time-Domain Reflectometer"). That work does not specify the
register map, the SPI framing, the word format, the SRAM timing or the sine
table. For those, this RTL makes its own choices, listed under "Where this
departs from or adds to the original" below.

## System around the FPGA

```
             +-------------------------- FPGA (tdr_fpga_top) ---------------------------+
 50 MHz ---->| clock_divider --pulse_out--------------------------------> line driver --+--> line
             |                                                                           |    | x(t)
 200 MHz --->| dds --dds_dac--> [D/A, band-pass, Schmitt trigger] --p(t)--+------------ latch|    v
 (from PLL)  |                                                           |          +---------------+
             | trigger_delay <--p_in-------------------------------------+          |  comparator   |
             |      | read_stb                                                      |  x(t) > y(t)? |
             | dm_integrator <--q_in--------------------------------------------q-- +---------------+
             |      | fb_dac ------------------> [feedback D/A, low-pass] --y(t)-------------^
             |      | bit_q
             | bit_shift_register --> memory_controller <--> SRAM 2 Mbit
             | control_logic <--SPI--> microcontroller (RTC, SD card, USB, RS-485, radio)
             +---------------------------------------------------------------------------+
```

Everything in square brackets is analog and outside the RTL. The 200 MHz DDS
clock comes from a PLL that is also outside; it enters as `clk_dds`.

## One sample: the loop

Each trigger edge runs one turn of the delta-modulation loop. At 50 MHz:

| time after trigger | what happens | where |
|---|---|---|
| 0 | p(t) rises and the comparator latches x > y | analog |
| 0 to 100 ns | comparator settles (its input difference is only millivolts) | `trigger_delay`, SETUP_CYCLES = 5 |
| 100 to 200 ns | q is synchronised and read, the counter steps, the code is registered | `dm_integrator`, PROC_CYCLES = 5 |
| 200 to 500 ns | feedback D/A and amplifier settle | analog |

So a trigger edge reaches the new feedback code in 10 clocks, give or take
the one clock of uncertainty from synchronising the asynchronous edge. The
500 ns loop limits the trigger to 2 MHz. The logic only needs strobes 10
clocks apart, so the analog settling is what sets that limit.

In `dm_integrator`, q = 1 steps the counter up and q = 0 steps it down. At
either end of the range the counter saturates instead of wrapping around. The
counter is DAC_W = 12 bits wide, and its step is 2^(12 − res), so the amplitude
resolution `res` can be set at run time (10 bit by default). A higher
resolution gives finer amplitude steps, but the loop then climbs more slowly:
a full-scale step needs (2^res − 1) samples, so its rise time must be at
least (2^res − 1) · t_res. At 1 ps and 10 bit that is 1 ns, which is why the
2 ns edges of the line driver are tracked. The end-to-end testbench lowers the
resolution to 10 ps per sample, and there the loop visibly lags the edges
(slope overload).

## Frequencies and tuning words

`clock_divider` divides 50 MHz by `DIV`. The output is high for DIV/2 clocks
(rounded down) and low for the rest. `dds` adds the 48-bit tuning word FTW to
its phase every 5 ns, so f_trigger = FTW · 200 MHz / 2^48, in steps of
0.71 µHz. To get a resolution t_res, use

    f_trigger = 1 / (1/f_pulse + t_res),   FTW = round(f_trigger · 2^48 / 200 MHz)

| f_pulse | DIV | t_res | f_pulse − f_trigger | FTW | time to fill 2^21 samples |
|---|---|---|---|---|---|
| 100 kHz | 500 | 1 ps | 0.01 Hz | 140737474282 | 21 s |
| 500 kHz | 100 | 1 ps | 0.25 Hz | 703687089933 | 4.2 s |
| 1 MHz | 50 | 1 ps | 1 Hz | 1407373476178 (reset value) | 2.1 s |
| 2 MHz | 25 | 1 ps | 4 Hz | 2814744137618 | 1.05 s |
| 1 MHz | 50 | 10 ps | 10 Hz | 1407360809945 | 2.1 s |

The reset value uses exactly 1 Hz, which gives t_res = 1.000001 ps. The exact
formula would give 1407373476180.

Only the DDS's phase goes out to the D/A converter, as a 14-bit offset-binary
sine. A 2^10-entry quarter-wave table holds it. The table is computed while
the design is elaborated, with entry i = round(8191 · sin((i + ½) · π / 2048)),
evaluated by an integer Taylor series. The analog band-pass filter and Schmitt
trigger then turn that sine back into the square trigger p(t).

**Start alignment.** When a measurement starts, `run` rises. This restarts the
divider counter and clears the DDS phase accumulator, after two synchroniser
clocks in the 200 MHz domain. So every record starts at the same phase of the
excitation, and sample k sits a fixed delay plus k · t_res into the excitation
period. Only differences between edges matter for a TDR reading, so the fixed
delay drops out.

## The record

Sample k of a record is one bit. `bit_shift_register` packs 16 bits per word,
with the earliest sample in bit 0. `memory_controller` writes word k/16 to SRAM
address k/16, so the 128K × 16 SRAM (2 Mbit) holds 2,097,152 samples. That is
2.1 µs of waveform at 1 ps. If the sample count is not a multiple of 16, the
last word is padded with zeros. To rebuild the waveform, run the same counter
that the hardware runs:

    s         = 2^(12 − RES)
    code[0]   = INIT
    code[k+1] = code[k] + s   if bit[k] = 1 and code[k] + s ≤ 4095
              = code[k] − s   if bit[k] = 0 and code[k] ≥ s
              = code[k]       otherwise
    y[k]      = code[k] · V_fullscale / 4096

y[k] is the feedback voltage that the line was compared with at sample k.

SRAM cycles (20 ns clock): a write drives address and data for 1 clock, holds
`we_n` low for 2 clocks, then keeps address and data for 1 more clock. A read
holds `oe_n` low for 2 clocks and captures the data on the last one. A full
word arrives at most every 16 loop turns, which is at least 8 µs apart. So a
one-word holding register is all the buffering needed.

## Microcontroller interface

SPI mode 0, MSB first, SCLK up to about 4 MHz. The input is oversampled by the
50 MHz clock. A frame is 40 bits: a command byte (bit 7 = write, bits 6:0 =
register) followed by 32 data bits. On a read, MISO carries the register
value during the 32 data bits.

| reg | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0: start a measurement, bit 1: abort |
| 0x01 | STATUS | R | bit 0 busy, bit 1 done, bit 2 memory full |
| 0x02 | DIV | R/W | excitation divider, reset 50 |
| 0x03 / 0x04 | FTW_LO / FTW_HI | R/W | DDS tuning word bits 31:0 / 47:32 |
| 0x05 | NSAMPLES | R/W | samples to record, reset 2^21 |
| 0x06 | RES | R/W | amplitude resolution in bits (1..12), reset 10 |
| 0x07 | INIT | R/W | integrator start code, reset 0 |
| 0x08 | RD_ADDR | W | set the readout word address (fetches that word) |
| 0x09 | RD_DATA | R | the fetched word; reading it fetches the next |
| 0x0A | SAMPLES | R | samples taken in the current or last record |
| 0x0B | WORDS | R | words written to SRAM |

Configuration writes are ignored while a measurement runs. A measurement goes
through these steps:

1. A start clears the write pointer and the shift register, and loads INIT
   into the integrator.
2. `run` rises. The divider and the DDS start from phase zero.
3. Every sample is recorded. This stops after NSAMPLES samples, when the
   memory is full, or on abort.
4. `run` falls. The last partial word is flushed, and 16 clocks later `done`
   is set.

## Modules

| module | function |
|---|---|
| `tdr_pkg` | register addresses and reset values |
| `tdr_fpga_top` | wiring; reset synchronisers for both clock domains |
| `clock_divider` | excitation square wave, 50 MHz / DIV |
| `dds` | 48-bit phase accumulator at 200 MHz, quarter-wave sine table, 14-bit output; three clocks from phase to output |
| `trigger_delay` | p(t) synchroniser, rising-edge detection, latch-setup wait; a trigger that arrives during a wait is ignored |
| `dm_integrator` | q synchroniser, up/down saturating counter with a run-time step, feedback code output |
| `bit_shift_register` | 1-bit samples into 16-bit words, flush, clear |
| `memory_controller` | asynchronous SRAM write and read cycles, word counter, full flag |
| `spi_slave` | 40-bit SPI register frames |
| `control_logic` | register file, measurement sequencer, readout prefetch |

The top's SRAM data bus is split into `sram_dq_o`, `sram_dq_oe` and
`sram_dq_i`. The tristate pad belongs in the board-level wrapper.

The logic synthesises to about 330 word-level cells and 570 flip-flops, plus
the 13-kbit sine table.

## Simulation

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/tdr_pkg.sv tb/tb_tdr_fpga_top.sv --top-module tb_tdr_fpga_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any of the others:

| testbench | what it shows |
|---|---|
| `tb_tdr_fpga_top_full` | One complete measurement at default sizes and reset registers: 1 MHz, 1 ps, 10 bit. It records 45,008 samples over a line model with a 10 ns round trip, reads them back over SPI and rebuilds the waveform. The edges come out 10.0 ns apart. Takes about 10 s. |
| `tb_tdr_fpga_top` | Three runs with a 1024-word memory. Run 1: 10 ps and 8 bit, where the loop tracks the 2 ns edges and the round trip measures 10.0 ns. Run 2: 10 bit, where the loop is slope-limited, and more samples than the memory holds, so the memory fills. Run 3: aborted. Also checks trigger-to-feedback latency and SRAM timing. Counts each mechanism, and fails if one never happens. |
| `tb_workload_frequencies` | The same 10 ns line at 100 kHz, 500 kHz, 1 MHz and 2 MHz excitation, 1 ps and 10 bit, default sizes. For each frequency, it checks the round trip, the rebuilt levels UG/2 and UG (from 500 kHz up), the time a 16,000-sample record takes (one trigger period per sample), and the 200 ns from trigger to feedback update. About 35 s. |
| `tb_workload_linearity` | An open line shortened from 2.0 m to 1.0 m in 10 cm steps at 5 ns/m. It fits a straight line to the measured round trips: slope 9.98 ns/m, R² 0.9999, every point within 100 ps. About 45 s. |
| `tb_workload_field` | A line with three sections: a short matched lead, a longer section with a lower impedance (wet sand), then the open end. It checks that the sections' boundary and the end appear at their round-trip times over a 100,000-sample record. About 15 s. |
| `tb_workload_jitter` | Repeated records of a line with a 5 ns round trip while the model adds 10 ps rms of random jitter to the trigger: 6 records at 100 kHz and 20 at 2 MHz. It checks every round trip and the spread of the edge from record to record. The spread comes out near 1 ps rms, because the counter averages many single latches. About 85 s. |
| `tb_clock_divider`, `tb_dds`, `tb_trigger_delay`, `tb_dm_integrator`, `tb_bit_shift_register`, `tb_memory_controller`, `tb_control_logic` | One per block, each against its own reference model |

The top-level testbenches use these behavioural models in `tb/`:

* `tdr_analog_model` stands in for the analog front end.
  * It finds the trigger edges by interpolating where the DDS samples cross
    mid-scale.
  * It models the line as a step response made of three ramps. A first
    fraction of UG arrives at once. A second fraction arrives after the round
    trip to a first boundary. The rest arrives after the round trip to the
    open end. The fractions and delays are inputs, so one model serves the
    matched open line (two halves of UG, equal delays) and a line with
    sections. Each ramp rises in 2 ns.
  * It latches q = x > y at every trigger edge.
  * It can add random timing jitter to the trigger edges (parameter
    `JIT_PS`, off by default).
* `sram_model` is an asynchronous SRAM. It also flags write pulses that are
  too short.

The interpolation works from 14-bit samples, which leaves the model's trigger
with about ±10 ps of jitter. That is why the 1 ps full-size test allows
±50 samples on the measured round trip. The error is not random. It depends on where the trigger
crossing falls between two DDS clocks, so it repeats every 5 ns of delay.
The linearity test shows it as a sawtooth of up to 80 ps across each 5 ns
cell.

At 100 kHz the model is coarser still. The sine crosses mid-scale so slowly
that one 14-bit code lasts many DDS clocks. The rebuilt trigger then stands
still for a few hundred samples and jumps by about 0.5 ns, instead of moving
1 ps each time. Edge positions still come out right, but the loop lags after
each jump, so levels at 100 kHz read 50 to 200 mV low in simulation. A real
band-pass filter and the noise around it smooth those steps to some degree;
the model does not.

## Where this departs from or adds to the original

Taken from the original design:

* the block structure
* 50 MHz system clock, 200 MHz DDS clock and 48-bit accumulator
* decimal divider for the excitation
* 100 ns latch setup and five clocks of processing
* the up/down-counter integrator
* 1 ps / 1 MHz / 10-bit operating point
* 2 Mbit record memory
* SPI link to the microcontroller

This design's own choices:

* 12-bit feedback code with a run-time resolution, where the original
  describes an N-bit counter feeding an N-bit converter
* saturation at the range ends
* how the five processing clocks are spent (synchroniser, capture, count,
  register)
* ignoring triggers during the setup wait
* quarter-wave table size and 14-bit DDS output width
* 16-bit words with the earliest sample in bit 0, and zero padding
* SRAM organisation and cycle timing
* the SPI frame, the register map and the sequencing
* restarting divider and DDS together at start

Not in the RTL:

* the PLL
* all analog circuits: line driver, comparators, band-pass and low-pass
  filters, both D/A converters
* the SRAM chip
* the microcontroller and its real-time clock, SD card and communication
  interfaces

These are ports of `tdr_fpga_top` or, for simulation, the models above.
Nothing here corrects comparator offset or gain in the recorded data; that is
left to whatever processes the readout.
