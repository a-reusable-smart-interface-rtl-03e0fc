# Smart interface for gas-sensor resistance measurement

A metal-oxide gas sensor is a resistor whose value depends on the gas
around it. Depending on the film and the gas, that value can be anywhere from a
few kilohms to a few hundred megohms, and a single sensor can change by a
factor of 200. This design reads such a resistor without an ADC. The resistor
is placed in the RC stage of a ring oscillator, so the oscillator's period
grows linearly with the resistance. A small digital block then counts system
clock cycles over a programmable number of oscillator periods and returns
the count as an eight-bit word over SPI. One oscillator and one external
capacitor serve an array of four sensors, which are switched in one at a time
by an analog multiplexer.

The RTL is a SystemVerilog model of this architecture. It is based on a
published mixed-signal sensor-interface chip. That publication gives the
partition into blocks, the counting method and the oscillator's measured
period law. It does not give the register map, the SPI transaction format or
the insides of the digital blocks: those are this design's own and are marked
as such below.

```
                 +------------------------- smart_sensor_top ----------------------------+
 external        |  +------------------- digital_interface -------------------+          |
 controller      |  |                                                         |          |
 (SPI master) ---+--+-> spi_slave <-> internal_controller <-> config_regs     |          |
  sclk ss_n      |  |                        |    ^                           |          |
  mosi miso      |  |                        v    |                           |          |
                 |  |                     osc_interface                       |          |
                 |  +------------------ osc_sel | osc_enable ^ osc_in --------+          |
                 |                              v            |                           |
                 |           rc_oscillator (behavioural): 4 resistors, C, ring           |
                 +-----------------------------------------------------------------------+
```

## From resistance to a count

The oscillator's period follows a straight line in the selected resistance R.
The published measurement with a 330 pF capacitor fits

    P = 6.49e-10 s/Ohm * R + 6.92 us

so 10 kOhm gives about 13.4 us and 1.5 MOhm about 980 us. With a 3.3 pF
capacitor the same circuit covers 1 to 200 MOhm. The behavioural model assumes
that the slope scales with C and the offset does not.

`osc_interface` turns that period into a number:

1. A start command latches the sensor select, the window length **N** and the
   prescaler **PRESC**. It then switches the multiplexer and closes the ring
   (`osc_enable`).
2. The oscillator output is synchronised into the clock domain with two
   flip-flops, and its rising edges are detected. The first period after
   switching is discarded, because the RC stage starts from a discharged
   state. The next rising edge opens the window.
3. While the window is open, a prescaler divides the system clock by PRESC+1
   and an eight-bit counter counts the prescaled ticks. A second counter counts
   oscillator periods. The window closes on the N-th rising edge after it
   opened.
4. The count is written to the RESULT register. A count that would pass 255
   sticks at 255 and sets the overflow flag.

The result is therefore

    count = floor(N * P / ((PRESC + 1) * Tclk))        (saturating at 255)

and the host recovers R by inverting the period law. Quantisation is one count
in the final number, so the relative error in the period is 1/count. Near the
low end of a range, the offset term takes up about half of the period, so the
relative error in R is about twice that. To stay within 1 % in R, the host
should pick N and PRESC so that the count lands near the top of the eight-bit
range (200–255). In practice this takes one coarse readout followed by one or
two refined ones; `tb/tb_resistance_sweep.sv` does exactly this. The
published design also leaves N to the external processor. The prescaler is an
addition of this design: without it, an eight-bit count could not span
periods from microseconds to milliseconds at any one clock rate.

Cycle timing: with PRESC = 0 the count is exactly the number of clocks
between the opening and closing edges. A readout takes about N + 1.5
oscillator periods from the start command, plus a few clocks. The system clock
rate is not fixed by the design. The testbenches use 10 MHz, at which the
whole 10 kOhm–200 MOhm span fits the counter with suitable N and PRESC.

## Talking to the chip: SPI transactions and registers

The chip is an SPI slave in mode 0 (SCLK idles low, data sampled on the rising
edge, MSB first), with 8-bit words framed by an active-low slave select. The
system clock must be at least eight times SCLK, because SCLK is oversampled
rather than used as a clock.

A transaction is two words:

| word | MOSI                                   | MISO                        |
|------|----------------------------------------|-----------------------------|
| 0    | command: bit 7 = 1 write, bits 2:0 address | STATUS                  |
| 1    | data (ignored on a read)               | register contents on a read |

Several transactions may follow one another inside one slave-select frame.
Every command word returns STATUS, so the host can poll just by sending
commands.

| addr | name   | access | contents |
|------|--------|--------|----------|
| 0    | CTRL   | R/W    | [1:0] sensor select, [2] keep oscillator running when idle, [3] start (write 1; always reads 0) |
| 1    | NPER   | R/W    | N, oscillator periods per window (0 acts as 1) |
| 2    | PRESC  | R/W    | clock prescaler, divide by PRESC+1 |
| 3    | RESULT | R      | last eight-bit count |
| 4    | STATUS | R      | [0] busy, [1] done, [2] overflow |

A typical readout: write NPER and PRESC, write CTRL with the sensor number
and bit 3 set, poll until STATUS.done is set, then read RESULT. Starting a new
readout clears done and overflow. Writing start while a readout runs restarts
it with the new settings. The whole map and protocol are this design's
choice: the published design only says that the configuration registers hold
the SPI data and the readout settings, and that the result goes to a buffer
that SPI can read.

## The blocks

All files are in `rtl/`, one module or package per file.

- **`gsi_pkg`**: register addresses, bit positions and the `readout_cfg_t`
  struct (select, keep-on, N, prescaler) passed from the controller to the
  oscillator interface.
- **`spi_slave`**: synchronises SCLK, SS_N and MOSI, shifts words in on
  rising SCLK edges and out on falling ones, and pulses `rx_valid` per word.
  The reply for the next word is taken from `tx_data` at the word boundary, so
  its user has half an SCLK period to provide it. `WIDTH` may be set to 16.
  MISO is driven low while the slave is deselected. Put a tri-state pad
  outside if several slaves share MISO.
- **`config_regs`**: flip-flop register file with a RAM-style interface: one
  host write port, one combinational read port, and an internal write port
  (which wins on a same-address conflict). It also presents every register
  as one flat vector. The RAM-style interface means a real RAM could replace
  it later.
- **`internal_controller`**: the transaction decoder (command/data phase,
  read-only protection, STATUS reply) and the readout sequencer. Writing the
  start bit stores CTRL without it and pulses `start` one clock later, so the
  oscillator interface sees the new select. In the clock of `done` the
  internal port writes RESULT; in every other clock it refreshes STATUS.
  STATUS.done therefore appears one clock after RESULT is valid, and a host
  that sees done always reads the new result.
- **`osc_interface`**: the period-to-count converter described above. It
  also drives the multiplexer select (following CTRL while idle, held during
  a readout) and the ring enable (during a readout, or always when
  CTRL[2] is set).
- **`digital_interface`**: the four blocks wired together. This is the
  synthesizable part: about 170 flip-flops.
- **`rc_oscillator`**: behavioural model of the analog ring oscillator,
  described next.
- **`smart_sensor_top`**: `digital_interface` plus `rc_oscillator`, with the
  four resistances and the capacitor as `real` parameters (defaults 10 k,
  20 k, 100 k, 1.5 MOhm and 330 pF). It is a simulation top.

## The oscillator model

The real oscillator is a ring of three inverting stages. Two are plain
inverters. The third is a Schmitt-trigger inverter, which gives clean
thresholds. Between the second inverter and the Schmitt trigger sits the RC
stage: the selected sensor resistor charges the external capacitor. A
transmission gate driven by `enable` opens or closes the ring, and `sel[1:0]`
drives the switch multiplexer in front of the capacitor. The capacitor is
sized so that the RC delay dwarfs the roughly 250 ns delay of the inverters.

`rc_oscillator` reproduces only the timing. It toggles its output every half
period, using the straight-line law above with the slope scaled by
`C_F / 330 pF`. It holds the output low while disabled, and it gives its first
rising edge half a period after enable rises. A change of `sel` takes effect
from the next half period. It uses delays and `fork`/`join_any`, so it needs
`--timing` in Verilator and is not synthesizable. The duty cycle (50 %) and
the start-up behaviour are modelling choices.

## How far to trust it

Follows the published design:
- the split into SPI, internal controller, configuration registers and
  oscillator interface;
- a four-resistor array behind one oscillator and one capacitor, with
  `sel0`/`sel1` and `enable` controls;
- the counting method: a period counter, and a clock counter over N periods;
- the eight-bit result in a buffer readable over SPI, with N programmed by
  the host;
- a slave-mode SPI with 8-bit words, 16 possible;
- the configuration registers as D flip-flops behind a RAM-like interface;
- the period law of the oscillator.

This design's own choices:
- the SPI mode and the slave-select wire (the original calls SPI a three-wire
  bus);
- oversampled SPI clocking;
- the transaction format and the register map;
- STATUS polling (there is no interrupt pin);
- the clock prescaler;
- the discarded settling period;
- saturation with an overflow flag;
- N = 0 treated as 1;
- asynchronous active-low reset;
- the model's duty cycle, start-up and C scaling.

Conflicting figures in the original: one passage says the capacitor was
chosen for periods above 10 ms, another says the period was set around 1 us,
and the measured curve runs from about 7 us to 1 ms. Also, the simulated
waveforms use 300 pF while the measurements use 330 pF. The model follows the
measured curve and defaults to 330 pF.

Not modelled:
- the heater controller that shares the chip (only named);
- SPI master mode (the original mentions that the SPI block could be reused
  as a master, but this application uses slave mode only);
- pads, the analog layout and the sensing films themselves.

## Simulating

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Build and run any of them
with plain Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_smart_sensor_top -y rtl -y tb +libext+.sv \
  rtl/gsi_pkg.sv tb/tb_smart_sensor_top.sv
./obj_dir/Vtb_smart_sensor_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_spi_slave` | random words in both directions, reply timing, frame handling |
| `tb_config_regs` | random host/internal writes and reads against a reference model, port priority |
| `tb_osc_interface` | counts against N·P/(PRESC+1), prescaler, overflow, N = 0, restart, select and enable behaviour, latency |
| `tb_internal_controller` | register access, read-only registers, start pulse timing, STATUS and RESULT updates, frame resync |
| `tb_rc_oscillator` | period for each resistor against the law, duty cycle, enable, capacitor scaling |
| `tb_digital_interface` | full SPI readouts on a square-wave stand-in, several transactions per frame |
| `tb_smart_sensor_top` | end to end at the default parameters: all four sensors, busy polling, prescaler, overflow, keep-running mode, restart; also checks the recovered resistance is within 1 % |
| `tb_resistance_sweep` | four chips on one SPI bus, 16 resistors from 10 kOhm to 200 MOhm (330 pF and 3.3 pF), host-side range selection, every value recovered within 1 % (worst about 0.35 %) |

All run in a few seconds.

To change the design:
- To change the register map, edit `gsi_pkg` and the decode in
  `internal_controller`.
- To widen the result, change `RESULT_W`, but note that `RESULT` is also one
  8-bit register.
- Sensor values and the capacitor are parameters of `smart_sensor_top`.
