# Differential-phase receiver logic with downconverter telemetry

A Ka-band cross-track interferometer measures height from the phase difference
between two receive channels. At 35.75 GHz a few tenths of a millimetre of
thermal expansion in either channel's RF path already shifts that phase, so
the measured phase has a temperature-dependent error. This design puts two
things side by side in one FPGA:

* a **phase path** that estimates the channel-to-channel phase in real time
  from the digitised receive channels, and subtracts a correction;
* a **telemetry path** that continuously reads the 16 temperature, LO-power
  and supply-current sensors on the RF downconverter through two MAX1168
  serial ADCs, keeps the latest value of each, and logs every reading as text
  on a serial line.

With both, phase and temperature can be recorded together, the phase error
characterised against temperature, and a correction written back while the
system runs. The board also has two heater resistors, one per channel, whose
control lines (`SHDN_p`, `SHDN_n`) are driven from a register.

## Block diagram

```
                       +-------------+   +-------------+
 ch1/ch2 samples ----->| sample_fifo |-->| phase_calc  |--> phase, phase_raw
 trig_in --> trigger_ctrl (clear, capture)  (cordic_atan2)
                       +-------------+   +------+------+
                                                | sums, phase
 reg bus <------------------------------> temp_reg <--- results, status
                                            | start/continuous, SHDN_p/n,
                                            | phase offset
 uart_rxd -> uart_rx --(2 chars arm)--> adc_scan_seq <-> spi_master <-> SCLK/MOSI/MISO
                                            |  CS1_n, CS2_n, EOC_n
                                            v
                           hex_formatter -> uart_tx -> uart_txd
```

| file | role |
|---|---|
| `rtl/dphase_top.sv` | top level, wires everything; one clock, async active-low reset |
| `rtl/tlm_pkg.sv` | shared constants, MAX1168 command byte, result struct, register map |
| `rtl/adc_scan_seq.sv` | telemetry sequencer: the conversion loop over both ADCs |
| `rtl/spi_master.sv` | SPI master, mode 0, 16-bit words |
| `rtl/hex_formatter.sv` | 16-bit result to four hex characters plus CR LF |
| `rtl/uart_tx.sv`, `rtl/uart_rx.sv` | 8N1 serial line, 115200 baud |
| `rtl/temp_reg.sv` | processor-visible registers and the 16-word result memory |
| `rtl/phase_calc.sv` | averaged cross product, powers, phase, correction |
| `rtl/cordic_atan2.sv` | iterative CORDIC angle of a vector |
| `rtl/trigger_ctrl.sv` | trigger synchroniser, clear pulse, capture enable |
| `rtl/sample_fifo.sv` | FIFO for sample pairs, with overflow count |

## One telemetry conversion

This is the part that needs the most care, because the MAX1168 is not a plain
SPI slave: between sending the command and reading the result the SPI clock
must stop while the ADC converts on its own internal oscillator, and the ADC
signals the end of the conversion on a separate line.

For every sensor `adc_scan_seq` does:

1. Pull that ADC's chip select low (`adc_cs1_n` for ADC1, `adc_cs2_n` for
   ADC2), wait `CS_SETUP` cycles.
2. Run a 16-bit SPI transfer. The first byte is the command
   `{CH_SEL[2:0], SCAN=00, REF_PD=01, INT_CLK=1}` = `{channel, 5'b00011}`;
   the second byte is don't-care. The ADC latches DIN on rising SCLK edges.
3. Stop SCLK and wait for `adc_eoc_n` to fall (synchronised by two
   flip-flops). When it falls, the ADC has already put the result's MSB on
   DOUT.
4. Run a second 16-bit transfer (sending zeros) and shift the result in, MSB
   first, sampling on rising edges.
5. Raise chip select, store the result, hand it to the text formatter, and
   wait until the formatter has taken it; keep chip select high at least
   `CS_GAP` cycles.

If EOC does not fall within `EOC_TIMEOUT` cycles the conversion is abandoned,
chip select is raised and `timeout_cnt` is incremented. SPI has no
acknowledge, so without this a missing or unpowered ADC would stop the loop.

A sweep is ADC1 inputs 0..7 and then ADC2 inputs 0..7. It runs once per
`start` pulse (CTRL bit 0), repeatedly while CTRL bit 1 (`continuous`) is set,
and for ever once two characters have been received on `uart_rxd`: this is
the bring-up sequence, where the operator types two characters on a terminal
after the FPGA is configured.

Assertions in `adc_scan_seq` check that at most one chip select is ever low and
that none is low while the sequencer is idle.

### Sensor map

Result word `REG_RESULT0 + adc*8 + ch` holds:

| ADC | ch | sensor | part |
|---|---|---|---|
| 1 | 0 | temperature, LO amplifier (U45) | MAX6612 |
| 1 | 1 | temperature, LO filter (−) (U50) | MAX6612 |
| 1 | 2 | temperature, LO filter (+) (U52) | MAX6612 |
| 1 | 3 | temperature, DC board (U57) | MAX6612 |
| 1 | 4 | LO power (U53) | CHE1270-QAG |
| 1 | 5 | current sense, LO (U65) | LT6107 |
| 1 | 6 | current sense, RX (+) (U61) | LT6107 |
| 1 | 7 | current sense, RX (−) (U69) | LT6107 |
| 2 | 0 | temperature, LNA (+) (U36) | MAX6612 |
| 2 | 1 | temperature, mixer (+) (U37) | MAX6612 |
| 2 | 2 | temperature, L-band amplifier (+) (U38) | MAX6612 |
| 2 | 3 | temperature, L-band output (+) (U39) | MAX6612 |
| 2 | 4 | temperature, LNA (−) (U16) | MAX6612 |
| 2 | 5 | temperature, mixer (−) (U17) | MAX6612 |
| 2 | 6 | temperature, L-band amplifier (−) (U18) | MAX6612 |
| 2 | 7 | temperature, L-band output (−) (U19) | MAX6612 |

Results are straight binary, 62.5 µV per LSB (4.096 V / 2^16). A MAX6612
gives 19.53 mV/°C, i.e. about 312.5 LSB per °C; its offset is in the sensor's
data sheet. The table assumes the ADC2 sensors sit on inputs 0..7 in the
order listed.

### Serial output

Each result becomes one line: the high byte and then the low byte, each as
two upper-case hex digits with a leading zero where needed, then CR LF
(`0005\r\n`, `7A31\r\n`). Lines come in sweep order, so the line number within
a sweep identifies the sensor. At 115200 baud a line takes about 0.52 ms,
longer than the 0.16 ms of SPI traffic per conversion, so with the defaults
the serial line sets the sweep rate: about 11 ms per 16-sensor sweep.

## Register map (`temp_reg`)

A plain register bus: a write takes effect at the clock edge where `reg_wr` is
high; read data appears with `reg_rvalid` one cycle after `reg_rd`.
Word addresses:

| addr | name | content |
|---|---|---|
| 0 | CTRL | [0] start one sweep (write only, self-clearing) [1] continuous [2] SHDN_p [3] SHDN_n [4] stop sample capture |
| 1 | STATUS | [0] sweep busy [1] armed by host characters [2] sample capture on [15:8] EOC timeouts [31:16] completed sweeps |
| 2 | SELECT | [31] ADC_1 chip select active, [27] ADC_2 chip select active (read only) |
| 3 | POFFSET | [15:0] phase correction subtracted from every phase |
| 4 | PHASE | [15:0] last corrected phase, [31:16] number of phase results |
| 5 | FIFO | [15:0] sample FIFO overflows |
| 6, 7 | XC_RE, XC_IM | last sum of V1·conj(V2), sign extended |
| 8, 9 | POW1, POW2 | last sums of \|V1\|² and \|V2\|² |
| 16..31 | RESULT | latest value of sensor (adc*8 + ch) |

`SHDN_p`/`SHDN_n` reset to 0, taken as "heater off". The pin polarity of the
heater switches is an assumption; check it against the board before use.

## Phase measurement (`phase_calc`)

Each channel delivers complex samples V1, V2 (signed, `SAMPLE_W` = 8 bits per
component). Over `N_LOOKS` = 1024 pairs the block sums

* C = Σ V1·conj(V2): Re = Σ(i1·i2 + q1·q2), Im = Σ(q1·i2 − i1·q2)
* P1 = Σ |V1|², P2 = Σ |V2|²

in `ACC_W = 2*SAMPLE_W + 2 + log2(N_LOOKS)` = 28-bit accumulators, which
cannot overflow. The angle of C is the averaged phase of channel 1 relative
to channel 2; |C| / sqrt(P1·P2) is the interferometric coherence, which the
processor can form from registers 6..9. Averaging N looks lowers the phase
noise roughly as 1/sqrt(N).

The angle comes from `cordic_atan2`: the vector is folded into the right half
plane (adding π if x < 0), then rotated towards the x axis by ±atan(2^-i) for
i = 0..15, one step per clock, accumulating the angle. Angles are binary
fractions of a half turn: 2^15 stands for π, so a 16-bit phase wraps at ±π by
itself and one LSB is 0.0055°. The micro-rotation table holds
round(atan(2^-i)/π · 2^31).

`phase = phase_raw − POFFSET` (modulo 2^16). This is the correction point:
software reads the telemetry, evaluates its own phase-versus-temperature
model, and writes POFFSET.

Timing: one pair per clock; `phase_valid` pulses `ITERS + 2` = 18 cycles after
the clock edge that took the last pair of an average, and the sums on the
outputs and in registers 6..9 stay until the next average ends. `N_LOOKS`
must exceed `ITERS + 2` (checked at elaboration).

## Trigger and sample capture

Samples are ignored until the external trigger (`trig_in`, asynchronous) rises.
`trigger_ctrl` then pulses `clr` for 4 cycles, which empties the FIFO and
drops any partial average, and turns capture on: from then on every
`adc_valid` pair is written into `sample_fifo`. CTRL bit 4 stops capture; the
next trigger edge starts it again (after another clear). In this top level
PhaseCalc reads the FIFO on every cycle it holds data, so with the single
clock the FIFO never fills; overflows are counted anyway (register 5).

## Where this departs from the original system

* The original ran the conversion loop as software on a soft processor,
  through a vendor SPI core and a custom register peripheral. Here the loop
  is logic, so the telemetry works with no processor; the register block
  keeps the processor's view (start, heaters, results, bits 31/27 for the two
  ADC selects).
* The processor, its local memories, its bus, the debug module, the SATA
  host controller and the controller that configures the high-speed ADCs are
  not here. The processor bus is replaced by the simple register bus above,
  brought out as top-level ports.
* The channel ADCs sample at 3 GS/s. This design takes one complex pair per
  clock (10^8 pairs/s at 100 MHz). Demultiplexing several samples per clock
  and the digital downconversion to complex baseband are not included: the
  sample ports expect baseband I/Q already.
* The clock frequency (100 MHz), the SPI setup and gap times, the EOC
  timeout, the FIFO depth, the number of looks, the sample width and the
  text format are choices of this design. The rates that matter externally,
  200 kbit/s SPI and 115200 baud, are derived from `CLK_HZ` and change with
  it.
* Data-line naming: the ADC's DIN is driven from the FPGA's MOSI and its DOUT
  goes to the FPGA's MISO, the usual SPI convention. Check the cable wiring
  against this convention before connecting a board.

## Parameters of the top level

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 100 000 000 | system clock, sets all dividers |
| `BAUD` | 115 200 | serial rate |
| `SPI_HZ` | 200 000 | SPI bit rate (SCLK half period = CLK_HZ / (2·SPI_HZ)) |
| `CS_SETUP`, `CS_GAP` | 100, 100 | cycles from CS low to SCLK; minimum CS high time |
| `EOC_TIMEOUT` | 20 000 | cycles to wait for end of conversion |
| `START_CHARS` | 2 | host characters that arm free-running sweeps |
| `SAMPLE_W` | 8 | bits per sample component |
| `N_LOOKS` | 1024 | pairs per phase estimate |
| `FIFO_DEPTH` | 16 | sample FIFO depth (power of two) |

Registers 6..9 carry the sums as 32-bit values; for `ACC_W` above 32
(`N_LOOKS` above 2^14 at 8 bits) they would be truncated.

## Simulation

Every block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. `tb/max1168_model.sv` is a behavioural model
of the telemetry ADC (command latch, conversion delay, EOC, result shift-out)
used by the sequencer and top-level tests. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tlm_pkg.sv tb/tb_dphase_top.sv --top-module tb_dphase_top -o sim
./obj_dir/sim
```

Replace `tb_dphase_top` by `tb_<block>` for a single block. The testbenches
start from random register contents, so everything is reset before it is
read.

`tb_dphase_top` runs the whole design at its default parameters (about 23 ms
of simulated time, a few seconds of run time): one sweep checked line by line
on the serial output and in the result registers, the heater lines, no phase
before the trigger, phase results within 0.5° of the applied difference minus
the correction, coherence near 1 from the sum registers, capture stop, arming
by two typed characters, and EOC timeouts when one ADC stops answering. It
counts each of these and fails if one never happened.

The block tests use shorter dividers and 64 looks. Among other things they
check the SPI transfer time (2·HALF_DIV·16 cycles), the 32 SCLKs per ADC
frame and the command bits, the UART frame length and reception at ±3 % rate
error, the exact sums of `phase_calc` against sums computed in the testbench,
its phase against `$atan2` within 3 LSB, and its 18-cycle latency.

## Limits of confidence

The telemetry sequence follows the MAX1168 16-bit, internal-clock, single
conversion protocol as described for this board; it has been checked against
a behavioural model, not against the part. Setup and hold times beyond the
SCLK period, the ADC's minimum CS-high time and its conversion time are not
modelled exactly; `CS_SETUP`, `CS_GAP` and `EOC_TIMEOUT` leave wide margins at
200 kbit/s. How the phase correction should depend on temperature is left to
software: the logic only applies the value it is given.
