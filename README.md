# Secure speech link: scrambled 8-bit samples over a two-wire bus

This is the digital part of a two-chip voice privacy link. A transmitter chip
digitises speech with an ADC0809 converter and scrambles every 8-bit sample.
It then sends the sample over an I2C-style two-wire bus. A receiver chip holds
two receiving stations. A two-position *E/D switch* on the transmitter picks
which of them hears the speech: receiver 1, receiver 2, or both. The addressed
station unscrambles the byte and hands it to its DAC0808. Anyone who taps the
wires without the descrambler sees scrambled bytes.

The design follows the architecture of the article *CPLD Make a Speech
Transfer Process Secure on a Chip*, which built both chips in Xilinx XC95108
CPLDs. The article gives the structure, the pins of each chip, the
switch-to-receiver mapping and one worked example (sample `11110000` goes onto
the wire as `00001111`). It does not give the scrambling algorithm, the bus
frame, the clock rates or the handshakes. Those are this design's own choices.
They are marked as such below and in the header comment of every file.

## Signal chain

```
 mic -> amp/filter -> ADC0809 ==> tx_cpld ==(i2c_clk, i2c_data)==> rx_cpld ==> dout1 -> DAC0808 -> filter/amp -> speaker
                         ^         adc0809_ctrl                     i2c_slave_rx(rx 1) -> descrambler
                         |         scrambler                        i2c_slave_rx(rx 2) -> descrambler ==> dout2 -> DAC0808 -> ...
                         +-------  i2c_master_tx
```

| module | role |
|---|---|
| `speech_pkg` | E/D switch encoding, station addresses, scramble/descramble functions |
| `speech_secure_top` | both chips joined by the bus; ADC and DAC connections as ports |
| `tx_cpld` | transmitter chip: convert, scramble, send; overlaps conversion with sending |
| `adc0809_ctrl` | drives `addr`, `ale` and `start`, waits on `eoc` and captures the sample |
| `scrambler` | scrambles one sample; its output register is the one-byte transmit buffer |
| `i2c_master_tx` | sends one write frame per sample on `scl`/`sda` |
| `rx_cpld` | receiver chip: two stations on the same two wires |
| `i2c_slave_rx` | one station: oversampling bus receiver with address match |
| `descrambler` | undoes the scrambling and holds the sample for the DAC |

The analog parts are outside the chips. These are the microphone, amplifiers,
filters and speaker, plus the ADC0809 and DAC0808 converters. The top level
exposes their digital connections: the `adc_*` ports and `dout1`/`dout2`.

## The scrambling transform

The worked example has only one pair: `11110000` becomes `00001111`. Three
simple byte transforms produce that pair:

| `MODE` | transform | e.g. `10110001` |
|---|---|---|
| `SCR_REVERSE` (default) | bit order reversed | `10001101` |
| `SCR_INVERT` | every bit complemented | `01001110` |
| `SCR_SWAP` | high and low nibbles exchanged | `00011011` |

The example cannot tell them apart, so `scrambler` and `descrambler` take
`MODE` as a parameter. Each transform is its own inverse. The receiver
therefore applies the same function again, which fits the article's statement
that the receiver decrypts "by the same approach". `MODE` must be the same at
both ends. `speech_secure_top` passes one `MODE` to both chips.

None of the three transforms is cryptographically strong. Each is a fixed
byte permutation that can be inverted once it is known. The design keeps to
what the source describes and does not try to strengthen it.

## E/D switch and receiver addressing

The article says which stations receive for each switch position. This design
carries out that selection with I2C addressing:

| `ed_sw` | receiving | bus address sent |
|---|---|---|
| `00` | nobody (transmitter idle, no conversions) | none |
| `01` | receiver 1 | `ADDR_RX1` = 0x51 |
| `10` | receiver 2 | `ADDR_RX2` = 0x52 |
| `11` | both | broadcast (general call) 0x00 |

The article does not cover position `00`. The address values are arbitrary.
The transmitter synchronizes the switch and reads it once per sample, when
that sample's conversion starts. The setting travels with the sample through
the transmit buffer. So a switch change never splits a frame, and it takes
effect from the next conversion.

## The bus frame and why its timing looks the way it does

Each sample is one I2C write frame, most significant bit first:

```
START | A6..A0 | W=0 | ack slot | D7..D0 | ack slot | STOP      (18 clocked bits)
```

The article gives the receiver chip only `sclk` and `sdata` as inputs, so
nothing can acknowledge. The link is one-way. The transmitter drives both
lines push-pull and clocks out a `1` in the acknowledge slots. Nobody reads
those slots.

**Quarter-bit timing.** Every bit lasts four *quarters* of `QUARTER`
transmitter clocks:

```
quarter      0        1        2        3
scl        __________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
sda        (previous)X new bit ..................
```

`sda` changes one quarter after `scl` falls and one quarter before `scl`
rises. A START is `sda` falling in the middle of a high `scl`. A STOP is `sda`
rising while `scl` is high. A frame is 20 bit times (START, 18 bits, STOP),
which is exactly `80*QUARTER` clocks from the edge that takes `send` to
`done`. At the default `QUARTER = 5` and an 8 MHz clock, the bus runs at
400 kHz and a frame takes 50 µs.

**Oversampling receiver.** The receiver chip has its own clock, unrelated to
the transmitter's. `i2c_slave_rx` passes both wires through identical
two-flop synchronizers and compares each sample with the one before:

- `scl` rising samples a bit;
- `sda` changing while `scl` stays high is a START or a STOP.

Each wire may take one more or one fewer receiver clock to get through its
synchronizer. A quarter-bit of margin on each side of every `sda` change
absorbs that difference. As a result, a data change can never look like a
START or a STOP. **Requirement:** a quarter bit must last at least two
receiver clocks.

**The STOP looks like a ninth clock.** A STOP needs one more rising edge of
`scl`, with `sda` low. To a receiver that counts rising edges, that edge
looks like the start of another bit. Suppose a frame is cut off after seven
data bits. If the station took its eighth bit on the rising edge, it would
deliver a wrong byte. So the station samples the eighth data bit on the
rising edge but commits the byte only on the following falling edge of `scl`.
A STOP arrives before that falling edge and cancels the byte. The testbench
monitor decodes frames the same way.

Other rules:

- A START in the middle of a frame restarts reception.
- A frame with another address, or with the read bit set, is ignored until
  the next START.

## Transmitter sequencing and the sample rate

`tx_cpld` repeats convert → scramble → send. It starts the next conversion as
soon as the previous sample has left the converter and the one-byte buffer
(the scrambler's output register) is free. The conversion of sample *k+1*
therefore runs while sample *k* is on the bus. The sample period is the
longer of the conversion and the frame, plus a few clocks. Both have fixed
lengths, so samples are evenly spaced, which audio needs.

The numbers below use the ADC0809 clocked at a typical 640 kHz. That clock
rate is an assumption; the article does not give one.

- One conversion takes 64 clocks, which is 100 µs.
- One frame takes 50 µs.
- The conversion therefore sets the pace: about 100 µs per sample, or about
  10 k samples/s.
- That is above the 8 kHz rate of telephone speech.

The article does not say whether conversion and sending overlap. Running them
one after the other would give about 150 µs per sample, below 8 kHz.

## ADC0809 handshake

`adc0809_ctrl` uses the converter lines the article lists: `addr[2:0]`,
`ale`, `start` and `eoc`, plus the data bus. One conversion goes like this:

1. Hold `addr` at `CHANNEL`.
2. Raise `ale` and `start` together for `PULSE_CYCLES` clocks. At 8 MHz the
   default of 2 clocks gives 250 ns, above the converter's minimum pulse
   width.
3. Wait until the synchronized `eoc` is seen low, then high again.
4. Capture the data bus. The capture comes 2 to 3 clocks after `eoc` rises.

No output-enable line is listed, so OE is assumed tied active on the board.
The converter's own clock is assumed to come from a separate oscillator.

## Clocks and reset

- `speech_secure_top` has separate `tx_clk` and `rx_clk` inputs and one
  active-low asynchronous reset, `rst_n`.
- The bus and the `eoc` and `ed_sw` inputs are the only crossings between
  clock domains. Each goes through a two-flop synchronizer.
- After reset, the bus idles with both wires high and both DAC outputs at 0.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `tb_scrambler`, `tb_descrambler` | all 256 inputs in all three modes, 1-clock latency, hold, the worked example |
| `tb_adc0809_ctrl` | pulse width, channel, no capture before `eoc` completes its low phase, 2-3 clock capture delay |
| `tb_i2c_master_tx` | frame contents checked by an independent bus decoder; frame length exactly `80*QUARTER`; one START and one STOP per frame |
| `tb_i2c_slave_rx` | wires driven by a task with random quarter lengths: own address, broadcast, foreign address, read frame, frame cut by STOP, repeated START, latency |
| `tb_tx_cpld` | every frame carries the right address and the scrambled sample; switch at `00` gives no activity; sample period equals the conversion time |
| `tb_rx_cpld` | each address reaches exactly the right station(s); outputs hold between frames |
| `tb_speech_secure_top` | end to end at default parameters with unrelated transmitter, receiver and ADC clocks; counts every mechanism (receiver 1 only, receiver 2 only, both, frame ignored by the other station, conversion overlapping a frame, idle at `00`) and fails if one never happens |
| `tb_speech_stream` | a 1 kHz tone for 5 ms at real clock rates (8 MHz, 10 MHz, 640 kHz ADC); every sample restored exactly at both DACs, spacing 100 µs (≥ 8 kHz) |

Two testbench helpers sit in `tb/`. `adc0809_model` is a behavioural model of
the converter's digital interface. `i2c_bus_monitor` is a passive frame
decoder. The designs also carry SystemVerilog assertions:

- `ale` and `start` always move together;
- `sda` changes while `scl` is high only for a START or a STOP;
- a transmit buffer is never overwritten;
- nothing is sent for switch position `00`.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/speech_pkg.sv tb/tb_speech_secure_top.sv --top-module tb_speech_secure_top
./obj_dir/Vtb_speech_secure_top
```

Replace the testbench name to run another one. The `--timescale 1ns/1ps` flag
matters for `tb_speech_stream`, whose delays are in nanoseconds.

## Changing it

| parameter | where | default | effect |
|---|---|---|---|
| `QUARTER` | top, `tx_cpld`, `i2c_master_tx` | 5 | transmitter clocks per quarter bit; bus rate = f_clk / (4·QUARTER) |
| `MODE` | top, `tx_cpld`, `rx_cpld`, (de)scrambler | `SCR_REVERSE` | scrambling transform; must match at both ends |
| `ADC_CHANNEL` / `CHANNEL` | `tx_cpld` / `adc0809_ctrl` | 0 | converter input channel |
| `PULSE_CYCLES` | `adc0809_ctrl` | 2 | width of the `ale`/`start` pulse |
| `OWN_ADDR` | `i2c_slave_rx` | `ADDR_RX1` | station address; `rx_cpld` sets `ADDR_RX1` and `ADDR_RX2` |

Station addresses and the switch encoding live in `speech_pkg`. If you slow
the receiver clock or shorten `QUARTER`, keep two receiver clocks per quarter
bit.

## Departures from the source and open points

- The scrambling algorithm is not known. The three candidates above are
  offered, and bit reversal is picked as the default.
- The frame format, the addresses, the one-way acknowledge slots, the bus
  speed and the meaning of switch position `00` are this design's own.
- Overlapping conversion with sending is this design's own. It makes 8 kHz
  speech fit at typical converter clocks.
- The receiver outputs carry an extra one-clock `valid` pulse.
- The article's chips were CPLDs programmed in VHDL. This RTL is
  vendor-neutral SystemVerilog and has not been fitted to an XC95108.
  Synthesis maps the whole link to about 150 flip-flops. The transmitter
  alone is about 70 flip-flops, and each receiving station about 40.
