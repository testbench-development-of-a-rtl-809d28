# Shift-register tester for a sigma-delta ADC / accelerometer chip

A mixed-signal chip (MEMS accelerometer, low-noise amplifier, sigma-delta ADC,
bandgap reference) is configured through fifteen 10-bit **SIPO** (serial-in,
parallel-out) registers and returns its ADC data through one 10-bit **PISO**
(parallel-in, serial-out) register. The chip has no built-in test logic: no
boundary scan, no BIST, no scan chain. So whether those registers work, and
with them every configuration bit of the chip, has to be found out from outside.

This RTL is the FPGA side of that test. It writes known words into every SIPO
group, reads them back through each group's serial Data Out pin, shows the
result on five LEDs, and reads the chip PISO in a loop. The hard part is timing
across the chip/board boundary. The FPGA generates every serial clock. Data
coming back from the chip arrives late by an amount that simulation cannot
predict (level shifters, PCB, FPGA board). Both receivers therefore have a
parameter that moves their sampling point in steps of one system clock.

All code is synthesizable SystemVerilog (IEEE 1800-2017). It uses a single
synchronous, active-high reset `rst` and one system clock `clk`. The nominal
clock is 250 MHz, which gives a 125 MHz serial clock at the default divider of 2.

## Structure

```
                       shreg_tester_top
 mode_i ──► piso_data_gen ──150 bits──► piso_top ──┬─ BG   (1 lane, 30 bit) ──► 3 chip SIPOs in series
                ▲                      (5×piso_tx) ├─ DFT  (1 lane, 10 bit) ──► chip SIPO
                └──── SIPO_LATCH_FE ◄──────────────┤─ FE   (1 lane, 60 bit) ──► 6 chip SIPOs in series
 manual_tx_i ─────────────────────────►            ├─ FECK (1 lane, 10 bit) ──► chip SIPO
                                                   └─ ADC  (4 lanes,10 bit) ──► 4 chip SIPOs, shared clk/latch
 sel_i, weight_i ─► sipo_readback ◄── 8 × Data Out (+ the FPGA's own clk/latch of that group)
                    (mux + dout_capture) ──► readback_word_o, leds_o[4:0]
 rx_enable_i ─────► sipo_rx ◄──► chip PISO (PISO_CLK_ADC, PISO_LATCH_ADC, PISO_DOUT_ADC) ──► adc_word_o
                    chip_piso_data_gen ──► chip_piso_data_o (PISO inputs, for chip-level simulation)
```

| File | Contents |
|---|---|
| `rtl/shreg_pkg.sv` | group sizes, `piso_data_t` (150-bit struct), `dout_sel_e` switch codes, test words |
| `rtl/piso_tx.sv` | one serial transmitter (N bits × L lanes) |
| `rtl/piso_top.sv` | the five transmitters, common divider, manual transmission |
| `rtl/sipo_rx.sv` | reader for the chip PISO |
| `rtl/dout_capture.sv` | sampler for one SIPO group's Data Out |
| `rtl/sipo_readback.sv` | 8-way selector, sampler, LED display |
| `rtl/piso_data_gen.sv` | 150-bit test data generator (one or three sets) |
| `rtl/chip_piso_data_gen.sv` | looping stimulus for the chip PISO's inputs |
| `rtl/shreg_tester_top.sv` | top level |

## Writing a SIPO group (`piso_tx`, `piso_top`)

Each chip SIPO has ten shift flip-flops clocked on the rising edge of its
serial clock, and ten output flip-flops clocked by a separate latch line. A
group of SIPOs in series (BG: 3, FE: 6) behaves like one longer shift chain.
The four ADC SIPOs are separate chains that share clock and latch. So a
transmitter is parameterised by bits per lane (`NBITS`) and number of data lanes
(`NLANES`).

The transmitter changes data on the falling edge of its clock, so data is
stable at the chip's rising edge. The first bit goes out half a period before
the first rising edge, on a falling edge that never appears on the wire. Here is
one transfer of a 3-bit word `b2 b1 b0` at `DIV = 2`. Clock 0 is the system
clock edge at which the new data is seen:

```
clock     0   1   2   3   4   5   6   7   8
sclk      0   1   0   1   0   1   0   0   0
sdata    b2  b2  b1  b1  b0  b0   0   0   0
latch     0   0   0   0   0   0   0   1   0
done                                      1
```

A transfer of N bits takes `(N+1)·DIV` system clocks. At `DIV = 2` that is 22
clocks for DFT, FECK and ADC, 62 for BG and 122 for FE. The latch is high for
the clock's high time (`DIV/2`). Bit `N-1` of a group's field is sent first. At
the latch it has reached the far end of the chain, which for BG and FE is the
last SIPO in series. The chip numbers its DFT bits `DFT[1]`..`DFT[10]`, with
`DFT[1]` going to the last flip-flop. So field bit 9 carries `DFT[1]`, and
field bit 0 carries `DFT[10]`.

A transfer starts when the word applied to the transmitter differs from its
value one clock earlier. Even one bit is enough. If the word changes during a
transfer, that transfer is dropped without a latch pulse and a new one starts
with the new word. Each group watches only its own field, so a DFT change
restarts DFT and leaves a running BG transfer alone. The ADC group watches all
four lanes together.

`piso_top` adds **manual transmission**: a rising edge on `manual_tx_i`
restarts all five groups with their present data. It acts once per edge,
however long the input stays high. An edge during a transfer restarts it as a
data change would. Reset stops every transfer and drives all lines low. The
word present at reset is taken as the reference, so nothing is sent until the
data changes or a manual edge arrives.

## Reading the chip PISO (`sipo_rx`)

The chip PISO loads its ten inputs on a rising clock edge while its load line
is high. It shifts one bit out, MSB first, on every later rising edge. The FPGA
drives both lines. The load pulse is one serial period wide and the first
rising edge falls in its middle. This keeps load high at that edge even if the
divider changes.

Sampling follows the round-trip delay. The chip puts a bit out on a rising
edge, and the bit reaches the FPGA a board delay later. The reader therefore
samples each bit one full serial period after the chip put it out, on the next
rising edge. The MSB, loaded on edge 1, is sampled at edge 2. The LSB is
sampled at an eleventh edge that is never put on the wire. `DELAY` moves every
sample a further `DELAY` system clocks later. At `DIV = 4`, with `t = 0` the
first clock of the load pulse:

```
t       0 1 2 3 4 5 6 7 8 9 ...          42
load    1 1 1 1 0 0 0 0 0 0
sclk    0 0 1 1 0 0 1 1 0 0 ...  (10 pulses, rising at t = 2, 6, …, 38)
sample              ^       ^ ...         ^   at t = LO + (k+1)·DIV + DELAY, k = 0..9  (DELAY = 0)
```

`LO = DIV - DIV/2` is the low time of the serial clock. When the tenth sample
is in, `data_o` takes the word and `valid_o` pulses. While `enable_i` is high
the reads repeat. Each new read starts `IDLE + 1` clocks after the last sample
of the previous one. `enable_i` is only looked at when a read could start. If
it falls during a read, that read still completes and then the loop stops.

A sample taken at system clock edge *E* sees the chip output as it was just
before *E*. The data path is `P` system clocks long, counted from the edge that
raised the chip clock to the edge where the sample lands. With that path,
`DELAY` must lie in `[P − DIV + 1, P]`: the valid window is one serial period
wide. For example, a 5-clock path at `DIV = 2` works with `DELAY` 4 or 5.
The first bit is then taken at the fourth rising edge instead of the second.

## Reading a SIPO group back (`dout_capture`, `sipo_readback`)

The chip's internal SIPO outputs cannot be reached from outside. What can be
reached is each group's Data Out, the end of its shift chain. During a transfer
the chain shifts the previous word out. The word written in one transfer
therefore comes back during the next one. A 30-bit or 60-bit chain returns its
first 10 bits, the most significant ones. Those bits have passed through every
SIPO of the chain.

`dout_capture` uses the serial clock and latch that the FPGA itself sends to
the group, so those two signals have no board delay. Data Out first passes an
input register. Each rising serial-clock edge schedules one sample `CAPTURE`
system clocks after the edge that raised the clock. The sampled value is the
pin as it was `CAPTURE − 1` clocks after that edge:

* `CAPTURE = 1` (the minimum) takes the bit on the pin just before the chip
  shifts. This is right for a short path.
* Each step of `CAPTURE` moves every sample one system clock later. For a path
  of `P` system clocks, `CAPTURE = P + 1` is exact. The valid range is
  `[P + 2 − DIV, P + 1]`.

The first ten samples after each latch pulse form the word. The latch passes
through the same delay as the samples, so samples still pending from one
transfer are never counted in the next. Nothing is reported before the first
latch after reset.

`sipo_readback` selects one group with three switches. The codes below are
`shreg_pkg::dout_sel_e`:

| `sel_i` (SW2 SW1 SW0) | group |
|---|---|
| 000 | FECK |
| 001 | DFT |
| 010 | ADC0 |
| 011 | ADC1 |
| 100 | ADC2 |
| 101 | ADC3 |
| 110 | BG (10 MSBs of 30) |
| 111 | FE (10 MSBs of 60) |

`readback_word_o` holds the 10 captured bits. `leds_o` shows bits 9..5 when
`weight_i = 1` and bits 4..0 when it is 0.

## Test data (`piso_data_gen`, `chip_piso_data_gen`)

`piso_data_gen` drives all 150 transmitter bits. During reset it outputs zeros.
In the first clock after reset it puts out set 1, and the change starts every
group.

* `mode_i = 0`: set 1 stays, so each group gets one transfer.
* `mode_i = 1`: 52 clocks after set 1, set 2 appears. At `DIV = 2` this
  interrupts the BG (62-clock) and FE (122-clock) transfers, so the
  restart-on-change path is used every time. When the next FE latch pulse
  ends, set 3 appears and stays. FE is the longest transfer, so at that point
  every group has finished set 2.

The ten most significant bits of each group in set 1 are the sequences used in
the physical test of the chip:

| group | sequence |
|---|---|
| FECK | 0110001010 |
| DFT | 1000101000 |
| ADC0 | 1011100101 |
| ADC1 | 0101101110 |
| ADC2 | 1110110111 |
| ADC3 | 1110111101 |
| BG | 0111010001 |
| FE | 1101010100 |

The other bits and sets are arbitrary. They are chosen so that every group
changes from one set to the next.

`chip_piso_data_gen` puts three 10-bit words in a loop on `chip_piso_data_o`,
28 clocks each. The first word is `1001110110`. On silicon the PISO's inputs
come from inside the chip. This port exists for chip-level simulation, where it
gives the PISO reader a known word.

## Parameters of `shreg_tester_top`

| parameter | default | meaning |
|---|---|---|
| `DIV` | 2 | system clocks per serial clock period, all links (≥ 2) |
| `RX_DELAY` | 0 | extra system clocks before each chip-PISO sample |
| `RX_IDLE` | 4 | system clocks between chip-PISO reads |
| `CAPTURE` | 1 | SIPO read-back sample point, system clocks after the edge (≥ 1) |
| `GEN_WAIT` | 52 | clocks set 1 is held in mode 1 |
| `CHIP_GEN_WAIT` | 28 | clocks each chip-PISO stimulus word is held |

The serial clock is the system clock divided by `DIV`. It was used at 125 MHz
(250/2) in simulation and at 100 MHz (200/2) and 10 MHz (200/20) on the
bench. The level shifters limit the wire to about 100 MHz.

## Simulating

The testbenches in `tb/` are self-checking. Each prints
`TB_RESULT checks=N failures=M`. They include behavioural models of the chip:

* `chip_sipo_model`: a SIPO chain with latched outputs.
* `chip_piso_model`: the PISO plus a delay line for the board path.
* `chip_model`: all fifteen SIPOs and the PISO, with configurable return-path
  delays.

Run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/shreg_pkg.sv tb/tb_shreg_tester_top.sv --top-module tb_shreg_tester_top
./obj_dir/Vtb_shreg_tester_top
```

| testbench | what it covers |
|---|---|
| `tb_piso_tx` | words latched by model SIPOs, pulse count, latch width, `(N+1)·DIV` timing, restart on change, start input, reset; 4×10 bit at DIV 2 and 30 bit at DIV 3 |
| `tb_piso_top` | all five groups, independent restart (DFT restarts, BG does not), manual edge once per edge and as a restart |
| `tb_sipo_rx` | words read against words loaded, load width and position, 10 pulses, read spacing, enable stop, reset; DIV 2 with no path and DELAY 0; DIV 8 with a 34-clock path and DELAY 34; DIV 2 with a 5-clock path and DELAY 4 |
| `tb_dout_capture` | 10-bit chain at DIV 2 with no path (`CAPTURE = 1`); 30-bit chain at DIV 8 with an 8-clock path (`CAPTURE = 9`); 60-bit chain at DIV 2 with a 2-clock path (`CAPTURE = 3`) |
| `tb_sipo_readback` | all eight switch codes, LED halves |
| `tb_piso_data_gen`, `tb_chip_piso_data_gen` | sequencing and hold times |
| `tb_shreg_tester_top` | whole design at default parameters against `chip_model`: three data sets with change restarts, read-back of all eight groups, manual transmission and restart, PISO read loop and its stop, mode 0; counts each mechanism |
| `tb_shreg_tester_top_delay` | the same at DIV 4 with a one-period SIPO return path (`CAPTURE = 5`) and a 5-clock PISO path (`RX_DELAY = 5`) |

## Design choices and limits

These points are this design's own; the behaviour described above them
follows the original test set-up.

* **Sample-point convention.** It is not pinned down which bit a given
  `CAPTURE` or `DELAY` value lands on for a particular board. The conventions
  above are exact for the models in `tb/`. On hardware, sweep the parameter
  and use the middle of the working range.
* **Read-back framing.** The bit that belongs to serial edge *k* is the one
  already on Data Out when edge *k* rises: the chain's last stage shows the
  previous word's MSB before the first edge. Because of the input register,
  the pin is observed one system clock before the sample is stored. So
  `CAPTURE = 1` looks at the pin at the rising edge itself, not one clock
  after it. A bench setting found by counting clocks from the chip's output
  edge may therefore need one extra step here.
* **Fixed sample points.** `DELAY` and `CAPTURE` are elaboration-time
  parameters, as in the original design. Changing them means rebuilding.
* **Latch placement.** The latch comes one low half-period after the last
  clock pulse. For an odd `DIV` the clock is high for `floor(DIV/2)` clocks.
* **Set 3 timing.** Set 3 follows the *end* of the FE latch pulse rather than
  its start. At `DIV > 2`, the new data would otherwise cut that latch pulse
  short.
* **Read spacing.** The gap between chip-PISO reads (`RX_IDLE`) is a free
  choice.
* **Reset.** Reset is synchronous. A manual-transmission input already high
  when reset is released does not trigger a transfer.
* **Not covered.** There is no logic for the board's temperature sensor, which
  shares the BG serial clock. The analog board circuits and the chip itself
  are outside this RTL. The chip appears only as behavioural models in `tb/`.
