# IR-UWB transmitter with on-chip GCD compression of neural data

A neural implant with many recording channels spends most of its power in the
radio. This design reduces both parts of that cost. First, it sends fewer symbols:
level-crossing ADC (LC-ADC) data is very sparse, and a small lossless compressor
based on the greatest common divisor (GCD) shortens each channel's packet
before it is sent. Second, it makes each symbol cheap: an impulse-radio
ultra-wideband (IR-UWB) transmitter sends one short pulse per symbol. The pulse
is built from delayed logic edges instead of an oscillator.

This repository holds SystemVerilog for the whole chip:

* the **digital controller**, which is synthesizable RTL: eight LC-ADC
  channels, per-channel compression, a serializer and a register file;
* a **test multiplexer**, also synthesizable RTL;
* **behavioural models** of the analog transmitter: PPM modulator, delay
  line, glitch-generator pulse generators and tri-state unit power amplifiers.

The design can be simulated end to end, from LC-ADC bits to the combined
output node of the power amplifiers.

```
 lcadc_data_in[7:0] ┐   ┌──────────── digital_controller ─────────────┐
 lcadc_dir_in[7:0]  ├──►│ 8 x gcd_encoder ──► packet_serializer ──────┼─► tx_data/tx_dir ─┐
 clk_tgran ─────────┘   │ (shift regs, window FSM, gcd_compressor)    │                   │
 address/data/we ──────►│ control_regfile ─► PA enables, standby, mode│             tx_source_mux ◄── ext_data/ext_dir
                        └─────────────────────────────────────────────┘                   │
                                                                                          ▼
                        uwb_transmitter: ppm_modulator ─► delay_line (8 stages) ─► 8 x pulse_gen_pa ─► rf_drive
                                                                                     (glitch gen + 8 unit PAs)
```

## LC-ADC data and packets

An LC-ADC does not sample at a fixed rate. Once per time step TGRAN (190 µs
nominal), it reports two bits:

* `DATA`: 1 if the signal crossed a quantisation level during the step;
* `DIR`: 1 if the crossing was upward.

More than nine steps in ten have no crossing. The controller collects
`WINDOW` = 16 consecutive steps per channel into a packet: 16 DATA bits and
16 DIR bits. Bit 15 is the oldest step and bit 0 the newest.

## GCD compression

### The rule

Look at the zero runs of a packet's DATA bits:

* the run before the first crossing;
* the runs between crossings;
* the run after the last crossing.

Take the greatest common divisor *g* of all run lengths and divide every run
by *g*. The receiver knows the window size. From the compressed length it
recovers *g* and multiplies the runs back, so the timing is restored exactly.

* An empty packet has one run of 16 zeros. It is sent as a single `0`.
* A packet with one crossing at bit *p* has runs of `15-p` and `p`, so
  *g* = gcd(*p*, 15).

With a window of 16, that one-crossing rule lets lone crossings at bits 0, 3,
5, 6, 9, 10, 12 and 15 be compressed. The compressed packet has `15/g + 1`
bits. Compressed bit *k* is original bit *k·g*, so the crossing lands at bit
*p/g*. Its DIR bit moves with it, and all other DIR bits are 0.

| DATA in | crossing bit *p* | *g* | length | DATA out |
|---|---|---|---|---|
| `0000` | none | 16 | 1 | `0` |
| `8000` | 15 | 15 | 2 | `2'b10` |
| `0001` | 0 | 15 | 2 | `2'b01` |
| `0040` | 6 | 3 | 6 | `6'h04` |
| `0200` | 9 | 3 | 6 | `6'h08` |
| `0020` | 5 | 5 | 4 | `4'h2` |
| `0400` | 10 | 5 | 4 | `4'h4` |
| `0800` | 11 | 1 | 16 | `16'h0800` (unchanged) |

### What the hardware detects

A general GCD engine would need a fast clock and many cycles. The
`gcd_compressor` instead recognises a fixed set of packets in pure
combinational logic:

* the empty packet;
* the eight one-crossing packets listed above.

That is 9 patterns, and they cover nearly all the compression that ECoG data
allows. Any other packet passes unchanged with length 16. That includes
packets with several crossings, even when their runs share a factor. The
detection table is computed at elaboration from `N`, so a different window
size needs no hand-written table.

Sixteen steps suits this pattern set particularly well. A lone crossing can
only be compressed when N-1 has small factors, and 15 = 3·5 gives eight such
positions. With N = 12, 20, 24 or 30, N-1 is prime, so only the two end
positions and the empty packet compress. On a sparse random stream with a
crossing probability of 1/20 per step, the mean compression is about
2.2× at N = 16, against 1.6× at 20 and 1.3× at 30. A 10-step window
(9 = 3·3) reaches 2.7× on that synthetic stream, but it sends frames more
often. The choice of 16 rests on recorded data, not on this stream.

### Lossy stride-1 mode

A lone crossing at a bit where gcd(*p*, 15) = 1 (bits 1, 2, 4, 7, 8, 11, 13,
14) cannot be compressed. In lossy mode the crossing is first moved one step
to the neighbouring bit that gives the larger *g*. Its DIR bit moves with it.
The crossing is moved, never dropped, so the recorded voltage is still right
at both ends of the packet; only one edge is off by one TGRAN. For N = 16 a
tie between the two neighbours never happens; if one did, the later step
would win. Lossy mode adds 8 patterns, 17 in all.

Mode `COMP_NONE` bypasses compression. It is useful for testing and for
measuring the link.

### Where the data path waits

`gcd_encoder` shifts one bit per TGRAN tick into two 16-bit shift registers.
On the 16th tick of a window it raises `load`. On the next `clk_prf` edge it
registers the compressor output (`data_out`, `dir_out`, `len`) and raises
`valid`. The registers then hold the packet while the next window fills.
`rd_ack` from the serializer clears `valid`. If a new window completes while
`valid` is still set, the old packet is overwritten and `overrun` pulses. At
the nominal clocks this cannot happen.

## Frame format

When all eight channels are valid, `packet_serializer` does the following:

1. It copies all packets into its own registers and acknowledges the
   encoders.
2. It sends one frame: `D p0 D p1 D p2 … D p7 D`.

Here `D` is the 3-symbol start/stop delimiter, sent MSB first, and `pN` is the
compressed packet of channel N, sent from bit len-1 (oldest) down to bit 0.
The delimiter has programmable DATA bits and programmable DIR bits.

Each symbol takes **two** `clk_prf` cycles:

* `tx_data` carries the DATA bit in the first cycle and returns to 0 in the
  second. This way a run of 1s still gives the transmitter a rising edge per
  symbol.
* `tx_dir` is held for both cycles.

A frame whose packets have lengths L0…L7 therefore lasts
`2·(ΣLi + 9·3)` cycles. The worst case, with nothing compressed, is 310
cycles = 44 µs at 7 MHz. A window lasts 16 × 190 µs = 3.04 ms.

Example: the controller's reference input has these DATA words for channels
0–7:

```
0000 0000 0000 0800 0200 2000 0400 3FFF
```

DIR is all 0 and the mode is lossless. The packets are then:

```
0, 0, 0, 16'h0800, 6'h08, 16'h2000, 4'h4, 16'h3FFF
```

The frame holds 61 packet symbols and 27 delimiter symbols.

## Registers

`control_regfile` has a 4-bit address, an 8-bit data input and
`write_enable`, all sampled on `clk_prf`. Registers are write-only from the
pins, and their values drive the chip directly.

| address | contents | reset |
|---|---|---|
| 0–7 | PA enables of pulse generator *i*, one bit per unit PA | `8'hFF` |
| 8 | `[0]` standby, `[2:1]` mode (0 none, 1 lossless, 2 lossy, 3 = lossless), `[3]` transmitter fed from `ext_data`/`ext_dir` | standby, lossless, controller |
| 9 | `[2:0]` delimiter DATA, `[5:3]` delimiter DIR | `111` / `101` |

The chip comes out of reset in standby, so clear bit 0 of register 8 before
you expect pulses.

## Transmitter model

The transmitter turns each rising edge of `tx_data` into one UWB pulse. The
time of the pulse carries `tx_dir` (2-PPM).

* **ppm_modulator**: the edge takes one of two paths, selected by DIR.
  * DIR = 0: straight through.
  * DIR = 1: through a current-starved delay cell biased by `vctrl_ppm`.
    The model's delay is 120 ns at 0.6 V, falling to 2 ns at 1.1 V. It is
    about 15.5 ns at 0.85 V.
* **delay_line**: 8 stages. Each stage is a delay cell with its own bias
  `vctrl_dc[i]`, followed by a restoring inverter. The model's stage delay is
  0.5 ns at 1.1 V, falling to 0.1 ns at 1.8 V, so the stages span a pulse of
  about 2 ns. The last tap is brought out as `delay_line_out`.
* **glitch_generator**: the output is the AND of the edge and a delayed,
  inverted copy of it. This gives a pulse whose width is the delay set by
  `vctrl_gg[i]`: 200 ps at 1.1 V down to 100 ps at 1.8 V. About 125–150 ps
  suits the 4 GHz centre frequency.
* **pulse_gen_pa / unit_pa**: each glitch drives 8 tri-state unit PAs.
  * An enabled unit pulls the shared node up during the glitch and down
    otherwise.
  * A disabled unit is high-Z.
  * The number of enabled units sets the amplitude of that sub-pulse.

The simulator has only two states, so there is no tri-state net. The model
reports, for each unit, whether it pulls up or down. The top adds these up
into `rf_drive` = (units pulling up) − (units pulling down).

* Between pulses, `rf_drive` equals −(number of enabled units).
* Each sub-pulse *i* lifts it by 2 × popcount(`pa_enable[i]`).

The off-chip series capacitor and the antenna would turn this node into the
radiated pulse. They are not modelled.

Standby has these effects:

* it holds the delay-cell outputs low;
* the delayed PPM path, the delay line and every glitch generator stop;
* no pulse is produced even though symbols keep arriving.

Delays are transport delays on `real` control voltages. The curves are
log-linear between two end points and clamped outside them. They reproduce
the direction and rough range of the circuit, not its exact shape. Change the
`V_LO/V_HI/D_LO_NS/D_HI_NS` parameters to fit measured curves.

## Clocks and timing

Everything runs on `clk_prf` (7 MHz). `clk_tgran` is slow (1/190 µs). It is
brought in through a two-flop synchroniser, and each rising edge becomes a
one-cycle tick (`edge_sync`). `clk_tgran` must stay high and low for at least
two `clk_prf` cycles each.

The LC-ADC bits must be stable around the rising edge of `clk_tgran`. The
test benches change them half a TGRAN period earlier.

A window's packets are ready 2 to 4 `clk_prf` cycles after the last TGRAN
edge of the window. The frame starts one cycle later.

## Departures and choices

The original design description fixes the structure. It fixes these points:

* the block split;
* 8 channels;
* 16-step windows;
* 7 MHz PRF and 190 µs TGRAN;
* VALID-flagged output registers;
* a programmable start/stop symbol;
* a register file for PA enables and standby;
* a test multiplexer;
* the transmitter's cell structure.

These points are choices made here:

* the register map and reset values;
* the 3-symbol delimiter, placed around every packet;
* channel 0 first, and the two-cycle return-to-zero symbol;
* the `rd_ack` handshake and the `overrun` flag;
* the single clock domain with a synchronised TGRAN;
* all analog delay curves and the 50 ps PA buffer delay.

Known differences from the published description:

* **Reference output for `0200`.** The published output gives `6'h04`. The
  compression rule gives `6'h08`, and the rule also gives the published
  results for `0040` → `6'h04` and `0020` → `4'h2`. This design follows the
  rule.
* **Size of the lossy set.** The lossy mode is described as needing 19
  patterns. A stride-1 move of the nine lossless patterns yields 17, which is
  what is built.
* **Width of LENGTH.** A block diagram shows a 4-bit LENGTH, but an
  uncompressed length of 16 needs 5 bits, which is what is built.
* **Which PPM position means 1.** One passage calls the variable-delay
  position the '1' bit; a measurement passage sets a delay for a '0' bit.
  Here DIR = 1 selects the delayed path. Swapping the meaning only means
  inverting DIR in front of the modulator.
* **Register pins.** The published controller waveform shows `address_in`,
  `write_enable` and `select_reg`, which this design keeps. It also shows
  control pins (`ctrl_in`, `sel`, `clear`) whose function is not described.
  This design does not have them: it has an 8-bit `data_in`, and the test
  multiplexer is selected by a register bit.
* **Channel count.** The scalability target is 1000 channels. The chip, and
  this RTL, has 8. At 7 MHz with two-cycle symbols the link carries
  3.5 Msymbol/s. That would cover the 1.2 MHz needed by 1000 compressed
  channels, but not the 5 MHz needed uncompressed.

## Simulating

Every test bench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends a hung run.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_uwb_tx_chip rtl/gcd_pkg.sv tb/tb_uwb_tx_chip.sv
./obj_dir/Vtb_uwb_tx_chip
```

Use the same command with another `tb_<block>` for each block.

| test bench | what it shows |
|---|---|
| `tb_gcd_compressor` | all 65,536 packets in all three modes against an independent run-length compressor and decompressor; the 9- and 17-pattern sets; the worked examples |
| `tb_gcd_encoder` | window timing, valid/rd_ack, overrun |
| `tb_packet_serializer` | random frames, exact symbol stream and frame length |
| `tb_control_regfile` | reset values, random writes |
| `tb_tx_source_mux` | both sources |
| `tb_digital_controller` | 13 windows in all modes with changing delimiters, against a reference stream |
| `tb_delay_cell`, `tb_ppm_modulator`, `tb_delay_line`, `tb_glitch_generator`, `tb_unit_pa`, `tb_pulse_gen_pa`, `tb_uwb_transmitter` | delays, pulse widths, PPM position, amplitude against the enables, standby |
| `tb_uwb_tx_chip` | the whole chip at its nominal clocks, with no parameter overrides, over six windows |
| `tb_gcd_window_sweep` | the compressor at windows of 10, 12, 16, 20, 24 and 30 steps against the rule; prints the detected-set sizes and a sparse-stream compression ratio per size |
| `tb_uwb_tx_prf` | the transmitter fed from the external pins at 20 MHz (5 ns PPM delay) and 40 MHz: 200 random bits each, decoded from pulse position with no errors; a VCTRL_PPM sweep from 0.6 V to 1.1 V |

`tb_uwb_tx_chip` covers:

* the reference vectors;
* lossy moves and compression off;
* a new delimiter and new PA enables;
* standby;
* the external source;
* a deliberately over-fast TGRAN that forces an overrun.

Each pulse is decoded from `rf_drive` for position and amplitude. The bench
fails if any of these mechanisms never occurred. It simulates 18 ms in well
under a second.

## Trusting and changing it

* The digital part is synthesizable. It passes Verilator lint and a second
  SystemVerilog front end. Verilator warns about a zero-delay possibility in
  the delay cell model and about the `disable iff` reset in the serializer's
  length assertion; both are expected.
* The transmitter models use `real` ports and delays. They are for
  simulation only, and a synthesis tool will reject them.
* `gcd_pkg` holds:
  * `WINDOW`, `NUM_CH` and `DELIM_LEN`;
  * the mode type;
  * the register addresses.

  The compressor and encoder take `N` as a parameter and build their tables
  from it.
* The detected set follows the one-crossing rule above. Detecting
  multi-crossing patterns would need extra table entries in
  `gcd_compressor`.
