# A 32-tap FIR filter for an FPGA audio path, built around one multiplier

This design filters a stream of 12-bit samples from an A/D converter and sends
the result to a D/A converter. It is a 32-tap finite impulse response (FIR)
filter, `y[n] = sum_{k=0..31} c[k] * x[n-k]`, built around a single
multiplier and accumulator. All 32 products of one output sample are computed
one per clock in a burst. At a 20 kHz sample rate and a 100 MHz clock the
burst fills 35 of the 5000 clocks between samples.

The design was written with bench debugging in mind:

- Four coefficient sets sit in one ROM, and two switches pick between them.
- Two more switches pick which slice of the 29-bit accumulator goes to the DAC.
- Sixteen pins carry the clock, the three control signals and a chosen
  12-bit word to a logic analyzer.

## Signal flow

```
 sample_timer --adc_start--> [ADC driver, external] --adc_valid, adc_data-->
   adc_offset (-2048) --> sample register --> sample_shreg (32 x 12, data memory) --+
                                                                                   |  x[n-k]
   sw_page --> coef_rom (128 x 12, registered, 4 pages of 32) -------- c[k] ------+
                                                                                   v
                                             fir_mult (12 x 12 -> 24, registered)
                                                                                   v
                                             fir_accum (sign-extend to 29, accumulate)
                                                                                   v
   sw_range --> acc_range_sel (sign + 11 bits) --> dac_level_shift (+2047) --> output register
                                                                                   v
                                                   dac_valid, dac_data --> [DAC driver, external]
   fir_ctrl sequences all of the above; debug_port drives tek[15:0].
```

| file | role |
|---|---|
| `rtl/fir_pkg.sv` | widths (12, 24, 29), sample/coefficient/accumulator types, select encodings |
| `rtl/fir_top.sv` | top level: wires the blocks, sample register, DAC output register |
| `rtl/fir_ctrl.sv` | state machine: load, 32 multiply-accumulate clocks, drain, output |
| `rtl/sample_shreg.sv` | last 32 samples; shift-in on load, rotate during the burst |
| `rtl/coef_rom.sv` | 4 pages x 32 coefficients, one clock read latency |
| `rtl/fir_mult.sv` | 12 x 12 signed multiplier with output register |
| `rtl/fir_accum.sv` | 24-to-29-bit sign extension and accumulator |
| `rtl/acc_range_sel.sv` | picks sign bit + 11 accumulator bits for the output |
| `rtl/adc_offset.sv` | ADC code to signed sample |
| `rtl/dac_level_shift.sv` | signed output to DAC code |
| `rtl/sample_timer.sv` | sample-rate strobe (divide by 5000) |
| `rtl/debug_port.sv` | 16 logic-analyzer pins |

## Timing of one output sample

This is the part that needs the most care. Two things make it tricky. The ROM
has a registered output, and the data memory is read without a register. The
sequencer has to make coefficient `k` and sample `x[n-k]` meet at the
multiplier in the same clock.

Clock numbers below count from the clock edge that sees `adc_valid` (t = 0):

| clocks after t | controller state | what happens |
|---|---|---|
| 0 -> 1 | IDLE | the offset-corrected sample is captured in the sample register, start flag set |
| 1 -> 2 | LOAD | `load_fir_shiftR`=1, `fir_shift_en`=1: sample shifted into position 0; accumulator cleared; ROM address is 0, so the ROM registers c[0] |
| 2+k -> 3+k, k = 0..31 | CALC | `fir_calc`=1: ROM output is c[k], shift register output is x[n-k]; the multiplier takes them; the register rotates; the ROM address moves to k+1 |
| 34 -> 35 | DRAIN | product 31 is added |
| 35 -> 36 | OUT | accumulator holds y[n]; the output register loads |
| 36 -> 37 | IDLE | `dac_valid`=1 for this one clock; `dac_data` holds y[n] until the next result |

So `dac_valid` is seen 37 clocks (NTAPS+5) after `adc_valid`. The filter is busy
for NTAPS+3 clocks per sample. An `adc_valid` that comes while it is busy is
ignored.

The ROM address is held at 0 while the controller is idle, and it runs one step
ahead of the tap counter during the burst. As a result, coefficient 0 is on the
ROM output in the first clock of `fir_calc`. The logic-analyzer check in
`tb_fir_ramp_debug` confirms exactly this.

The data memory is a shift register with two moves:

- **Load.** The new sample enters at position 0 and the oldest drops out.
- **Rotate.** Every position moves one step toward 0, and position 0 wraps
  round to position 31.

32 rotations bring the register back to where it was after the load. The next
sample can therefore be shifted in without any bookkeeping.

## Number formats along the path

- **ADC to sample.** The ADC code is offset binary, with mid-scale 2048 meaning
  zero signal. Read as a signed 12-bit number, the code has the bit pattern
  `1000_0000_0000` (-2048) added to it. This subtracts 2048 modulo 4096 and is
  the same as inverting the MSB: code 0 becomes -2048, 2048 becomes 0 and 4095
  becomes +2047.
- **Product.** The product is 12 x 12 signed, giving 24 bits. It must be
  sign-extended, not zero-extended, to 29 bits before it is accumulated. A
  zero-extended product turns every negative term into a large positive one.
- **Accumulator.** The accumulator is 29 bits: 24 bits plus 5 bits of growth
  for 32 terms. The largest possible sum, 32 x 2048 x 2048 = 2^27, fits.
- **Output slice.** The 12-bit output word is the accumulator's sign (bit 28)
  followed by 11 bits chosen by `sw_range`:

  | `sw_range` (sw7, sw6) | bits |
  |---|---|
  | 0 | 10..0 |
  | 1 | 15..5 |
  | 2 | 20..10 |
  | 3 | 25..15 |

  How large the result is depends on both the coefficients and the input, so
  the slice is picked by hand:
  - **Too low.** Bits above the slice are lost, the value wraps, and the DAC
    shows a sawtooth-like distortion of the signal.
  - **Too high.** Only a few low-order bits move, or none, and the output
    looks flat.

  For example, with the all-ones page, a 1 Vp-p input on a 3.3 V ADC gives
  sums of up to about ±30,000. Slice 15..5 shows such a signal cleanly, and
  slice 10..0 wraps it.
- **DAC code.** 2047 is added to the signed word, 12 bits wide, so that
  negative half-cycles sit below mid-scale: -2047 becomes 0, 0 becomes 2047
  and +2047 becomes 4094. The single value -2048 wraps to 4095.

## Coefficient ROM

The ROM holds 128 words of 12 bits. Its address is `{sw_page[1], sw_page[0],
k[4:0]}`, so switch sw1 drives address bit 6 and sw0 drives bit 5.

| page | contents | effect |
|---|---|---|
| 0 | c[0] = 0x001, others 0 | output = input (in slice 10..0) |
| 1 | all 0x001 | 32-sample moving average; removes a sine whose period is exactly 32 samples (625 Hz at 20 kHz) |
| 2 | c[k] = 8 * min(k+1, 32-k), values 8..128, sum 2176 | triangular-window low-pass |
| 3 | c[0] = 0xFFF (-1), others 0 | output = -input |

Page 3 also has a second job. It makes sure that every bit position of the ROM
is 1 in at least one word. If some bit were 0 in every word, synthesis would
remove that output flip-flop and the logic behind it, and the circuit
would differ from the one intended.

The low-pass values on page 2 are this design's own choice; any 32-value set
can be put there by editing `init_word` in `coef_rom.sv`.

The parameter `RAMP_TEST=1` loads 0, 1, ..., 31 into every page instead. With
that pattern the ROM address sequence can be read directly off the debug pins.

## Debug pins

`tek[15:0]` is meant for a 16-channel logic analyzer on two 8-pin connectors:

| pin | signal |
|---|---|
| DIO0 | clock (forwarded directly) |
| DIO1 | `fir_calc` |
| DIO2 | `load_fir_shiftR` |
| DIO3 | `fir_shift_en` |
| DIO4..DIO15 | 12-bit word, bit 0 on DIO4 |

`dbg_sel` chooses which 12-bit word goes on DIO4..DIO15:

| `dbg_sel` | word |
|---|---|
| 0 | ROM output |
| 1 | data-memory output |
| 2 | offset-corrected ADC sample |
| 3 | DAC word |

Define DIO4..DIO15 as a bus in the analyzer to see the word as three hex
digits. On an FPGA the forwarded clock on DIO0 is best sent through a DDR
output register; here it is a plain wire, and a synthesis tool reports it as
an output tied to an input.

## What is outside this RTL

The ADC driver and the DAC driver are not included. Their interface is assumed
to be:

- **ADC driver.** It receives a one-clock `adc_start` request at the sample
  rate and returns `adc_valid` together with a 12-bit `adc_data` some clocks
  later.
- **DAC driver.** It takes `dac_data` when `dac_valid` pulses.

If your drivers use a different handshake, adapt `fir_top`. The sample rate
comes from `SAMPLE_DIV` = 5000, which assumes a 100 MHz clock and a 20 kHz
sample rate; change it for another clock.

On the analog side, the DAC's 2.048 V full scale against the ADC's roughly
3.3 V means a DC component at the input reappears at the output scaled by
about 0.62. An AC test signal on a DC-coupled ADC input needs an offset near
mid-scale (about 1.62 V).

## Choices made here rather than given

The following were not specified and were chosen for this design:

- the state machine and its one-clock LOAD, DRAIN and OUT states;
- the multiplier's output register;
- the shift register's rotate read-out;
- the ADC/DAC handshake;
- synchronous active-high reset;
- the DAC register resetting to 2047;
- dropping samples that arrive while busy;
- the page-2 coefficient values;
- the debug word select;
- the 100 MHz clock assumption.

The following follow the original design:

- widths 12/24/29 and the sign extension;
- the four-page ROM layout, its pages 0, 1 and 3 and the switch mapping;
- the four output slices;
- the -2048 and +2047 conversions;
- the registered ROM and the coefficient-0-in-first-clock timing;
- the debug pin map.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_fir_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/fir_pkg.sv tb/tb_fir_top.sv -o sim
./obj_dir/sim
```

| testbench | checks |
|---|---|
| `tb_fir_top` | Runs the full design at its default parameters through about 190 samples. It checks every DAC word and the accumulator against a reference model, the 37-clock latency and the debug pins in every clock. It walks all four pages, all four slices and all four debug selections. It checks that a 625 Hz sine at 20 kHz is nulled by the moving average, that slice wrap-around occurs and that a sample sent while busy is dropped. |
| `tb_fir_ramp_debug` | Runs the top with `RAMP_TEST=1` and a short sample divider. It checks that the debug word reads k in the k-th `fir_calc` clock, that `load_fir_shiftR` comes just before `fir_calc`, that `fir_calc` lasts 32 clocks, and it checks every output. |
| `tb_fir_50hz` | Runs the full design at default parameters with a 50 Hz, 1 Vp-p sine on a 1.92 V offset, converted as a 3.3 V ADC would, through the moving-average page for one period per slice. In slice 10..0 the output wraps and jumps. In slice 15..5 it never wraps and gives a smooth sine of about 1230 codes peak to peak, centred 335 codes above mid-scale (the input's DC offset). |
| `tb_fir_ctrl` | Cycle-by-cycle control sequence and busy behaviour. |
| `tb_coef_rom` | All 128 words, one-clock latency, no all-zero bit, ramp contents. |
| `tb_sample_shreg` | Against a queue model; return to the start after 32 rotations. |
| `tb_fir_mult`, `tb_fir_accum` | Corner and random operands; full-scale and negative sums. |
| `tb_acc_range_sel`, `tb_adc_offset`, `tb_dac_level_shift` | Exhaustive or random against arithmetic models. |
| `tb_sample_timer` | Tick spacing for the default and a short divider. |
| `tb_debug_port` | Pin map and word select. |

The top-level test at full size runs in about a second. The controller holds
two SystemVerilog assertions, checked with `--assert`: `fir_calc` starts with
tap 0 and ends after tap 31.
