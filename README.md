# A single-multiplier IIR decimation filter for an 18-bit ADC

This design filters the samples of a fast 18-bit ADC with a high-order IIR
low-pass filter, using only one 18×18 hardware multiplier. The filter is a
cascade of up to seven second-order sections (biquads). All of them are
computed one after the other by the same multiply-accumulate unit, in a fixed
128-clock schedule per input sample. With a 2^26 Hz (67.1 MHz) clock this gives
one filtered sample every 1/524288 s. That is the rate of the ADC the design is
meant for, and the low-pass output can then be decimated to 16384 Hz by
keeping every 32nd sample.

The schedule is not hard-wired. It is a *program* of 128 words stored next to
the filter coefficients in one dual-port block RAM. Each word holds an 18-bit
coefficient half and an 18-bit control word. A counter steps through the
program once per sample. Four such programs (banks) fit in the memory, and a
3-bit select input picks the filter. A host processor can rewrite the
coefficients at any time through a simple address/data bus.

## 1. The arithmetic

Each section computes, in direct form I,

    y = c0 · (x + b1·x[-1] + b2·x[-2]) + a1·y[-1] + a2·y[-2]

and the cascade is preceded by an overall gain `g`. Note the sign
convention: `a1` and `a2` are *added*, so they have the opposite sign of the
usual `1 + a1 z^-1 + a2 z^-2` denominator.

Three tricks keep the hardware small:

* **Shared history.** The output of section j is the input of section j+1.
  So one pair of stored values (newest, older) per section boundary serves
  as the y-history of one section and the x-history of the next. Seven
  sections need eight slots.
* **c0 is a power of two.** The per-section gain `c0 = 2^-n`, n = 0..7, is a
  right shift of the accumulator rather than a multiplication. Designs
  choose `c0` so that the gain from the input to every section output stays
  in [1, 2) as far as the shift range allows (see section 9), and the
  overall gain `g` (|g| < 2) takes up the rest.
* **The accumulator is never cleared between sections.** It is cleared once
  per sample. It is loaded with `g·x`, which is the input of section 0. Each
  section then adds `b2·x[-2] + b1·x[-1]`, shifts the sum right by n, and adds
  `a2·y[-2] + a1·y[-1]`. The accumulator now holds that section's output at
  full precision, which is the starting value of the next section.

## 2. Number formats

All values are two's complement. The accumulator keeps more bits than the
stored values, so nothing is lost inside a section.

| quantity | bits | fraction bits | relation |
|---|---|---|---|
| ADC word | 18 | 0 | |
| input value | 32 | 9 | ADC word, sign extended by 5, shifted left by 9 |
| history / filter value | 35 | 12 | input value shifted left by 3 |
| coefficient, gain | 35 | 33 | range -2 … +2 |
| product (35×35) | 70 | 45 | formed in four 18×18 passes |
| accumulator | 48 | 20 | product bits below 2^-20 are dropped |
| output | 32 | 9 | filter value without its 3 lowest bits |

The 18-bit ADC reaches bit 29 of a history value, which leaves a factor of 32 of
headroom. A history value is accumulator bits 42:8. The value overflows when
accumulator bits 47:42 are not all equal.

### Four-pass multiplication

A 35-bit operand is split into an unsigned 17-bit low half `L` (stored as
`{0, bits 16:0}` so that it is a non-negative 18-bit signed number) and a
signed 18-bit high half `M` (bits 34:17). The product is

    c·v = Lc·Lv + 2^17·(Lc·Mv + Mc·Lv) + 2^34·Mc·Mv

and each term is one pass of the 18×18 multiplier. `mul_shifter` places the
36-bit partial product at bit 0, 17 or 34 of a 73-bit word (zero-extended for
L·L, sign-extended otherwise). It keeps bits 72:25 as the 48-bit addend. The
truncation happens per partial product, so the accumulated sum can differ from
a truncated full product by a few units of 2^-20. The reference model in the
testbenches reproduces this exactly.

## 3. The program (microcode)

### Control word

| bits | field | meaning |
|---|---|---|
| 17:13 | – | unused |
| 12:8 | hist_addr | `{bank, slot[2:0], half}`: history read address; write slot |
| 7 | load_io | latch the next input sample; latch FIL, IOLD and OVF |
| 6 | hist_we | store the accumulator value in the history file |
| 5 | acc_reset | clear the accumulator |
| 4 | acc_load | load the accumulator with itself shifted right by n |
| 3:2 | mul_shift | 00 L·L (shift 0), 01 cross (shift 17), 1x M·M (shift 34) |
| 1:0 | in_sel | 00 input low half `{0, I[13:0], 000}`, 01 input high half `I[31:14]`, 1x history |

The input halves are those of the 35-bit value `I << 3`, so the input never
has to be stored in the history format first.

### Program layout

| words | content |
|---|---|
| 127, 0, 1, 2 | g·x: coefficient halves gL, gM, gL, gM; accumulator cleared by word 1 |
| 3 + 17j … 19 + 17j | section j (j = 0..6), see below |
| 122 … 126 | store the last section output; word 125 also latches the new input and the outputs |

Within section j (offset from `3 + 17j`):

| offset | coefficient | operation |
|---|---|---|
| 0–3 | b2 (L, M, L, M) | × older input of section j; offset 3 stores the section input as newest |
| 4–7 | b1 (L, M, L, M) | × newest input of section j |
| 8 | shift n in bits 2:0 | (no product) |
| 9–12 | a2 (L, M, L, M) | × older output; offset 11 applies the c0 shift to the sum so far |
| 13–16 | a1 (L, M, L, M) | × newest output |

The four passes of each product pair coefficient half and value half as
L·L, M·L (or L·M), L·M (or M·L) and M·M. The *value* half comes from the
history read address and the input select. The *alignment* comes from
mul_shift.

### Pipeline

Coefficient memory reads are registered, so every control field is written
into the word whose position matches the pipeline stage it drives. For
coefficient word `w` (on COEF in clock `w+1` of the frame):

| clock | stage |
|---|---|
| w+1 | COEF and CTRL valid; history read or input select (the history address is in word w−1, the input select in word w) |
| w+2 | coefficient and operand registers |
| w+3 | 18×18 product register |
| w+4 | aligned addend register (the alignment is in word w+2) |
| w+5 | in the accumulator |

Control bits act in the clock in which they are presented. The c0 shift amount
of word 8 of a section is carried through three registers. This puts it at the
barrel shifter exactly when word 11 asserts acc_load. At that moment the b2
and b1 products are fully accumulated and no a2 product has arrived yet.

After the last section, words 122–124 let the final products drain.
Word 125 then stores the result and latches it as the output. The same word
loads the next input sample. The pipeline then starts the g·x products of the
next sample with words 127 and 0 while word 126 is idle.

## 4. History file

The history file (`history_file`) holds two banks of eight 35-bit values:
slot j holds the input of section j, and slot 7 the output of the last
section. Each value is read as two 18-bit halves. Instead of copying every
"newest" value to "older" once per sample, the two banks swap roles: a read
uses bank `hist_addr[4] xor HT`, and a write goes to the *other* bank.
`HT` is bit 7 of the frame counter and toggles once per sample. A value
stored with `hist_addr[4] = 0` in one frame is read back as "newest" with
`hist_addr[4] = 0` in the next frame and as "older" with `hist_addr[4] = 1`
in the frame after. It has been overwritten by then. In each section the
write of the new value comes after the last read of the value it
overwrites.

## 5. Overflow

`overflow_detect` turns the accumulator into a history value. If accumulator
bits 47:42 are not all equal, or the ADC reports an over-range sample (IOVF),
the value is replaced by a marker at the edge of the output range:
`+(2^29 − 1)` or `−2^29` in value units, chosen by accumulator bit 36. The
marker propagates through the following sections and shows up in the output.
The engine's OVF output is set for a sample if any value stored during its
frame, or the output itself, overflowed. It appears as ADC0OVF at the top.

The ADC block flags a sample as over-range when it is within 64 counts of
either end of the 18-bit scale. IOVF is used as it arrives. The ADC register
should therefore be loaded late in the frame (after the last section's input
is stored at word 108). Then a sample's flag covers its own frame, except for
the final store of the previous sample.

## 6. Top level (`iir_top`)

```
ADC0[17:0], ADC0L --> iir_adc --I, IOVF--> filter_engine --FIL, IOLD--> data_interface <--> host bus
                                               ^    |OVF --> ADC0OVF
CLK1PPS --> clock_counter --A[6:0]--> coeff_mem -+ COEF, CTRL
                      `----ODD (HT)-----------------^
SEL[2:0] ---------------------------------> coeff_mem (bank)
```

| port | dir | width | function |
|---|---|---|---|
| clk | in | 1 | master clock (2^26 Hz for 524288 samples/s) |
| rst | in | 1 | synchronous reset, active high |
| adc0, adc0_l | in | 18, 1 | ADC data; the sample is captured on the falling edge of the busy line |
| adc0_ovf | out | 1 | overflow flag of the current output |
| sel | in | 3 | filter bank (bits 1:0 used) |
| clk_1pps | in | 1 | 1 pulse per second; restarts the program |
| ad | in | 12 | host address |
| d_in, d_out, d_oe | in, out, out | 32, 32, 1 | host data bus, split into directions with an output enable |
| wr, cs | in | 1 | host write strobe and chip select |

**Frame counter.** `clock_counter` is an 8-bit counter: bits 6:0 address the
program and bit 7 is HT. It powers up (and resets) at 0xF6. On a rising edge
of 1PPS it is loaded with 1 at the next clock, which aligns the filter
schedule, and with it the ADC conversion timing, across several boards. The
first output after a 1PPS edge comes 125 clocks later, and after that one
every 128 clocks.

**Host bus.** With `cs` high and `wr` low the bus is driven (`d_oe`):

| ad | read | write |
|---|---|---|
| `0xxx_xxxx_xxx0` | IOLD, the input sample that belongs to FIL | – |
| `0xxx_xxxx_xxx1` | FIL, the filter output | – |
| `1 aaaa_aaaa_aaa` | coefficient memory half-word, zero-extended; data of the address presented in the previous clock | `d_in[17:0]` to half-word `a` |

The memory has 512 words of 36 bits: four banks of 128. The host sees it as
1024 half-words. Half-word `2n` is `{word n bits 33:32, bits 15:0}` and
half-word `2n+1` is `{bits 35:34, bits 31:16}`. Inside a word,
bits 17:0 are the coefficient half and `{bits 35:32, bits 31:18}` the
control word. So a word is written as two 18-bit half-word writes. Bank `b`
occupies half-words `256·b … 256·b + 255`. At power-up every bank holds the
program with all coefficients zero, and the filter outputs zero until
coefficients are written. Writing the bank that is currently selected
disturbs the outputs of the samples in flight. The usual procedure is to write
a bank that is not selected and then switch `sel` right after an output.

**ADC timing.** `iir_adc` captures the ADC word on the falling edge of ADC0L
(asynchronous to CLK). The engine takes it at word 125. ADC0L must not fall
close to that clock edge, and for the overflow flag to line up (section 5) it
should fall between words 109 and 124.

## 7. Source files

| file | block |
|---|---|
| `rtl/iir_pkg.sv` | formats, control word type, program layout and the function `microcode()` that generates the program |
| `rtl/iir_top.sv` | top level |
| `rtl/filter_engine.sv` | the MAC engine and its pipeline registers |
| `rtl/input_mux.sv` | input register, IOLD, operand select |
| `rtl/mult18.sv` | registered 18×18 signed multiplier |
| `rtl/mul_shifter.sv` | partial product alignment and truncation |
| `rtl/accumulator.sv` | 48-bit accumulator (clear, load, add) |
| `rtl/barrel_shifter.sv` | c0 right shift by 0..7 |
| `rtl/overflow_detect.sv` | accumulator to history value, overflow marker |
| `rtl/history_file.sv` | two-bank history storage |
| `rtl/coeff_mem.sv` | dual-port coefficient and program memory |
| `rtl/clock_counter.sv` | frame counter with 1PPS restart |
| `rtl/iir_adc.sv` | ADC capture register and over-range flag |
| `rtl/data_interface.sv` | host bus decode |

`N_SOS` (default 7) on the top, the engine and the memory sets the program
that the memory is initialised with. Seven sections are the most that fit in
128 words (3 + 17·7 + 5 = 127). Fewer sections leave spare words at the end of
the program, and the engine itself does not change.

Filters of orders up to 14 fit: for example Butterworth or elliptic
low-passes of order 4 to 14, or a 6th- and an 8th-order elliptic filter in
series. The coefficient values must be computed offline. For each biquad, round
`b1, b2, a1, a2` (with the sign convention above) and `g` to 33 fraction bits.
Pick `n` so that the cumulative gain stays in [1, 2). Then write the halves
to the words listed in section 3. The testbench package
`tb/iir_tb_pkg.sv` (`to_coef`, `mem_word`) does exactly this and can serve as
an example.

## 8. Verification

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=… failures=…` and stops itself with a watchdog.
`tb/iir_tb_pkg.sv` contains a bit-exact reference model of the filter (the
same four-pass truncation, shift and overflow rules), a double-precision
model, a generator for a stable seven-section test filter, and the program
word builder.

* `tb_filter_engine` drives the engine with a modelled memory. It compares
  every output, IOLD and OVF with the bit-exact model and the output with the
  double-precision model (within 0.05 ADC counts). It also checks the
  128-clock output period, and drives both input and accumulator overflow.
* `tb_iir_top` runs the complete design at its default size. It loads two
  banks over the host bus during reset and reads them back, then restarts the
  counter with 1PPS (checking the 125-clock first output and the 128-clock
  period). It clocks the ADC once per frame through a sine, an impulse, an
  over-range run (ADC overflow), a bank switch to a filter without c0 shifts
  (accumulator overflow) and back, and an aligned second 1PPS pulse. Outputs,
  IOLD and ADC0OVF are read over the host bus and compared with the model.
  Each of these mechanisms is counted, and one that never happens is a
  failure.
* `tb_workloads` runs ten low-pass filters through the complete design.
  All have a 7400 Hz corner at 524288 samples/s: a 4th-order Butterworth,
  elliptic filters of order 4, 6, 8, 10, 12 and 14 (0.1 dB ripple, 10 dB of
  stop-band attenuation per order, gain 1.01158), and the cascades 4+6, 6+6
  and 6+8. Each is driven with a 1 kHz sine at half of full scale. The
  coefficients are a small table in the testbench. Results:

  | filter | sections | shifts n | g | max deviation from double precision | 1 kHz gain |
  |---|---|---|---|---|---|
  | Butterworth 4 | 2 | 7,7 | 0.057 | 0.111 counts | 1.0000 |
  | elliptic 4 | 2 | 4,2 | 0.63 | 0.038 | 1.0001 |
  | elliptic 6 | 3 | 6,2,1 | 0.51 | 0.129 | 1.0003 |
  | elliptic 8 | 4 | 7,3,2,1 | 0.84 | 0.148 | 1.0005 |
  | elliptic 10 | 5 | 7,5,2,1,1 | 0.69 | 0.246 | 1.0008 |
  | elliptic 12 | 6 | 7,6,3,2,1 | 0.57 | 0.492 | 1.0011 |
  | elliptic 14 | 7 | 7,7,4,2,1,1,1 | 0.94 | 0.526 | 1.0017 |
  | elliptic 4 + 6 | 5 | 4,2,6,3,1 | 0.64 | 0.119 | 1.0004 |
  | elliptic 6 + 6 | 6 | 6,2,1,7,2,1 | 0.52 | 0.258 | 1.0006 |
  | elliptic 6 + 8 | 7 | 6,2,1,7,4,2,1 | 0.86 | 0.186 | 1.0008 |

  Every output is bit-exact with the reference model. None overflows, and a
  count is one ADC LSB. The high-order elliptic filters have
  high-Q sections close to the corner frequency, and they show the largest
  rounding error. Where a cascade of two lower-order filters does the same
  job, it is the better choice.

  The same testbench repeats the document's range measurements. It records
  the largest value written to the history file, as a share of the 35-bit
  range (2^34). The square waves have amplitude 1.99 and sweep linearly
  over 8192 samples:

  | filter | stimulus | range used | document |
  |---|---|---|---|
  | elliptic 8 | square 1 - 10 kHz | 4.9 % | 7.0 % |
  | elliptic 10 | square 1 - 10 kHz | 5.6 % | 5.8 % |
  | elliptic 12 | square 1 - 10 kHz | 8.0 % | 6.3 % |
  | elliptic 14 | square 1 - 10 kHz | 21.1 % | 7.5 % |
  | elliptic 4 + 6 | square 1 - 10 kHz | 5.0 % | 6.3 % |
  | elliptic 8 | square 160 Hz - 1.6 kHz | 4.7 % | 6.9 % |
  | elliptic 8 | sine 1 kHz, amplitude 1 | 2.2 % | 3.0 % |
  | elliptic 8 | sine 10 kHz, amplitude 1 | 2.1 % | 2.6 % |

  The check accepts 0.5 to 4 times the document's figure. The shift choice
  here differs from the document's. The first sections of the 14th-order
  filter need more than the 7 bits of shift that c0 offers. Their excess
  gain carries into the later sections, which is why that filter uses more
  range. All runs stay far from overflow.

  A last set runs the elliptic filters of order 4 to 14 with a 925 Hz
  corner, the first stage of a decimation towards 2048 samples/s. They are
  driven with the same 1 kHz sine. The 3-bit shift still covers their
  sections, and none overflows. Their poles lie much closer to z = 1,
  though, and the 35-bit coefficients no longer suffice. The deviation from
  double precision grows 20 to 50 times:

  | filter | order 4 | 6 | 8 | 10 | 12 | 14 |
  |---|---|---|---|---|---|---|
  | max deviation, counts | 1.9 | 6.7 | 7.6 | 10.6 | 18.1 | 10.6 |

  The limit for these runs is 40 counts. A low output rate is better
  reached in two steps: first the 7400 Hz filter, then a second filter at
  the reduced rate.
* The block testbenches compare each unit with an independent computation
  (integer arithmetic, a memory model, the program function).

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/iir_pkg.sv tb/iir_tb_pkg.sv tb/tb_iir_top.sv --top-module tb_iir_top
./obj_dir/Vtb_iir_top +verilator+rand+reset+2
```

The testbenches do not depend on power-up values: they pass with
randomised initial register contents.

## 9. Choices made here and limits

* **Pipeline timing.** The per-stage timing in section 3 (in particular the
  three-register delay of the c0 shift amount) is this implementation's.
  It is consistent with the program word layout, and the program and
  datapath are verified together against the arithmetic model. They are
  not verified against an independent hardware reference.
* **Reset.** `rst` is an addition. It clears the input register, the outputs
  and the accumulator, sets the counter to its power-up value, and masks the
  program word so that nothing is stored while the memory output is not yet
  valid. The memories and the ADC register are initialised at power-up
  (history cleared, programs with zero coefficients).
* **1PPS** is sampled by a register on CLK (synchronous edge detection)
  rather than latched asynchronously. The counter shows 1 one clock after
  the edge is seen.
* **Host data bus** is split into `d_in`, `d_out` and `d_oe` instead of a
  tri-state port. A memory read returns the half-word addressed one clock
  earlier.
* **OVF** covers all values stored during a frame, not only the output.
* **c0 range.** The shift field is three bits, so one section can be scaled
  down by at most 2^7. A low-pass section with a corner this far below the
  sample rate has a DC gain of several hundred: the Butterworth sections
  above each need about 2^9. The intermediate gains can then not all be held
  in [1, 2). The shifts are chosen as large as allowed, and the overall gain
  `g` ends up below 1 (0.057 for the Butterworth filter). That costs a few
  bits of the 5-bit headroom at the input, but causes no overflow.
* **Not included:** the ADC chip itself (its data and busy pins are top-level
  ports); the host software and the offline coefficient generator; the final
  downsampling by 32. The output is produced at the full rate and the reader
  of FIL keeps every 32nd sample.
* **2048 Hz output.** A single stage of this filter is not accurate enough
  for a direct decimation to 2048 Hz (corner around 925 Hz). The 35-bit
  coefficients then limit the noise floor, so such a rate needs two decimation
  stages.
