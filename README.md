# Bit-serial FIR and IIR filters without multipliers

These filters compute

    y(n) = a0 x(n) + a1 x(n-1) + ... + aP x(n-P) + b1 y(n-1) + ... + bP y(n-P)

without a single multiplier. Samples move through the filter one bit per clock
cycle, least significant bit first. In each cycle, one bit of every stored
sample (the current input, the older inputs and, for an IIR filter, the older
outputs) forms the address of a small ROM. The ROM holds every possible sum of
the coefficients. An adder-subtractor accumulates the ROM word into a register
`S`, weighting it by the bit position. After 8 cycles, one per sample bit, `S`
holds the next output sample. This is distributed arithmetic: the
multiply-accumulate is spread over the bits of the data.

The ROM has 2^N entries for N coefficients, so a high-order filter is not
built as one filter. It is built from small sub-filters, each with its own
small ROM:

* **IIR.** Second- and first-order sections in series. The serial output of one
  section is the serial input of the next.
* **FIR.** Sub-filters that pass the input along from one to the next. Their
  outputs are summed by a tree of bit-serial adders.

One example: an 8th-order FIR filter needs one 512-entry table. As a
4th-order plus a 3rd-order sub-filter, it needs a 32-entry and a 16-entry
table.

The top level, `bitserial_filter_bank`, holds five such filters side by side:

| instance | filter | sections | table sizes | cycles per sample | output bits |
|---|---|---|---|---|---|
| `iir2`  | 2nd-order IIR: 50/60 Hz mains notch for ECG signals | 1 × order 2 | 32 | 8 | 8 |
| `iir4`  | 4th-order IIR: 60 Hz notch, then 50 Hz notch | 2 × order 2 | 32, 32 | 8 | 8 |
| `fir4`  | 4th-order FIR, 5-tap binomial low-pass | 1 × order 4 | 32 | 8 | 8 |
| `fir8`  | 8th-order FIR, 9-tap binomial low-pass | order 4 + order 3 | 32, 16 | 9 | 9 |
| `fir18` | 18th-order FIR, 19-tap triangular low-pass | orders 4, 4, 4, 3 | 32, 32, 32, 16 | 10 | 10 |

The notch is the filter

    y(n) = x(n) - 1.9021 x(n-1) + x(n-2) + 1.8523 y(n-1) - 0.94833 y(n-2)

At 1200 samples/s it removes 60 Hz interference from an electrocardiogram. At
1000 samples/s the same samples remove 50 Hz. The other coefficient sets are
this design's own choice; see "Where this design makes its own choices".

## Numbers and the table

Samples are 8-bit two's-complement fractions `x0.x-1 x-2 ... x-7`. The sign
bit `x0` has weight -1, so a sample lies in [-1, 1). Write the sample bits
out and regroup the equation by bit position:

    y = sum_{j=-7..-1} 2^j f(bits j) - f(bits 0)

Here `f(bits j)` is the sum of the coefficients whose sample has a 1 in bit
`j`. Bit `j` is taken from x(n), x(n-1), ..., x(n-P), y(n-1), ..., y(n-P).
`f` is what the ROM (`da_lut`) stores:

* The address order, from MSB to LSB, is x(n), x(n-1), ..., x(n-P), then
  y(n-1), ..., y(n-P).
* Each entry is `floor(2^7 × sum)`. An entry has 7 fractional bits, which
  gives the 8-bit coefficient precision.
* An entry is `8 + ceil(log2 N)` bits wide: 11 bits for the five
  coefficients of a second-order IIR section.

Coefficients are module parameters. They are integers scaled by 2^16, for
example `-1.9021` becomes `-124656`. Each entry is rounded down only once,
after the sum is formed, and not per coefficient. For the notch this
reproduces the published 32-entry table of this filter exactly. The table is
built at elaboration time by a constant function, so changing the coefficients
is only a parameter change. Elaboration stops with an error if a sum does not
fit in the entry width.

## One frame, cycle by cycle

A frame is W cycles. W is 8 for an 8-bit sample. A FIR tree adds guard
cycles (see below). `frame_counter` decodes four strobes:

| strobe | cycle | what happens |
|---|---|---|
| `first` | 0 | LSB on all serial lines; the carries of the serial adders restart |
| `value_bit` | 0 … 6 | `S <= S/2 + f` |
| `sign_bit` | 7 | `S <= S/2 - f`; `S` now holds the output |
| `last` | W-1 | output stored; `S <= 0`; next sample loaded |

The halving `S/2` is an arithmetic shift that drops the LSB of `S`. This
rounds down a little at every step. The result lies within about 2 LSB of the
exact sum of products, always on the low side.

Storage for a section of order P:

* **Current input.** The bit of x(n) comes straight from the serial input
  `x_in`. The shift register that holds the current sample belongs to
  whatever drives the input: the serialiser `par_to_ser`, or the previous
  section.
* **Older inputs.** x(n-1) … x(n-P) sit in W-bit shift registers chained one
  after another. Each register's LSB is a table address bit, and that bit
  shifts on into the next register.
* **Older outputs.** y(n-1) … y(n-P) sit in a second chain. At the end of each
  frame, y(n-1) loads the low W bits of the new result in parallel. Its old
  contents finish shifting into y(n-2) in the same cycle.
* **Serial output.** `y_out` is the LSB of the y(n-1) register. During frame
  k+1 it carries the output for the sample that arrived in frame k. The bits
  have the same frame alignment as the input, so sections connect directly.
* **Overflow.** Outputs wrap at 8 bits. There is no saturation.

A FIR sub-filter (`fir_section`) is the same circuit without the output
chain:

* The result goes into a W-bit `y` register at the frame end. It is shifted
  out during the next frame.
* One more W-bit register behind the oldest tap hands the input on to the
  next sub-filter (`x_out`). The input is delayed by P+1 frames.

## Building higher orders

**IIR (`iir_cascade`).** LTI sections in series can be regrouped and
reordered without changing the overall response. A filter of order 4 is
therefore two second-order sections, and order 5 is two second-order and one
first-order section. Section `s` reads its coefficients from `A[3s..3s+2]`
and `B[3s+1..3s+2]`. Each section adds one frame of latency.

**FIR (`fir_cascade`).** The input travels through the sub-filters. Sub-filter
`s` computes the part of the convolution over its own slice of taps. A
balanced tree of `serial_adder`s sums the results. Each adder is a full adder
with a carry flip-flop. Its sum output is combinational, so the tree adds no
latency.

Each tree level can add one bit. So the whole FIR filter works on words of
`W = 8 + ceil(log2 k)` bits for k sub-filters, and produces one result every
W cycles:

* The input sample is sign-extended to W bits.
* Inside a sub-filter, only the first 8 cycles feed the accumulator. The extra
  cycles carry only the sign.
* The sub-filter outputs and the final sum are W-bit words with 7 fractional
  bits.

With an odd number of branches on a tree level, the last branch is passed up
unchanged.

## Sample ports, rate and latency

`iir_filter` and `fir_filter` wrap a cascade in parallel sample ports:

* `frame_counter` sequences everything.
* `par_to_ser` takes the 8-bit `x` in the last cycle of every frame. It marks
  that cycle with `x_take`.
* `ser_to_par` collects the serial result into the parallel `y`. It pulses
  `y_valid` when `y` changes.

Timing:

* **Throughput.** One sample every W cycles.
* **IIR latency.** The edge that loads a sample's output into `y` comes
  (NSEC + 1) × W clock edges after the edge that took the sample.
* **FIR latency.** The same distance is 2 × W edges, whatever the number of
  sub-filters.

Reset is synchronous and active high. It clears all registers and puts the
counter on the last cycle of a frame, so the first edge after reset takes the
first sample. All five filters of the bank share one clock and reset. Each
filter runs at its own frame length.

## Accuracy to expect

The arithmetic is 8-bit throughout, and this shows in the notch:

* Rounding `S/2` down at each of the 8 steps injects a small negative bias.
  The notch's high-Q poles amplify that bias into a steady output offset of
  about -5 LSB per section.
* The 7-bit table entries move the notch zeros from 60 Hz to about 59 Hz.

Measured in simulation at 1200 samples/s, with the mean removed:

* A 60 Hz tone keeps 13 % of its RMS value.
* 50 Hz keeps 86 %. 5 Hz keeps 99 %.
* Through the two-section notch, both 50 Hz and 60 Hz drop to 12–19 %.
* A synthetic ECG with 60 Hz interference keeps 24 % of the interference
  amplitude.

## Where this design makes its own choices

Based on the published design:

* The architecture: ROM, S register, adder-subtractor, and x and y shift
  registers.
* The LSB-first bit order and the address order.
* The `S/2 ± f` recursion with its truncation.
* The 11-bit table of the notch and 8-bit wrapping outputs.
* The serial section-to-section links.
* The FIR adder tree with `ceil(log2 k)` guard bits.
* The 4+3 split of the 8th-order FIR filter.

Chosen here:

* **Reset and counter.** The reset is synchronous, not asynchronous. The bit
  counter is binary, not a one-hot ring. Neither changes the timing.
* **Wider `S`.** The `S` register is one bit wider than the table entries,
  since the running value can approach twice the largest entry.
* **Current-input register.** The x(n) shift register is placed in the stage
  that drives a section. The section has no register of its own for x(n).
* **Handshake.** The handshake outputs `x_take` and `y_valid` are added.
* **Output path.** The original single-section filter copies its result into
  the parallel output register at the same edge that stores y(n-1). Here the
  parallel output is always rebuilt from the serial output stream, so it works
  after any cascade. This costs one frame of extra latency.
* **Coefficients.** The 50 Hz notch of `iir4` has its zeros and poles placed
  on 7-bit grid values close to 50 Hz. The FIR coefficients are chosen here.
  The 18th-order filter is split as 4+4+4+3.
* **Accepted lint warnings.** Only the low W bits of the accumulator result
  are stored. The LSB of the deserialiser's shift register and the `first`
  strobe in the accumulator are unused. These are the lint warnings that
  remain.

Not built: the ADC and DAC. They are off-the-shelf converters. The filters
expose their 8-bit sample words instead.

## Files

| file | contents |
|---|---|
| `rtl/bsf_pkg.sv` | widths, the `frame_t` strobe struct, coefficient-array types, table-width helper |
| `rtl/frame_counter.sv` | bit-phase counter and strobes |
| `rtl/da_lut.sv` | coefficient-sum ROM, built from parameters |
| `rtl/da_accumulator.sv` | adder-subtractor and S register |
| `rtl/iir_section.sv`, `rtl/fir_section.sv` | low-order sub-filters |
| `rtl/serial_adder.sv` | bit-serial adder |
| `rtl/iir_cascade.sv`, `rtl/fir_cascade.sv` | high-order filters from sub-filters |
| `rtl/par_to_ser.sv`, `rtl/ser_to_par.sv` | sample serialiser and deserialiser |
| `rtl/iir_filter.sv`, `rtl/fir_filter.sv` | complete filters with parallel ports |
| `rtl/bitserial_filter_bank.sv` | top: the five filters |
| `tb/tb_ref_pkg.sv` | integer reference arithmetic shared by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ecg_notch.sv` | mains-interference workload (tones and a synthetic ECG) |
| `tb/tb_fir100.sv` | 100th-order FIR filter: 101 taps, 21 sub-filters, 13-cycle words |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the end-to-end test of the whole bank at its default
size:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bsf_pkg.sv tb/tb_ref_pkg.sv tb/tb_bitserial_filter_bank.sv \
        --top-module tb_bitserial_filter_bank -o sim
    ./obj_dir/sim

Replace the last file and the top-module name to run any other testbench.

The testbenches compare the RTL with an integer model built from the
equations. The model walks the sample bits with the same rounding. Where
meaningful, the testbenches also check that this model is within a few LSB of
the exact sum of products. They also check:

* sample spacing and latency;
* the published notch table;
* the frequency response of the notch;
* a 100th-order filter.

The bank test also counts how often each mechanism occurs, and fails if one
never does:

* sign-bit subtractions;
* outputs produced by feedback alone;
* traffic between IIR sections;
* hand-over between FIR sub-filters;
* carries in the adder tree.

To change a filter, override its parameters on `iir_filter` or `fir_filter`:

* `NSEC`: number of sections.
* `SEC_ORDER`: the order of each section.
* `A` and `B`, or `COEF`: the coefficients, scaled by 2^16.

`W` follows from `NSEC` for FIR filters. Coefficient lists may hold up to 128
taps and 32 sections.
