# Scanned-array 2D frequency-planar beam filter

A plane wave crossing a linear array of sensors appears, in the
space-time plane (sensor position `n1`, time `n2`), as a set of parallel
lines; its 2D spectrum is concentrated on a line through the origin whose
slope gives the direction of arrival. A 2D filter whose pass band is a narrow
strip around one such line (a *frequency-planar* or beam filter) passes broadband
waves from one direction and rejects the rest. A first-order 2D IIR filter is
enough for a sharp beam, but the straightforward build needs one A/D converter
per sensor, and arrays of 100 sensors or more.

This design uses **one** A/D converter. An analog N1:1 multiplexer scans the
array (sensor 0, 1, ..., N1-1, then sensor 0 again), so the converter runs at
`f_AS = N1 * f_s` and the filter receives a single 1D stream:

    k = n2*N1 + n1            (scanned sample k is sensor n1 of scan n2)

The filter runs on that stream at one sample per clock. With the default
N1 = 100 sensors at 44.1 kHz each, the clock is 4.41 MHz.

Each sensor is sampled `n1/N1` of a period later than sensor 0 of its scan.
This is a small skew in space-time. It turns the input spectrum by about
`atan(1/N1)`, which is 0.57 degrees for N1 = 100. For a beam much wider than
that, the skew can be ignored. For a narrower beam, the coefficients should be
designed for a filter turned by that angle. The hardware is the same in both
cases.

## From a 2D recursion to a 1D pipeline

The filter computes the first-order 2D difference equation

    y(n1,n2) =  a00 w(n1,n2)   + a10 w(n1-1,n2) + a01 w(n1,n2-1) + a11 w(n1-1,n2-1)
              - b10 y(n1-1,n2) - b01 y(n1,n2-1) - b11 y(n1-1,n2-1)

with zero boundary values `w(-1,n2) = y(-1,n2) = 0` (the spatial boundary) and
`w(n1,-1) = y(n1,-1) = 0` (the temporal boundary).

In the scanned stream, one sensor back is one sample back, and one scan back is
N1 samples back. So each 2D term becomes a 1D tap:

| 2D term        | scanned-stream tap | hardware                         |
|----------------|--------------------|----------------------------------|
| w(n1,n2)       | w(k)               | the input itself                 |
| w(n1-1,n2)     | w(k-1)             | 1 register, then SDP             |
| w(n1,n2-1)     | w(k-N1)            | N1 registers                     |
| w(n1-1,n2-1)   | w(k-N1-1)          | N1 registers, 1 register, SDP    |
| y(n1-1,n2)     | y(k-1)             | 1 register, then SDP             |
| y(n1,n2-1)     | y(k-N1)            | N1 registers                     |
| y(n1-1,n2-1)   | y(k-N1-1)          | N1 registers, 1 register, SDP    |

The temporal boundary comes for free: reset clears every delay register, so
the first scan reads zeros from the N1 taps. The spatial boundary is harder.
At sensor 0, the "one sample back" tap holds sensor N1-1 of the previous
scan, which is not a spatial neighbour.

The **spatial delay processor (SDP)** handles this. It has an up counter that
follows the sensor index, and a multiplexer that outputs a stored zero while
the counter is 0. At every other sensor, it passes its input through. There is
one SDP on each tap that looks one sensor back: four in all. Each SDP has its
own counter. The counters share reset and enable, so they always agree, and an
assertion checks this.

The recursion closes in one clock. `y(k)` needs `y(k-1)`, so the seven products
and their sum must settle within one sample period. The one-sample register on
the `y` feedback branch also serves as the output register. As a result,
`y_SCAN(k)` appears one clock after `w(k)`.

## Beam output

The scanned output holds `y` for every sensor. The beam filter output is the
value at the last sensor of each scan:

    y_beam(n2) = y(N1-1, n2) = y_SCAN(n2*N1 + N1-1)

A down-sample-by-N1 stage has its own sensor counter. It keeps only that
sample and passes it through a short register FIFO (a delay line with a valid
flag). With the default depth of 1, the beam output appears two clocks after
the A/D sample of sensor N1-1.

## Number format

- Samples, both input and output, are 16-bit two's-complement integers.
- The seven coefficients are 16-bit signed numbers with 13 fractional bits.
  Their range is [-4, 4).
- Products and sums are kept at full precision (35 bits).
- The sum is rounded to the nearest integer, with halves rounded up, by adding
  2^12 and shifting right by 13.
- The result is then saturated to 16 bits. The `sat` flag marks a saturated
  output.
- The saturated value is the one fed back, so an overload stays bounded.

The 16-bit word length is the reference one. The coefficient format, the
rounding and the saturation are choices made for this RTL. They are set in
`rtl/fp_pkg.sv` (`DATA_W`, `COEF_W`, `COEF_FRAC`).

## Coefficients

The coefficients are run-time inputs (`coefs`, a packed `fp_coefs_t` struct),
because filter design picks their values for each beam. Hold them constant
while the filter runs. The testbenches use a standard first-order
frequency-planar design: apply the 2D bilinear transform to the prototype
`1/(R + L1 s1 + L2 s2)`. This gives

    D   = R + L1 + L2
    aij = 1/D                       (all four)
    b10 = (R - L1 + L2)/D
    b01 = (R + L1 - L2)/D
    b11 = (R - L1 - L2)/D

The ratio L1:L2 sets the beam direction, and a small R makes the beam narrow.
The filter is stable for R, L1, L2 >= 0. `fp_ref_pkg::ref_coefs()` computes
these values.

## Modules

| file                         | role |
|------------------------------|------|
| `rtl/fp_pkg.sv`              | widths, default N1 = 100, sample and coefficient types |
| `rtl/fp_beam_filter_top.sv`  | the whole filter: address generator, filter graph, down-sampler |
| `rtl/mux_addr_gen.sv`        | multiplexer select address, counting 0..N1-1 on each sample |
| `rtl/fp_iir_sfg.sv`          | the signal flow graph: six delay lines, four SDPs, the vector processor |
| `rtl/fp_vector_processor.sv` | seven parallel multiplies, adder tree, rounding and saturation (combinational) |
| `rtl/sdp.sv`                 | spatial delay processor |
| `rtl/delay_line.sv`          | chain of DEPTH registers with a clock enable and a synchronous clear |
| `rtl/output_downsampler.sv`  | keeps sensor N1-1 of each scan and passes it to a register FIFO |

These parts are outside the RTL: the analog multiplexer, the A/D converter,
and any host link used to drive the board. The top connects to them through
its ports:

- `mux_addr`: output, drives the multiplexer's select lines.
- `scan_start`, `scan_end`: outputs, high when `mux_addr` selects sensor 0 or
  sensor N1-1.
- `adc_valid`, `adc_data`: inputs for one converted sample. The sample must
  belong to the sensor that `mux_addr` selects in that same cycle. If the
  converter has pipeline latency, absorb it in the interface logic.
- `coefs`: input, the filter coefficients.
- `y_scan_valid`, `y_scan`: the scanned output, one value per input sample.
- `y_valid`, `y_out`: the beam output, one value per scan.
- `zic`: high when an SDP substitutes a zero.
- `sat`: high when the output saturates.

All resets are synchronous and active high. A reset returns the design to
sensor 0 and clears all delay registers.

`adc_valid` works as a clock enable for the whole pipeline. Hold it high to
get one sample per clock, the intended operating mode. Drop it to stall the
pipeline. The stall lets the logic run from a clock faster than the converter.
The reference design has no stall; it is an addition in this RTL.

## Where this RTL departs from, or adds to, the reference design

- **Vector processor structure.** The reference shows a graphical
  filter mask with a particular arrangement of gain and add/subtract blocks.
  Here the seven terms are formed side by side and summed in a balanced tree.
  The arithmetic is equivalent, but the adder order and intermediate widths
  differ.
- **Added controls.** The clock enable, the status flags, the synchronous
  reset and the FIFO depth are choices made for this RTL.
- **Coefficient values.** The reference takes its coefficient values from
  separate filter-design work and does not list them. None are built in.
- **Timing not verified.** No timing closure was attempted. The critical
  path is the feedback loop: a 16x16 multiply, a three-level adder tree, rounding
  and saturation, all within one clock. At 4.41 MHz (a 227 ns period) this leaves a wide margin, though it has not been measured. At the
  300 MHz that a 25-sensor, 12 MHz-per-sensor configuration would need, it
  would require a pipelined multiply-add or a look-ahead rewrite of the
  recursion. Neither is built.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The testbenches use verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_beam_filter_top.sv \
        --top-module tb_fp_beam_filter_top -o sim
    ./obj_dir/sim

For another module, replace the testbench name.

- `tb/fp_ref_pkg.sv` evaluates the 2D difference equation directly on 2D
  arrays in 64-bit arithmetic, with the same rounding and saturation. It also
  holds the coefficient formula above.
- `tb_fp_beam_filter_top` runs the top at its default size (N1 = 100). It acts
  as the array, multiplexer and converter: each cycle it returns the sample of
  the sensor that `mux_addr` selects. It runs three tests:
  1. the unit impulse response of a 30-degree beam filter over 40 scans;
  2. a noisy plane wave with random converter stalls;
  3. a high-gain filter at full scale, to force saturation.

  It checks every scanned and beam output, and the clock on which each
  arrives. It also checks that stalls, zero substitutions, saturation, scan
  wrap-around and beam outputs each occurred.
- `tb_beam_selectivity` shows the filter doing its job at N1 = 100. It uses a
  30-degree beam with unity gain on the beam. It sends in two plane waves
  of the same frequency and amplitude: one along the beam, one mirrored.
  In steady state, the beam output keeps about 98% of the first wave's RMS and
  about 9% of the second's. The test requires more than 80% and less than 20%.
- `tb_fp_iir_sfg` tests the filter graph with N1 = 8. It uses random
  coefficients, random stalls, and saturation fed back into the recursion.

To change the array size, set `N1` on `fp_beam_filter_top`. N1 sets the delay
line lengths, the counter widths and the down-sampling factor. The registers
holding the delay lines total about 2 x (N1 + 2) x 16 bits.
