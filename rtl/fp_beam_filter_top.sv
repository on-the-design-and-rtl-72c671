// fp_beam_filter_top: single-chip scanned-array 2D frequency-planar beam filter.
//
// A linear array of N1 sensors is read through one analog N1:1 multiplexer and
// one A/D converter. Instead of sampling all sensors at once, the array is
// scanned: sensor 0, 1, ..., N1-1 in consecutive A/D samples, so one converter
// running at f_AS serves every sensor at f_AS/N1. The scanned stream is fed to
// a pipelined first-order 2D IIR filter (fp_iir_sfg) whose 2D delays have
// become 1D delays of 1 and N1 samples, and whose spatial boundary conditions
// are restored by spatial delay processors. The filter output at the last
// sensor of each scan is the beam filter output (output_downsampler).
//
// Blocks: mux_addr_gen drives the multiplexer select port; fp_iir_sfg filters;
// output_downsampler down-samples by N1 into a register FIFO. The analog
// multiplexer and the A/D converter are outside: their signals are ports.
//
// Interface:
//   mux_addr              select address for the analog multiplexer
//   adc_valid, adc_data   one converted sample, belonging to the sensor that
//                         mux_addr selects in that cycle (this design assumes
//                         the converter interface delivers samples so aligned)
//   coefs                 filter coefficients, held static while running
//   y_scan_valid, y_scan  scanned output y_SCAN(k), one per input sample
//   y_valid, y_out        beam output y(N1-1, n2), one per scan
//   zic, sat              status: spatial zero substituted / output saturated
//   scan_start, scan_end  mux_addr is at sensor 0 / at sensor N1-1
// Timing: with adc_valid held high the filter takes one sample per clock
// (f_AS = clock); y_scan follows its input by one clock, y_out follows the
// sample of sensor N1-1 by two clocks (one for the filter, one for the FIFO).
// Deasserting adc_valid stalls everything (this design's choice).
module fp_beam_filter_top
  import fp_pkg::*;
#(
  parameter int N1        = N1_DEFAULT,
  parameter int OUT_DEPTH = 1,
  localparam int AW = (N1 > 1) ? $clog2(N1) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  fp_coefs_t     coefs,
  output logic [AW-1:0] mux_addr,
  output logic          scan_start,
  output logic          scan_end,
  input  logic          adc_valid,
  input  sample_t       adc_data,
  output logic          y_scan_valid,
  output sample_t       y_scan,
  output logic          y_valid,
  output sample_t       y_out,
  output logic          zic,
  output logic          sat
);

  mux_addr_gen #(.N1(N1)) u_addr (
    .clk, .rst, .en(adc_valid),
    .addr(mux_addr), .scan_start, .scan_end
  );

  fp_iir_sfg #(.N1(N1)) u_sfg (
    .clk, .rst,
    .in_valid(adc_valid), .w_in(adc_data), .coefs,
    .y_valid(y_scan_valid), .y_out(y_scan),
    .zic, .sat
  );

  output_downsampler #(.WIDTH(DATA_W), .N1(N1), .OUT_DEPTH(OUT_DEPTH)) u_ds (
    .clk, .rst,
    .in_valid(y_scan_valid), .din(y_scan),
    .out_valid(y_valid), .dout(y_out)
  );

  // The multiplexer address and the SDP counters follow the same sensor index.
  a_scan_aligned: assert property (@(posedge clk) disable iff (rst)
    adc_valid |-> (zic == scan_start));

endmodule
