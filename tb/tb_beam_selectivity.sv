// tb_beam_selectivity: directional test of the beam filter at its default
// size (N1 = 100 sensors). A first-order frequency-planar filter
// (R = 0.05, L1 = cos 30deg, L2 = sin 30deg, unity gain on its pass-band
// line) is fed two sinusoidal plane waves of the same temporal frequency
// (1 rad/sample) and amplitude, each sampled the way the scanned array
// samples it (sensor n1 at time n2 - n1/N1):
//   pass wave:   w = A sin(W (t - tan30 * n1))   lies on the pass-band line
//   reject wave: w = A sin(W (t + tan30 * n1))   lies on the mirrored line
// The filter's frequency response predicts a gain of about 0.95 for the
// first and 0.09 for the second. Over the last 50 of 150 scans the RMS of the
// beam output y_out must be above 0.8 A/sqrt2 for the pass wave and below
// 0.2 A/sqrt2 for the reject wave. Every beam output is also compared with
// the 2D reference of the difference equation.
module tb_beam_selectivity;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int  N1 = N1_DEFAULT;
  localparam int  N2 = 150;
  localparam real A  = 8000.0;
  localparam real W  = 1.0;
  localparam real TAN30 = 0.5773503;

  logic clk = 0, rst, adc_valid;
  sample_t adc_data, y_scan, y_out;
  fp_coefs_t coefs;
  logic [$clog2(N1)-1:0] mux_addr;
  logic scan_start, scan_end, y_scan_valid, y_valid, zic, sat;

  fp_beam_filter_top dut (
    .clk, .rst, .coefs, .mux_addr, .scan_start, .scan_end,
    .adc_valid, .adc_data, .y_scan_valid, .y_scan, .y_valid, .y_out, .zic, .sat
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint wr[N2][N1], yr[N2][N1];
  function automatic longint w_at(int n1, int n2);
    return (n1 < 0 || n2 < 0) ? 0 : wr[n2][n1];
  endfunction
  function automatic longint y_at(int n1, int n2);
    return (n1 < 0 || n2 < 0) ? 0 : yr[n2][n1];
  endfunction

  // collect beam outputs in order
  longint beam[$];
  always @(posedge clk) if (!rst && y_valid) beam.push_back(longint'(y_out));

  task automatic run(real slope, output real rms);
    real t, acc;
    rst = 1; adc_valid = 0; adc_data = '0;
    @(posedge clk); #2 rst = 0;
    beam.delete();
    for (int n2 = 0; n2 < N2; n2++) begin
      for (int n1 = 0; n1 < N1; n1++) begin
        t = real'(n2) - real'(n1) / real'(N1) - slope * real'(n1);
        wr[n2][n1] = longint'($rtoi(A * $sin(W * t)));
        yr[n2][n1] = ref_y(coefs, w_at(n1, n2), w_at(n1-1, n2), w_at(n1, n2-1), w_at(n1-1, n2-1),
                           y_at(n1-1, n2), y_at(n1, n2-1), y_at(n1-1, n2-1));
        adc_valid = 1; adc_data = sample_t'(wr[n2][n1]);
        @(posedge clk); #2;
      end
    end
    adc_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (beam.size() != N2) begin
      failures++; $display("FAIL %0d beam outputs, expected %0d", beam.size(), N2);
    end
    acc = 0.0;
    for (int n2 = 0; n2 < N2 && n2 < beam.size(); n2++) begin
      checks++;
      if (beam[n2] != yr[n2][N1-1]) begin
        failures++; $display("FAIL beam output %0d: %0d expected %0d", n2, beam[n2], yr[n2][N1-1]);
      end
      if (n2 >= N2 - 50) acc += real'(beam[n2]) * real'(beam[n2]);
    end
    rms = $sqrt(acc / 50.0);
  endtask

  real rms_pass, rms_rej, ref_rms;
  initial begin
    rst = 1; adc_valid = 0; adc_data = '0;
    coefs = ref_coefs_unity(0.05, 0.8660254, 0.5);
    repeat (3) @(posedge clk);
    run(TAN30, rms_pass);
    run(-TAN30, rms_rej);
    ref_rms = A / $sqrt(2.0);
    $display("beam output RMS: pass-band wave %0.1f, rejected wave %0.1f, input %0.1f",
             rms_pass, rms_rej, ref_rms);
    checks++;
    if (rms_pass < 0.8 * ref_rms) begin failures++; $display("FAIL pass-band wave attenuated"); end
    checks++;
    if (rms_rej > 0.2 * ref_rms) begin failures++; $display("FAIL off-beam wave not rejected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
