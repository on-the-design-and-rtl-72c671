// tb_fp_beam_filter_top: end-to-end test of the beam filter at its default
// size (N1 = 100 sensors). The testbench plays the sensor array, the analog
// multiplexer and the A/D converter: in each cycle it returns the sample of
// the sensor that mux_addr selects. A 2D reference (sensor n1, scan n2) of
// the first-order difference equation predicts every scanned output y_scan,
// due one clock after its input, and every beam output y_out = y(N1-1, n2),
// due two clocks after the sample of the last sensor. Three runs, each after
// a reset:
//   1. unit impulse response of a 30-degree frequency-planar filter, 40 scans
//   2. a sampled plane wave plus noise, with random A/D stalls, 12 scans
//   3. a high-gain filter driven at full scale, so the output saturates
// Each mechanism (stall, spatial zero substitution, saturation, address
// wrap-around, down-sampled output) is counted and must occur.
module tb_fp_beam_filter_top;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N1 = N1_DEFAULT;
  localparam int N2 = 40;
  localparam int AW = $clog2(N1);

  logic clk = 0, rst, adc_valid;
  sample_t adc_data, y_scan, y_out;
  fp_coefs_t coefs;
  logic [AW-1:0] mux_addr;
  logic scan_start, scan_end, y_scan_valid, y_valid, zic, sat;

  fp_beam_filter_top dut (
    .clk, .rst, .coefs, .mux_addr, .scan_start, .scan_end,
    .adc_valid, .adc_data, .y_scan_valid, .y_scan, .y_valid, .y_out, .zic, .sat
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_zic = 0, n_sat = 0, n_wrap = 0, n_out = 0;
  longint cyc = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  longint wr[N2][N1], yr[N2][N1];
  function automatic longint w_at(int n1, int n2);
    return (n1 < 0 || n2 < 0) ? 0 : wr[n2][n1];
  endfunction
  function automatic longint y_at(int n1, int n2);
    return (n1 < 0 || n2 < 0) ? 0 : yr[n2][n1];
  endfunction

  // expected outputs: cycle and value
  longint q_scan_cyc[$], q_scan_val[$], q_out_cyc[$], q_out_val[$];

  // output monitor, sampled just after each clock edge
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if (q_scan_cyc.size() > 0 && q_scan_cyc[0] == cyc) begin
        if (y_scan_valid !== 1'b1 || longint'(y_scan) != q_scan_val[0]) begin
          failures++;
          $display("FAIL y_scan at cycle %0d: valid %b value %0d expected %0d", cyc, y_scan_valid, y_scan, q_scan_val[0]);
        end
        void'(q_scan_cyc.pop_front()); void'(q_scan_val.pop_front());
      end else if (y_scan_valid) begin
        failures++;
        $display("FAIL y_scan at cycle %0d: unexpected output %0d", cyc, y_scan);
      end
      checks++;
      if (q_out_cyc.size() > 0 && q_out_cyc[0] == cyc) begin
        if (y_valid !== 1'b1 || longint'(y_out) != q_out_val[0]) begin
          failures++;
          $display("FAIL y_out at cycle %0d: valid %b value %0d expected %0d", cyc, y_valid, y_out, q_out_val[0]);
        end
        void'(q_out_cyc.pop_front()); void'(q_out_val.pop_front());
        n_out++;
      end else if (y_valid) begin
        failures++;
        $display("FAIL y_out at cycle %0d: unexpected output %0d", cyc, y_out);
      end
    end
  end

  function automatic longint stimulus(int mode, int n1, int n2);
    real t;
    case (mode)
      0: return (n1 == 0 && n2 == 0) ? 16384 : 0;
      1: begin
        // plane wave arriving at 30 degrees to the temporal axis, sampled at
        // the scanned instants n2 - n1/N1, plus a little noise
        t = real'(n2) - real'(n1) / real'(N1) + real'(n1) * 0.57735;
        return longint'($rtoi(6000.0 * $sin(0.9 * t))) + longint'($urandom_range(0, 200)) - 100;
      end
      default: return longint'($signed(16'($urandom)));
    endcase
  endfunction

  task automatic run(int mode, int scans, int stall_pct);
    rst = 1; adc_valid = 0; adc_data = '0;
    @(posedge clk); #2 rst = 0;
    for (int n2 = 0; n2 < scans; n2++) begin
      for (int n1 = 0; n1 < N1; n1++) begin
        while (int'($urandom_range(0, 99)) < stall_pct) begin
          adc_valid = 0; n_stall++;
          @(posedge clk); #2;
        end
        // the sensor selected now must be sensor n1
        checks++;
        if (int'(mux_addr) != n1 || scan_start !== (n1 == 0) || scan_end !== (n1 == N1 - 1)) begin
          failures++;
          $display("FAIL mux_addr %0d expected %0d", mux_addr, n1);
        end
        wr[n2][n1] = stimulus(mode, n1, n2);
        yr[n2][n1] = ref_y(coefs, w_at(n1, n2), w_at(n1-1, n2), w_at(n1, n2-1), w_at(n1-1, n2-1),
                           y_at(n1-1, n2), y_at(n1, n2-1), y_at(n1-1, n2-1));
        adc_valid = 1; adc_data = sample_t'(wr[n2][n1]);
        q_scan_cyc.push_back(cyc + 1); q_scan_val.push_back(yr[n2][n1]);
        if (n1 == N1 - 1) begin
          q_out_cyc.push_back(cyc + 2); q_out_val.push_back(yr[n2][n1]);
          n_wrap++;
        end
        #1;
        if (zic) n_zic++;
        if (sat) n_sat++;
        @(posedge clk); #2;
      end
    end
    adc_valid = 0;
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (q_scan_cyc.size() != 0 || q_out_cyc.size() != 0) begin
      failures++;
      $display("FAIL %0d scanned and %0d beam outputs never arrived", q_scan_cyc.size(), q_out_cyc.size());
      q_scan_cyc.delete(); q_scan_val.delete(); q_out_cyc.delete(); q_out_val.delete();
    end
  endtask

  int sat_before;
  initial begin
    rst = 1; adc_valid = 0; adc_data = '0;
    repeat (3) @(posedge clk);
    // 1. impulse response, beam at 30 degrees, narrow (R = 0.05)
    coefs = ref_coefs(0.05, $cos(3.14159265 / 6.0), $sin(3.14159265 / 6.0));
    run(0, N2, 0);
    // the impulse response spreads along the pass-band line, so later
    // sensors must see non-zero output in later scans
    checks++;
    if (yr[N2 - 1][N1 - 1] == 0 && yr[10][20] == 0) begin
      failures++; $display("FAIL impulse response did not propagate");
    end
    // 2. plane wave with stalls
    run(1, 12, 15);
    // 3. saturation
    sat_before = n_sat;
    coefs = '0;
    coefs.a00 = coef_t'(3 << COEF_FRAC);
    coefs.b10 = coef_t'(-(1 << (COEF_FRAC - 1)));
    run(2, 3, 5);
    $display("stalls %0d spatial zeros %0d saturations %0d scans %0d beam outputs %0d",
             n_stall, n_zic, n_sat, n_wrap, n_out);
    checks++;
    if (n_stall == 0 || n_zic == 0 || n_sat == sat_before || n_wrap == 0 || n_out == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
