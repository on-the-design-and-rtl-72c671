// tb_fp_iir_sfg: checks the scanned-signal filter against the 2D difference
// equation evaluated directly on a 2D array (n1 = sensor, n2 = scan), with
// zero boundary values at n1 = -1 and n2 = -1. N1 = 8 keeps the run short.
// Phase 1 uses a stable frequency-planar filter and random input; phase 2
// uses random coefficients and full-scale input, so the output saturates and
// the saturation is fed back. Random stalls (in_valid low) are inserted.
// Every y_out must match the reference and arrive one clock after its input.
module tb_fp_iir_sfg;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N1 = 8;
  localparam int N2 = 40;

  logic clk = 0, rst, in_valid, y_valid, zic, sat;
  sample_t w_in, y_out;
  fp_coefs_t coefs;
  int checks = 0, failures = 0, stalls = 0, sats = 0, zics = 0;

  fp_iir_sfg #(.N1(N1)) dut (.clk, .rst, .in_valid, .w_in, .coefs, .y_valid, .y_out, .zic, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run_phase(bit wild);
    logic    pending;
    longint  pend_val;
    rst = 1; in_valid = 0; pending = 0; pend_val = 0;
    @(posedge clk); #1 rst = 0;
    for (int n2 = 0; n2 < N2; n2++) begin
      for (int n1 = 0; n1 < N1; n1++) begin
        while ($urandom_range(0, 5) == 0) begin   // stall cycle
          in_valid = 0; stalls++;
          @(posedge clk); #1;
          checks++;
          // no new output; the last one is held
          if (y_valid !== 1'b0 || (pending && longint'(y_out) != pend_val)) begin
            failures++; $display("FAIL during stall: y_valid %b y_out %0d held %0d", y_valid, y_out, pend_val);
          end
        end
        wr[n2][n1] = wild ? longint'($signed(16'($urandom))) : longint'($signed(16'($urandom))) / 8;
        yr[n2][n1] = ref_y(coefs, w_at(n1, n2), w_at(n1-1, n2), w_at(n1, n2-1), w_at(n1-1, n2-1),
                           y_at(n1-1, n2), y_at(n1, n2-1), y_at(n1-1, n2-1));
        in_valid = 1; w_in = sample_t'(wr[n2][n1]);
        #1;
        checks++;
        if (zic !== (n1 == 0)) begin failures++; $display("FAIL zic at n1=%0d", n1); end
        if (zic) zics++;
        if (sat) sats++;
        @(posedge clk); #1;
        checks++;
        if (y_valid !== 1'b1 || longint'(y_out) != yr[n2][n1]) begin
          failures++;
          $display("FAIL (n1=%0d,n2=%0d): y_valid %b y_out %0d expected %0d", n1, n2, y_valid, y_out, yr[n2][n1]);
        end
        pending = 1; pend_val = yr[n2][n1];
      end
    end
    in_valid = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; in_valid = 0; w_in = '0;
    coefs = ref_coefs(0.05, 0.866, 0.5);
    repeat (3) @(posedge clk);
    run_phase(0);
    coefs = fp_coefs_t'({$urandom, $urandom, $urandom, 16'($urandom)});
    run_phase(1);
    if (stalls == 0 || sats == 0 || zics == 0) begin
      failures++; $display("FAIL mechanism missing: stalls %0d sats %0d zics %0d", stalls, sats, zics);
    end
    $display("stalls %0d saturations %0d spatial zeros %0d", stalls, sats, zics);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
