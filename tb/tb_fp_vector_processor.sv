// tb_fp_vector_processor: checks the seven-term dot product against 64-bit
// integer arithmetic (fp_ref_pkg::ref_y): random coefficients and taps, small
// operands that exercise rounding exactly at the half step, and large
// operands that must saturate at both ends.
module tb_fp_vector_processor;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  fp_coefs_t c;
  sample_t w00, w10, w01, w11, y10, y01, y11, y;
  logic sat;
  int checks = 0, failures = 0, sats = 0, halves = 0;

  fp_vector_processor dut (.coefs(c), .w00, .w10, .w01, .w11, .y10, .y01, .y11, .y, .sat);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint exp, ymax;
    #1;
    exp  = ref_y(c, longint'(w00), longint'(w10), longint'(w01), longint'(w11),
                 longint'(y10), longint'(y01), longint'(y11));
    ymax = (longint'(1) <<< (DATA_W - 1)) - 1;
    checks++;
    if (longint'(y) != exp || sat !== (exp == ymax || exp == -ymax - 1)) begin
      failures++;
      $display("FAIL y=%0d expected %0d sat=%b", y, exp, sat);
    end
    if (sat) sats++;
  endtask

  initial begin
    // random operands of every size
    for (int i = 0; i < 4000; i++) begin
      c = fp_coefs_t'({$urandom, $urandom, $urandom, 16'($urandom)});
      {w00, w10, w01, w11} = {$urandom, $urandom};
      {y10, y01, y11} = {$urandom, 16'($urandom)};
      if (i % 2 == 1) begin   // moderate values that mostly stay in range
        w00 >>>= 4; w10 >>>= 4; w01 >>>= 4; w11 >>>= 4;
        y10 >>>= 4; y01 >>>= 4; y11 >>>= 4;
      end
      check_one();
    end
    // rounding at exactly half an LSB: a00 = 0.5, w00 odd, others zero
    c = '0;
    c.a00 = coef_t'(1 << (COEF_FRAC - 1));
    {w10, w01, w11, y10, y01, y11} = '0;
    for (int v = -9; v <= 9; v++) begin
      w00 = sample_t'(v);
      check_one();
      halves++;
    end
    // single-term feedback sign: y = -b10 * y10
    c = '0;
    c.b10 = coef_t'(1 << COEF_FRAC);
    w00 = '0; y10 = 16'sd1234;
    check_one();
    if (y != -16'sd1234) begin failures++; $display("FAIL feedback sign"); end
    checks++;
    // positive and negative saturation
    c = '0;
    c.a00 = coef_t'(3 << COEF_FRAC);
    w00 = 16'sd20000; check_one();
    w00 = -16'sd20000; check_one();
    if (sats < 2) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
