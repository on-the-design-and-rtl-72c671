// tb_output_downsampler: feeds numbered samples with a random valid into
// down-samplers for N1 = 4 (FIFO depth 3) and N1 = 100 (depth 1). Every
// N1-th accepted sample (sensor N1-1) must come out, in order, exactly
// OUT_DEPTH clocks after it was accepted, and nothing else may come out.
module tb_output_downsampler;
  localparam int W = 16;
  logic clk = 0, rst, in_valid;
  logic [W-1:0] din, dout_a, dout_b;
  logic ov_a, ov_b;
  int checks = 0, failures = 0, outs_a = 0, outs_b = 0;

  output_downsampler #(.WIDTH(W), .N1(4),   .OUT_DEPTH(3)) dut_a (.clk, .rst, .in_valid, .din, .out_valid(ov_a), .dout(dout_a));
  output_downsampler #(.WIDTH(W), .N1(100), .OUT_DEPTH(1)) dut_b (.clk, .rst, .in_valid, .din, .out_valid(ov_b), .dout(dout_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs per clock: value and cycle at which it must appear
  int exp_a_cyc[$], exp_b_cyc[$];
  logic [W-1:0] exp_a_val[$], exp_b_val[$];
  int cyc, accepted;

  initial begin
    rst = 1; in_valid = 0; din = '0; cyc = 0; accepted = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      din = W'($urandom);
      if (in_valid) begin
        if (accepted % 4 == 3)   begin exp_a_cyc.push_back(cyc + 3); exp_a_val.push_back(din); end
        if (accepted % 100 == 99) begin exp_b_cyc.push_back(cyc + 1); exp_b_val.push_back(din); end
        accepted++;
      end
      @(posedge clk);
      cyc++;
      #1;
      // output a
      checks++;
      if (exp_a_cyc.size() > 0 && exp_a_cyc[0] == cyc) begin
        if (!ov_a || dout_a !== exp_a_val[0]) begin
          failures++; $display("FAIL a cycle %0d: valid %b data %h exp %h", cyc, ov_a, dout_a, exp_a_val[0]);
        end
        void'(exp_a_cyc.pop_front()); void'(exp_a_val.pop_front()); outs_a++;
      end else if (ov_a) begin
        failures++; $display("FAIL a cycle %0d: unexpected output", cyc);
      end
      // output b
      checks++;
      if (exp_b_cyc.size() > 0 && exp_b_cyc[0] == cyc) begin
        if (!ov_b || dout_b !== exp_b_val[0]) begin
          failures++; $display("FAIL b cycle %0d: valid %b data %h exp %h", cyc, ov_b, dout_b, exp_b_val[0]);
        end
        void'(exp_b_cyc.pop_front()); void'(exp_b_val.pop_front()); outs_b++;
      end else if (ov_b) begin
        failures++; $display("FAIL b cycle %0d: unexpected output", cyc);
      end
    end
    if (outs_a < 100 || outs_b < 5) begin failures++; $display("FAIL too few outputs %0d %0d", outs_a, outs_b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
