// tb_sdp: checks the spatial delay processor with N1 = 7 (and N1 = 100).
// The testbench counts accepted samples itself: the sensor index is
// (accepted samples since reset) mod N1. At index 0 the output must be the
// stored zero and zic high; otherwise the output must equal the input.
module tb_sdp;
  localparam int W = 16;
  logic clk = 0, rst, en;
  logic [W-1:0] din, dout_a, dout_b;
  logic zic_a, zic_b;
  int checks = 0, failures = 0, zics = 0;

  sdp #(.WIDTH(W), .N1(7))   dut_a (.clk, .rst, .en, .din, .dout(dout_a), .zic(zic_a));
  sdp #(.WIDTH(W), .N1(100)) dut_b (.clk, .rst, .en, .din, .dout(dout_b), .zic(zic_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] dout, logic zic, int n, int idx);
    logic [W-1:0] exp;
    exp = (idx == 0) ? '0 : din;
    checks++;
    if (dout !== exp || zic !== (idx == 0)) begin
      failures++;
      $display("FAIL N1=%0d index %0d: dout %h (exp %h) zic %b", n, idx, dout, exp, zic);
    end
  endtask

  int accepted;
  initial begin
    rst = 1; en = 0; din = '0; accepted = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      en  = ($urandom_range(0, 4) != 0);
      din = W'($urandom) | 16'h0001;   // never zero, so a substituted zero shows
      #1;
      check(dout_a, zic_a, 7,   accepted % 7);
      check(dout_b, zic_b, 100, accepted % 100);
      if (zic_a) zics++;
      @(posedge clk);
      if (en) accepted++;
      #1;
    end
    if (zics == 0) begin failures++; $display("FAIL no zero substitution seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
