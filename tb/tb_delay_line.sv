// tb_delay_line: checks the register delay line at depths 1 and 7.
// Random data with a random enable is pushed in; a software queue of the
// enabled inputs predicts dout = the input DEPTH enabled samples earlier
// (zero while fewer than DEPTH samples have entered since reset).
module tb_delay_line;
  localparam int W = 12;
  logic clk = 0, rst, en;
  logic [W-1:0] din, dout1, dout7;
  int checks = 0, failures = 0;

  delay_line #(.WIDTH(W), .DEPTH(1)) dut1 (.clk, .rst, .en, .din, .dout(dout1));
  delay_line #(.WIDTH(W), .DEPTH(7)) dut7 (.clk, .rst, .en, .din, .dout(dout7));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist[$];

  function automatic logic [W-1:0] expect_at(int depth);
    return (hist.size() >= depth) ? hist[hist.size() - depth] : '0;
  endfunction

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; en = 0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 600; i++) begin
        en  = ($urandom_range(0, 3) != 0);
        din = W'($urandom);
        @(posedge clk);
        if (en) hist.push_back(din);
        #1;
        check(dout1, expect_at(1), "depth 1");
        check(dout7, expect_at(7), "depth 7");
      end
      // synchronous reset clears every stage
      rst = 1; @(posedge clk); #1 rst = 0;
      hist.delete();
      check(dout1, '0, "reset depth 1");
      check(dout7, '0, "reset depth 7");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
