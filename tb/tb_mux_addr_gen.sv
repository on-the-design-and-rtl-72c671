// tb_mux_addr_gen: checks the multiplexer address sequence 0..N1-1, 0, ...
// for N1 = 5 and N1 = 100 under a random enable, including scan_start and
// scan_end, and that a synchronous reset returns the address to sensor 0.
module tb_mux_addr_gen;
  logic clk = 0, rst, en;
  logic [2:0] addr_a;
  logic [6:0] addr_b;
  logic ss_a, se_a, ss_b, se_b;
  int checks = 0, failures = 0, wraps = 0;

  mux_addr_gen #(.N1(5))   dut_a (.clk, .rst, .en, .addr(addr_a), .scan_start(ss_a), .scan_end(se_a));
  mux_addr_gen #(.N1(100)) dut_b (.clk, .rst, .en, .addr(addr_b), .scan_start(ss_b), .scan_end(se_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, logic ss, logic se, int n, int exp);
    checks++;
    if (got != exp || ss !== (exp == 0) || se !== (exp == n - 1)) begin
      failures++;
      $display("FAIL N1=%0d addr %0d expected %0d (start %b end %b)", n, got, exp, ss, se);
    end
  endtask

  int count;
  initial begin
    rst = 1; en = 0; count = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      #1;
      check(int'(addr_a), ss_a, se_a, 5,   count % 5);
      check(int'(addr_b), ss_b, se_b, 100, count % 100);
      @(posedge clk);
      if (en) begin
        count++;
        if (count % 100 == 0) wraps++;
      end
      #1;
    end
    rst = 1; @(posedge clk); #1 rst = 0;
    check(int'(addr_a), ss_a, se_a, 5, 0);
    check(int'(addr_b), ss_b, se_b, 100, 0);
    if (wraps == 0) begin failures++; $display("FAIL no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
