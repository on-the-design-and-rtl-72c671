// mux_addr_gen: address generator for the N1:1 analog sensor multiplexer.
//
// The sensor array is scanned uniformly: sensor 0, 1, ..., N1-1, then sensor 0
// again, one sensor per A/D sample. This block holds the address presented to
// the multiplexer's digital select port; after each sample it is incremented
// and wrapped to 0 when it reaches N1. `scan_start` flags address 0 (the first
// sensor of a scan) and `scan_end` address N1-1.
//
// Interface: clk, rst (synchronous, address 0), en (advance after a sample)
// -> addr, scan_start, scan_end.
// Timing: addr is a register; the sample taken while addr = n belongs to sensor
// n, and addr moves to the next sensor on the enabled clock edge that takes it.
module mux_addr_gen #(
  parameter int N1 = 100,
  localparam int AW = (N1 > 1) ? $clog2(N1) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [AW-1:0] addr,
  output logic          scan_start,
  output logic          scan_end
);

  localparam logic [AW-1:0] LAST = AW'(N1 - 1);

  always_ff @(posedge clk) begin
    if (rst)
      addr <= '0;
    else if (en)
      addr <= (addr == LAST) ? '0 : addr + 1'b1;
  end

  assign scan_start = (addr == '0);
  assign scan_end   = (addr == LAST);

endmodule
