// output_downsampler: down-sample-by-N1 output stage.
//
// The scanned output carries y for every sensor, but the beam filter output is
// the value at the last sensor of each scan, y(N1-1, n2) = y_SCAN(n2*N1 + N1-1).
// A counter follows the sensor index of the incoming scanned output samples and
// keeps only the sample at index N1-1; that sample enters a FIFO made of a
// clocked register delay line, which delivers it OUT_DEPTH clocks later. The
// FIFO depth is this design's choice (the reference only says it is a clocked
// register delay line).
//
// Interface: clk, rst (synchronous), in_valid + din (scanned samples in scan
// order starting at sensor 0 after reset) -> out_valid + dout (one per scan).
// Timing: out_valid/dout appear OUT_DEPTH clocks after the accepted sample of
// sensor N1-1; the output rate is the input rate divided by N1.
module output_downsampler #(
  parameter int WIDTH     = 16,
  parameter int N1        = 100,
  parameter int OUT_DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] din,
  output logic             out_valid,
  output logic [WIDTH-1:0] dout
);

  localparam int CW = (N1 > 1) ? $clog2(N1) : 1;
  localparam logic [CW-1:0] LAST = CW'(N1 - 1);

  logic [CW-1:0] n1_cnt;
  logic          keep;

  always_ff @(posedge clk) begin
    if (rst)
      n1_cnt <= '0;
    else if (in_valid)
      n1_cnt <= (n1_cnt == LAST) ? '0 : n1_cnt + 1'b1;
  end

  assign keep = in_valid && (n1_cnt == LAST);

  // FIFO: delay line clocked every cycle, carrying a valid flag with the data
  delay_line #(.WIDTH(WIDTH + 1), .DEPTH(OUT_DEPTH)) u_fifo (
    .clk, .rst, .en(1'b1),
    .din ({keep, keep ? din : '0}),
    .dout({out_valid, dout})
  );

endmodule
