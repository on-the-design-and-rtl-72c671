// sdp: spatial delay processor.
//
// In the scanned stream a one-sample delay moves a value to the next sensor,
// but at the first sensor of each scan (n1 = 0) the value delivered would come
// from the last sensor of the previous scan. The spatial zero initial condition
// w(-1,n2) = y(-1,n2) = 0 requires a zero there instead. The SDP keeps its own
// up counter SDPn1 that follows the sensor index: it is incremented on every
// sample and reset to zero when it reaches N1. While SDPn1 is 0 a multiplexer
// connects the register-stored zero to the output; otherwise the input is fed
// through. Counter, end-of-scan comparison against the stored N1, and output
// multiplexer follow the reference circuit; the clock enable is this design's.
//
// Interface: clk, rst (synchronous, clears SDPn1), en (one sample), din -> dout.
// Timing: dout is combinational from din and the counter; the counter steps
// on each enabled clock edge, so the sample presented with SDPn1 = n1 is the
// sample of sensor n1.
module sdp #(
  parameter int WIDTH = 16,
  parameter int N1    = 100
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             zic      // high while the zero is being substituted
);

  localparam int CW = (N1 > 1) ? $clog2(N1) : 1;
  localparam logic [CW-1:0] LAST = CW'(N1 - 1);
  localparam logic [WIDTH-1:0] ZIC_VALUE = '0;   // register-stored zero

  logic [CW-1:0] sdpn1;

  always_ff @(posedge clk) begin
    if (rst)
      sdpn1 <= '0;
    else if (en)
      sdpn1 <= (sdpn1 == LAST) ? '0 : sdpn1 + 1'b1;   // reset when SDPn1 reaches N1
  end

  assign zic  = (sdpn1 == '0);
  assign dout = zic ? ZIC_VALUE : din;

endmodule
