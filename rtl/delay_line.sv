// delay_line: clocked delay line of DEPTH serially cascaded registers.
//
// The spatial shift (one sensor) and the temporal shift (one scan period) of
// the scanned-array signal both become plain delays of the 1D scanned stream:
// one register for a spatial step and N1 registers for a temporal step. This
// block is that delay line. Each register advances when `en` is high (one
// scanned sample per enable), so `dout` is the value of `din` DEPTH enabled
// cycles earlier. A synchronous reset clears every stage to zero, which gives
// the temporal zero initial conditions w(n1,-1) = y(n1,-1) = 0 at start-up.
//
// Interface: clk, rst (synchronous, active high), en, din -> dout.
// Timing: dout(k) = din(k-DEPTH), counted in enabled cycles; DEPTH >= 1.
module delay_line #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 100
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[DEPTH-1];

endmodule
