// fp_iir_sfg: pipelined 1D realisation of the first-order 2D IIR
// frequency-planar filter on the scanned-array signal.
//
// Sensor n1 of scan n2 arrives as scanned sample k = n2*N1 + n1. A step of one
// sensor is then a delay of one sample and a step of one scan period a delay of
// N1 samples, so the 2D difference equation
//   y(n1,n2) = sum_{i,j} a_ij w(n1-i,n2-j) - sum_{(i,j)!=(0,0)} b_ij y(n1-i,n2-j)
// becomes a 1D recursion with taps at k-1, k-N1 and k-N1-1 on both the input
// and the output stream. The branches follow the signal flow graph of the
// reference design:
//   w10 = SDP1(w(k-1))      w01 = w(k-N1)      w11 = SDP2(w(k-N1-1))
//   y10 = SDP3(y(k-1))      y01 = y(k-N1)      y11 = SDP4(y(k-N1-1))
// The N1-tap is followed by a separate one-sample delay for the (1,1) taps.
// Each SDP substitutes zero at the first sensor of a scan (spatial zero
// initial condition); the delay lines start cleared, which gives the temporal
// zero initial condition for the first scan. The vector processor forms the
// new output in the same clock period, and the one-sample output delay line is
// both the y(k-1) feedback register and the output register.
//
// Interface: clk, rst (synchronous), in_valid + w_in (one scanned sample per
// enabled clock, in scan order starting with sensor 0 after reset), coefs
// (held static while running) -> y_valid + y_out, plus status flags.
// Timing: one sample per clock when in_valid is held high; y_out carries
// y_SCAN(k) and y_valid pulses on the clock after sample k is accepted.
// in_valid low stalls the whole graph (a clock enable, this design's choice).
module fp_iir_sfg
  import fp_pkg::*;
#(
  parameter int N1 = N1_DEFAULT
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  sample_t   w_in,
  input  fp_coefs_t coefs,
  output logic      y_valid,
  output sample_t   y_out,
  output logic      zic,       // a spatial zero initial condition is applied to sample k
  output logic      sat        // y_SCAN(k) saturated
);

  sample_t w_d1, w_dn, w_dn1;
  sample_t y_d1, y_dn, y_dn1;
  sample_t w10, w11, y10, y11, y_comb;
  logic    zic1, zic2, zic3, zic4;

  // feed-forward branches
  delay_line #(.WIDTH(DATA_W), .DEPTH(1))  u_dl_w1  (.clk, .rst, .en(in_valid), .din(w_in),  .dout(w_d1));
  sdp        #(.WIDTH(DATA_W), .N1(N1))    u_sdp1   (.clk, .rst, .en(in_valid), .din(w_d1),  .dout(w10), .zic(zic1));
  delay_line #(.WIDTH(DATA_W), .DEPTH(N1)) u_dl_wn  (.clk, .rst, .en(in_valid), .din(w_in),  .dout(w_dn));
  delay_line #(.WIDTH(DATA_W), .DEPTH(1))  u_dl_wn1 (.clk, .rst, .en(in_valid), .din(w_dn),  .dout(w_dn1));
  sdp        #(.WIDTH(DATA_W), .N1(N1))    u_sdp2   (.clk, .rst, .en(in_valid), .din(w_dn1), .dout(w11), .zic(zic2));

  // feed-back branches
  delay_line #(.WIDTH(DATA_W), .DEPTH(1))  u_dl_y1  (.clk, .rst, .en(in_valid), .din(y_comb), .dout(y_d1));
  sdp        #(.WIDTH(DATA_W), .N1(N1))    u_sdp3   (.clk, .rst, .en(in_valid), .din(y_d1),   .dout(y10), .zic(zic3));
  delay_line #(.WIDTH(DATA_W), .DEPTH(N1)) u_dl_yn  (.clk, .rst, .en(in_valid), .din(y_comb), .dout(y_dn));
  delay_line #(.WIDTH(DATA_W), .DEPTH(1))  u_dl_yn1 (.clk, .rst, .en(in_valid), .din(y_dn),   .dout(y_dn1));
  sdp        #(.WIDTH(DATA_W), .N1(N1))    u_sdp4   (.clk, .rst, .en(in_valid), .din(y_dn1),  .dout(y11), .zic(zic4));

  fp_vector_processor u_vp (
    .coefs,
    .w00(w_in), .w10, .w01(w_dn), .w11,
    .y10, .y01(y_dn), .y11,
    .y(y_comb), .sat
  );

  // the four SDP counters run in lock step; report one of them
  assign zic   = in_valid & zic1;
  assign y_out = y_d1;

  always_ff @(posedge clk) begin
    if (rst) y_valid <= 1'b0;
    else     y_valid <= in_valid;
  end

  // The four SDPs share reset and enable, so their counters never differ.
  a_sdp_lockstep: assert property (@(posedge clk) disable iff (rst)
    (zic1 == zic2) && (zic2 == zic3) && (zic3 == zic4));

endmodule
