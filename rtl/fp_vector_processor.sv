// fp_vector_processor: parallel dot product of the first-order 2D IIR filter.
//
// Computes, in one clock period, the right-hand side of
//   y(n1,n2) = a00 w00 + a10 w10 + a01 w01 + a11 w11 - b10 y10 - b01 y01 - b11 y11
// where wij = w(n1-i,n2-j) and yij = y(n1-i,n2-j) arrive already aligned by the
// delay lines and spatial delay processors. All seven products are formed at
// once and summed by an adder tree, so a new output is ready every sample, as
// the reference design requires (its feedback term y10 is the output of the
// previous sample). The result is combinational; the enclosing signal flow
// graph registers it.
//
// Number format (this design's choice; the reference gives only the 16-bit
// word length): samples are DATA_W-bit integers, coefficients have COEF_FRAC
// fractional bits. The full-precision sum is rounded to nearest (half up) by
// adding 2^(COEF_FRAC-1) and shifting right by COEF_FRAC, then saturated to
// DATA_W bits; `sat` flags a saturated output.
//
// Interface: coefs, seven taps -> y, sat. Purely combinational.
module fp_vector_processor
  import fp_pkg::*;
(
  input  fp_coefs_t coefs,
  input  sample_t   w00,
  input  sample_t   w10,
  input  sample_t   w01,
  input  sample_t   w11,
  input  sample_t   y10,
  input  sample_t   y01,
  input  sample_t   y11,
  output sample_t   y,
  output logic      sat
);

  localparam int PROD_W = DATA_W + COEF_W;
  localparam int ACC_W  = PROD_W + 3;            // seven terms need 3 guard bits

  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t ROUND = acc_t'(1) <<< (COEF_FRAC - 1);
  localparam acc_t YMAX  = acc_t'((1 <<< (DATA_W - 1)) - 1);
  localparam acc_t YMIN  = -acc_t'(1 <<< (DATA_W - 1));

  acc_t p_a00, p_a10, p_a01, p_a11, p_b10, p_b01, p_b11;
  acc_t sum_ff, sum_fb, sum, shifted;

  always_comb begin
    p_a00 = acc_t'(coefs.a00 * w00);
    p_a10 = acc_t'(coefs.a10 * w10);
    p_a01 = acc_t'(coefs.a01 * w01);
    p_a11 = acc_t'(coefs.a11 * w11);
    p_b10 = acc_t'(coefs.b10 * y10);
    p_b01 = acc_t'(coefs.b01 * y01);
    p_b11 = acc_t'(coefs.b11 * y11);

    // adder tree: feed-forward and feed-back halves, then their difference
    sum_ff  = (p_a00 + p_a10) + (p_a01 + p_a11);
    sum_fb  = (p_b10 + p_b01) + p_b11;
    sum     = sum_ff - sum_fb;
    shifted = (sum + ROUND) >>> COEF_FRAC;

    sat = 1'b0;
    if (shifted > YMAX) begin
      y   = sample_t'(YMAX);
      sat = 1'b1;
    end else if (shifted < YMIN) begin
      y   = sample_t'(YMIN);
      sat = 1'b1;
    end else begin
      y = sample_t'(shifted);
    end
  end

endmodule
