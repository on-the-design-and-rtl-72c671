// fp_pkg: types and constants shared by the scanned-array 2D frequency-planar
// beam filter.
//
// The filter works on 16-bit two's-complement samples, the word length of the
// reference implementation. The seven coefficients of the first-order 2D IIR
// difference equation are signed fixed-point numbers with COEF_FRAC fractional
// bits; the coefficient word length and binary point are this design's choice
// (the coefficient values come from the filter synthesis and are loaded through
// ports). N1_DEFAULT is the number of sensors of the main configuration.
package fp_pkg;

  parameter int DATA_W     = 16;   // sample width (ADC input, filter output)
  parameter int COEF_W     = 16;   // coefficient width
  parameter int COEF_FRAC  = 13;   // coefficient fractional bits: range [-4, 4)
  parameter int N1_DEFAULT = 100;  // sensors in the linear array

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Coefficients of y(n1,n2) = sum a_ij w(n1-i,n2-j) - sum b_ij y(n1-i,n2-j),
  // with b00 normalised to 1.
  typedef struct packed {
    coef_t a00;
    coef_t a10;
    coef_t a01;
    coef_t a11;
    coef_t b10;
    coef_t b01;
    coef_t b11;
  } fp_coefs_t;

endpackage
