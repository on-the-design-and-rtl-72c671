// fp_ref_pkg: reference arithmetic for the filter testbenches.
//
// ref_y() evaluates one output of the first-order 2D difference equation
//   y = a00 w00 + a10 w10 + a01 w01 + a11 w11 - b10 y10 - b01 y01 - b11 y11
// in 64-bit integers, rounds it to nearest (half up) at COEF_FRAC fractional
// bits and saturates it to DATA_W bits, the number format the RTL documents.
// ref_coefs() returns the coefficients of a first-order frequency-planar
// filter obtained from the prototype 1/(R + L1 s1 + L2 s2) by the 2D bilinear
// transform: all a_ij = 1/D, b10 = (R-L1+L2)/D, b01 = (R+L1-L2)/D,
// b11 = (R-L1-L2)/D with D = R+L1+L2; its pass band is the line through the
// origin of direction set by L1 : L2 and its width by R. Its gain on that
// line is 1/R; ref_coefs_unity() scales the a_ij by R for unity pass-band gain.
package fp_ref_pkg;
  import fp_pkg::*;

  function automatic longint sat_round(longint acc);
    longint v, ymax, ymin;
    v    = (acc + (longint'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    ymax = (longint'(1) <<< (DATA_W - 1)) - 1;
    ymin = -(longint'(1) <<< (DATA_W - 1));
    if (v > ymax) return ymax;
    if (v < ymin) return ymin;
    return v;
  endfunction

  function automatic longint ref_y(fp_coefs_t c,
                                   longint w00, longint w10, longint w01, longint w11,
                                   longint y10, longint y01, longint y11);
    longint acc;
    acc = longint'(c.a00) * w00 + longint'(c.a10) * w10 + longint'(c.a01) * w01
        + longint'(c.a11) * w11 - longint'(c.b10) * y10 - longint'(c.b01) * y01
        - longint'(c.b11) * y11;
    return sat_round(acc);
  endfunction

  function automatic coef_t to_coef(real x);
    return coef_t'($rtoi(x * real'(1 << COEF_FRAC) + ((x >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic fp_coefs_t ref_coefs(real r, real l1, real l2);
    fp_coefs_t c;
    real d;
    d = r + l1 + l2;
    c.a00 = to_coef(1.0 / d);
    c.a10 = to_coef(1.0 / d);
    c.a01 = to_coef(1.0 / d);
    c.a11 = to_coef(1.0 / d);
    c.b10 = to_coef((r - l1 + l2) / d);
    c.b01 = to_coef((r + l1 - l2) / d);
    c.b11 = to_coef((r - l1 - l2) / d);
    return c;
  endfunction

  function automatic fp_coefs_t ref_coefs_unity(real r, real l1, real l2);
    fp_coefs_t c;
    real d;
    c = ref_coefs(r, l1, l2);
    d = r + l1 + l2;
    c.a00 = to_coef(r / d);
    c.a10 = to_coef(r / d);
    c.a01 = to_coef(r / d);
    c.a11 = to_coef(r / d);
    return c;
  endfunction

endpackage
