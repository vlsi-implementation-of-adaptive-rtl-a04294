// lms_pkg: types and arithmetic helpers shared by the LMS adaptive filter.
//
// All samples, weights, the error and the step size are 16-bit signed
// fractions in Q1.15 format (value = integer / 2^15, range [-1, 1)). The
// 16-bit word width is the one printed on every data path of the tap, filter
// and weight-update diagrams; the Q1.15 interpretation is this design's own
// choice. Results that leave the 16-bit range are saturated, not wrapped.
package lms_pkg;

  localparam int unsigned DATA_W = 16;   // word width of x, d, y, e, w
  localparam int unsigned FRAC_W = 15;   // fractional bits (Q1.15)

  typedef logic signed [DATA_W-1:0] sample_t;

  localparam sample_t SAMPLE_MAX = sample_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam sample_t SAMPLE_MIN = sample_t'({1'b1, {(DATA_W-1){1'b0}}});

  // Saturating 16-bit addition and subtraction.
  function automatic sample_t sat_add(input sample_t a, input sample_t b);
    logic signed [DATA_W:0] s;
    s = {a[DATA_W-1], a} + {b[DATA_W-1], b};
    if (s[DATA_W] != s[DATA_W-1]) return s[DATA_W] ? SAMPLE_MIN : SAMPLE_MAX;
    return s[DATA_W-1:0];
  endfunction

  function automatic sample_t sat_sub(input sample_t a, input sample_t b);
    logic signed [DATA_W:0] s;
    s = {a[DATA_W-1], a} - {b[DATA_W-1], b};
    if (s[DATA_W] != s[DATA_W-1]) return s[DATA_W] ? SAMPLE_MIN : SAMPLE_MAX;
    return s[DATA_W-1:0];
  endfunction

  // Keep the Q1.15 part of a full 2*DATA_W-bit product: drop the FRAC_W low
  // bits (truncation toward minus infinity). The top two bits differ only
  // for (-1) x (-1) = +1, which does not fit and saturates.
  function automatic sample_t trunc_product(input logic signed [2*DATA_W-1:0] full);
    if (full[2*DATA_W-1] != full[2*DATA_W-2]) return SAMPLE_MAX;
    return full[FRAC_W +: DATA_W];
  endfunction

endpackage
