// mult_trunc: the "multiplier truncator" of the tap and of the weight-update
// path. It multiplies two Q1.15 words and keeps the 16 bits that form the
// Q1.15 product (lms_pkg::trunc_product): bits [30:15] of the 32-bit full
// product, i.e. the 15 lowest bits are dropped (truncation toward minus
// infinity). The one product that does not fit, (-1) x (-1), saturates to
// the largest positive word.
//
// Purely combinational. Interface: a, b in; p out, all lms_pkg::sample_t.
// The unit and its 16-bit output follow the tap and weight-update diagrams;
// the fraction format, the choice of kept bits and the saturation of the
// corner case are this design's own.
module mult_trunc
  import lms_pkg::*;
(
  input  sample_t a,
  input  sample_t b,
  output sample_t p
);

  logic signed [2*DATA_W-1:0] full;

  always_comb begin
    full = a * b;
    p    = trunc_product(full);
  end

endmodule
