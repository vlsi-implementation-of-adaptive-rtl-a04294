// tap_adder: the adder that forms the filter output y[n] from the N tap
// outputs o[0..N-1].
//
// The sum is formed at full precision, DATA_W + clog2(N) bits wide, so no
// partial sum can overflow, and is then saturated to a 16-bit Q1.15 word.
// Combinational: y is valid in the same cycle as the tap outputs.
//
// The N-input adder follows the filter diagram. Its output width is not
// printed there; the 16-bit saturated result is this design's own choice.
module tap_adder
  import lms_pkg::*;
#(
  parameter int unsigned N = 16          // number of tap outputs summed
)(
  input  sample_t o_in [N],              // tap outputs
  output sample_t y                      // saturated sum
);

  localparam int unsigned SUM_W = DATA_W + $clog2(N) + 1;

  logic signed [SUM_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) acc += SUM_W'(o_in[i]);
    if (acc > SUM_W'(SAMPLE_MAX))      y = SAMPLE_MAX;
    else if (acc < SUM_W'(SAMPLE_MIN)) y = SAMPLE_MIN;
    else                               y = acc[DATA_W-1:0];
  end

endmodule
