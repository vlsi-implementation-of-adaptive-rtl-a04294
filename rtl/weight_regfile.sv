// weight_regfile: the N x 16-bit weight register file.
//
// Holds the N filter coefficients w[0..N-1]. All words are read in parallel
// (w_all feeds the taps and the weight read multiplexer). Writes come from
// the weight update demultiplexer as a one-hot word enable `we` plus one
// data word; every enabled word takes wdata on the clock edge. Reset clears
// all weights to zero, the "initialize w" step of the LMS flow.
//
// The file, its N-word organisation and the 16-bit width follow the filter
// and weight-update diagrams; the write-enable form of the port and the
// synchronous reset are this design's own.
module weight_regfile
  import lms_pkg::*;
#(
  parameter int unsigned N = 16          // number of taps / weights
)(
  input  logic           clk,
  input  logic           rst,            // synchronous, active high
  input  logic [N-1:0]   we,             // per-word write enable (one-hot)
  input  sample_t        wdata,          // word written where we is set
  output sample_t        w_all [N]       // all weights, w_all[i] = w[i]
);

  sample_t w_q [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) w_q[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) if (we[i]) w_q[i] <= wdata;
    end
  end

  assign w_all = w_q;

  // The demultiplexer addresses one word at a time.
  a_onehot_we: assert property (@(posedge clk) disable iff (rst) $onehot0(we))
    else $error("weight_regfile: more than one word enabled");

endmodule
