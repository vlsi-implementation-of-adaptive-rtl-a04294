// adaptive_filter: an N-tap LMS adaptive FIR filter.
//
// For every input pair (x[n], d[n]) the filter computes
//   y[n]    = sum_k w[k] x[n-k]
//   e[n]    = d[n] - y[n]
//   w[k]   += rate * e[n] * x[n-k]      for k = 0..N-1
// in 16-bit Q1.15 fixed point. The weights start at zero after reset. One
// iteration takes N + 4 clocks: 4 to filter, form the error and scale it,
// then N to update the weights one at a time through a single multiplier.
//
// Interface: offer x_in and d_in with in_valid; they are taken in the cycle
// in which in_ready is also high. y_out and e_out appear with a one-clock
// out_valid pulse 3 clocks after the sample is taken. rate is the step size
// (2*mu of the LMS update) and may change between samples. w_out shows the
// weight vector.
//
// The division into filter (taps, adder, weight register file, weight
// update logic) and weight update controller follows the hardware block
// diagrams; the handshake and the fixed-point format are this design's own.
module adaptive_filter
  import lms_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
)(
  input  logic    clk,
  input  logic    rst,          // synchronous, active high
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t x_in,         // input signal x[n]
  input  sample_t d_in,         // desired signal d[n]
  input  sample_t rate,         // step size, Q1.15
  output logic    out_valid,
  output sample_t y_out,        // filter output y[n]
  output sample_t e_out,        // error e[n]
  output sample_t w_out [N]     // weights
);

  logic          fen, upd_en;
  logic [AW-1:0] addr;
  sample_t       e_rate, y;

  lms_filter #(.N(N), .AW(AW)) u_filter (
    .clk   (clk),
    .rst   (rst),
    .fen   (fen),
    .x_in  (x_in),
    .upd_en(upd_en),
    .addr  (addr),
    .e_rate(e_rate),
    .y     (y),
    .w_all (w_out)
  );

  weight_update_ctrl #(.N(N), .AW(AW)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .d_in     (d_in),
    .y_in     (y),
    .rate     (rate),
    .fen      (fen),
    .upd_en   (upd_en),
    .addr     (addr),
    .e_rate   (e_rate),
    .out_valid(out_valid),
    .y_out    (y_out),
    .e_out    (e_out)
  );

endmodule
