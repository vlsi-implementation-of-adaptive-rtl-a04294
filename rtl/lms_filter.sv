// lms_filter: the adaptive FIR filter datapath. N taps form a tapped delay
// line (each tap passes its stored sample on to the next), the adder sums
// the N tap products into y[n], the weight register file holds the N
// weights, and the weight update logic writes one weight per clock.
//
//   y[n]   = sum_k trunc(w[k] * x[n-k]),  k = 0..N-1
//   w[k]  <= w[k] + trunc(e_rate * x[n-k])   for the addressed k
//
// Timing: `fen` at edge t shifts x_in into tap 0 and loads every tap's
// weight register from the file; y is valid (combinationally, from the tap
// output registers) after edge t+1 and stays valid until the next `fen`.
// While upd_en is high, word `addr` of the file takes its new value at each
// edge; the samples x[n-k] used for it stay in the taps until the next fen.
//
// Structure and 16-bit widths follow the filter diagram; control comes from
// weight_update_ctrl. w_all is brought out for observation.
module lms_filter
  import lms_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
)(
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          fen,        // filter clock enable
  input  sample_t       x_in,       // filter input x[n]
  input  logic          upd_en,     // weight update enable
  input  logic [AW-1:0] addr,       // weight being updated
  input  sample_t       e_rate,     // e[n] * rate
  output sample_t       y,          // filter output y[n]
  output sample_t       w_all [N]   // current weights
);

  sample_t u_chain [N+1];   // u_chain[k] enters tap k, u_chain[k+1] leaves it
  sample_t o_all   [N];
  sample_t u_all   [N];
  logic [N-1:0] we;
  sample_t wdata;

  assign u_chain[0] = x_in;

  for (genvar k = 0; k < N; k++) begin : g_tap
    lms_tap u_tap (
      .clk  (clk),
      .rst  (rst),
      .fen  (fen),
      .u_in (u_chain[k]),
      .w_in (w_all[k]),
      .u_out(u_chain[k+1]),
      .o_out(o_all[k])
    );
    assign u_all[k] = u_chain[k+1];
  end

  tap_adder #(.N(N)) u_adder (.o_in(o_all), .y(y));

  weight_regfile #(.N(N)) u_wfile (
    .clk  (clk),
    .rst  (rst),
    .we   (we),
    .wdata(wdata),
    .w_all(w_all)
  );

  weight_update_logic #(.N(N), .AW(AW)) u_wul (
    .upd_en(upd_en),
    .addr  (addr),
    .e_rate(e_rate),
    .u_all (u_all),
    .w_all (w_all),
    .we    (we),
    .wdata (wdata)
  );

endmodule
