// weight_update_logic: updates one filter weight per clock,
// w[k] <= w[k] + trunc(e_rate * u[k]).
//
// The weight update controller supplies the tap address k (log2 N bits),
// the scaled error e_rate = e[n] x rate and an update enable. An N-to-1
// multiplexer picks the sample u[k] = x[n-k] held in tap k, the multiplier
// truncator forms e_rate * u[k], a second N-to-1 multiplexer picks the
// current weight w[k] from the register file, the adder forms the new
// weight and an N-output demultiplexer steers it back to word k of the
// register file (one-hot write enable). Sweeping k over 0..N-1 applies the
// LMS update to the whole weight vector in N clocks.
//
// Combinational; the write lands at the next clock edge in the register
// file. The two multiplexers, the multiplier truncator, the adder and the
// demultiplexer follow the weight-update diagram. Saturation in the adder
// is this design's own choice.
module weight_update_logic
  import lms_pkg::*;
#(
  parameter int unsigned N  = 16,                    // number of weights
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1 // address width
)(
  input  logic            upd_en,       // apply the update to word addr
  input  logic [AW-1:0]   addr,         // tap / weight address k
  input  sample_t         e_rate,       // e[n] x rate
  input  sample_t         u_all [N],    // samples held in the taps
  input  sample_t         w_all [N],    // current weights
  output logic [N-1:0]    we,           // one-hot write enable to the file
  output sample_t         wdata         // new weight w[k]
);

  sample_t u_sel, w_sel, delta;

  // 16 bit N x 1 multiplexers
  assign u_sel = u_all[addr];
  assign w_sel = w_all[addr];

  mult_trunc u_mul (.a(e_rate), .b(u_sel), .p(delta));

  assign wdata = sat_add(w_sel, delta);

  // 16 bit N x 1 demultiplexer (write enables; the data word is shared)
  always_comb begin
    we = '0;
    if (upd_en) we[addr] = 1'b1;
  end

endmodule
