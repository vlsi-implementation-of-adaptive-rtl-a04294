// weight_update_ctrl: the weight update controller. It compares the desired
// sample d[n] with the filter output y[n] to form the error e[n], scales the
// error by the step size, and sequences one LMS iteration.
//
// One iteration follows the steps of the LMS flow, one state per step:
//   IDLE   read x[n] and d[n]: when in_valid is high, pulse `fen` (the filter
//          clock enable that shifts x[n] into the tap line and loads the tap
//          weights) and store d[n].
//   FILTER the taps multiply; their output registers load.
//   ERROR  comparator: e[n] = d[n] - y[n] (saturated), y[n] and e[n] stored.
//   FACTOR e_rate = trunc(e[n] * rate); y[n], e[n] presented with out_valid.
//   UPDATE N clocks, addr = 0..N-1 with upd_en high: weight k is updated.
// A new sample is accepted (in_ready high) only in IDLE, so the sample
// period is N + 4 clocks when in_valid is held high.
//
// Interface: in_valid/in_ready handshake on (x, d); the controller itself
// only takes d, x goes straight to the filter. out_valid is a one-clock
// pulse, there is no back-pressure on the output.
// The comparator and its d, y, e ports and the address output follow the
// controller and weight-update diagrams; the state machine, the handshake,
// the separate step-size multiply and the synchronous reset are this
// design's own.
module weight_update_ctrl
  import lms_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
)(
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          in_valid,   // x[n], d[n] offered
  output logic          in_ready,   // controller can take a new sample
  input  sample_t       d_in,       // desired sample d[n]
  input  sample_t       y_in,       // filter output y[n] from the adder
  input  sample_t       rate,       // step size (2*mu), Q1.15
  output logic          fen,        // filter clock enable
  output logic          upd_en,     // weight update enable
  output logic [AW-1:0] addr,       // weight address to update
  output sample_t       e_rate,     // e[n] * rate
  output logic          out_valid,  // y_out, e_out valid (one clock)
  output sample_t       y_out,      // y[n]
  output sample_t       e_out       // e[n]
);

  typedef enum logic [2:0] {
    S_IDLE, S_FILTER, S_ERROR, S_FACTOR, S_UPDATE
  } state_e;

  state_e        state;
  sample_t       d_q, y_q, e_q, er_q, er_next;
  logic [AW-1:0] addr_q;

  mult_trunc u_scale (.a(e_q), .b(rate), .p(er_next));

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      d_q    <= '0;
      y_q    <= '0;
      e_q    <= '0;
      er_q   <= '0;
      addr_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          d_q   <= d_in;
          state <= S_FILTER;
        end
        S_FILTER: state <= S_ERROR;
        S_ERROR: begin
          y_q   <= y_in;
          e_q   <= sat_sub(d_q, y_in);
          state <= S_FACTOR;
        end
        S_FACTOR: begin
          er_q   <= er_next;
          addr_q <= '0;
          state  <= S_UPDATE;
        end
        S_UPDATE: begin
          if (addr_q == AW'(N - 1)) state <= S_IDLE;
          addr_q <= addr_q + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready  = (state == S_IDLE);
  assign fen       = in_ready && in_valid;
  assign upd_en    = (state == S_UPDATE);
  assign addr      = addr_q;
  assign e_rate    = er_q;
  assign out_valid = (state == S_FACTOR);
  assign y_out     = y_q;
  assign e_out     = e_q;

  a_addr_range: assert property (@(posedge clk) disable iff (rst)
    upd_en |-> (32'(addr_q) < N))
    else $error("weight_update_ctrl: address out of range");

endmodule
