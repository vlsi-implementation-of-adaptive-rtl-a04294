// lms_tap: one tap of the adaptive FIR filter (the "center tap").
//
// The tap holds a sample and a weight in two registers and multiplies them.
// When the filter clock enable `fen` is high, the input register takes u_in
// (the sample of the previous tap, or the filter input for the first tap)
// and the weight register takes w_in from the weight register file. The
// multiplier truncator forms the 16-bit product, which the output register
// captures on every clock edge, so o_out is valid one clock after `fen`.
// u_out is the content of the input register, u[n-1] from the point of view
// of the next tap, and feeds that tap's input and the weight update logic.
//
// Timing: fen at edge t loads the operands, o_out = trunc(u*w) after edge t+1.
// The three registers, the multiplier truncator and the 16-bit widths follow
// the tap diagram. The single clock with an enable standing in for the
// separate filter clock, and the synchronous reset to zero, are this
// design's own choices.
module lms_tap
  import lms_pkg::*;
(
  input  logic    clk,
  input  logic    rst,     // synchronous, active high: clears all registers
  input  logic    fen,     // filter clock enable: load a new sample and weight
  input  sample_t u_in,    // sample entering this tap, u[n]
  input  sample_t w_in,    // this tap's weight from the weight register file
  output sample_t u_out,   // stored sample, passed on to the next tap
  output sample_t o_out    // registered product u * w
);

  sample_t u_q, w_q, prod, o_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      u_q <= '0;
      w_q <= '0;
    end else if (fen) begin
      u_q <= u_in;
      w_q <= w_in;
    end
  end

  mult_trunc u_mul (.a(u_q), .b(w_q), .p(prod));

  always_ff @(posedge clk) begin
    if (rst) o_q <= '0;
    else     o_q <= prod;
  end

  assign u_out = u_q;
  assign o_out = o_q;

endmodule
