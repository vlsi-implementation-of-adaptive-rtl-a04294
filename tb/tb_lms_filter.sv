// tb_lms_filter: drives the filter datapath the way the controller does
// (filter enable, one idle clock, then an N-clock update sweep) with random
// inputs and scaled errors, and checks y[n] and all weights against an
// integer model of the delay line, taps, adder and update rule.
module tb_lms_filter;
  import lms_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 16;
  localparam int AW = 4;
  logic clk = 0, rst, fen, upd_en;
  logic [AW-1:0] addr;
  sample_t x_in, e_rate, y;
  sample_t w_all [N];
  int xl [N];
  int wm [N];
  int checks = 0, failures = 0;

  lms_filter #(.N(N), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; fen = 0; upd_en = 0; addr = '0; x_in = '0; e_rate = '0;
    for (int i = 0; i < N; i++) begin xl[i] = 0; wm[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 400; t++) begin
      longint s;
      int er;
      // filter: shift in a new sample
      fen = 1;
      x_in = sample_t'((t % 4 == 0) ? rand16() : (int'($urandom_range(0, 16383)) - 8192));
      @(posedge clk); #1;
      for (int i = N - 1; i > 0; i--) xl[i] = xl[i-1];
      xl[0] = int'(x_in);
      fen = 0;
      @(posedge clk); #1;
      s = 0;
      for (int i = 0; i < N; i++) s += longint'(ref_mul(xl[i], wm[i]));
      checks++;
      if (int'(y) != clamp16(s)) begin
        failures++;
        $display("FAIL t=%0d y=%0d expected %0d", t, y, clamp16(s));
      end
      // update sweep
      er = (t % 5 == 0) ? rand16() : (int'($urandom_range(0, 8191)) - 4096);
      e_rate = sample_t'(er);
      for (int k = 0; k < N; k++) begin
        upd_en = 1; addr = AW'(k);
        @(posedge clk); #1;
        wm[k] = ref_add(wm[k], ref_mul(er, xl[k]));
      end
      upd_en = 0;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(w_all[i]) != wm[i]) begin
          failures++;
          $display("FAIL t=%0d w[%0d]=%0d expected %0d", t, i, w_all[i], wm[i]);
        end
      end
      // y must hold until the next filter enable
      checks++;
      if (int'(y) != clamp16(s)) begin
        failures++;
        $display("FAIL t=%0d y changed during update", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
