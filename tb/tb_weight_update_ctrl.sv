// tb_weight_update_ctrl: runs many LMS iterations through the controller
// with random d, y and step size, and checks cycle by cycle: the filter
// enable only at acceptance, no acceptance while busy (in_valid is held
// high at random during an iteration), the error d - y and the scaled error,
// the address sweep 0..N-1 with the update enable, and the N + 4 clock
// sample period.
module tb_weight_update_ctrl;
  import lms_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 16;
  localparam int AW = 4;
  logic clk = 0, rst;
  logic in_valid, in_ready, fen, upd_en, out_valid;
  logic [AW-1:0] addr;
  sample_t d_in, y_in, rate, e_rate, y_out, e_out;
  int checks = 0, failures = 0, stalls = 0;

  weight_update_ctrl #(.N(N), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s = %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; in_valid = 0; d_in = '0; y_in = '0; rate = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      int d, y, r, e, period;
      // idle gap
      repeat ($urandom_range(0, 3)) begin
        in_valid = 0;
        #1;
        expect_eq("in_ready idle", int'(in_ready), 1);
        expect_eq("fen idle", int'(fen), 0);
        @(posedge clk); #1;
      end
      d = rand16(); y = rand16(); r = int'($urandom_range(0, 32767));
      in_valid = 1; d_in = sample_t'(d); y_in = sample_t'(y); rate = sample_t'(r);
      #1;
      expect_eq("in_ready", int'(in_ready), 1);
      expect_eq("fen", int'(fen), 1);
      e = ref_sub(d, y);
      period = 0;
      do begin
        @(posedge clk); #1;
        period++;
        in_valid = ($urandom_range(0, 1) == 1);
        d_in = sample_t'(rand16());       // must be ignored while busy
        #1;
        if (!in_ready && in_valid) stalls++;
        if (in_ready) break;
        expect_eq("fen busy", int'(fen), 0);
        expect_eq("out_valid", int'(out_valid), int'(period == 3));
        expect_eq("upd_en", int'(upd_en), int'(period >= 4));
        if (period == 3) begin
          expect_eq("y_out", int'(y_out), y);
          expect_eq("e_out", int'(e_out), e);
        end
        if (period >= 4) begin
          expect_eq("addr", int'(addr), period - 4);
          expect_eq("e_rate", int'(e_rate), ref_mul(e, r));
        end
      end while (period < 100);
      expect_eq("sample period", period, N + 4);
      in_valid = 0;
    end
    expect_eq("stall seen", int'(stalls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
