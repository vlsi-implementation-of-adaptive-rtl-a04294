// tb_tap_adder: checks the saturating N-input adder against an integer sum,
// with small operands (no saturation) and large ones (both saturation ends).
module tb_tap_adder;
  import lms_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  sample_t o_in [N];
  sample_t y;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  tap_adder #(.N(N)) dut (.o_in(o_in), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      automatic longint s = 0;
      automatic int exp;
      for (int i = 0; i < N; i++) begin
        automatic int v = (t % 3 == 0) ? rand16() : (int'($urandom_range(0, 4095)) - 2048);
        o_in[i] = sample_t'(v);
        s += longint'(v);
      end
      #1;
      exp = clamp16(s);
      if (s > 32767) sat_hi++;
      if (s < -32768) sat_lo++;
      checks++;
      if (int'(y) != exp) begin
        failures++;
        $display("FAIL sum=%0d y=%0d expected %0d", s, y, exp);
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised (%0d, %0d)", sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
