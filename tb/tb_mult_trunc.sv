// tb_mult_trunc: checks the Q1.15 multiply-truncate against an integer
// floor-division model over corner cases and random operands.
module tb_mult_trunc;
  import lms_pkg::*;
  import tb_ref_pkg::*;

  sample_t a, b, p;
  int checks = 0, failures = 0;

  mult_trunc dut (.a(a), .b(b), .p(p));

  task automatic check(input int av, input int bv);
    int exp;
    a = sample_t'(av);
    b = sample_t'(bv);
    #1;
    exp = ref_mul(av, bv);
    checks++;
    if (int'(p) != exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d p=%0d expected %0d", av, bv, p, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(-32768, -32768);   // +1 does not fit: saturates
    check(-32768, 32767);
    check(16384, 16384);     // 0.5 * 0.5 = 0.25
    check(-1, 1);            // tiny negative truncates to -1 LSB
    check(-16384, 16384);
    check(0, 12345);
    for (int i = 0; i < 2000; i++) check(rand16(), rand16());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
