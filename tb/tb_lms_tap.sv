// tb_lms_tap: drives one tap with random samples, weights and filter clock
// enables, and checks the stored sample (passed to the next tap) and the
// registered product, which must appear one clock after the operands load.
module tb_lms_tap;
  import lms_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst, fen;
  sample_t u_in, w_in, u_out, o_out;
  int checks = 0, failures = 0;
  int m_u = 0, m_w = 0, m_o = 0;

  lms_tap dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; fen = 0; u_in = '0; w_in = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      fen  = ($urandom_range(0, 2) == 0);
      u_in = sample_t'(rand16());
      w_in = sample_t'(rand16());
      @(posedge clk);
      // model: output register takes the product of the registers before
      // this edge; input and weight registers load when fen was high
      m_o = ref_mul(m_u, m_w);
      if (fen) begin
        m_u = int'(u_in);
        m_w = int'(w_in);
      end
      #1;
      checks++;
      if (int'(u_out) != m_u) begin
        failures++;
        $display("FAIL t=%0d u_out=%0d expected %0d", t, u_out, m_u);
      end
      checks++;
      if (int'(o_out) != m_o) begin
        failures++;
        $display("FAIL t=%0d o_out=%0d expected %0d", t, o_out, m_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
