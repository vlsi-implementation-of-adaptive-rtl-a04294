// tb_weight_update_logic: for random samples, weights, step-scaled errors
// and addresses, checks the one-hot write enable and the new weight
// w[k] + trunc(e_rate * u[k]) against the integer model.
module tb_weight_update_logic;
  import lms_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 16;
  localparam int AW = 4;
  logic upd_en;
  logic [AW-1:0] addr;
  sample_t e_rate, wdata;
  sample_t u_all [N];
  sample_t w_all [N];
  logic [N-1:0] we;
  int checks = 0, failures = 0;

  weight_update_logic #(.N(N), .AW(AW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int k, exp;
      logic [N-1:0] exp_we;
      for (int i = 0; i < N; i++) begin
        u_all[i] = sample_t'(rand16());
        w_all[i] = sample_t'(rand16());
      end
      e_rate = sample_t'(rand16());
      k = $urandom_range(0, N - 1);
      addr = AW'(k);
      upd_en = ($urandom_range(0, 3) != 0);
      #1;
      exp = ref_add(int'(w_all[k]), ref_mul(int'(e_rate), int'(u_all[k])));
      exp_we = upd_en ? (N'(1) << k) : '0;
      checks++;
      if (we !== exp_we) begin
        failures++;
        $display("FAIL we=%h expected %h", we, exp_we);
      end
      checks++;
      if (int'(wdata) != exp) begin
        failures++;
        $display("FAIL k=%0d wdata=%0d expected %0d", k, wdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
