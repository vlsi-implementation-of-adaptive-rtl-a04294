// tb_weight_regfile: checks reset to zero, then random single-word writes
// (and idle cycles) against an array model, reading all words every cycle.
module tb_weight_regfile;
  import lms_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  logic clk = 0, rst;
  logic [N-1:0] we;
  sample_t wdata;
  sample_t w_all [N];
  int model [N];
  int checks = 0, failures = 0;

  weight_regfile #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int t);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(w_all[i]) != model[i]) begin
        failures++;
        $display("FAIL t=%0d w[%0d]=%0d expected %0d", t, i, w_all[i], model[i]);
      end
    end
  endtask

  initial begin
    rst = 1; we = '0; wdata = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < N; i++) model[i] = 0;
    compare(-1);
    for (int t = 0; t < 2000; t++) begin
      automatic int k = $urandom_range(0, N - 1);
      we    = ($urandom_range(0, 3) != 0) ? (N'(1) << k) : '0;
      wdata = sample_t'(rand16());
      @(posedge clk);
      if (we != 0) model[k] = int'(wdata);
      #1;
      compare(t);
    end
    // reset clears every word again
    rst = 1; we = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < N; i++) model[i] = 0;
    compare(-2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
