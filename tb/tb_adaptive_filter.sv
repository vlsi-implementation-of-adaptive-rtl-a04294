// tb_adaptive_filter: end-to-end test of the LMS adaptive filter at its
// default size (16 taps), in the two configurations the filter is meant for.
//
//  1. System identification: a random input drives both an "unknown" FIR
//     system, modelled here, and the adaptive filter; the system's output
//     is the desired signal. The weights must converge to the system's
//     coefficients and the error must become small.
//  2. Noise reduction: the input is a sinusoid plus random noise, the
//     desired signal is the pure sinusoid. The output must follow the
//     sinusoid with an error well below the noise.
//
// Every sample's y[n] and e[n], and the whole weight vector after every
// update, are also compared bit for bit with an integer model of the LMS
// recursion. The latency (3 clocks from acceptance to out_valid) and the
// sample period (N + 4 clocks when the next sample is already waiting) are
// checked, and the test counts how often a sample had to wait, how often
// each weight address was written and how many samples each configuration
// ran; a mechanism that never happened counts as a failure.
module tb_adaptive_filter;
  import lms_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic    clk = 0, rst, in_valid, in_ready, out_valid;
  sample_t x_in, d_in, rate, y_out, e_out;
  sample_t w_out [N];

  adaptive_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int stalls = 0, periods_checked = 0;
  int writes [N];
  int sysid_samples = 0, nr_samples = 0;
  int xl [N];
  int wm [N];
  int last_accept = -1000;

  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s = %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic reset_all(input int r);
    in_valid = 0; x_in = '0; d_in = '0; rate = sample_t'(r);
    rst = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < N; i++) begin xl[i] = 0; wm[i] = 0; end
    last_accept = -1000;
  endtask

  // Offer one sample, wait for it to be taken and for its result; check
  // the result and, once the update is done, the weights. If back_to_back
  // is set, the caller offers the next sample straight away.
  task automatic run_sample(input int x, input int d, input int r,
                            output int y_got, output int e_got);
    int acc_cycle, y, e, er, waited;
    int w_before [N];
    in_valid = 1; x_in = sample_t'(x); d_in = sample_t'(d); rate = sample_t'(r);
    // called at a falling edge: the sample is taken at the next rising
    // edge at which in_ready is high
    waited = 0;
    while (!in_ready) begin
      stalls++;
      waited++;
      @(negedge clk);
    end
    // weights of the previous iteration are final now
    for (int i = 0; i < N; i++) begin
      expect_eq($sformatf("w[%0d]", i), int'(w_out[i]), wm[i]);
      w_before[i] = int'(w_out[i]);
    end
    @(posedge clk);
    acc_cycle = cycle;
    if (waited > 0 && last_accept >= 0) begin
      expect_eq("sample period", acc_cycle - last_accept, N + 4);
      periods_checked++;
    end
    last_accept = acc_cycle;
    @(negedge clk);
    in_valid = 0;
    // model
    for (int i = N - 1; i > 0; i--) xl[i] = xl[i-1];
    xl[0] = x;
    begin
      longint s = 0;
      for (int i = 0; i < N; i++) s += longint'(ref_mul(xl[i], wm[i]));
      y = clamp16(s);
    end
    e  = ref_sub(d, y);
    er = ref_mul(e, r);
    for (int i = 0; i < N; i++) begin
      int nw = ref_add(wm[i], ref_mul(er, xl[i]));
      if (nw != w_before[i]) writes[i]++;
      wm[i] = nw;
    end
    while (!out_valid) @(negedge clk);
    expect_eq("latency", cycle - acc_cycle, 3);
    expect_eq("y", int'(y_out), y);
    expect_eq("e", int'(e_out), e);
    y_got = int'(y_out);
    e_got = int'(e_out);
    // wait for the update to finish before the next sample is offered,
    // except on half of the samples, where it is offered straight away
    if ($urandom_range(0, 1) == 0) begin
      while (!in_ready) @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  // "Unknown" system: an 8-tap FIR with Q1.15 coefficients.
  int h [8] = '{3277, 6554, 9830, 6554, -3277, -1638, 1638, 819};

  initial begin
    real sum_e_early, sum_e_late, sum_noise;
    int y, e;
    int xh [8];
    for (int i = 0; i < N; i++) writes[i] = 0;

    // ---------------- 1. system identification ----------------
    reset_all(16384);
    for (int i = 0; i < 8; i++) xh[i] = 0;
    sum_e_early = 0; sum_e_late = 0;
    for (int n = 0; n < 800; n++) begin
      automatic int x, d;
      automatic longint s = 0;
      x = int'($urandom_range(0, 16383)) - 8192;       // uniform +-0.25
      for (int i = 7; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = x;
      for (int i = 0; i < 8; i++) s += longint'(xh[i]) * longint'(h[i]);
      d = clamp16(s / 32768);
      run_sample(x, d, 16384, y, e);
      sysid_samples++;
      if (n < 50) sum_e_early += (e < 0 ? -e : e);
      if (n >= 700) sum_e_late += (e < 0 ? -e : e);
    end
    $display("system identification: mean|e| first 50 = %0.1f LSB, last 100 = %0.1f LSB",
             sum_e_early / 50.0, sum_e_late / 100.0);
    for (int i = 0; i < N; i++) begin
      automatic int target = (i < 8) ? h[i] : 0;
      automatic int diff = int'(w_out[i]) - target;
      if (diff < 0) diff = -diff;
      expect_true($sformatf("sysid w[%0d]=%0d near %0d", i, w_out[i], target), diff < 400);
    end
    expect_true("sysid error decreased", sum_e_late / 100.0 < 0.1 * sum_e_early / 50.0);
    expect_true("sysid error small", sum_e_late / 100.0 < 200.0);

    // ---------------- 2. noise reduction ----------------
    reset_all(4096);
    sum_e_early = 0; sum_e_late = 0; sum_noise = 0;
    for (int n = 0; n < 1000; n++) begin
      automatic int x, d, noise;
      d = int'($rtoi(16384.0 * $cos(2.0 * 3.14159265358979 * n / 50.0)));  // 0.5 cos
      noise = int'($urandom_range(0, 13106)) - 6553;                        // +-0.2
      x = clamp16(longint'(d) + longint'(noise));
      run_sample(x, d, 4096, y, e);
      nr_samples++;
      if (n < 50) sum_e_early += (e < 0 ? -e : e);
      if (n >= 800) begin
        sum_e_late += (e < 0 ? -e : e);
        sum_noise  += (noise < 0 ? -noise : noise);
      end
    end
    $display("noise reduction: mean|e| first 50 = %0.1f, last 200 = %0.1f, mean|noise| = %0.1f LSB",
             sum_e_early / 50.0, sum_e_late / 200.0, sum_noise / 200.0);
    expect_true("noise reduction error below noise", sum_e_late < 0.6 * sum_noise);
    expect_true("noise reduction error decreased", sum_e_late / 200.0 < sum_e_early / 50.0);

    // ---------------- mechanisms ----------------
    $display("stalls=%0d periods_checked=%0d sysid=%0d nr=%0d", stalls, periods_checked,
             sysid_samples, nr_samples);
    expect_true("a sample waited for the update sweep", stalls > 0);
    expect_true("back-to-back sample period measured", periods_checked > 0);
    expect_true("system identification ran", sysid_samples > 0);
    expect_true("noise reduction ran", nr_samples > 0);
    for (int i = 0; i < N; i++)
      expect_true($sformatf("weight %0d written", i), writes[i] > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
