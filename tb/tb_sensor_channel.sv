// tb_sensor_channel: one full sensor, from buffer delay to calibrated alarm.
// The 45 nm sensor (9 + 43 buffers, AFN over 9 cycles, threshold 17, 100
// calibration measurements) runs at a 10001 ps clock. For each nominal
// buffer delay the expected FN is worked out from the chain's per-buffer
// delays, and every settled window must report afn_sum = 9 x FN with the
// alarm set exactly when the sum is below the threshold. The sequence: a
// fast chip (no alarm), a slow chip (alarm), calibration at a worst-case
// delay (the threshold must become 9 x FN there, and calibration must take
// 101 windows), then the worst case itself (no alarm: AFN equals the
// threshold), a slightly slower chip (alarm) and a faster one (no alarm).
`timescale 1ps/1ps
module tb_sensor_channel;
  localparam int unsigned N0     = sensor_pkg::ASIC_N0;
  localparam int unsigned N1     = sensor_pkg::ASIC_N1;
  localparam int unsigned WINDOW = sensor_pkg::ASIC_WINDOW;
  localparam int unsigned PERIOD = 10001;
  localparam int unsigned FN_W   = sensor_pkg::fn_width(N1);
  localparam int unsigned SUM_W  = sensor_pkg::sum_width(N1, WINDOW);

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             cal_start = 1'b0;
  logic [N1-1:0]    samples;
  logic [FN_W-1:0]  fn;
  logic [SUM_W-1:0] afn_sum;
  logic             afn_valid;
  logic [SUM_W-1:0] threshold_sum;
  logic             alarm, cal_busy, cal_done;
  int checks = 0, failures = 0;
  int n_alarm = 0, n_quiet = 0;

  sensor_channel dut (
    .clk(clk), .rst(rst), .cal_start(cal_start), .samples(samples), .fn(fn),
    .afn_sum(afn_sum), .afn_valid(afn_valid), .threshold_sum(threshold_sum),
    .alarm(alarm), .cal_busy(cal_busy), .cal_done(cal_done)
  );

  initial forever begin
    #5001 clk = 1'b1;
    #5000 clk = 1'b0;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned expected_fn(input int unsigned nominal);
    longint acc;
    acc = 0;
    for (int k = 0; k < N0 + N1; k++) begin
      acc += longint'(pvt_env_pkg::buffer_delay(nominal, 0, k, 30, 20));
      if (k >= N0 && acc >= longint'(PERIOD)) return k - N0;
    end
    return N1;
  endfunction

  task automatic wait_window();
    do begin
      @(posedge clk);
      #1;
    end while (!afn_valid);
  endtask

  // Apply a buffer delay, let two windows pass, then check three windows.
  task automatic run_condition(input int unsigned nominal, input int unsigned thr);
    int unsigned exp_sum;
    pvt_env_pkg::buffer_delay_ps = nominal;
    exp_sum = WINDOW * expected_fn(nominal);
    wait_window();
    wait_window();
    repeat (3) begin
      wait_window();
      check(afn_sum == SUM_W'(exp_sum),
            $sformatf("delay %0d: afn_sum=%0d expected %0d", nominal, afn_sum, exp_sum));
      check(threshold_sum == SUM_W'(thr), "threshold in use");
      check(alarm == (exp_sum < thr), $sformatf("delay %0d: alarm=%b", nominal, alarm));
      if (alarm) n_alarm++; else n_quiet++;
    end
  endtask

  int unsigned d_worst, cal_thr, windows;

  initial begin
    pvt_env_pkg::buffer_delay_ps = 200;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_condition(200, 17 * WINDOW);   // fast chip
    run_condition(480, 17 * WINDOW);   // slow chip
    // worst-case condition: the delay that gives FN nearest 20
    d_worst = 300;
    while (expected_fn(d_worst) > 20) d_worst += 2;
    pvt_env_pkg::buffer_delay_ps = d_worst;
    cal_thr = WINDOW * expected_fn(d_worst);
    wait_window();
    wait_window();
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    check(cal_busy, "calibration started");
    windows = 0;
    while (cal_busy) begin
      @(posedge clk);
      #1;
      if (afn_valid) windows++;
    end
    #1;
    check(windows == sensor_pkg::CAL_REPEATS + 1,
          $sformatf("calibration took %0d windows", windows));
    check(cal_done, "cal_done");
    check(threshold_sum == SUM_W'(cal_thr),
          $sformatf("calibrated threshold %0d expected %0d", threshold_sum, cal_thr));
    run_condition(d_worst, cal_thr);                        // at the worst case: quiet
    begin
      int unsigned d_slow;
      d_slow = d_worst;
      while (expected_fn(d_slow) >= expected_fn(d_worst)) d_slow += 2;
      run_condition(d_slow, cal_thr);                       // just slower: alarm
    end
    run_condition(220, cal_thr);                            // fast again: quiet
    check(n_alarm > 0 && n_quiet > 0, "alarm and quiet both seen");
    $display("calibrated threshold %0d (AFN %0d) at %0d ps; windows with alarm %0d, quiet %0d",
             cal_thr, cal_thr / WINDOW, d_worst, n_alarm, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
