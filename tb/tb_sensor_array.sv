// tb_sensor_array: end-to-end test of the 50-sensor array at its defaults.
// Fifty sensors of 70 leading and 32 tapped buffers (AFN over 20 cycles,
// threshold 17, 100 calibration measurements) share a 10001 ps clock; each
// has its own process variation. For every chip-wide nominal buffer delay
// the expected FN of each sensor is worked out from its chain's per-buffer
// delays, and every settled window must give afn_sum = 20 x FN and the
// alarm exactly when that sum is below the sensor's threshold; alarm_any
// and alarm_count must summarise the alarms one clock later.
// The sequence runs: a fast chip (FN saturated at 32, no alarm), a chip
// near the fixed threshold (some sensors alarm, others not), a slow chip
// (all alarm), a very slow chip (edge over two periods: second phase
// change), then a calibration at the worst-case delay, after which the
// worst case must raise no alarm and a slightly slower chip must make every
// sensor alarm. Each of these mechanisms is counted and must occur.
`timescale 1ps/1ps
module tb_sensor_array;
  localparam int unsigned NS     = sensor_pkg::FPGA_SENSORS;
  localparam int unsigned N0     = sensor_pkg::FPGA_N0;
  localparam int unsigned N1     = sensor_pkg::FPGA_N1;
  localparam int unsigned WINDOW = sensor_pkg::FPGA_WINDOW;
  localparam int unsigned PERIOD = 10001;
  localparam int unsigned FN_W   = sensor_pkg::fn_width(N1);
  localparam int unsigned SUM_W  = sensor_pkg::sum_width(N1, WINDOW);
  localparam int unsigned CNT_W  = $clog2(NS + 1);

  logic                      clk = 1'b0;
  logic                      rst = 1'b1;
  logic                      cal_start = 1'b0;
  logic [NS-1:0][N1-1:0]     samples;
  logic [NS-1:0][FN_W-1:0]   fn;
  logic [NS-1:0][SUM_W-1:0]  afn_sum;
  logic [NS-1:0]             afn_valid;
  logic [NS-1:0][SUM_W-1:0]  threshold_sum;
  logic [NS-1:0]             alarm;
  logic                      alarm_any;
  logic [CNT_W-1:0]          alarm_count;
  logic                      cal_busy, cal_done;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_windows = 0, n_saturated = 0, n_second_change = 0, n_all_quiet = 0;
  int n_mixed = 0, n_all_alarm = 0, n_calibrations = 0, n_uniform_after_cal = 0;

  sensor_array dut (
    .clk(clk), .rst(rst), .cal_start(cal_start), .samples(samples), .fn(fn),
    .afn_sum(afn_sum), .afn_valid(afn_valid), .threshold_sum(threshold_sum),
    .alarm(alarm), .alarm_any(alarm_any), .alarm_count(alarm_count),
    .cal_busy(cal_busy), .cal_done(cal_done)
  );

  initial forever begin
    #5001 clk = 1'b1;
    #5000 clk = 1'b0;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // FN of the sensor with the given seed; second = chain shows a second phase change
  function automatic int unsigned expected_fn(input int unsigned nominal, input int unsigned seed,
                                              output bit second);
    longint acc;
    int unsigned f;
    acc = 0;
    f = N1;
    second = 1'b0;
    for (int k = 0; k < N0 + N1; k++) begin
      acc += longint'(pvt_env_pkg::buffer_delay(nominal, seed, k, 30, 20));
      if (k >= N0 && acc >= longint'(PERIOD) && f == N1) f = k - N0;
      if (k >= N0 && acc >= longint'(2 * PERIOD)) second = 1'b1;
    end
    return f;
  endfunction

  task automatic wait_window();
    do begin
      @(posedge clk);
      #1;
    end while (!afn_valid[0]);
  endtask

  int unsigned thr [NS];

  // Apply a delay, let two windows pass, check two windows; returns alarm count
  task automatic run_condition(input int unsigned nominal, output int unsigned n_alarm);
    int unsigned exp_sum [NS];
    int unsigned f, nsat, nsec;
    bit second;
    pvt_env_pkg::buffer_delay_ps = nominal;
    nsat = 0;
    nsec = 0;
    n_alarm = 0;
    for (int i = 0; i < NS; i++) begin
      f = expected_fn(nominal, i + 1, second);
      exp_sum[i] = WINDOW * f;
      if (f == N1) nsat++;
      if (second) nsec++;
      if (exp_sum[i] < thr[i]) n_alarm++;
    end
    wait_window();
    wait_window();
    repeat (2) begin
      wait_window();
      n_windows++;
      check(afn_valid == '1, $sformatf("all sensors end their window together (%b)", afn_valid));
      for (int i = 0; i < NS; i++) begin
        check(afn_sum[i] == SUM_W'(exp_sum[i]),
              $sformatf("delay %0d sensor %0d: afn_sum=%0d expected %0d", nominal, i, afn_sum[i], exp_sum[i]));
        check(threshold_sum[i] == SUM_W'(thr[i]), $sformatf("sensor %0d threshold", i));
        check(alarm[i] == (exp_sum[i] < thr[i]), $sformatf("delay %0d sensor %0d alarm", nominal, i));
      end
      @(posedge clk); #1;
      check(alarm_count == CNT_W'(n_alarm), $sformatf("alarm_count=%0d expected %0d", alarm_count, n_alarm));
      check(alarm_any == (n_alarm != 0), "alarm_any");
    end
    if (nsat > 0) n_saturated++;
    if (nsec > 0) n_second_change++;
    if (n_alarm == 0) n_all_quiet++;
    else if (n_alarm == NS) n_all_alarm++;
    else n_mixed++;
    $display("buffer delay %0d ps: %0d of %0d sensors alarm", nominal, n_alarm, NS);
  endtask

  int unsigned na, d_worst, windows, d_slow, f_min_worst, f_max_slow;
  bit sec;

  initial begin
    foreach (thr[i]) thr[i] = sensor_pkg::AFN_THRESHOLD * WINDOW;
    pvt_env_pkg::buffer_delay_ps = 90;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    run_condition(90, na);    // fast: FN saturated
    run_condition(114, na);   // near the fixed threshold: mixed decisions
    run_condition(125, na);   // slow
    run_condition(210, na);   // very slow: second phase change

    // calibration at the worst-case condition
    d_worst = 110;
    pvt_env_pkg::buffer_delay_ps = d_worst;
    f_min_worst = N1;
    for (int i = 0; i < NS; i++) begin
      thr[i] = WINDOW * expected_fn(d_worst, i + 1, sec);
      if (thr[i] / WINDOW < f_min_worst) f_min_worst = thr[i] / WINDOW;
    end
    wait_window();
    wait_window();
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    check(cal_busy && !cal_done, "calibration running");
    windows = 0;
    while (cal_busy) begin
      @(posedge clk);
      #1;
      if (afn_valid[0]) windows++;
    end
    #1;
    check(windows == sensor_pkg::CAL_REPEATS + 1, $sformatf("calibration took %0d windows", windows));
    check(cal_done, "all sensors calibrated");
    for (int i = 0; i < NS; i++)
      check(threshold_sum[i] == SUM_W'(thr[i]),
            $sformatf("sensor %0d calibrated threshold %0d expected %0d", i, threshold_sum[i], thr[i]));
    if (cal_done) n_calibrations++;

    run_condition(d_worst, na);   // at the worst case: nobody alarms
    if (na == 0) n_uniform_after_cal++;
    // slightly slower: the smallest delay at which every sensor's FN drops
    d_slow = d_worst;
    do begin
      d_slow++;
      f_max_slow = 0;
      for (int i = 0; i < NS; i++) begin
        int unsigned f;
        f = expected_fn(d_slow, i + 1, sec);
        if (WINDOW * f >= thr[i]) f_max_slow = 1;
      end
    end while (f_max_slow != 0);
    run_condition(d_slow, na);    // everybody alarms
    if (na == NS) n_uniform_after_cal++;
    check(n_uniform_after_cal == 2, "uniform decisions after calibration");

    $display("windows %0d, saturated %0d, second phase change %0d, all quiet %0d, mixed %0d, all alarm %0d, calibrations %0d, uniform after calibration %0d",
             n_windows, n_saturated, n_second_change, n_all_quiet, n_mixed, n_all_alarm,
             n_calibrations, n_uniform_after_cal);
    check(n_saturated > 0, "saturated FN seen");
    check(n_second_change > 0, "second phase change seen");
    check(n_all_quiet > 0, "no-alarm condition seen");
    check(n_mixed > 0, "mixed decisions seen");
    check(n_all_alarm > 0, "all-alarm condition seen");
    check(n_calibrations > 0, "calibration seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
