// tb_afn_monitor: checks the FN window sums and the threshold alarm.
// Random FN values (0..43) are fed with fn_valid randomly low a fifth of
// the time. For each window of 9 valid values the testbench draws them in
// advance, sums them, and sets the threshold to the sum itself (no alarm:
// the AFN equals the threshold), to the sum + 1 (alarm), to the sum - 1 (no
// alarm) or to the fixed 17 x 9. afn_valid must pulse, with the right sum
// and alarm, on exactly the clock edge that takes the window's last value,
// and stay low otherwise; the alarm must hold between windows.
`timescale 1ps/1ps
module tb_afn_monitor;
  localparam int unsigned N1     = 43;
  localparam int unsigned WINDOW = 9;
  localparam int unsigned FN_W   = sensor_pkg::fn_width(N1);
  localparam int unsigned SUM_W  = sensor_pkg::sum_width(N1, WINDOW);

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic [FN_W-1:0]  fn = '0;
  logic             fn_valid = 1'b0;
  logic [SUM_W-1:0] threshold_sum = '0;
  logic [SUM_W-1:0] afn_sum;
  logic             afn_valid;
  logic             alarm;
  int checks = 0, failures = 0;
  int n_alarm = 0, n_quiet = 0, n_equal = 0, n_gaps = 0;

  afn_monitor #(.N1(N1), .WINDOW(WINDOW)) dut (
    .clk(clk), .rst(rst), .fn(fn), .fn_valid(fn_valid), .threshold_sum(threshold_sum),
    .afn_sum(afn_sum), .afn_valid(afn_valid), .alarm(alarm)
  );

  always #5000 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int unsigned vals [WINDOW];
  int unsigned sum, thr, mode;
  logic exp_alarm, last_alarm;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    last_alarm = 1'b0;
    for (int w = 0; w < 200; w++) begin
      sum = 0;
      foreach (vals[i]) begin
        vals[i] = $urandom % (N1 + 1);
        sum += vals[i];
      end
      mode = $urandom % 4;
      thr  = (mode == 0) ? sum : (mode == 1) ? sum + 1 : (mode == 2) ? ((sum > 0) ? sum - 1 : 0)
                                                                      : sensor_pkg::AFN_THRESHOLD * WINDOW;
      exp_alarm = (sum < thr);
      if (sum == thr) n_equal++;
      for (int i = 0; i < WINDOW; i++) begin
        // random idle cycles before the value
        while ($urandom % 5 == 0) begin
          @(negedge clk);
          fn_valid = 1'b0;
          fn = FN_W'($urandom);
          n_gaps++;
          @(posedge clk); #1;
          check(!afn_valid, "no afn_valid on an idle cycle");
          check(alarm == last_alarm, "alarm held");
        end
        @(negedge clk);
        fn_valid = 1'b1;
        fn = FN_W'(vals[i]);
        threshold_sum = SUM_W'(thr);
        @(posedge clk); #1;
        if (i == WINDOW - 1) begin
          check(afn_valid, "afn_valid at window end");
          check(afn_sum == SUM_W'(sum), $sformatf("afn_sum=%0d expected %0d", afn_sum, sum));
          check(alarm == exp_alarm, $sformatf("alarm=%b for sum %0d threshold %0d", alarm, sum, thr));
          last_alarm = exp_alarm;
          if (exp_alarm) n_alarm++; else n_quiet++;
        end else begin
          check(!afn_valid, "no afn_valid inside a window");
          check(alarm == last_alarm, "alarm held inside a window");
        end
      end
    end
    check(n_alarm > 0 && n_quiet > 0 && n_equal > 0 && n_gaps > 0, "all cases exercised");
    $display("windows with alarm %0d, without %0d, at threshold %0d, idle cycles %0d",
             n_alarm, n_quiet, n_equal, n_gaps);
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
