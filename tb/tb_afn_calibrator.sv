// tb_afn_calibrator: checks the threshold calibration.
// After reset the threshold must be the fixed 17 x 9 = 153 (sum units).
// Calibration is run three times with 100 measurements (the default): the
// window in progress at cal_start is discarded, the following 100 window
// sums (random around an AFN of 15..20, delivered with random gaps) are
// averaged with rounding to nearest, and the average must become the
// threshold on the edge after the 100th sum, with cal_busy high from the
// edge after cal_start until then and cal_done high afterwards. The
// threshold must not change while measuring.
`timescale 1ps/1ps
module tb_afn_calibrator;
  localparam int unsigned N1      = 43;
  localparam int unsigned WINDOW  = 9;
  localparam int unsigned REPEATS = 100;
  localparam int unsigned SUM_W   = sensor_pkg::sum_width(N1, WINDOW);

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             cal_start = 1'b0;
  logic [SUM_W-1:0] afn_sum = '0;
  logic             afn_valid = 1'b0;
  logic [SUM_W-1:0] threshold_sum;
  logic             cal_busy;
  logic             cal_done;
  int checks = 0, failures = 0;

  afn_calibrator dut (
    .clk(clk), .rst(rst), .cal_start(cal_start), .afn_sum(afn_sum), .afn_valid(afn_valid),
    .threshold_sum(threshold_sum), .cal_busy(cal_busy), .cal_done(cal_done)
  );

  always #5000 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send_window(input int unsigned value);
    repeat ($urandom % 4) begin
      @(negedge clk) afn_valid = 1'b0;
      @(posedge clk);
    end
    @(negedge clk);
    afn_valid = 1'b1;
    afn_sum   = SUM_W'(value);
    @(posedge clk);
    @(negedge clk) afn_valid = 1'b0;
  endtask

  int unsigned total, expected, base;
  logic [SUM_W-1:0] old_thr;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(posedge clk); #1;
    check(threshold_sum == SUM_W'(sensor_pkg::AFN_THRESHOLD * WINDOW), "threshold after reset");
    check(!cal_busy && !cal_done, "idle after reset");
    for (int run = 0; run < 3; run++) begin
      base = 15 * WINDOW + run * 20;
      old_thr = threshold_sum;
      @(negedge clk) cal_start = 1'b1;
      @(posedge clk); #1;
      check(cal_busy, "busy after cal_start");
      @(negedge clk) cal_start = 1'b0;
      send_window(0);  // the window in progress, to be discarded
      total = 0;
      for (int i = 0; i < REPEATS; i++) begin
        int unsigned v;
        v = base + $urandom % (5 * WINDOW);
        total += v;
        send_window(v);
        #1;
        if (i < REPEATS - 1) begin
          check(cal_busy, "busy while measuring");
          check(threshold_sum == old_thr, "threshold unchanged while measuring");
        end
      end
      expected = (total + REPEATS / 2) / REPEATS;
      check(!cal_busy && cal_done, "done after the last measurement");
      check(threshold_sum == SUM_W'(expected),
            $sformatf("threshold=%0d expected %0d", threshold_sum, expected));
      // further windows do not move the threshold
      send_window(5);
      check(threshold_sum == SUM_W'(expected), "threshold held after calibration");
    end
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
