// sensor_channel: one sensor with its AFN alarm and its own calibration.
//
// Chains the three parts of a complete sensor: the delay-chain digital sensor
// produces FN every clock, the AFN monitor sums FN over WINDOW cycles and
// compares the sum with the threshold, and the calibrator supplies that
// threshold (the fixed AFN threshold after reset, the calibrated one after a
// calibration). Defaults are the 45 nm sensor's: 9 leading buffers, 43
// tapped buffers and flip-flops, AFN over 9 cycles, threshold 17, 100
// calibration measurements. Grouping them in one module is this design's.
// Interface and timing: those of the three parts; samples are the raw
// flip-flop outputs, fn is the latest FN,
// afn_sum/afn_valid/alarm change at each window end.
`timescale 1ps/1ps
module sensor_channel #(
  parameter int unsigned N0            = sensor_pkg::ASIC_N0,
  parameter int unsigned N1            = sensor_pkg::ASIC_N1,
  parameter int unsigned WINDOW        = sensor_pkg::ASIC_WINDOW,
  parameter int unsigned AFN_THRESHOLD = sensor_pkg::AFN_THRESHOLD,
  parameter int unsigned CAL_REPEATS   = sensor_pkg::CAL_REPEATS,
  parameter int unsigned SEED          = 0,
  localparam int unsigned FN_W  = sensor_pkg::fn_width(N1),
  localparam int unsigned SUM_W = sensor_pkg::sum_width(N1, WINDOW)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cal_start,
  output logic [N1-1:0]    samples,
  output logic [FN_W-1:0]  fn,
  output logic [SUM_W-1:0] afn_sum,
  output logic             afn_valid,
  output logic [SUM_W-1:0] threshold_sum,
  output logic             alarm,
  output logic             cal_busy,
  output logic             cal_done
);

  logic          fn_valid;

  digital_sensor #(
    .N0   (N0),
    .N1   (N1),
    .SEED (SEED)
  ) u_sensor (
    .clk      (clk),
    .rst      (rst),
    .samples  (samples),
    .fn       (fn),
    .fn_valid (fn_valid)
  );

  afn_monitor #(
    .N1     (N1),
    .WINDOW (WINDOW)
  ) u_monitor (
    .clk           (clk),
    .rst           (rst),
    .fn            (fn),
    .fn_valid      (fn_valid),
    .threshold_sum (threshold_sum),
    .afn_sum       (afn_sum),
    .afn_valid     (afn_valid),
    .alarm         (alarm)
  );

  afn_calibrator #(
    .N1            (N1),
    .WINDOW        (WINDOW),
    .AFN_THRESHOLD (AFN_THRESHOLD),
    .CAL_REPEATS   (CAL_REPEATS)
  ) u_calibrator (
    .clk           (clk),
    .rst           (rst),
    .cal_start     (cal_start),
    .afn_sum       (afn_sum),
    .afn_valid     (afn_valid),
    .threshold_sum (threshold_sum),
    .cal_busy      (cal_busy),
    .cal_done      (cal_done)
  );

endmodule
