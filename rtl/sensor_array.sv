// sensor_array: a chip's bank of delay-chain sensors with a common alarm.
//
// NUM_SENSORS identical sensors are spread over the die; each has its own
// chain (so its own process variation), its own AFN monitor and its own
// calibrated threshold, while all share the clock, the supply and the
// temperature they watch. The per-sensor alarms are gathered into alarm_any
// (some sensor sees the chip running slower than its worst allowed
// condition) and alarm_count (how many do, the figure used to judge how
// uniformly the sensors decide). cal_start calibrates every sensor at once,
// with the chip held at the worst-case condition; cal_done rises when all
// have loaded their threshold.
// Defaults are the FPGA array: 50 sensors of 70 leading buffers and 32
// tapped buffers and flip-flops, AFN over 20 cycles, threshold 17, 100
// calibration measurements. The aggregation into alarm_any/alarm_count and
// the common calibration start are this design's choices.
// Timing: per-sensor outputs as in sensor_channel; alarm_any and alarm_count
// are registered, one clock after the alarms they summarise.
`timescale 1ps/1ps
module sensor_array #(
  parameter int unsigned NUM_SENSORS   = sensor_pkg::FPGA_SENSORS,
  parameter int unsigned N0            = sensor_pkg::FPGA_N0,
  parameter int unsigned N1            = sensor_pkg::FPGA_N1,
  parameter int unsigned WINDOW        = sensor_pkg::FPGA_WINDOW,
  parameter int unsigned AFN_THRESHOLD = sensor_pkg::AFN_THRESHOLD,
  parameter int unsigned CAL_REPEATS   = sensor_pkg::CAL_REPEATS,
  localparam int unsigned FN_W  = sensor_pkg::fn_width(N1),
  localparam int unsigned SUM_W = sensor_pkg::sum_width(N1, WINDOW),
  localparam int unsigned CNT_W = $clog2(NUM_SENSORS + 1)
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic                                cal_start,
  output logic [NUM_SENSORS-1:0][N1-1:0]      samples,
  output logic [NUM_SENSORS-1:0][FN_W-1:0]    fn,
  output logic [NUM_SENSORS-1:0][SUM_W-1:0]   afn_sum,
  output logic [NUM_SENSORS-1:0]              afn_valid,
  output logic [NUM_SENSORS-1:0][SUM_W-1:0]   threshold_sum,
  output logic [NUM_SENSORS-1:0]              alarm,
  output logic                                alarm_any,
  output logic [CNT_W-1:0]                    alarm_count,
  output logic                                cal_busy,
  output logic                                cal_done
);

  logic [NUM_SENSORS-1:0] busy;
  logic [NUM_SENSORS-1:0] done;
  logic [CNT_W-1:0]       count_next;

  for (genvar i = 0; i < NUM_SENSORS; i++) begin : g_sensor
    sensor_channel #(
      .N0            (N0),
      .N1            (N1),
      .WINDOW        (WINDOW),
      .AFN_THRESHOLD (AFN_THRESHOLD),
      .CAL_REPEATS   (CAL_REPEATS),
      .SEED          (i + 1)
    ) u_channel (
      .clk           (clk),
      .rst           (rst),
      .cal_start     (cal_start),
      .samples       (samples[i]),
      .fn            (fn[i]),
      .afn_sum       (afn_sum[i]),
      .afn_valid     (afn_valid[i]),
      .threshold_sum (threshold_sum[i]),
      .alarm         (alarm[i]),
      .cal_busy      (busy[i]),
      .cal_done      (done[i])
    );
  end

  always_comb begin
    count_next = '0;
    for (int i = 0; i < NUM_SENSORS; i++) count_next += CNT_W'(alarm[i]);
  end

  assign cal_busy = |busy;
  assign cal_done = &done;

  always_ff @(posedge clk) begin
    if (rst) begin
      alarm_any   <= 1'b0;
      alarm_count <= '0;
    end else begin
      alarm_any   <= |alarm;
      alarm_count <= count_next;
    end
  end

endmodule
