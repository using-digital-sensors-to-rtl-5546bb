// afn_calibrator: post-characterization calibration of the alarm threshold.
//
// Process variation shifts each sensor's AFN, so one threshold for all
// sensors makes some of them raise false or missed alarms. To calibrate, the
// chip is held at the worst-case operating condition it must still tolerate
// and cal_start is pulsed. The calibrator discards the window in progress
// (it may have begun before the condition was applied), then adds up the next
// CAL_REPEATS window sums from the AFN monitor and loads their average,
// rounded to the nearest sum unit, as this sensor's threshold. Until then the
// threshold is the fixed AFN threshold (AFN_THRESHOLD x WINDOW in sum units).
// Defaults: threshold 17, 100 repetitions, 45 nm window of 9 cycles. The
// discarded first window and the rounding are this design's choices.
// Interface: cal_start pulse in; threshold_sum out, cal_busy high while
// measuring, cal_done high once a calibrated threshold is loaded (cleared by
// reset). The threshold changes on the edge after the last measured window.
`timescale 1ps/1ps
module afn_calibrator #(
  parameter int unsigned N1            = sensor_pkg::ASIC_N1,
  parameter int unsigned WINDOW        = sensor_pkg::ASIC_WINDOW,
  parameter int unsigned AFN_THRESHOLD = sensor_pkg::AFN_THRESHOLD,
  parameter int unsigned CAL_REPEATS   = sensor_pkg::CAL_REPEATS,
  localparam int unsigned SUM_W = sensor_pkg::sum_width(N1, WINDOW)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cal_start,
  input  logic [SUM_W-1:0] afn_sum,
  input  logic             afn_valid,
  output logic [SUM_W-1:0] threshold_sum,
  output logic             cal_busy,
  output logic             cal_done
);

  localparam int unsigned TOT_W = SUM_W + $clog2(CAL_REPEATS + 1);
  localparam int unsigned REP_W = $clog2(CAL_REPEATS + 1);

  typedef enum logic [1:0] {CAL_IDLE, CAL_SKIP, CAL_MEASURE} cal_state_e;

  cal_state_e       state;
  logic [REP_W-1:0] n_meas;
  logic [TOT_W-1:0] total;
  logic [TOT_W-1:0] total_next;
  logic [TOT_W-1:0] average;

  assign total_next = total + TOT_W'(afn_sum);
  assign average    = (total_next + TOT_W'(CAL_REPEATS / 2)) / TOT_W'(CAL_REPEATS);
  assign cal_busy   = (state != CAL_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= CAL_IDLE;
      n_meas        <= '0;
      total         <= '0;
      threshold_sum <= SUM_W'(AFN_THRESHOLD * WINDOW);
      cal_done      <= 1'b0;
    end else begin
      unique case (state)
        CAL_IDLE: begin
          if (cal_start) begin
            state  <= CAL_SKIP;
            n_meas <= '0;
            total  <= '0;
          end
        end
        CAL_SKIP: begin
          if (afn_valid) state <= CAL_MEASURE;
        end
        CAL_MEASURE: begin
          if (afn_valid) begin
            total  <= total_next;
            n_meas <= n_meas + 1'b1;
            if (n_meas == REP_W'(CAL_REPEATS - 1)) begin
              threshold_sum <= SUM_W'(average);
              cal_done      <= 1'b1;
              state         <= CAL_IDLE;
            end
          end
        end
        default: state <= CAL_IDLE;
      endcase
    end
  end

endmodule
