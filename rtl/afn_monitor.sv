// afn_monitor: Average Flip-flop Number over a window, and the alarm.
//
// FN values are summed over WINDOW consecutive valid cycles; the sum is the
// AFN scaled by WINDOW, kept unscaled so that averages such as 15.5 stay exact
// and no divider is needed. At the end of each window the sum is published
// with a one-cycle afn_valid pulse and compared with the threshold, also
// given in sum units (AFN threshold x WINDOW): the alarm is raised when the
// AFN is strictly below the threshold, i.e. the chip runs slower than at its
// worst-case allowed condition, and is held until the next window end.
// Windows do not overlap. Defaults follow the 45 nm sensor (43 flip-flops,
// AFN over 9 cycles); the sum representation and the held alarm level are
// this design's choices.
// Timing: afn_sum, afn_valid and alarm change on the clock edge that takes
// in the window's last FN.
`timescale 1ps/1ps
module afn_monitor #(
  parameter int unsigned N1     = sensor_pkg::ASIC_N1,
  parameter int unsigned WINDOW = sensor_pkg::ASIC_WINDOW,
  localparam int unsigned FN_W  = sensor_pkg::fn_width(N1),
  localparam int unsigned SUM_W = sensor_pkg::sum_width(N1, WINDOW)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [FN_W-1:0]  fn,
  input  logic             fn_valid,
  input  logic [SUM_W-1:0] threshold_sum,
  output logic [SUM_W-1:0] afn_sum,
  output logic             afn_valid,
  output logic             alarm
);

  localparam int unsigned CNT_W = (WINDOW > 1) ? $clog2(WINDOW) : 1;

  logic [CNT_W-1:0] cnt;
  logic [SUM_W-1:0] acc;
  logic [SUM_W-1:0] acc_next;

  assign acc_next = acc + SUM_W'(fn);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      acc       <= '0;
      afn_sum   <= '0;
      afn_valid <= 1'b0;
      alarm     <= 1'b0;
    end else begin
      afn_valid <= 1'b0;
      if (fn_valid) begin
        if (cnt == CNT_W'(WINDOW - 1)) begin
          cnt       <= '0;
          acc       <= '0;
          afn_sum   <= acc_next;
          afn_valid <= 1'b1;
          alarm     <= (acc_next < threshold_sum);
        end else begin
          cnt <= cnt + 1'b1;
          acc <= acc_next;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    fn_valid |-> acc_next >= acc);

endmodule
