// sensor_pkg: constants shared by the delay-chain sensor blocks.
//
// The two configurations below are the ones the sensor was characterised in:
// a 45 nm standard-cell sensor (9 leading buffers, 43 tapped buffers and
// flip-flops, AFN over 9 cycles) and an FPGA array of 50 sensors (70 leading
// buffers, 32 tapped buffers and flip-flops, AFN over 20 cycles). Both use an
// alarm threshold of AFN = 17 and a calibration that averages 100 AFN
// measurements. The helper functions size the FN and window-sum registers.
`timescale 1ps/1ps
package sensor_pkg;

  // 45 nm standard-cell sensor
  localparam int unsigned ASIC_N0      = 9;
  localparam int unsigned ASIC_N1      = 43;
  localparam int unsigned ASIC_WINDOW  = 9;

  // FPGA array
  localparam int unsigned FPGA_SENSORS = 50;
  localparam int unsigned FPGA_N0      = 70;
  localparam int unsigned FPGA_N1      = 32;
  localparam int unsigned FPGA_WINDOW  = 20;

  // Alarm threshold (in AFN units) and calibration length
  localparam int unsigned AFN_THRESHOLD = 17;
  localparam int unsigned CAL_REPEATS   = 100;

  // Width of FN, which ranges over 0..n1 (n1 = no phase change seen)
  function automatic int unsigned fn_width(input int unsigned n1);
    return $clog2(n1 + 1);
  endfunction

  // Width of a window sum of FN, which ranges over 0..n1*window
  function automatic int unsigned sum_width(input int unsigned n1, input int unsigned window);
    return $clog2(n1 * window + 1);
  endfunction

endpackage
