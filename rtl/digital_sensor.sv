// digital_sensor: one delay-chain digital sensor.
//
// A toggle flip-flop launches an edge on every clock into a chain of N0
// leading buffers and N1 tapped buffers; each tapped buffer feeds a D
// flip-flop clocked by the same clock. How far the edge travels in one clock
// period depends on the buffer delay, so on supply voltage, temperature and
// process together: FN, the number of leading flip-flops that caught the
// edge, is high on a fast (cool, well-powered) chip and low on a slow one.
// The default sizes are those of the 45 nm sensor (9 leading buffers, 43
// buffers and flip-flops). The chain is a behavioural model; everything else
// is synthesizable. SEED and RISE_FALL_PERMILLE only configure that model
// (process variation, rise/fall delay asymmetry).
// Interface: clk, rst in; samples (raw flip-flop outputs), fn and fn_valid
// out, with the timing of fn_sampler.
`timescale 1ps/1ps
module digital_sensor #(
  parameter int unsigned N0   = sensor_pkg::ASIC_N0,
  parameter int unsigned N1   = sensor_pkg::ASIC_N1,
  parameter int unsigned SEED = 0,
  parameter int unsigned RISE_FALL_PERMILLE = 0,
  localparam int unsigned FN_W = sensor_pkg::fn_width(N1)
) (
  input  logic            clk,
  input  logic            rst,
  output logic [N1-1:0]   samples,
  output logic [FN_W-1:0] fn,
  output logic            fn_valid
);

  logic          a0;
  logic [N1-1:0] taps;

  toggle_ff u_toggle (
    .clk (clk),
    .rst (rst),
    .a0  (a0)
  );

  delay_chain #(
    .N0                 (N0),
    .N1                 (N1),
    .SEED               (SEED),
    .RISE_FALL_PERMILLE (RISE_FALL_PERMILLE)
  ) u_chain (
    .a0   (a0),
    .taps (taps)
  );

  fn_sampler #(
    .N1 (N1)
  ) u_sampler (
    .clk      (clk),
    .rst      (rst),
    .a0       (a0),
    .taps     (taps),
    .samples  (samples),
    .fn       (fn),
    .fn_valid (fn_valid)
  );

endmodule
