// fn_sampler: the sensor's N1 sampling flip-flops and the FN encoder.
//
// On every rising clock edge the flip-flops capture the N1 taps of the delay
// chain. The toggle flip-flop launched an edge into the chain one clock
// earlier; flip-flops the edge reached in time hold the value a0 had just
// before this sampling edge (phase A), the others still hold the previous
// value (phase A-bar). Because a0 toggles on the same edge, a sample is in
// phase A-bar exactly when it equals the new a0. FN is the index of the first
// flip-flop in phase A-bar, flip-flops being numbered from 0 next to the
// leading buffers, which is also the number of leading flip-flops in phase A.
// Only the first phase change counts: a chain longer than one clock period
// shows a second change further on, which is ignored. With no flip-flop in
// phase A-bar, FN = N1.
// Timing: fn is registered one clock after the sampling edge. fn_valid is low
// for the first two edges after reset (the first samples see no launched
// edge) and high from then on. Numbering, phase rule, saturation at N1 and the
// one-cycle register are this design's reading of the sensor's definition.
`timescale 1ps/1ps
module fn_sampler #(
  parameter int unsigned N1 = sensor_pkg::ASIC_N1,
  localparam int unsigned FN_W = sensor_pkg::fn_width(N1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            a0,
  input  logic [N1-1:0]   taps,
  output logic [N1-1:0]   samples,
  output logic [FN_W-1:0] fn,
  output logic            fn_valid
);

  logic [1:0]      warm;
  logic [N1-1:0]   abar;
  logic [FN_W-1:0] fn_next;

  // The N1 sampling flip-flops
  always_ff @(posedge clk) begin
    if (rst) samples <= '0;
    else     samples <= taps;
  end

  // Phase A-bar: the sample equals a0 after the toggle
  assign abar = ~(samples ^ {N1{a0}});

  // Priority encoder: index of the first A-bar flip-flop, N1 if none
  always_comb begin
    fn_next = FN_W'(N1);
    for (int j = N1 - 1; j >= 0; j--) begin
      if (abar[j]) fn_next = FN_W'(j);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      warm     <= '0;
      fn       <= '0;
      fn_valid <= 1'b0;
    end else begin
      warm     <= {warm[0], 1'b1};
      fn       <= fn_next;
      fn_valid <= warm[1];
    end
  end

  a_fn_range: assert property (@(posedge clk) disable iff (rst) fn <= FN_W'(N1));

endmodule
