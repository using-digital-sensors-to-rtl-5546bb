// toggle_ff: edge source of the delay-chain sensor.
//
// A single flip-flop whose next state is its own complement, so its output
// a0 is a square wave at half the clock frequency: every rising clock edge
// launches one edge (rising or falling, alternately) into the delay chain.
// Reset (synchronous, active high, this design's choice) forces a0 to 0.
// Interface: clk, rst in; a0 out, valid one clock-to-output after each edge.
`timescale 1ps/1ps
module toggle_ff (
  input  logic clk,
  input  logic rst,
  output logic a0
);

  always_ff @(posedge clk) begin
    if (rst) a0 <= 1'b0;
    else     a0 <= ~a0;
  end

endmodule
