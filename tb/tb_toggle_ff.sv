// tb_toggle_ff: checks the sensor's edge source.
// After a synchronous reset a0 must be 0, then invert on every rising clock
// edge (a square wave at half the clock frequency, two clocks per period),
// and return to 0 on a reset applied mid-run.
`timescale 1ps/1ps
module tb_toggle_ff;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic a0;
  int checks = 0, failures = 0;
  logic expected;

  toggle_ff dut (.clk(clk), .rst(rst), .a0(a0));

  always #5000 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(a0, 1'b0, "reset value");
    rst = 1'b0;
    expected = 1'b0;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk);
      #1 expected = ~expected;
      check(a0, expected, "toggle");
    end
    // mid-run reset
    rst = 1'b1;
    @(posedge clk);
    #1 check(a0, 1'b0, "mid-run reset");
    @(posedge clk);
    #1 check(a0, 1'b0, "held in reset");
    rst = 1'b0;
    @(posedge clk);
    #1 check(a0, 1'b1, "first toggle after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
