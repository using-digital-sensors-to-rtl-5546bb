// tb_delay_chain: checks the behavioural buffer chain's timing.
// For several nominal buffer delays (standing for different voltage and
// temperature) and two process seeds, an edge is applied to the chain input
// and every tap is checked to hold its old value 1 ps before, and its new
// value 1 ps after, the sum of the buffer delays up to it (leading buffers
// included), worked out here from the environment model's per-buffer delay.
`timescale 1ps/1ps
module tb_delay_chain;
  localparam int unsigned N0 = 9;
  localparam int unsigned N1 = 43;
  int checks = 0, failures = 0;

  logic          a0_s0, a0_s1;
  logic [N1-1:0] taps_s0, taps_s1;

  delay_chain #(.N0(N0), .N1(N1), .SEED(0)) dut0 (.a0(a0_s0), .taps(taps_s0));
  delay_chain #(.N0(N0), .N1(N1), .SEED(7)) dut1 (.a0(a0_s1), .taps(taps_s1));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One edge through the chain of the given seed; taps checked at their arrival times.
  task automatic run_edge(input int unsigned seed, input logic new_val);
    longint cum [N1];
    longint acc, t0;
    acc = 0;
    for (int k = 0; k < N0 + N1; k++) begin
      acc += longint'(pvt_env_pkg::buffer_delay(pvt_env_pkg::buffer_delay_ps, seed, k, 30, 20));
      if (k >= N0) cum[k - N0] = acc;
    end
    t0 = $time;
    if (seed == 0) a0_s0 = new_val; else a0_s1 = new_val;
    for (int j = 0; j < N1; j++) begin
      #(cum[j] - ($time - t0) - 1);  // 1 ps before arrival
      check(((seed == 0) ? taps_s0[j] : taps_s1[j]) == !new_val, $sformatf("tap %0d early", j));
      #2;
      check(((seed == 0) ? taps_s0[j] : taps_s1[j]) == new_val, $sformatf("tap %0d on time", j));
    end
    #1000;
  endtask

  initial begin
    a0_s0 = 1'b0;
    a0_s1 = 1'b0;
    #100_000;
    for (int c = 0; c < 3; c++) begin
      pvt_env_pkg::buffer_delay_ps = (c == 0) ? 250 : (c == 1) ? 180 : 330;
      run_edge(0, 1'b1);
      run_edge(0, 1'b0);
      run_edge(7, 1'b1);
      run_edge(7, 1'b0);
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
