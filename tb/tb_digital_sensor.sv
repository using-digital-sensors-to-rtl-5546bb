// tb_digital_sensor: checks a whole sensor against the chain's timing.
// The sensor (9 leading buffers, 43 tapped buffers and flip-flops) is run
// at a clock period of 10001 ps under several nominal buffer delays, from a
// fast chip (no phase change, FN = 43) to a slow one, including delays where
// the edge needs more than two clock periods to reach the end of the chain
// (a second phase change). The expected FN is the number of taps the edge
// reaches within one clock period, summed here from the per-buffer delays.
// Every valid FN over 30 cycles must match; fn_valid must rise on the third
// clock edge after reset.
`timescale 1ps/1ps
module tb_digital_sensor;
  localparam int unsigned N0     = 9;
  localparam int unsigned N1     = 43;
  localparam int unsigned SEED   = 3;
  localparam int unsigned PERIOD = 10001;
  localparam int unsigned FN_W   = sensor_pkg::fn_width(N1);

  logic            clk = 1'b0;
  logic            rst = 1'b1;
  logic [N1-1:0]   samples;
  logic [FN_W-1:0] fn;
  logic            fn_valid;
  int checks = 0, failures = 0;
  int n_saturated = 0, n_second_change = 0;

  digital_sensor #(.N0(N0), .N1(N1), .SEED(SEED)) dut (
    .clk(clk), .rst(rst), .samples(samples), .fn(fn), .fn_valid(fn_valid)
  );

  initial forever begin
    #5001 clk = 1'b1;
    #5000 clk = 1'b0;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Number of taps reached within one period, and whether the chain is long
  // enough to show a second phase change.
  function automatic int unsigned expected_fn(input int unsigned nominal, output bit second);
    longint acc;
    int unsigned fn_exp;
    acc = 0;
    fn_exp = N1;
    second = 1'b0;
    for (int k = 0; k < N0 + N1; k++) begin
      acc += longint'(pvt_env_pkg::buffer_delay(nominal, SEED, k, 30, 20));
      if (k >= N0 && acc >= longint'(PERIOD) && fn_exp == N1) fn_exp = k - N0;
      if (k >= N0 && acc >= longint'(2 * PERIOD)) second = 1'b1;
    end
    return fn_exp;
  endfunction

  int unsigned delays [6] = '{150, 250, 300, 420, 600, 900};
  int unsigned exp_fn;
  bit second;
  int unsigned seen_fn [6];

  initial begin
    pvt_env_pkg::buffer_delay_ps = delays[0];
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(posedge clk); #1 check(!fn_valid, "fn_valid after edge 1");
    @(posedge clk); #1 check(!fn_valid, "fn_valid after edge 2");
    @(posedge clk); #1 check(fn_valid, "fn_valid after edge 3");
    foreach (delays[c]) begin
      pvt_env_pkg::buffer_delay_ps = delays[c];
      exp_fn = expected_fn(delays[c], second);
      // let edges launched under the old delay drain out
      repeat (8) @(posedge clk);
      for (int i = 0; i < 30; i++) begin
        @(posedge clk); #1;
        check(fn_valid && fn == FN_W'(exp_fn),
              $sformatf("delay %0d ps: fn=%0d expected %0d", delays[c], fn, exp_fn));
      end
      seen_fn[c] = fn;
      if (exp_fn == N1) n_saturated++;
      if (second) n_second_change++;
      $display("buffer delay %0d ps -> FN %0d", delays[c], fn);
    end
    // slower chip, lower FN
    for (int c = 1; c < 6; c++) check(seen_fn[c] <= seen_fn[c-1], "FN falls as delay grows");
    check(n_saturated > 0 && n_second_change > 0, "saturation and second phase change exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
