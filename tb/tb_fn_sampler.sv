// tb_fn_sampler: checks the sampling flip-flops and the FN encoder.
// The testbench plays the toggle flip-flop and the delay chain: before each
// sampling edge it sets the first k taps to the value a0 holds (they caught
// the edge) and tap k to the opposite value, with random values beyond it
// (a second phase change must be ignored), or all taps to a0 (no phase
// change: FN = N1). FN must equal k one clock after the sampling edge,
// samples must equal the taps, and fn_valid must rise on the third edge
// after reset.
`timescale 1ps/1ps
module tb_fn_sampler;
  localparam int unsigned N1   = 43;
  localparam int unsigned FN_W = sensor_pkg::fn_width(N1);

  logic            clk = 1'b0;
  logic            rst = 1'b1;
  logic            a0;
  logic [N1-1:0]   taps;
  logic [N1-1:0]   samples;
  logic [FN_W-1:0] fn;
  logic            fn_valid;
  int checks = 0, failures = 0;
  int n_no_change = 0, n_second_change = 0;

  fn_sampler #(.N1(N1)) dut (
    .clk(clk), .rst(rst), .a0(a0), .taps(taps),
    .samples(samples), .fn(fn), .fn_valid(fn_valid)
  );

  always #5000 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) a0 <= 1'b0;
    else     a0 <= ~a0;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int unsigned k, prev_k;
  logic [N1-1:0] prev_taps;

  initial begin
    taps = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // edges 1 and 2 after reset: fn_valid low; edge 3: high
    @(posedge clk); #1 check(fn_valid == 1'b0, "fn_valid after edge 1");
    @(posedge clk); #1 check(fn_valid == 1'b0, "fn_valid after edge 2");
    @(posedge clk); #1 check(fn_valid == 1'b1, "fn_valid after edge 3");
    prev_k = N1 + 1;  // nothing pending
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      k = (i % 10 == 0) ? N1 : ($urandom % N1);
      for (int j = 0; j < N1; j++) begin
        if (j < k)       taps[j] = a0;
        else if (j == k) taps[j] = ~a0;
        else             taps[j] = 1'($urandom);
      end
      if (k == N1) n_no_change++;
      else begin
        for (int j = k + 1; j < N1; j++) if (taps[j] == a0) begin
          n_second_change++;
          break;
        end
      end
      @(posedge clk);
      #1;
      check(samples == taps, "samples hold the taps");
      if (prev_k <= N1) check(fn == FN_W'(prev_k), $sformatf("fn=%0d expected %0d", fn, prev_k));
      prev_k = k;
    end
    @(posedge clk); #1;
    check(fn == FN_W'(prev_k), "last fn");
    check(n_no_change > 0 && n_second_change > 0, "both special cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
