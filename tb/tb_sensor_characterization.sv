// tb_sensor_characterization: four sample readings of the 45 nm sensor.
// Two sensors (9 + 43 buffers) with different process seeds, standing for
// two dies, and with rising edges 2 % slower than falling ones, are read at
// four buffer delays chosen by this testbench to give the readings
//   die 1: AFN 31 (fast corner), AFN 13 (slow corner), AFN 15.5;
//   die 2: AFN 31.5.
// A half-integer AFN appears when the edge's reach lies between the rising
// and the falling edge's: FN then alternates between two neighbours and the
// flip-flop between them samples the same value every cycle. For each
// reading the testbench checks every cycle's FN against the direction of
// the edge it measured, an AFN over 10 cycles (sum = 5 x both FNs), and,
// for half-integer readings, the constant flip-flop. Expected values come
// from the per-buffer delays of the environment model.
`timescale 1ps/1ps
module tb_sensor_characterization;
  localparam int unsigned N0     = 9;
  localparam int unsigned N1     = 43;
  localparam int unsigned WINDOW = 10;
  localparam int unsigned RF     = 20;
  localparam int unsigned PERIOD = 10001;
  localparam int unsigned FN_W   = sensor_pkg::fn_width(N1);
  localparam int unsigned SUM_W  = sensor_pkg::sum_width(N1, WINDOW);

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [1:0][N1-1:0]   samples;
  logic [1:0][FN_W-1:0] fn;
  logic [1:0]           fn_valid;
  logic [1:0][SUM_W-1:0] afn_sum;
  logic [1:0]           afn_valid;
  logic [1:0]           alarm;
  int checks = 0, failures = 0;
  int n_whole = 0, n_half = 0;

  for (genvar s = 0; s < 2; s++) begin : g_die
    digital_sensor #(.N0(N0), .N1(N1), .SEED(s + 1), .RISE_FALL_PERMILLE(RF)) u_sensor (
      .clk(clk), .rst(rst), .samples(samples[s]), .fn(fn[s]), .fn_valid(fn_valid[s])
    );
    afn_monitor #(.N1(N1), .WINDOW(WINDOW)) u_monitor (
      .clk(clk), .rst(rst), .fn(fn[s]), .fn_valid(fn_valid[s]),
      .threshold_sum(SUM_W'(sensor_pkg::AFN_THRESHOLD * WINDOW)),
      .afn_sum(afn_sum[s]), .afn_valid(afn_valid[s]), .alarm(alarm[s])
    );
  end

  logic a0_ref;
  always_ff @(posedge clk) a0_ref <= rst ? 1'b0 : ~a0_ref;

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

  // FN for an edge of the given direction
  function automatic int unsigned fn_of(input int unsigned nominal, input int unsigned seed,
                                        input bit rising);
    longint acc;
    acc = 0;
    for (int k = 0; k < N0 + N1; k++) begin
      acc += longint'(pvt_env_pkg::buffer_delay(nominal, seed, k, 30, 20, rising, RF));
      if (k >= N0 && acc >= longint'(PERIOD)) return k - N0;
    end
    return N1;
  endfunction

  // Smallest delay whose (rising, falling) FNs add up to twice the target AFN
  // and match the wanted spread (0: equal, 1: one apart).
  function automatic int unsigned find_delay(input int unsigned seed, input int unsigned afn_x2,
                                             input int unsigned spread);
    for (int unsigned d = 100; d < 1000; d++) begin
      int unsigned r, f;
      r = fn_of(d, seed, 1'b1);
      f = fn_of(d, seed, 1'b0);
      if (r + f == afn_x2 && ((f >= r) ? f - r : r - f) == spread) return d;
    end
    return 0;
  endfunction

  task automatic reading(input int unsigned die, input int unsigned afn_x2, input int unsigned spread);
    int unsigned d, fr, ff, lo;
    logic flat_val;
    bit flat_ok;
    d = find_delay(die + 1, afn_x2, spread);
    check(d != 0, $sformatf("a delay giving AFN %0d/2 exists", afn_x2));
    if (d == 0) return;
    pvt_env_pkg::buffer_delay_ps = d;
    fr = fn_of(d, die + 1, 1'b1);
    ff = fn_of(d, die + 1, 1'b0);
    lo = (fr < ff) ? fr : ff;
    // let old edges drain and align on a window end
    repeat (6) @(posedge clk);
    do begin
      @(posedge clk);
      #1;
    end while (!afn_valid[die]);
    do begin
      @(posedge clk);
      #1;
    end while (!afn_valid[die]);
    flat_val = samples[die][lo];
    flat_ok = 1'b1;
    for (int i = 0; i < WINDOW; i++) begin
      @(posedge clk);
      #1;
      // fn registered now measured the edge launched two clocks ago;
      // a0 has toggled twice since, so that edge had a0's present value
      // (a0_ref copies the sensors' toggle flip-flop)
      check(fn[die] == FN_W'(a0_ref ? fr : ff),
            $sformatf("die %0d delay %0d: fn=%0d expected %0d", die + 1, d, fn[die],
                      a0_ref ? fr : ff));
      if (samples[die][lo] != flat_val) flat_ok = 1'b0;
    end
    check(afn_valid[die], "window end");
    check(afn_sum[die] == SUM_W'(WINDOW / 2 * (fr + ff)),
          $sformatf("die %0d: afn_sum=%0d expected %0d", die + 1, afn_sum[die], WINDOW / 2 * (fr + ff)));
    check(2 * afn_sum[die] == SUM_W'(WINDOW * afn_x2 / 2) * 2, "AFN equals the target");
    if (spread == 1) begin
      check(flat_ok, $sformatf("flip-flop %0d samples a constant", lo));
      n_half++;
    end else begin
      n_whole++;
    end
    $display("die %0d, buffer delay %0d ps: FN %0d (rising) / %0d (falling), AFN %0d.%0d",
             die + 1, d, fr, ff, afn_sum[die] / WINDOW, (afn_sum[die] % WINDOW) * 10 / WINDOW);
  endtask

  initial begin
    pvt_env_pkg::buffer_delay_ps = 250;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    reading(0, 62, 0);   // AFN 31
    reading(0, 26, 0);   // AFN 13
    reading(0, 31, 1);   // AFN 15.5
    reading(1, 63, 1);   // AFN 31.5
    check(n_whole == 2 && n_half == 2, "whole and half readings seen");
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
