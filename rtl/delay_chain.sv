// delay_chain: BEHAVIOURAL MODEL (not synthesizable) of the sensor's buffer chain.
//
// The chain is N0 leading buffers followed by N1 buffers, each of the latter
// also driving one sampling flip-flop through its tap. In silicon these are
// ordinary standard-cell (or FPGA LUT) buffers kept from optimisation; their
// propagation delay, which depends on supply voltage, temperature and process,
// is precisely what the sensor measures, so the chain cannot be written as
// logic. Here each buffer is a transport delay: every change of its input
// reaches its output buffer_delay() picoseconds later (transport delay),
// the delay being taken, when the edge enters the chain, from the chip-wide
// nominal delay in pvt_env_pkg and this instance's process factors (SEED,
// the two spreads) and the edge's direction: with RISE_FALL_PERMILLE > 0 a
// rising edge travels slower than a falling one, so the flip-flop at the
// edge's reach can catch one direction and miss the other, and FN then
// alternates between two values. For simulation speed the model does not keep every
// buffer output: one process per launched edge walks down the chain and
// updates each tap when the edge reaches it.
// Interface: a0 in (from the toggle flip-flop), taps[j] out = output of
// tapped buffer j, j = 0 next to the leading buffers. The numbers of buffers
// follow the 45 nm sensor; the delay model is this design's own.
`timescale 1ps/1ps
module delay_chain #(
  parameter int unsigned N0 = sensor_pkg::ASIC_N0,
  parameter int unsigned N1 = sensor_pkg::ASIC_N1,
  parameter int unsigned SEED = 0,
  parameter int unsigned SENSOR_SPREAD_PERMILLE = 30,
  parameter int unsigned BUFFER_SPREAD_PERMILLE = 20,
  parameter int unsigned RISE_FALL_PERMILLE = 0
) (
  input  logic          a0,
  output logic [N1-1:0] taps
);

  // Carry one launched edge of value v down the chain: the delays are taken
  // at launch, and each tap takes v when the edge reaches it. Edges launched
  // before this one are still travelling in their own processes, so a chain
  // longer than a clock period holds several edges at once.
  task automatic propagate(input logic v);
    longint t, elapsed;
    t = 0;
    elapsed = 0;
    for (int k = 0; k < N0 + N1; k++) begin
      t += longint'(pvt_env_pkg::buffer_delay(pvt_env_pkg::buffer_delay_ps, SEED, k,
                                              SENSOR_SPREAD_PERMILLE, BUFFER_SPREAD_PERMILLE,
                                              v, RISE_FALL_PERMILLE));
      if (k >= N0) begin
        #(t - elapsed);
        elapsed = t;
        taps[k - N0] = v;
      end
    end
  endtask

  initial begin
    taps = '0;
    forever begin
      @(a0);
      fork
        propagate(a0);
      join_none
    end
  end

endmodule
