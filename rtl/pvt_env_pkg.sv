// pvt_env_pkg: behavioural model of the operating environment (not logic).
//
// The delay-chain sensor turns the propagation delay of its buffers into a
// number. Supply voltage and temperature act on every buffer of the chip at
// once, so they are modelled here by one chip-wide variable, the nominal
// delay of one buffer in picoseconds; a testbench raises it to model a hot or
// under-powered chip and lowers it for a cool or over-powered one. Process
// variation is per sensor and per buffer: buffer_delay() scales the nominal
// delay by two factors drawn from a seed by a fixed integer hash, so that a
// testbench can work out the same delays on its own. Rising and falling
// edges may be given different delays, as real buffers have. Delays are rounded to an
// even number of picoseconds; with an odd clock period no tap ever changes
// exactly on a sampling edge. Only the behavioural delay chain and the
// testbenches use this package.
`timescale 1ps/1ps
package pvt_env_pkg;

  // Nominal delay of one buffer at the current (V, T), in picoseconds.
  int unsigned buffer_delay_ps = 250;

  // 32-bit integer hash (xorshift-multiply) used to draw process factors.
  function automatic int unsigned mix(input int unsigned x);
    int unsigned h;
    h = x ^ 32'h9E37_79B9;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Signed offset in [-spread, +spread] permille drawn from a key.
  function automatic int offset_permille(input int unsigned key, input int unsigned spread);
    if (spread == 0) return 0;
    return int'(mix(key) % (2 * spread + 1)) - int'(spread);
  endfunction

  // Delay in ps of buffer k (0 = first leading buffer) of the sensor with
  // the given seed, at nominal delay nominal_ps. A rising output is slower
  // than a falling one by rise_fall permille (split evenly around nominal).
  function automatic int unsigned buffer_delay(input int unsigned nominal_ps,
                                               input int unsigned seed,
                                               input int unsigned k,
                                               input int unsigned sensor_spread,
                                               input int unsigned buffer_spread,
                                               input bit          rising = 1'b1,
                                               input int unsigned rise_fall = 0);
    longint f_sensor, f_buffer, f_edge, d;
    f_sensor = 1000 + longint'(offset_permille(seed * 32'h0001_0003, sensor_spread));
    f_buffer = 1000 + longint'(offset_permille(seed * 32'h0001_0003 + k + 1, buffer_spread));
    f_edge   = rising ? 1000 + longint'(rise_fall) / 2 : 1000 - longint'(rise_fall) / 2;
    d = (longint'(nominal_ps) * f_sensor * f_buffer * f_edge + 1_000_000_000) / 2_000_000_000;
    if (d < 1) d = 1;
    return int'(unsigned'(2 * d));
  endfunction

endpackage
