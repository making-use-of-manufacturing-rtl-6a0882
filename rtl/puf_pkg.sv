// puf_pkg - shared constants and the process-variation model of the
// hybrid oscillator arbiter PUF.
//
// The PUF in this library turns the random delay mismatch between
// nominally identical ring oscillators into key bits. Silicon supplies that
// mismatch for free; a simulation has to invent it. This package holds the
// deterministic "virtual fab" used by the behavioural ring-oscillator model:
// every oscillator of every die gets its own stage delays, derived from a die
// seed and the oscillator's index by an integer hash, so that a simulation of
// a given die is repeatable and two dies differ.
//
// Variation model: each of the STAGES inverter stages has a delay of
//   nominal * (1 + SIGMA_PCT/100 * g),
// where g is an approximately standard-normal value built as the sum of four
// independent uniform numbers (Irwin-Hall, centred and scaled). The 10 %
// standard deviation is the spread the device Monte Carlo used for the
// transistor geometry; using it directly on the stage delay is a modelling
// choice of this library. A ring's half period is the sum of its stage
// delays: an edge travels once around the ring every half period.
//
// Key sizing and key-generation timing (32-bit key from 2*KEY_BITS = 64
// oscillators,
// 13 stages, 50 ns run for the parallel variant, >150 ns for the serial one)
// follow the published design; the 1 ns system clock is this library's choice.
package puf_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // ---- published configuration -------------------------------------------
  localparam int unsigned KEY_BITS   = 32;            // response length
  localparam int unsigned RO_STAGES  = 13;            // inverter stages per ring

  // ---- modelling choices ---------------------------------------------------
  // Nominal ring period about 55 ps, i.e. 13 stages of ~2.115 ps each.
  localparam int unsigned NOMINAL_STAGE_DELAY_FS = 2115;
  localparam int unsigned STAGE_SIGMA_PCT        = 10;

  // 32-bit mixing hash (xorshift-multiply finaliser).
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb_352d;
    h = h ^ (h >> 15);
    h = h * 32'h846c_a68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Approximately normal variate in units of 1/1000 sigma, range about
  // +-3464 (sum of four 12-bit uniforms, centred, scaled by sqrt(12/4)).
  function automatic int gauss_milli(input logic [31:0] key);
    int acc;
    acc = 0;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] r;
      r   = mix32(key ^ (32'h9e37_79b9 * (k + 1)));
      acc = acc + int'(r & 32'hfff);      // 0 .. 4095
    end
    acc = acc - 4 * 2048;                 // centred, sigma = 2364.5
    return (acc * 1000) / 2365;
  endfunction

  // Delay of one inverter stage, in femtoseconds.
  function automatic int unsigned stage_delay_fs(
      input int unsigned die_seed, input int unsigned ro_index,
      input int unsigned stage, input int unsigned nominal_fs,
      input int unsigned sigma_pct);
    logic [31:0] key;
    longint      d;
    key = mix32(die_seed) ^ mix32(32'(ro_index) * 32'h0001_0001 + 32'(stage) + 32'h5bd1_e995);
    d   = longint'(nominal_fs) * (100_000 + longint'(sigma_pct) * gauss_milli(key)) / 100_000;
    if (d < longint'(nominal_fs) / 4) d = longint'(nominal_fs) / 4;   // keep delays physical
    return 32'(d);
  endfunction

  // Half period of one ring (sum of its stage delays), in femtoseconds.
  function automatic int unsigned ro_half_period_fs(
      input int unsigned die_seed, input int unsigned ro_index,
      input int unsigned stages, input int unsigned nominal_fs,
      input int unsigned sigma_pct);
    int unsigned sum;
    sum = 0;
    for (int unsigned s = 0; s < stages; s++)
      sum += stage_delay_fs(die_seed, ro_index, s, nominal_fs, sigma_pct);
    return sum;
  endfunction

endpackage
