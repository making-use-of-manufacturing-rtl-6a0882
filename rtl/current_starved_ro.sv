// current_starved_ro - behavioural model of one enable-gated, current-starved
// ring oscillator. It is a timing model for simulation with delays, not a
// circuit to be synthesized.
//
// The real part is an odd ring of current-starved inverters closed through an
// enable gate; a common tuning voltage sets the starving current and hence the
// speed. It is an analog circuit, so it is modelled here by its timing only:
// while `enable` is high the output toggles every half period, where the half
// period is the sum of the ring's STAGES stage delays drawn from the
// process-variation model in puf_pkg (die seed DIE_SEED, ring RO_INDEX).
//
// Synthesis sees the same description without the delay, i.e. a gated
// inverter closed on itself; the resulting combinational-loop warning stands
// because that loop is the oscillator.
//
// Interface and timing:
//   enable - high starts the ring. `osc` stays low for one half period after
//            the rising edge of `enable`, then rises, and toggles every half
//            period from then on.
//   osc    - ring output. It is forced low as soon as `enable` falls, so a
//            stopped ring can only produce a falling edge, never a rising one.
//            The internal node needs `enable` low for one half period to come
//            back to rest; restart the ring no sooner (the controllers leave
//            at least two 1 ns cycles, the half period is about 27 ps).
// The 13 stages, the per-ring enable and the common tuning voltage follow the
// published design. The tuning voltage is held constant, so it enters only
// through NOMINAL_STAGE_DELAY_FS; the delay values, the variation model and
// the low rest level while disabled are this model's choices.
module current_starved_ro #(
    parameter int unsigned DIE_SEED               = 1,
    parameter int unsigned RO_INDEX               = 0,
    parameter int unsigned STAGES                 = puf_pkg::RO_STAGES,
    parameter int unsigned NOMINAL_STAGE_DELAY_FS = puf_pkg::NOMINAL_STAGE_DELAY_FS,
    parameter int unsigned SIGMA_PCT              = puf_pkg::STAGE_SIGMA_PCT
) (
    input  logic enable,
    output logic osc
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned HALF_PERIOD_FS =
      puf_pkg::ro_half_period_fs(DIE_SEED, RO_INDEX, STAGES, NOMINAL_STAGE_DELAY_FS, SIGMA_PCT);
  localparam realtime HALF_PERIOD = real'(HALF_PERIOD_FS) / 1000.0;   // in ps

  // The whole ring is folded into one gated inversion with the ring's half
  // period as its delay: with the gate open the node inverts itself every
  // half period; with it closed the node returns low. This is a combinational
  // loop on purpose - it is the oscillator.
  logic ring;

  initial begin
    if (STAGES % 2 == 0)
      $error("current_starved_ro: a ring needs an odd number of inverting stages");
  end

  assign #(HALF_PERIOD) ring = enable & ~ring;
  assign osc = enable & ring;

endmodule
