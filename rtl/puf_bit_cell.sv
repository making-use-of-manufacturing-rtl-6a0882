// puf_bit_cell - one bit of the parallel (speed-optimised) hybrid oscillator
// arbiter PUF: two current-starved ring oscillators and one arbiter flip-flop.
//
// The ring with index RO_D drives the flop's data input and the ring with
// index RO_CLK drives its clock, as in the published single-bit circuit. Both
// rings share one enable. After the rings have run for the chosen time and
// are stopped, `q` holds the level the data ring had at the clock ring's last
// rising edge: a bit decided by the two rings' manufacturing mismatch.
//
// Interface and timing:
//   enable - starts both rings (high) and stops them (low).
//   rst_n  - asynchronous active-low clear of the flop.
//   q      - the response bit; valid once `enable` is low.
module puf_bit_cell #(
    parameter int unsigned DIE_SEED               = 1,
    parameter int unsigned RO_D                   = 0,
    parameter int unsigned RO_CLK                 = 1,
    parameter int unsigned STAGES                 = puf_pkg::RO_STAGES,
    parameter int unsigned NOMINAL_STAGE_DELAY_FS = puf_pkg::NOMINAL_STAGE_DELAY_FS,
    parameter int unsigned SIGMA_PCT              = puf_pkg::STAGE_SIGMA_PCT
) (
    input  logic rst_n,
    input  logic enable,
    output logic q
);
  timeunit 1ps;
  timeprecision 1fs;

  logic osc_d, osc_clk;

  current_starved_ro #(
      .DIE_SEED(DIE_SEED), .RO_INDEX(RO_D), .STAGES(STAGES),
      .NOMINAL_STAGE_DELAY_FS(NOMINAL_STAGE_DELAY_FS), .SIGMA_PCT(SIGMA_PCT)
  ) u_ro_d (.enable(enable), .osc(osc_d));

  current_starved_ro #(
      .DIE_SEED(DIE_SEED), .RO_INDEX(RO_CLK), .STAGES(STAGES),
      .NOMINAL_STAGE_DELAY_FS(NOMINAL_STAGE_DELAY_FS), .SIGMA_PCT(SIGMA_PCT)
  ) u_ro_clk (.enable(enable), .osc(osc_clk));

  arbiter_dff u_arb (.rst_n(rst_n), .ro_d(osc_d), .ro_clk(osc_clk), .q(q));

endmodule
