// hoa_puf_speed_core - oscillator and arbiter array of the speed-optimised
// hybrid oscillator arbiter PUF.
//
// 2*KEY_BITS ring oscillators are split into two sets of KEY_BITS. Ring i of
// the first set (global index i) drives the data input and ring i of the
// second set (global index KEY_BITS+i) drives the clock of arbiter flop i, so
// every key bit has its own flop and all bits are produced at once. There are
// no multiplexers and hence no challenge: a die has exactly one key. This
// structure and the default of 64 rings for a 32-bit key follow the published
// design; the pairing of ring i with ring KEY_BITS+i is this design's choice.
//
// Interface and timing:
//   enable  - common enable of all rings.
//   rst_n   - asynchronous clear of all arbiter flops.
//   key_raw - the arbiter outputs, bit i from pair i; read it only after
//             `enable` has been low for at least one half ring period.
module hoa_puf_speed_core #(
    parameter int unsigned DIE_SEED               = 1,
    parameter int unsigned KEY_BITS               = puf_pkg::KEY_BITS,
    parameter int unsigned STAGES                 = puf_pkg::RO_STAGES,
    parameter int unsigned NOMINAL_STAGE_DELAY_FS = puf_pkg::NOMINAL_STAGE_DELAY_FS,
    parameter int unsigned SIGMA_PCT              = puf_pkg::STAGE_SIGMA_PCT
) (
    input  logic                rst_n,
    input  logic                enable,
    output logic [KEY_BITS-1:0] key_raw
);
  timeunit 1ps;
  timeprecision 1fs;

  for (genvar i = 0; i < KEY_BITS; i++) begin : g_bit
    puf_bit_cell #(
        .DIE_SEED(DIE_SEED), .RO_D(i), .RO_CLK(KEY_BITS + i), .STAGES(STAGES),
        .NOMINAL_STAGE_DELAY_FS(NOMINAL_STAGE_DELAY_FS), .SIGMA_PCT(SIGMA_PCT)
    ) u_cell (.rst_n(rst_n), .enable(enable), .q(key_raw[i]));
  end

endmodule
