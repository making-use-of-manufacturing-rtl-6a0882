// hoa_puf_power_core - oscillators, multiplexers and single arbiter of the
// power-optimised hybrid oscillator arbiter PUF.
//
// 2*KEY_BITS ring oscillators are split into two sets of KEY_BITS. MUX1
// selects one ring of the first set (global indices 0..KEY_BITS-1) for the
// arbiter flop's data input, MUX2 one ring of the second set (global indices
// KEY_BITS..2*KEY_BITS-1) for its clock. One flop replaces the KEY_BITS flops
// of the speed-optimised variant, and the multiplexer selects are the
// challenge; both follow the published design. To save power further this
// implementation enables only the two selected rings, a choice of its own.
//
// Interface and timing:
//   pair_en - runs the selected pair (high) or stops every ring (low).
//   sel_d   - MUX1 select, index of the data ring within the first set.
//   sel_clk - MUX2 select, index of the clock ring within the second set.
//   rst_n   - asynchronous clear of the arbiter flop.
//   bit_out - the arbiter output; read it only while pair_en is low.
// Change the selects only while pair_en is low.
module hoa_puf_power_core #(
    parameter int unsigned DIE_SEED               = 1,
    parameter int unsigned KEY_BITS               = puf_pkg::KEY_BITS,
    parameter int unsigned STAGES                 = puf_pkg::RO_STAGES,
    parameter int unsigned NOMINAL_STAGE_DELAY_FS = puf_pkg::NOMINAL_STAGE_DELAY_FS,
    parameter int unsigned SIGMA_PCT              = puf_pkg::STAGE_SIGMA_PCT,
    localparam int unsigned SW = (KEY_BITS > 1) ? $clog2(KEY_BITS) : 1
) (
    input  logic          rst_n,
    input  logic          pair_en,
    input  logic [SW-1:0] sel_d,
    input  logic [SW-1:0] sel_clk,
    output logic          bit_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [KEY_BITS-1:0] en_d, en_clk;
  logic [KEY_BITS-1:0] osc_d, osc_clk;
  logic                mux_d, mux_clk;

  for (genvar i = 0; i < KEY_BITS; i++) begin : g_ro
    assign en_d[i]   = pair_en && (sel_d   == SW'(i));
    assign en_clk[i] = pair_en && (sel_clk == SW'(i));

    current_starved_ro #(
        .DIE_SEED(DIE_SEED), .RO_INDEX(i), .STAGES(STAGES),
        .NOMINAL_STAGE_DELAY_FS(NOMINAL_STAGE_DELAY_FS), .SIGMA_PCT(SIGMA_PCT)
    ) u_ro_d (.enable(en_d[i]), .osc(osc_d[i]));

    current_starved_ro #(
        .DIE_SEED(DIE_SEED), .RO_INDEX(KEY_BITS + i), .STAGES(STAGES),
        .NOMINAL_STAGE_DELAY_FS(NOMINAL_STAGE_DELAY_FS), .SIGMA_PCT(SIGMA_PCT)
    ) u_ro_clk (.enable(en_clk[i]), .osc(osc_clk[i]));
  end

  ro_mux #(.N(KEY_BITS)) u_mux1 (.ro(osc_d),   .sel(sel_d),   .y(mux_d));
  ro_mux #(.N(KEY_BITS)) u_mux2 (.ro(osc_clk), .sel(sel_clk), .y(mux_clk));

  arbiter_dff u_arb (.rst_n(rst_n), .ro_d(mux_d), .ro_clk(mux_clk), .q(bit_out));

endmodule
