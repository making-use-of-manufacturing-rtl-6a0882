// hoa_puf_top - the two hybrid oscillator arbiter PUF variants side by side.
//
// A physical unclonable function turns manufacturing mismatch into a key that
// is never stored. Both variants here race pairs of nominally identical ring
// oscillators into a D flip-flop: one ring is the data, the other the clock,
// and the level the flop holds when the rings are stopped is a die-specific
// bit. 2*KEY_BITS rings give a KEY_BITS-bit key.
//
//   speed-optimised (hoa_puf_speed_core + speed_key_ctrl): one flop per key
//     bit, all bits at once, no challenge; 50 ns per key by default.
//   power-optimised (hoa_puf_power_core + power_key_seq): two multiplexers and
//     a single flop, one bit at a time, the multiplexer selects form the
//     challenge; 160 ns per key by default.
//
// The two are alternatives for different products, so each has its own
// rings (its own die seed for the variation model) and its own ports.
// Interface: clk is the 1 ns system clock, rst_n an asynchronous active-low
// reset; the speed_* and power_* ports are those of speed_key_ctrl and
// power_key_seq. Ring oscillators are behavioural models: the top simulates
// with timing but only the controllers, multiplexers and flops are logic.
module hoa_puf_top #(
    parameter int unsigned KEY_BITS               = puf_pkg::KEY_BITS,
    parameter int unsigned STAGES                 = puf_pkg::RO_STAGES,
    parameter int unsigned NOMINAL_STAGE_DELAY_FS = puf_pkg::NOMINAL_STAGE_DELAY_FS,
    parameter int unsigned SIGMA_PCT              = puf_pkg::STAGE_SIGMA_PCT,
    parameter int unsigned SPEED_DIE_SEED         = 1,
    parameter int unsigned POWER_DIE_SEED         = 2,
    parameter int unsigned SPEED_RUN_CYCLES       = 50,
    parameter int unsigned POWER_RUN_CYCLES       = 3,
    localparam int unsigned SW = (KEY_BITS > 1) ? $clog2(KEY_BITS) : 1
) (
    input  logic                clk,
    input  logic                rst_n,
    // speed-optimised PUF
    input  logic                speed_start,
    output logic [KEY_BITS-1:0] speed_key,
    output logic                speed_key_valid,
    output logic                speed_busy,
    // power-optimised PUF
    input  logic                power_start,
    input  logic [SW-1:0]       power_challenge_d,
    input  logic [SW-1:0]       power_challenge_clk,
    output logic [KEY_BITS-1:0] power_key,
    output logic                power_key_valid,
    output logic                power_busy
);
  timeunit 1ps;
  timeprecision 1fs;

  // ---- speed-optimised ----------------------------------------------------
  logic                sp_enable, sp_arb_rst_n;
  logic [KEY_BITS-1:0] sp_key_raw;

  speed_key_ctrl #(.KEY_BITS(KEY_BITS), .RUN_CYCLES(SPEED_RUN_CYCLES)) u_speed_ctrl (
      .clk(clk), .rst_n(rst_n), .start(speed_start),
      .ro_enable(sp_enable), .arb_rst_n(sp_arb_rst_n), .key_raw(sp_key_raw),
      .key(speed_key), .key_valid(speed_key_valid), .busy(speed_busy));

  hoa_puf_speed_core #(
      .DIE_SEED(SPEED_DIE_SEED), .KEY_BITS(KEY_BITS), .STAGES(STAGES),
      .NOMINAL_STAGE_DELAY_FS(NOMINAL_STAGE_DELAY_FS), .SIGMA_PCT(SIGMA_PCT)
  ) u_speed_core (.rst_n(sp_arb_rst_n), .enable(sp_enable), .key_raw(sp_key_raw));

  // ---- power-optimised ----------------------------------------------------
  logic          pw_pair_en, pw_arb_rst_n, pw_bit;
  logic [SW-1:0] pw_sel_d, pw_sel_clk;

  power_key_seq #(.KEY_BITS(KEY_BITS), .RUN_CYCLES(POWER_RUN_CYCLES)) u_power_seq (
      .clk(clk), .rst_n(rst_n), .start(power_start),
      .challenge_d(power_challenge_d), .challenge_clk(power_challenge_clk),
      .pair_en(pw_pair_en), .sel_d(pw_sel_d), .sel_clk(pw_sel_clk),
      .arb_rst_n(pw_arb_rst_n), .bit_in(pw_bit),
      .key(power_key), .key_valid(power_key_valid), .busy(power_busy));

  hoa_puf_power_core #(
      .DIE_SEED(POWER_DIE_SEED), .KEY_BITS(KEY_BITS), .STAGES(STAGES),
      .NOMINAL_STAGE_DELAY_FS(NOMINAL_STAGE_DELAY_FS), .SIGMA_PCT(SIGMA_PCT)
  ) u_power_core (.rst_n(pw_arb_rst_n), .pair_en(pw_pair_en),
                  .sel_d(pw_sel_d), .sel_clk(pw_sel_clk), .bit_out(pw_bit));

endmodule
