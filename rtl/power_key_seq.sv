// power_key_seq - bit sequencer of the power-optimised hybrid oscillator
// arbiter PUF.
//
// The power-optimised PUF has a single arbiter flop behind two multiplexers,
// so the key is produced one bit at a time: for every bit the sequencer sets
// the two multiplexer selects while the rings are stopped and clears the flop
// (SELECT, one cycle), runs the selected ring pair (RUN, RUN_CYCLES cycles),
// stops it and lets the flop settle (HOLD, one cycle), then stores the flop
// output as the next key bit. Serial generation with a gap between selections
// follows the published design; the challenge format and the cycle counts are
// this design's choices. The challenge gives the two starting selects; bit k
// uses data ring (challenge_d + k) mod KEY_BITS and clock ring
// (challenge_clk + k) mod KEY_BITS, so challenge 0/0 pairs the same rings as
// the speed-optimised variant.
//
// Interface and timing (clk rising edge, rst_n asynchronous active low):
//   start, challenge_d, challenge_clk - a start pulse in IDLE latches the
//               challenge and begins a key generation.
//   pair_en, sel_d, sel_clk, arb_rst_n - drive hoa_puf_power_core; the selects
//               only change while pair_en is low.
//   bit_in    - the arbiter output.
//   key       - the key, bit k in key[k]; key_valid rises
//               KEY_BITS*(RUN_CYCLES+2) cycles after the start edge (160 ns
//               with the defaults and a 1 ns clock) and stays high until the
//               next start.
//   busy      - high while a key is being generated.
module power_key_seq #(
    parameter int unsigned KEY_BITS   = puf_pkg::KEY_BITS,
    parameter int unsigned RUN_CYCLES = 3,
    localparam int unsigned SW = (KEY_BITS > 1) ? $clog2(KEY_BITS) : 1
) (
    input  logic                clk,
    input  logic                rst_n,
    input  logic                start,
    input  logic [SW-1:0]       challenge_d,
    input  logic [SW-1:0]       challenge_clk,
    output logic                pair_en,
    output logic [SW-1:0]       sel_d,
    output logic [SW-1:0]       sel_clk,
    output logic                arb_rst_n,
    input  logic                bit_in,
    output logic [KEY_BITS-1:0] key,
    output logic                key_valid,
    output logic                busy
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {S_IDLE, S_SELECT, S_RUN, S_HOLD} state_t;

  localparam int unsigned CW = (RUN_CYCLES > 1) ? $clog2(RUN_CYCLES) : 1;
  localparam int unsigned BW = (KEY_BITS > 1) ? $clog2(KEY_BITS) : 1;

  state_t        state;
  logic [CW-1:0] cnt;
  logic [BW-1:0] bit_idx;

  function automatic logic [SW-1:0] next_sel(input logic [SW-1:0] s);
    return (s == SW'(KEY_BITS - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      sel_d     <= '0;
      sel_clk   <= '0;
      key       <= '0;
      key_valid <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (start) begin
            state     <= S_SELECT;
            bit_idx   <= '0;
            sel_d     <= challenge_d;
            sel_clk   <= challenge_clk;
            key_valid <= 1'b0;
          end
        S_SELECT: begin
          state <= S_RUN;
          cnt   <= CW'(RUN_CYCLES - 1);
        end
        S_RUN:
          if (cnt == '0) state <= S_HOLD;
          else           cnt   <= cnt - 1'b1;
        S_HOLD: begin
          key[bit_idx] <= bit_in;
          if (bit_idx == BW'(KEY_BITS - 1)) begin
            state     <= S_IDLE;
            key_valid <= 1'b1;
          end else begin
            state   <= S_SELECT;
            bit_idx <= bit_idx + 1'b1;
            sel_d   <= next_sel(sel_d);
            sel_clk <= next_sel(sel_clk);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign pair_en   = (state == S_RUN);
  assign arb_rst_n = rst_n && (state != S_SELECT);
  assign busy      = (state != S_IDLE);

  // The multiplexer selects must be quiet while a ring pair runs, or a glitch
  // could reach the arbiter clock.
  a_sel_stable : assert property (@(posedge clk) disable iff (!rst_n)
      pair_en |=> (!pair_en || ($stable(sel_d) && $stable(sel_clk))));

  initial begin
    if (RUN_CYCLES < 1) $error("power_key_seq: RUN_CYCLES must be at least 1");
  end

endmodule
