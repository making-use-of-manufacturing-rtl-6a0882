// speed_key_ctrl - key-generation controller of the speed-optimised hybrid
// oscillator arbiter PUF.
//
// All arbiter flops work in parallel, so a key is produced by one run of the
// whole ring array: clear the flops, run every ring for RUN_CYCLES system
// clocks, stop them, wait SETTLE_CYCLES for the flops to be quiet, then copy
// the flop outputs into the key register. Recording the key after a fixed run
// time (50 ns by default) follows the published design; the clear step, the
// settle wait and the 1 ns system clock that turns 50 ns into 50 cycles are
// this design's choices.
//
// Interface and timing (clk rising edge, rst_n asynchronous active low):
//   start     - a one-cycle pulse in IDLE begins a key generation.
//   ro_enable - ring enable; high for exactly RUN_CYCLES cycles, starting two
//               cycles after the start edge (one cycle clears the flops).
//   arb_rst_n - clear of the arbiter flops (low in the clear cycle).
//   key_raw   - arbiter flop outputs, sampled only after the rings stopped.
//   key       - the key; key_valid rises RUN_CYCLES+SETTLE_CYCLES+1 cycles
//               after the start edge and stays high until the next start.
//   busy      - high from the start edge until key_valid rises.
module speed_key_ctrl #(
    parameter int unsigned KEY_BITS      = puf_pkg::KEY_BITS,
    parameter int unsigned RUN_CYCLES    = 50,
    parameter int unsigned SETTLE_CYCLES = 1
) (
    input  logic                clk,
    input  logic                rst_n,
    input  logic                start,
    output logic                ro_enable,
    output logic                arb_rst_n,
    input  logic [KEY_BITS-1:0] key_raw,
    output logic [KEY_BITS-1:0] key,
    output logic                key_valid,
    output logic                busy
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_SETTLE} state_t;

  localparam int unsigned CW = $clog2(RUN_CYCLES + SETTLE_CYCLES + 1);

  state_t        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      key       <= '0;
      key_valid <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (start) begin
            state     <= S_CLEAR;
            key_valid <= 1'b0;
          end
        S_CLEAR: begin
          state <= S_RUN;
          cnt   <= CW'(RUN_CYCLES - 1);
        end
        S_RUN:
          if (cnt == '0) begin
            state <= S_SETTLE;
            cnt   <= CW'(SETTLE_CYCLES - 1);
          end else begin
            cnt <= cnt - 1'b1;
          end
        S_SETTLE:
          if (cnt == '0) begin
            state     <= S_IDLE;
            key       <= key_raw;
            key_valid <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ro_enable = (state == S_RUN);
  assign arb_rst_n = rst_n && (state != S_CLEAR);
  assign busy      = (state != S_IDLE);

  initial begin
    if (RUN_CYCLES < 1 || SETTLE_CYCLES < 1)
      $error("speed_key_ctrl: RUN_CYCLES and SETTLE_CYCLES must be at least 1");
  end

endmodule
