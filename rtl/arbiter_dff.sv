// arbiter_dff - the D flip-flop that acts as the arbiter of the hybrid
// oscillator arbiter PUF.
//
// Two free-running ring oscillators feed it: one drives the data input, the
// other drives the clock. On every rising edge of the clock ring the flop
// samples the present level of the data ring. Because the two rings run at
// slightly different, die-specific frequencies, the value held when the rings
// are stopped is a die-specific bit; using a flip-flop in place of the
// counters and comparator of a classic ring-oscillator PUF follows the
// published design.
//
// Interface and timing:
//   ro_d   - data ring output.
//   ro_clk - clock ring output; rising edge samples ro_d.
//   rst_n  - asynchronous, active-low clear to 0 (this design's choice, used
//            to start every key generation from a known state).
//   q      - the sampled bit. It settles only after both rings are stopped,
//            and is then read by a system-clock register; it changes on
//            ring-clock edges and must not be read while the rings run.
module arbiter_dff (
    input  logic rst_n,
    input  logic ro_d,
    input  logic ro_clk,
    output logic q
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ro_d;
  end

endmodule
