// ro_mux - the oscillator multiplexer (MUX1 / MUX2) of the serial,
// power-optimised hybrid oscillator arbiter PUF.
//
// It routes one of N ring-oscillator outputs to the shared arbiter flip-flop.
// The select lines are part of the PUF challenge, as in the published design;
// the plain binary select encoding is this design's choice.
//
// Interface and timing: purely combinational. `ro` carries the N ring
// outputs, `sel` the binary index of the one to pass, `y` the selected ring.
// Selects should change only while the rings are stopped, so that no glitch
// reaches the flip-flop clock; the sequencer (power_key_seq) guarantees that.
module ro_mux #(
    parameter int unsigned N = puf_pkg::KEY_BITS,
    localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
    input  logic [N-1:0]  ro,
    input  logic [SW-1:0] sel,
    output logic          y
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    y = 1'b0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SW'(i)) y = ro[i];
  end

endmodule
