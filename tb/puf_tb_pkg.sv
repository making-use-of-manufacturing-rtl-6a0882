// puf_tb_pkg - reference arithmetic shared by the PUF testbenches.
//
// ref_bit() predicts, from the two rings' half periods alone, the bit an
// arbiter flop holds after both rings ran together for a window of w
// femtoseconds starting at the same instant. The clock ring rises at odd
// multiples of its half period; the flop keeps the data ring's level at the
// last such edge before the window closes, and the data ring's level at time
// t is the parity of floor(t / half period). With no clock edge in the window
// the flop keeps its cleared value, 0. `tie` reports coincident edges, whose
// outcome depends on event order and is not checked.
package puf_tb_pkg;

  function automatic logic ref_bit(input longint ha, input longint hb,
                                   input longint w, output logic tie);
    longint m, t;
    tie = 1'b0;
    if (w % ha == 0 || w % hb == 0) tie = 1'b1;
    if (hb >= w) return 1'b0;                  // no rising edge of the clock ring
    m = (w - 1) / hb;                          // last multiple of hb strictly before w
    if (m % 2 == 0) m = m - 1;                 // rising edges are odd multiples
    t = m * hb;
    if (t % ha == 0) tie = 1'b1;
    return logic'((t / ha) % 2);
  endfunction

  function automatic longint half_fs(input int unsigned seed, input int unsigned idx);
    return longint'(puf_pkg::ro_half_period_fs(seed, idx, puf_pkg::RO_STAGES,
                    puf_pkg::NOMINAL_STAGE_DELAY_FS, puf_pkg::STAGE_SIGMA_PCT));
  endfunction

endpackage
