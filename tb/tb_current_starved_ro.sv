// tb_current_starved_ro - checks the ring-oscillator model: low while
// disabled, first rise one half period after enable, a steady period of two
// half periods, an immediate stop on disable, a half period equal to the sum
// of the thirteen stage delays, and different rings running at different
// speeds.
module tb_current_starved_ro;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic en;
  logic osc_a, osc_b;

  current_starved_ro #(.DIE_SEED(7), .RO_INDEX(3))  u_a (.enable(en), .osc(osc_a));
  current_starved_ro #(.DIE_SEED(7), .RO_INDEX(40)) u_b (.enable(en), .osc(osc_b));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Independent half period: the stage delays added up here.
  function automatic longint expected_half(input int unsigned seed, input int unsigned idx);
    longint s = 0;
    for (int unsigned k = 0; k < 13; k++)
      s += longint'(puf_pkg::stage_delay_fs(seed, idx, k, 2115, 10));
    return s;
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  realtime t_en, rises[$], falls[$];
  always @(posedge osc_a) rises.push_back($realtime);
  always @(negedge osc_a) falls.push_back($realtime);

  initial begin : watchdog
    #(1_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ha, hb;
    real    h_ps;
    int     n_b;
    ha   = expected_half(7, 3);
    hb   = expected_half(7, 40);
    h_ps = real'(ha) / 1000.0;
    en = 1'b0;
    #100;
    check(osc_a == 1'b0 && osc_b == 1'b0, "rings low while disabled");
    check(rises.size() == 0, "no rising edges while disabled");
    // nominal 13 x 2.115 ps = 27.5 ps half period, 10 % stage spread
    check(ha > 22_000 && ha < 33_000, $sformatf("half period plausible (%0d fs)", ha));
    check(ha != hb, "two rings of one die differ");
    check(expected_half(8, 3) != ha, "same ring on another die differs");

    rises.delete();
    falls.delete();
    t_en = $realtime;
    en   = 1'b1;
    #(10_000);                                 // 10 ns
    check(rises.size() > 100, $sformatf("ring oscillates (%0d rises)", rises.size()));
    if (rises.size() > 3) begin
      check(absr(rises[0] - t_en - h_ps) < 0.002, "first rise one half period after enable");
      for (int i = 1; i < 4; i++)
        check(absr(rises[i] - rises[i-1] - 2.0 * h_ps) < 0.002, "period is two half periods");
      check(absr(falls[0] - rises[0] - h_ps) < 0.002, "high for one half period");
    end
    check(rises.size() == int'((10_000_000 / ha + 1) / 2),
          $sformatf("rise count %0d matches the half period", rises.size()));
    // stop while high or low: output must be low at once
    wait (osc_a == 1'b1);
    #(h_ps / 2.0);
    en = 1'b0;
    #0.001;
    check(osc_a == 1'b0 && osc_b == 1'b0, "disable forces output low immediately");
    n_b = rises.size();
    #500;
    check(rises.size() == n_b, "no edges after disable");
    // restart: same phase relation as the first start
    rises.delete();
    t_en = $realtime;
    en = 1'b1;
    #(h_ps * 3.5);
    check(rises.size() == 2, "restart runs again from the low state");
    en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
