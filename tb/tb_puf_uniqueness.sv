// tb_puf_uniqueness - inter-die uniqueness of both PUF variants.
//
// NDIES copies of hoa_puf_top stand for NDIES manufactured dies: each copy
// gets its own die seeds, so its rings carry their own stage-delay
// variation. All dies generate a speed-optimised key and a power-optimised
// key (challenge 0/0) at the same time; every bit is checked against the
// prediction from the rings' half periods, and the mean pairwise Hamming
// distance between the dies' keys is reported. The published evaluation
// reports 50 % (speed-optimised) and 48 % (power-optimised) over its Monte
// Carlo runs; with NDIES dies of 32-bit keys the mean must lie within
// 40 %..60 % here. No key may be shared by two dies.
module tb_puf_uniqueness;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NDIES = 16;
  localparam int unsigned K     = puf_pkg::KEY_BITS;

  int checks = 0, failures = 0, ties = 0;
  logic clk = 1'b0, rst_n, start;
  logic [NDIES-1:0] sv, pv;
  logic [K-1:0] skey [NDIES];
  logic [K-1:0] pkey [NDIES];

  for (genvar d = 0; d < NDIES; d++) begin : g_die
    logic sb, pb;
    hoa_puf_top #(.SPEED_DIE_SEED(100 + d), .POWER_DIE_SEED(500 + d)) u_die (
        .clk(clk), .rst_n(rst_n),
        .speed_start(start), .speed_key(skey[d]), .speed_key_valid(sv[d]), .speed_busy(sb),
        .power_start(start), .power_challenge_d(5'd0), .power_challenge_clk(5'd0),
        .power_key(pkey[d]), .power_key_valid(pv[d]), .power_busy(pb));
  end

  always #500 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_die(input int d);
    logic e, tie;
    for (int i = 0; i < K; i++) begin
      e = puf_tb_pkg::ref_bit(puf_tb_pkg::half_fs(100 + d, i), puf_tb_pkg::half_fs(100 + d, K + i),
                              50 * 1_000_000, tie);
      if (tie) ties++;
      else check(skey[d][i] == e, $sformatf("die %0d speed bit %0d", d, i));
      e = puf_tb_pkg::ref_bit(puf_tb_pkg::half_fs(500 + d, i), puf_tb_pkg::half_fs(500 + d, K + i),
                              3 * 1_000_000, tie);
      if (tie) ties++;
      else check(pkey[d][i] == e, $sformatf("die %0d power bit %0d", d, i));
    end
  endtask

  initial begin
    longint s_hd, p_hd, pairs;
    int s_pct10, p_pct10, s_same, p_same;
    start = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (&sv && &pv);
    @(negedge clk);
    for (int d = 0; d < NDIES; d++) check_die(d);
    s_hd = 0; p_hd = 0; pairs = 0; s_same = 0; p_same = 0;
    for (int a = 0; a < NDIES; a++)
      for (int b = a + 1; b < NDIES; b++) begin
        s_hd += $countones(skey[a] ^ skey[b]);
        p_hd += $countones(pkey[a] ^ pkey[b]);
        if (skey[a] == skey[b]) s_same++;
        if (pkey[a] == pkey[b]) p_same++;
        pairs++;
      end
    s_pct10 = int'(s_hd * 1000 / (pairs * K));
    p_pct10 = int'(p_hd * 1000 / (pairs * K));
    $display("dies %0d: inter-die Hamming distance speed-optimised %0d.%0d %%, power-optimised %0d.%0d %%",
             NDIES, s_pct10 / 10, s_pct10 % 10, p_pct10 / 10, p_pct10 % 10);
    check(s_pct10 >= 400 && s_pct10 <= 600, "speed-optimised inter-die distance near 50 %");
    check(p_pct10 >= 400 && p_pct10 <= 600, "power-optimised inter-die distance near 50 %");
    check(s_same == 0 && p_same == 0, "no two dies share a key");
    $display("ties skipped: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
