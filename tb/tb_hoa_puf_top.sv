// tb_hoa_puf_top - end-to-end test of both PUF variants at their default
// size (32-bit keys, 64 rings each, 13 stages, 1 ns system clock).
//
// Speed-optimised: generates the key several times and checks every bit
// against the prediction from the rings' half periods for a 50 ns run, the
// 52-cycle latency and that the key repeats. Power-optimised: generates keys
// for several challenges, checks every bit against the prediction for the
// selected pair and a 3 ns run, the 160-cycle latency, that a challenge gives
// the same key again and that different challenges give different keys. Both
// variants also run at the same time. Each mechanism is counted and one that
// never happened counts as a failure.
module tb_hoa_puf_top;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K          = puf_pkg::KEY_BITS;
  localparam int unsigned SPEED_SEED = 1;     // defaults of hoa_puf_top
  localparam int unsigned POWER_SEED = 2;
  localparam longint      SPEED_W    = 50 * 1_000_000;   // 50 cycles of 1 ns, in fs
  localparam longint      POWER_W    = 3 * 1_000_000;

  int checks = 0, failures = 0, ties = 0;
  int n_speed_keys = 0, n_power_keys = 0, n_repeat = 0, n_challenge_change = 0,
      n_concurrent = 0, n_busy_ignored = 0;

  logic clk = 1'b0, rst_n;
  logic speed_start, speed_key_valid, speed_busy;
  logic power_start, power_key_valid, power_busy;
  logic [4:0] cd, cc;
  logic [K-1:0] speed_key, power_key;

  hoa_puf_top dut (
      .clk(clk), .rst_n(rst_n),
      .speed_start(speed_start), .speed_key(speed_key),
      .speed_key_valid(speed_key_valid), .speed_busy(speed_busy),
      .power_start(power_start), .power_challenge_d(cd), .power_challenge_clk(cc),
      .power_key(power_key), .power_key_valid(power_key_valid), .power_busy(power_busy));

  always #500 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(50_000_000);                                 // 50 us
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_speed_key(input logic [K-1:0] key);
    logic e, tie;
    for (int i = 0; i < K; i++) begin
      e = puf_tb_pkg::ref_bit(puf_tb_pkg::half_fs(SPEED_SEED, i),
                              puf_tb_pkg::half_fs(SPEED_SEED, K + i), SPEED_W, tie);
      if (tie) ties++;
      else check(key[i] == e, $sformatf("speed key bit %0d", i));
    end
  endtask

  task automatic check_power_key(input logic [K-1:0] key, input int c_d, input int c_c);
    logic e, tie;
    for (int k = 0; k < K; k++) begin
      e = puf_tb_pkg::ref_bit(puf_tb_pkg::half_fs(POWER_SEED, (c_d + k) % K),
                              puf_tb_pkg::half_fs(POWER_SEED, K + (c_c + k) % K), POWER_W, tie);
      if (tie) ties++;
      else check(key[k] == e, $sformatf("power key bit %0d (challenge %0d/%0d)", k, c_d, c_c));
    end
  endtask

  task automatic speed_key_gen(output logic [K-1:0] key, output int lat);
    @(negedge clk) speed_start = 1'b1;
    @(negedge clk) speed_start = 1'b0;
    lat = 0;
    while (!speed_key_valid && lat < 1000) begin
      @(negedge clk);
      lat++;
    end
    key = speed_key;
    n_speed_keys++;
  endtask

  task automatic power_key_gen(input int c_d, input int c_c, output logic [K-1:0] key,
                               output int lat);
    @(negedge clk) begin power_start = 1'b1; cd = 5'(c_d); cc = 5'(c_c); end
    @(negedge clk) power_start = 1'b0;
    lat = 0;
    while (!power_key_valid && lat < 1000) begin
      @(negedge clk);
      lat++;
    end
    key = power_key;
    n_power_keys++;
  endtask

  initial begin
    logic [K-1:0] sk0, sk1, pk0, pk1, pk2;
    int lat, hd, hd_sum, n_hd;
    speed_start = 1'b0; power_start = 1'b0; cd = '0; cc = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    check(!speed_key_valid && !power_key_valid, "no key after reset");

    // ---- speed-optimised: one key, reproducible ----
    speed_key_gen(sk0, lat);
    $display("speed key: %h (%0d cycles)", sk0, lat);
    check(lat == 52, $sformatf("speed key latency %0d, expected 52", lat));
    check_speed_key(sk0);
    check(sk0 != '0 && sk0 != '1, "speed key not constant");
    speed_key_gen(sk1, lat);
    check(sk1 == sk0, "speed key reproduced");
    if (sk1 == sk0) n_repeat++;

    // start while busy is ignored
    @(negedge clk) speed_start = 1'b1;
    @(negedge clk) speed_start = 1'b1;             // second start during the run
    @(negedge clk) speed_start = 1'b0;
    lat = 0;
    while (!speed_key_valid) begin @(negedge clk); lat++; end
    check(lat == 51, $sformatf("start while busy ignored (%0d)", lat));
    if (lat == 51) n_busy_ignored++;

    // ---- power-optimised: challenges ----
    power_key_gen(0, 0, pk0, lat);
    $display("power key, challenge 0/0: %h (%0d cycles)", pk0, lat);
    check(lat == 160, $sformatf("power key latency %0d, expected 160", lat));
    check_power_key(pk0, 0, 0);
    power_key_gen(0, 0, pk1, lat);
    check(pk1 == pk0, "power key reproduced for the same challenge");
    if (pk1 == pk0) n_repeat++;
    hd_sum = 0; n_hd = 0;
    for (int c = 0; c < 6; c++) begin
      int a, b;
      a = $urandom_range(0, K - 1);
      b = $urandom_range(0, K - 1);
      if (a == 0 && b == 0) a = 1;
      power_key_gen(a, b, pk2, lat);
      check_power_key(pk2, a, b);
      hd = $countones(pk2 ^ pk0);
      hd_sum += hd; n_hd++;
      $display("power key, challenge %0d/%0d: %h, %0d bits from challenge 0/0", a, b, pk2, hd);
      if (pk2 != pk0) n_challenge_change++;
    end
    $display("mean Hamming distance between challenges: %0d %%", hd_sum * 100 / (n_hd * K));

    // ---- both at once ----
    fork
      speed_key_gen(sk1, lat);
      power_key_gen(5, 17, pk2, lat);
    join
    check(sk1 == sk0, "speed key unchanged while the power PUF runs");
    check_power_key(pk2, 5, 17);
    n_concurrent++;

    $display("mechanisms: speed keys %0d, power keys %0d, repeats %0d, challenge changes %0d, concurrent %0d, busy-start ignored %0d, ties %0d",
             n_speed_keys, n_power_keys, n_repeat, n_challenge_change, n_concurrent, n_busy_ignored, ties);
    check(n_speed_keys > 0 && n_power_keys > 0 && n_repeat >= 2 && n_challenge_change > 0 &&
          n_concurrent > 0 && n_busy_ignored > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
