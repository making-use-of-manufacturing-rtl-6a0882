// tb_power_key_seq - checks the power-optimised bit sequencer with a
// stand-in core whose bit is a fixed function of the selected ring pair:
// the select sequence for a given challenge, selects quiet while a pair runs,
// three run cycles and one clear per bit, the assembled key and the
// 160-cycle key latency.
module tb_power_key_seq;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K = 32;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n, start;
  logic [4:0] cd, cc, sel_d, sel_clk;
  logic pair_en, arb_rst_n, bit_in, key_valid, busy;
  logic [K-1:0] key;

  power_key_seq dut (.clk(clk), .rst_n(rst_n), .start(start), .challenge_d(cd),
                     .challenge_clk(cc), .pair_en(pair_en), .sel_d(sel_d), .sel_clk(sel_clk),
                     .arb_rst_n(arb_rst_n), .bit_in(bit_in), .key(key),
                     .key_valid(key_valid), .busy(busy));

  always #500 clk = ~clk;

  function automatic logic pair_bit(input logic [4:0] a, input logic [4:0] b);
    return ^(puf_pkg::mix32({22'd0, a, b}));
  endfunction

  // stand-in core: the flop takes the pair's bit while the pair runs.
  always @(posedge clk or negedge arb_rst_n)
    if (!arb_rst_n)   bit_in <= 1'b0;
    else if (pair_en) bit_in <= pair_bit(sel_d, sel_clk);

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

  initial begin
    int lat, en_cycles, clears, pairs;
    logic [K-1:0] exp_key;
    logic prev_en;
    rst_n = 1'b0; start = 1'b0; cd = '0; cc = '0;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      cd = (run == 0) ? 5'd0 : 5'($urandom);
      cc = (run == 0) ? 5'd0 : 5'($urandom);
      for (int k = 0; k < K; k++) exp_key[k] = pair_bit(5'((cd + k) % K), 5'((cc + k) % K));
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cd = ~cd;                                  // challenge only sampled at start
      lat = 0; en_cycles = 0; clears = 0; pairs = 0; prev_en = 1'b0;
      while (!key_valid && lat < 400) begin
        if (!arb_rst_n) clears++;
        if (pair_en) begin
          en_cycles++;
          if (!prev_en) pairs++;
        end
        prev_en = pair_en;
        @(negedge clk);
        lat++;
      end
      check(lat == K * 5, $sformatf("key latency %0d cycles (expected %0d)", lat, K * 5));
      check(en_cycles == K * 3, $sformatf("rings run %0d cycles (expected %0d)", en_cycles, K * 3));
      check(clears == K, $sformatf("one clear per bit (%0d)", clears));
      check(pairs == K, $sformatf("%0d ring pairs visited", pairs));
      check(key == exp_key, $sformatf("key %h expected %h", key, exp_key));
      check(!busy, "idle at key_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the select sequence itself is checked on every pair start
  logic [4:0] exp_d, exp_c;
  logic       started;
  always @(posedge clk) begin
    if (start && !busy) begin exp_d <= cd; exp_c <= cc; started <= 1'b1; end
    else if (started && pair_en && !$past(pair_en)) begin
      checks++;
      if (sel_d != exp_d || sel_clk != exp_c) begin
        failures++;
        $display("FAIL: selects %0d/%0d expected %0d/%0d", sel_d, sel_clk, exp_d, exp_c);
      end
      exp_d <= (exp_d == 5'(K - 1)) ? '0 : exp_d + 1'b1;
      exp_c <= (exp_c == 5'(K - 1)) ? '0 : exp_c + 1'b1;
    end
  end
  initial started = 1'b0;
endmodule
