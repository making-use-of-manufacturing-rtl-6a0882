// tb_speed_key_ctrl - checks the speed-optimised key controller with a
// stand-in arbiter array: the flop clear precedes the ring run, the rings run
// for exactly 50 cycles (50 ns at 1 ns), the key is captured after the rings
// stop, key_valid rises 52 cycles after start and busy covers the run.
module tb_speed_key_ctrl;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K = 32;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n, start;
  logic ro_enable, arb_rst_n, key_valid, busy;
  logic [K-1:0] key_raw, key;

  speed_key_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .ro_enable(ro_enable),
                      .arb_rst_n(arb_rst_n), .key_raw(key_raw), .key(key),
                      .key_valid(key_valid), .busy(busy));

  always #500 clk = ~clk;                         // 1 ns system clock

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stand-in for the arbiter flops: a value that moves while the rings run
  // and freezes when they stop; cleared by arb_rst_n.
  always @(posedge clk or negedge arb_rst_n)
    if (!arb_rst_n)     key_raw <= '0;
    else if (ro_enable) key_raw <= $urandom;

  initial begin : watchdog
    #(2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int en_cycles, lat, clear_seen, clear_after_en;
    logic [K-1:0] frozen;
    rst_n = 1'b0; start = 1'b0;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    check(!key_valid && !busy && !ro_enable, "idle after reset");
    for (int run = 0; run < 3; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 0; en_cycles = 0; clear_seen = 0; clear_after_en = 0;
      check(busy && !key_valid, "busy, key not valid after start");
      while (!key_valid && lat < 200) begin
        if (!arb_rst_n) begin clear_seen++; if (en_cycles > 0) clear_after_en++; end
        if (ro_enable) en_cycles++;
        if (ro_enable) check(busy, "busy while running");
        frozen = key_raw;
        @(negedge clk);
        lat++;
      end
      check(clear_seen == 1 && clear_after_en == 0, "one clear cycle before the run");
      check(en_cycles == 50, $sformatf("rings run 50 cycles (got %0d)", en_cycles));
      check(lat == 52, $sformatf("key_valid 52 cycles after start (got %0d)", lat));
      check(key == frozen, "key equals the frozen arbiter outputs");
      check(!busy && !ro_enable, "idle once the key is valid");
      repeat (5) @(negedge clk);
      check(key_valid && key == frozen, "key and key_valid held");
    end
    // start while busy is ignored until the key is out
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b1;
    check(busy, "busy");
    start = 1'b0;
    wait (key_valid);
    check(1'b1, "second start while busy ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
