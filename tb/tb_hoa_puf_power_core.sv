// tb_hoa_puf_power_core - selects ring pairs through MUX1/MUX2, runs each
// pair for a window and compares the arbiter bit with the prediction from the
// two selected rings' half periods. Also checks that only the selected pair
// runs.
module tb_hoa_puf_power_core;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SEED = 9;
  localparam int unsigned K    = puf_pkg::KEY_BITS;

  int checks = 0, failures = 0, ties = 0, ones = 0;
  logic rst_n, en, b;
  logic [4:0] sd, sc;

  hoa_puf_power_core #(.DIE_SEED(SEED)) dut
      (.rst_n(rst_n), .pair_en(en), .sel_d(sd), .sel_clk(sc), .bit_out(b));

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
    longint w;
    logic   e, tie;
    rst_n = 1'b0; en = 1'b0; sd = '0; sc = '0;
    #1000;                                         // disabled rings settle low
    check(b == 1'b0, "cleared");
    rst_n = 1'b1;
    for (int r = 0; r < 120; r++) begin
      sd = 5'($urandom_range(0, K - 1));
      sc = 5'($urandom_range(0, K - 1));
      w  = 1_000_000 + longint'($urandom_range(0, 4_000_000));   // 1 .. 5 ns
      rst_n = 1'b0; #1; rst_n = 1'b1; #1;
      en = 1'b1;
      #(real'(w) / 2000.0);
      checks++;
      if ($countones(dut.en_d) != 1 || $countones(dut.en_clk) != 1 ||
          !dut.en_d[sd] || !dut.en_clk[sc]) begin
        failures++;
        $display("FAIL: only the selected pair should run");
      end
      #(real'(w) / 1000.0 - real'(w) / 2000.0);
      en = 1'b0;
      #100;                                        // > one half period: rings at rest
      e = puf_tb_pkg::ref_bit(puf_tb_pkg::half_fs(SEED, sd), puf_tb_pkg::half_fs(SEED, K + sc), w, tie);
      if (tie) ties++;
      else begin
        check(b == e, $sformatf("pair %0d/%0d window %0d fs", sd, sc, w));
        if (e) ones++;
      end
    end
    check(ones > 10 && ones < 110, $sformatf("both bit values occur (%0d ones)", ones));
    $display("ties skipped: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
