// tb_hoa_puf_speed_core - runs the full 64-ring, 32-flop array for several
// window lengths, including the 50 ns run of a key generation, and compares
// every bit with the prediction from the rings' half periods. Also checks
// that the key is stable once the rings are stopped and that a repeat run
// reproduces it.
module tb_hoa_puf_speed_core;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SEED = 5;
  localparam int unsigned K    = puf_pkg::KEY_BITS;

  int checks = 0, failures = 0, ties = 0;
  logic rst_n, en;
  logic [K-1:0] key;

  hoa_puf_speed_core #(.DIE_SEED(SEED)) dut (.rst_n(rst_n), .enable(en), .key_raw(key));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint w, output logic [K-1:0] got);
    logic e, tie;
    rst_n = 1'b0; #1; rst_n = 1'b1; #1;
    en = 1'b1;
    #(real'(w) / 1000.0);
    en = 1'b0;
    #100;                                          // > one half period: rings at rest
    got = key;
    for (int i = 0; i < K; i++) begin
      e = puf_tb_pkg::ref_bit(puf_tb_pkg::half_fs(SEED, i), puf_tb_pkg::half_fs(SEED, K + i), w, tie);
      if (tie) ties++;
      else check(key[i] == e, $sformatf("bit %0d window %0d fs", i, w));
    end
    #1000;
    check(key == got, "key stable after the rings stop");
  endtask

  initial begin
    logic [K-1:0] k1, k2;
    longint w;
    rst_n = 1'b0; en = 1'b0;
    #1000;                                         // disabled rings settle low
    check(key == '0, "cleared");
    run(64'd50_000_000, k1);                       // the 50 ns key run
    $display("key after 50 ns: %h", k1);
    check(k1 != '0 && k1 != '1, "key is not constant");
    run(64'd50_000_000, k2);
    check(k1 == k2, "repeat run reproduces the key");
    for (int r = 0; r < 8; r++) begin
      w = 5_000_000 + longint'($urandom_range(0, 50_000_000));
      run(w, k2);
    end
    $display("ties skipped: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
