// tb_puf_bit_cell - runs single-bit PUF cells for many window lengths and
// compares the bit each holds with the one predicted from the two rings'
// half periods (puf_tb_pkg::ref_bit). Also checks the clear.
module tb_puf_bit_cell;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SEED = 11;
  localparam int unsigned NC   = 4;

  int checks = 0, failures = 0, ties = 0, ones = 0;
  logic rst_n, en;
  logic [NC-1:0] q;

  for (genvar c = 0; c < NC; c++) begin : g_c
    puf_bit_cell #(.DIE_SEED(SEED), .RO_D(c), .RO_CLK(NC + c)) u_cell
        (.rst_n(rst_n), .enable(en), .q(q[c]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(20_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint w;
    logic   e, tie;
    rst_n = 1'b0; en = 1'b0;
    #1000;                                         // disabled rings settle low
    check(q == '0, "cleared");
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      w = 1000 + longint'($urandom_range(0, 60_000_000));   // 1 ps .. 60 ns in fs
      rst_n = 1'b0; #1; rst_n = 1'b1; #1;
      en = 1'b1;
      #(real'(w) / 1000.0);
      en = 1'b0;
      #100;
      for (int c = 0; c < NC; c++) begin
        e = puf_tb_pkg::ref_bit(puf_tb_pkg::half_fs(SEED, c), puf_tb_pkg::half_fs(SEED, NC + c), w, tie);
        if (tie) ties++;
        else begin
          check(q[c] == e, $sformatf("cell %0d window %0d fs: got %b expected %b", c, w, q[c], e));
          if (e) ones++;
        end
      end
    end
    check(ones > 0, "some windows give a 1");
    $display("ties skipped: %0d, ones: %0d", ties, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
