// tb_ro_mux - checks the oscillator multiplexer with random inputs and every
// select value, at the default 32 inputs and at a non-power-of-two size.
module tb_ro_mux;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic [31:0] ro;
  logic [4:0]  sel;
  logic        y;
  logic [5:0]  ro6;
  logic [2:0]  sel6;
  logic        y6;

  ro_mux dut (.ro(ro), .sel(sel), .y(y));
  ro_mux #(.N(6)) dut6 (.ro(ro6), .sel(sel6), .y(y6));

  initial begin : watchdog
    #(1_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      ro  = $urandom;
      ro6 = 6'($urandom);
      for (int s = 0; s < 32; s++) begin
        sel  = 5'(s);
        sel6 = 3'(s % 8);
        #1;
        checks++;
        if (y !== ro[s]) begin
          failures++;
          $display("FAIL: ro=%h sel=%0d y=%b", ro, s, y);
        end
        if (s % 8 < 6) begin
          checks++;
          if (y6 !== ro6[s % 8]) begin failures++; $display("FAIL: N=6 sel=%0d", s % 8); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
