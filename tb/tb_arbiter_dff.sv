// tb_arbiter_dff - checks the arbiter flop: asynchronous clear, sampling of
// the data input on rising clock edges only, and holding between edges.
module tb_arbiter_dff;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic rst_n, d, c, q;

  arbiter_dff dut (.rst_n(rst_n), .ro_d(d), .ro_clk(c), .q(q));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(100_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    rst_n = 1'b0; d = 1'b1; c = 1'b0;
    #10;
    check(q == 1'b0, "cleared by reset");
    c = 1'b1; #10; c = 1'b0; #10;
    check(q == 1'b0, "reset holds the flop");
    rst_n = 1'b1;
    model = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      #3;
      c = 1'b1;                     // rising edge: sample
      model = d;
      #2;
      d = ~d;                       // data moves while clock is high
      #3;
      check(q == model, $sformatf("sample %0d", i));
      c = 1'b0;                     // falling edge: no sample
      #3;
      check(q == model, $sformatf("hold on falling edge %0d", i));
    end
    // asynchronous clear without a clock edge
    d = 1'b1; c = 1'b1; #5; check(q == 1'b1, "set before clear");
    rst_n = 1'b0; #1;
    check(q == 1'b0, "asynchronous clear");
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
