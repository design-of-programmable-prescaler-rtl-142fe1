// tb_tspc_dff - self-checking test of the positive-edge flip-flop.
// Drives random data, checks that q takes d on every rising clock edge, holds
// across the falling edge and while d changes, that qb is always ~q, and that
// the asynchronous clear acts at once, without a clock edge.
module tb_tspc_dff;
  logic clk = 1'b0, d = 1'b0, clr = 1'b0;
  logic q, qb;
  int checks = 0, failures = 0;

  tspc_dff dut (.clk(clk), .d(d), .clr(clr), .q(q), .qb(qb));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: d=%0b q=%0b qb=%0b at %0t", what, d, q, qb, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) #10;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_q;
    #1 clr = 1'b1;   // raised after time 0 so that it is an edge
    #2 check(q == 1'b0, "clear");
    clr = 1'b0;
    expect_q = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      #5 clk = 1'b1;             // rising edge
      expect_q = d;
      #1 check(q == expect_q, "capture on rising edge");
      check(qb == ~q, "qb complement");
      d = ~d;                    // data change while clock high
      #4 clk = 1'b0;             // falling edge
      #1 check(q == expect_q, "hold over falling edge and data change");
      #4;
    end
    // load a 1, then clear with the clock idle
    d = 1'b1; #1 clk = 1'b1; #1 check(q == 1'b1, "load 1 before clear");
    clk = 1'b0; #1;
    clr = 1'b1; #1 check(q == 1'b0 && qb == 1'b1, "async clear");
    clk = 1'b1; #1 check(q == 1'b0, "clear overrides clock");
    clk = 1'b0; clr = 1'b0; #1 check(q == 1'b0, "clear released, value held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
