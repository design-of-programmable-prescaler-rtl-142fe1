// tb_dmp45 - self-checking test of the divide-by-4/5 dual modulus prescaler.
// Measures every period of out (rising edge to rising edge, in input clocks)
// and its high time. With mc held at 0 the period must be 4 (high 2), with mc
// held at 1 it must be 5 (high 3). Then mc is changed at random once per
// output cycle, half a clock after out rises, and each period must equal
// 4 + the mc value of that cycle.
module tb_dmp45;
  logic clk = 1'b0, clr = 1'b0, mc = 1'b0;
  logic out;
  int checks = 0, failures = 0;
  int cycle = 0;                 // input clock count
  int last_rise = -1, last_high = 0;
  int n4 = 0, n5 = 0;

  dmp45 dut (.clk(clk), .clr(clr), .mc(mc), .out(out));

  initial forever #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // wait for the next rising edge of out and return the period since the
  // previous one and the high time of the previous cycle
  task automatic next_period(output int period, output int high);
    int rise_cycle, fall_cycle;
    @(posedge out);
    rise_cycle = cycle;
    period = rise_cycle - last_rise;
    high = last_high;
    last_rise = rise_cycle;
    fork
      begin @(negedge out); fall_cycle = cycle; last_high = fall_cycle - rise_cycle; end
    join_none
  endtask

  task automatic expect_period(input int want_p, input int want_h, input string what);
    int p, h;
    next_period(p, h);
    checks++;
    if (p != want_p || (want_h > 0 && h != want_h)) begin
      failures++;
      $display("FAIL %s: period %0d (want %0d) high %0d (want %0d)", what, p, want_p, h, want_h);
    end
    if (p == 4) n4++;
    if (p == 5) n5++;
  endtask

  initial begin
    int p, h;
    logic mc_now;
    #1 clr = 1'b1;   // raised after time 0 so that it is an edge
    repeat (2) @(negedge clk);
    clr = 1'b0;
    // static modulus 0
    mc = 1'b0;
    repeat (3) next_period(p, h);
    repeat (20) expect_period(4, 2, "divide by 4");
    // static modulus 1; the first period after the change may be mixed
    @(negedge clk) mc = 1'b1;
    repeat (2) next_period(p, h);
    repeat (20) expect_period(5, 3, "divide by 5");
    // mc changes every cycle, half a clock after out rises
    @(posedge out);
    last_rise = cycle;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      mc_now = 1'($urandom);
      mc = mc_now;
      expect_period(mc_now ? 5 : 4, 0, "per-cycle modulus");
    end
    checks++;
    if (n4 == 0 || n5 == 0) begin
      failures++;
      $display("FAIL a modulus never occurred: n4=%0d n5=%0d", n4, n5);
    end
    $display("divide-by-4 cycles %0d, divide-by-5 cycles %0d", n4, n5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
