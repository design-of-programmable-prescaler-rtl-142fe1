// tb_prog_prescaler - end-to-end test of the programmable prescaler at its
// default size (four counter stages, ratios 64..79).
//
// All observation is done on the falling edge of the input clock, so each
// rising edge of out, f4 and mc is timed in whole input clocks. Checks:
//   - after reset is released, out rises on the first rising input clock edge and then
//     every 64 + d clocks;
//   - every period of f4 is 4 or 5 clocks, and within each output period
//     exactly d of the 16 prescaler cycles are 5 clocks long;
//   - out stays high for 8 of the 16 prescaler cycles of each period, and for
//     d = 0 that is 32 clocks (square wave at fin/64).
// The program word is walked through all 16 values, then changed at random
// times; the period in which d changes, and the next, are not checked.
// Coverage of each mechanism is counted: divide-by-4 cycles, divide-by-5
// cycles, switches of mc, changes of d, a reset, and each of the 16 ratios.
// A mechanism that never occurred counts as a failure.
module tb_prog_prescaler;
  localparam int unsigned S = 4;
  localparam int BASE = 4 << S;                  // 64

  logic clk = 1'b0, rst = 1'b0;
  logic [S-1:0] d = '0;
  logic out, f4, mc;
  logic [S-1:0] fdiv;

  int checks = 0, failures = 0;

  prog_prescaler dut (.clk(clk), .rst(rst), .d(d), .out(out), .f4(f4), .fdiv(fdiv), .mc(mc));

  initial forever #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (d=%0d) at %0t", what, d, $time);
    end
  endtask

  // monitor state
  int cyc = 0;                    // clocks since reset release
  logic p_out = 1'b0, p_f4 = 1'b0, p_mc = 1'b0;
  int last_out = -1, last_f4 = -1;
  int fives = 0, f4_rises_high = 0;
  int skip = 0;                   // output periods still to ignore
  int out_rises = 0;
  int n_div4 = 0, n_div5 = 0, n_mc_switch = 0, n_d_change = 0, n_reset = 0;
  int ratio_seen [16];

  always @(negedge clk) begin
    if (rst) begin
      cyc = 0;
      p_out = out; p_f4 = f4; p_mc = mc;
      last_out = -1; last_f4 = -1; fives = 0; f4_rises_high = 0; out_rises = 0;
    end else begin
      cyc++;
      if (mc != p_mc) n_mc_switch++;
      if (f4 && !p_f4) begin
        if (last_f4 >= 0) begin
          int p;
          p = cyc - last_f4;
          check(p == 4 || p == 5, "f4 period is 4 or 5");
          if (p == 4) n_div4++;
          if (p == 5) begin n_div5++; fives++; end
        end
        last_f4 = cyc;
        if (out) f4_rises_high++;
      end
      if (!out && p_out) begin
        if (skip == 0 && last_out >= 0) begin
          check(f4_rises_high == (1 << (S - 1)), "out high for half the prescaler cycles");
          if (d == 0) check(cyc - last_out == BASE / 2, "d=0 output high time");
        end
      end
      if (out && !p_out) begin
        out_rises++;
        if (out_rises == 1) begin
          // reset is released just after a rising clock edge, so the first
          // falling edge counts 1 and the next rising clock edge is seen at 2
          check(cyc == 2, "first output edge on the first clock after reset");
        end else if (skip > 0) begin
          skip--;
        end else begin
          check(cyc - last_out == BASE + int'(d), "output period = 64 + d");
          check(fives == int'(d), "d of 16 prescaler cycles divide by 5");
          if (cyc - last_out == BASE + int'(d)) ratio_seen[d]++;
        end
        last_out = cyc;
        fives = 0;
        f4_rises_high = 1;
      end
      p_out = out; p_f4 = f4; p_mc = mc;
    end
  end

  task automatic set_d(input logic [S-1:0] v);
    @(posedge clk);
    #1;
    if (v != d) n_d_change++;
    d = v;
    skip = 1;     // the period in which d changes is mixed; the next is clean
  endtask

  task automatic wait_periods(input int n);
    repeat (n) @(posedge out);
  endtask

  initial begin
    for (int i = 0; i < 16; i++) ratio_seen[i] = 0;
    // reset, divide by 64 (the configuration of the reference waveforms)
    #1 rst = 1'b1;   // raised after time 0 so that it is an edge
    repeat (3) @(posedge clk);
    #1 rst = 1'b0; n_reset++;
    wait_periods(4);
    // walk all program words
    for (int v = 1; v < 16; v++) begin
      set_d(S'(v));
      wait_periods(4);
    end
    // random words applied at random times
    for (int i = 0; i < 30; i++) begin
      repeat ($urandom_range(0, 90)) @(posedge clk);
      set_d(S'($urandom));
      wait_periods(3);
    end
    // reset again with a non-zero word
    set_d(4'd11);
    #3 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0; n_reset++;
    skip = 0;
    wait_periods(4);

    check(n_div4 > 0, "divide-by-4 cycles occurred");
    check(n_div5 > 0, "divide-by-5 cycles occurred");
    check(n_mc_switch > 0, "modulus control switched");
    check(n_d_change > 0, "program word changed");
    check(n_reset > 1, "reset applied");
    for (int v = 0; v < 16; v++) check(ratio_seen[v] > 0, $sformatf("ratio %0d observed", BASE + v));
    $display("divide-by-4 cycles %0d, divide-by-5 cycles %0d, mc switches %0d, d changes %0d, resets %0d",
             n_div4, n_div5, n_mc_switch, n_d_change, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
