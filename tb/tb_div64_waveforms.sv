// tb_div64_waveforms - the divide-by-64 operating point of the prescaler.
//
// Program word 0 (modulus control never asserted), input clock at 20 GHz
// (50 ps period). After reset every divider output must be a square wave:
// f4 at fin/4, then F8, F16, F32 and F64 at fin/8 .. fin/64, each high for
// exactly half its period. Periods and high times are measured in input
// clocks on the falling clock edge. mc must stay low throughout. The run
// covers 20 output periods (1280 input clocks, 64 ns).
module tb_div64_waveforms;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned S = 4;
  localparam int N_SIG = S + 1;            // f4, F8, F16, F32, F64

  logic clk = 1'b0, rst = 1'b0;
  logic out, f4, mc;
  logic [S-1:0] fdiv;
  int checks = 0, failures = 0;

  prog_prescaler dut (.clk(clk), .rst(rst), .d('0), .out(out), .f4(f4), .fdiv(fdiv), .mc(mc));

  initial forever #25ps clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N_SIG-1:0] sig, prev;
  int last_rise [N_SIG];
  int last_fall [N_SIG];
  int periods   [N_SIG];
  int cyc = 0;
  int mc_high = 0;

  assign sig = {fdiv, f4};

  always @(negedge clk) begin
    if (!rst) begin
      cyc++;
      if (mc) mc_high++;
      for (int k = 0; k < N_SIG; k++) begin
        if (sig[k] && !prev[k]) begin
          if (last_rise[k] >= 0) begin
            checks++;
            if (cyc - last_rise[k] != (4 << k)) begin
              failures++;
              $display("FAIL divider output %0d: period %0d, want %0d", k, cyc - last_rise[k], 4 << k);
            end
            checks++;
            if (last_fall[k] - last_rise[k] != (2 << k)) begin
              failures++;
              $display("FAIL divider output %0d: high %0d, want %0d", k, last_fall[k] - last_rise[k], 2 << k);
            end
            periods[k]++;
          end
          last_rise[k] = cyc;
        end
        if (!sig[k] && prev[k]) last_fall[k] = cyc;
      end
    end
    prev = sig;
  end

  initial begin
    for (int k = 0; k < N_SIG; k++) begin last_rise[k] = -1; last_fall[k] = -1; periods[k] = 0; end
    #1ps rst = 1'b1;
    repeat (2) @(posedge clk);
    #1ps rst = 1'b0;
    repeat (20) @(posedge out);
    @(posedge clk);            // let the monitor see the last edge
    checks++;
    if (mc_high != 0) begin failures++; $display("FAIL mc was high for %0d clocks", mc_high); end
    for (int k = 0; k < N_SIG; k++) begin
      checks++;
      if (periods[k] < 19) begin failures++; $display("FAIL output %0d: only %0d periods", k, periods[k]); end
    end
    $display("output periods seen: f4 %0d, F8 %0d, F16 %0d, F32 %0d, F64 %0d; simulated %0t ps",
             periods[0], periods[1], periods[2], periods[3], periods[4], $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
