// tb_mc_control - exhaustive test of the modulus control decoder.
// For every program word d and every counter word q it compares mc with a
// reference written differently from the block: mc is program bit d[k] where
// k is the position of the highest set bit of q, and 0 when q is 0. It also
// checks the property the division ratio rests on: over the 16 counter states
// mc is high exactly d times.
module tb_mc_control;
  localparam int unsigned S = 4;
  logic [S-1:0] q, d;
  logic mc;
  int checks = 0, failures = 0;

  mc_control #(.STAGES(S)) dut (.q(q), .d(d), .mc(mc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_mc(input int qv, input int dv);
    int top = -1;
    for (int k = 0; k < int'(S); k++) if ((qv >> k) & 1) top = k;
    return (top < 0) ? 1'b0 : 1'((dv >> top) & 1);
  endfunction

  initial begin
    for (int dv = 0; dv < (1 << S); dv++) begin
      int ones;
      ones = 0;
      for (int qv = 0; qv < (1 << S); qv++) begin
        d = S'(dv); q = S'(qv);
        #1;
        checks++;
        if (mc != ref_mc(qv, dv)) begin
          failures++;
          $display("FAIL d=%0d q=%0d mc=%0b", dv, qv, mc);
        end
        ones += int'(mc);
      end
      checks++;
      if (ones != dv) begin
        failures++;
        $display("FAIL d=%0d: mc high in %0d of 16 states", dv, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
