// tb_ripple_div16 - self-checking test of the ripple divide-by-16 counter.
// Counts rising edges of clk_in from reset and checks after each that the
// counter word equals (16 - edges) mod 16 (each stage toggles when the stage
// before it rises, so the word counts down), that qb is ~q, and that stage k
// has a period of 2^(k+1) input edges with 50 % duty. An asynchronous clear in
// the middle of a count must return the word to 0.
module tb_ripple_div16;
  localparam int unsigned S = 4;
  logic clk_in = 1'b0, clr = 1'b0;
  logic [S-1:0] q, qb;
  int checks = 0, failures = 0;
  int edges = 0;
  int rises [S];
  int last_rise [S];

  ripple_div16 #(.STAGES(S)) dut (.clk_in(clk_in), .clr(clr), .q(q), .qb(qb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < S; k++) begin : g_mon
    always @(posedge q[k]) begin
      if (!clr) begin
        if (rises[k] > 0) begin
          checks++;
          if (edges - last_rise[k] != (2 << k)) begin
            failures++;
            $display("FAIL stage %0d period %0d, want %0d", k, edges - last_rise[k], 2 << k);
          end
        end
        rises[k]++;
        last_rise[k] = edges;
      end
    end
  end

  task automatic pulse();
    #5 clk_in = 1'b1;
    edges++;
    #5 clk_in = 1'b0;
  endtask

  initial begin
    logic [S-1:0] want;
    for (int k = 0; k < S; k++) begin rises[k] = 0; last_rise[k] = 0; end
    #1 clr = 1'b1;   // raised after time 0 so that it is an edge
    #6;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset value %h", q); end
    clr = 1'b0;
    for (int i = 0; i < 100; i++) begin
      pulse();
      #1;
      want = S'((1 << S) - (edges % (1 << S)));
      checks++;
      if (q != want || qb != ~q) begin
        failures++;
        $display("FAIL after %0d edges: q=%h want %h qb=%h", edges, q, want, qb);
      end
    end
    // duty: stage k is high for 2^k of every 2^(k+1) input edges, so the
    // sum of q over one full cycle of 16 edges is 8 for every stage
    begin
      int high [S];
      for (int k = 0; k < S; k++) high[k] = 0;
      for (int i = 0; i < 16; i++) begin
        pulse(); #1;
        for (int k = 0; k < S; k++) high[k] += int'(q[k]);
      end
      for (int k = 0; k < S; k++) begin
        checks++;
        if (high[k] != 8) begin failures++; $display("FAIL stage %0d duty %0d/16", k, high[k]); end
      end
    end
    // clear in the middle of a count
    pulse(); pulse(); pulse();
    clr = 1'b1; #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL async clear: q=%h", q); end
    for (int k = 0; k < S; k++) begin
      checks++;
      if (rises[k] < 3) begin failures++; $display("FAIL stage %0d rose only %0d times", k, rises[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
