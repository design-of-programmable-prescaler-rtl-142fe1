// ripple_div16 - asynchronous (ripple) divide-by-2^STAGES counter.
//
// Each stage is a flip-flop whose Q-bar is fed back to its D, so it toggles on
// every rising edge of its own clock. Stage 0 is clocked by clk_in (F4, the
// output of the dual modulus prescaler); stage i is clocked by the Q output of
// stage i-1. Each stage thus runs at half the frequency of the one before it:
// with the default four stages the outputs are F8, F16, F32 and F64. Because
// every stage toggles when its predecessor rises, the word q counts down by one
// on each rising edge of clk_in (15, 14, ... 0, 15 from reset at 0); every one
// of the 2^STAGES states lasts exactly one clk_in period.
//
// Interface: q[0] is the first stage (F8), q[STAGES-1] the last (F64); qb is
// the complement. clr clears all stages asynchronously.
// Timing: q settles through the ripple chain after each rising edge of clk_in;
// at register-transfer level all stages update in the same time step. Only
// the first stage loads the input clock, which is the point of the ripple
// structure: low clock load and power, at the cost of accumulated delay.
module ripple_div16 #(
  parameter int unsigned STAGES = 4
) (
  input  logic              clk_in,
  input  logic              clr,
  output logic [STAGES-1:0] q,
  output logic [STAGES-1:0] qb
);

  logic [STAGES-1:0] stage_clk;

  assign stage_clk[0] = clk_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    if (i > 0) begin : g_link
      assign stage_clk[i] = q[i-1];
    end
    tspc_dff u_dff (
      .clk(stage_clk[i]),
      .d  (qb[i]),
     
      .clr(clr),
      .q  (q[i]),
      .qb (qb[i])
    );
  end

endmodule
