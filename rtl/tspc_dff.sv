// tspc_dff - positive-edge D flip-flop, the storage cell of every stage of
// the prescaler.
//
// The cell it stands for is the 11-transistor true single-phase clock (TSPC)
// flip-flop of Yuan and Svensson: one clock phase only, evaluation while the
// clock is high, hold while it is low, so the output changes only on the
// rising clock edge. At register-transfer level that is an ordinary
// rising-edge D flip-flop; the dynamic nodes, the transistor stacking and the
// absence of clock skew have no logic-level counterpart.
//
// Interface: d is sampled on the rising edge of clk; q and its complement qb
// follow. clr is the CLR pin of the flip-flop symbol used in the schematics,
// here an asynchronous active-high clear; it is this design's way of starting
// every divider from a known state (the transistor cell has no clear). The
// symbol's PRE pin is never driven in the prescaler and is left out.
// Timing: q changes in the same time step as the rising edge of clk, or at once
// when clr rises.
module tspc_dff (
  input  logic clk,
  input  logic d,
  input  logic clr,
  output logic q,
  output logic qb
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= 1'b0;
    else     q <= d;
  end

  assign qb = ~q;

endmodule
