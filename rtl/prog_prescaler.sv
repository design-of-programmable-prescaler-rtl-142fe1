// prog_prescaler - divide-by-64..79 programmable prescaler for the feedback
// path of a PLL frequency synthesizer.
//
// A synchronous divide-by-4/5 dual modulus prescaler (dmp45) runs at the input
// clock. Its output F4 clocks an asynchronous divide-by-16 ripple counter
// (ripple_div16) whose last stage is the output F64. The counter passes through
// each of its 16 states for one prescaler cycle per output period; the control
// block (mc_control) raises the modulus control MC in exactly D of those 16
// states, so the prescaler divides by 5 D times and by 4 (16 - D) times:
//   output period = 16*4 + D = 64 + D input clocks, D = d[3:0] = 0..15.
// STAGES sets the length of the ripple counter and the program word; in
// general the ratio is 4*2^STAGES + d.
//
// Interface: clk is the input (VCO) clock, out the divided clock (to the
// phase detector). f4, fdiv and mc expose the internal dividers and the modulus
// control. rst clears all flip-flops asynchronously; out then rises on the
// first rising clk edge after rst is released and every 4*2^STAGES + d clocks
// from there. out is high for 2^(STAGES-1) of the 2^STAGES prescaler cycles of
// each period.
// Timing: d is read continuously; a change takes full effect from the next
// output period, the period in which it changes may have a ratio between the
// old and the new one. At register-transfer level the ripple chain and the
// control gates settle within the clock edge; in silicon MC must settle through
// the ripple chain and the control gates within one input clock period after a
// rising edge of F4, because the prescaler samples MC on the next edge.
module prog_prescaler #(
  parameter int unsigned STAGES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [STAGES-1:0] d,
  output logic              out,
  output logic              f4,
  output logic [STAGES-1:0] fdiv,
  output logic              mc
);

  dmp45 u_dmp (
    .clk(clk),
    .clr(rst),
    .mc (mc),
    .out(f4)
  );

  ripple_div16 #(.STAGES(STAGES)) u_cnt (
    .clk_in(f4),
    .clr   (rst),
    .q     (fdiv),
    .qb    ()
  );

  mc_control #(.STAGES(STAGES)) u_ctrl (
    .q (fdiv),
    .d (d),
    .mc(mc)
  );

  assign out = fdiv[STAGES-1];

endmodule
