// dmp45 - synchronous divide-by-4/5 dual modulus prescaler.
//
// Three flip-flops all clocked by the input clock and two NAND gates:
//   DFF1.D = NAND1(DFF3.Q, DFF2.Q)     DFF2.D = DFF1.Q (= OUT)
//   DFF3.D = NAND2(MC, DFF2.Qbar)
// With MC = 0, NAND2 holds DFF3.Q at 1, NAND1 acts as an inverter on DFF2.Q and
// DFF1/DFF2 form a two-stage twisted-ring counter: OUT = 1100..., divide by 4.
// With MC = 1, NAND2 acts as an inverter on DFF2.Qbar, so DFF3 is DFF2.Q one
// clock late; the extra state stretches the high phase: OUT = 11100...,
// divide by 5. Gate names and connections follow the reference schematic;
// this reading of it (DFF2.Q into NAND1, DFF2.Qbar into NAND2) is the one that
// gives the stated divide-by-4 and divide-by-5 behaviour.
//
// Interface: clk is the high-frequency input, out the divided clock (Q of
// DFF1), clr an asynchronous clear of the three flip-flops (from the all-zero
// state the ring enters its cycle after one clock; no state locks up).
// Timing: mc is sampled on the second rising clk edge after a rising edge of
// out (the edge at which DFF2 rises); the cycle of out that contains that edge
// is 5 clocks long if mc was 1 there, else 4. mc may therefore change at any
// time in the clock period after out rises.
module dmp45 (
  input  logic clk,
  input  logic clr,
  input  logic mc,
  output logic out
);

  logic q1, q2, q2b, q3;
  logic nand1, nand2;

  assign nand1 = ~(q3 & q2);
  assign nand2 = ~(mc & q2b);

  tspc_dff u_dff1 (.clk(clk), .d(nand1), .clr(clr), .q(q1), .qb());
  tspc_dff u_dff2 (.clk(clk), .d(q1),    .clr(clr), .q(q2), .qb(q2b));
  tspc_dff u_dff3 (.clk(clk), .d(nand2), .clr(clr), .q(q3), .qb());

  assign out = q1;

endmodule
