// mc_control - modulus control block of the programmable prescaler.
//
// The ripple counter below the dual modulus prescaler steps through all
// 2^STAGES states once per output period, one state per prescaler cycle. This
// block decodes those states into STAGES disjoint windows A0..A(STAGES-1),
// where A_k is active in 2^k of the states, gates each window with program bit
// D_k and ORs the results into MC:
//   A_k = q[k] & ~q[k+1] & ... & ~q[STAGES-1]
//   MC  = OR_k (D_k & A_k)
// MC is therefore high in exactly D = sum D_k 2^k states, and the prescaler
// divides by 5 in D of its 2^STAGES cycles and by 4 in the rest. For four
// stages A3 is F64 alone and A2, A1, A0 need 2, 3 and 4 counter taps, matching
// the gates AND7, AND6 and AND5 of the schematic; AND1..AND4 gate A0..A3 with
// D0..D3 and the OR gate forms MC. Which flip-flop outputs (Q or Q-bar) feed
// each decoding gate is this design's reading; only the window sizes matter to
// the division ratio.
//
// Interface: q is the counter word (q[0] = F8), d the program word; purely
// combinational, mc follows q and d without a clock.
module mc_control #(
  parameter int unsigned STAGES = 4
) (
  input  logic [STAGES-1:0] q,
  input  logic [STAGES-1:0] d,
  output logic              mc
);

  logic [STAGES-1:0] a;      // decoded windows A0..A(STAGES-1)
  logic [STAGES-1:0] upper;  // upper[k]: some stage above k is set

  always_comb begin
    upper[STAGES-1] = 1'b0;
    for (int k = STAGES - 2; k >= 0; k--) begin
      upper[k] = upper[k+1] | q[k+1];
    end
    a  = q & ~upper;
    mc = |(a & d);
  end

endmodule
