// adapto_lb_row: one row of N_LB logic blocks joined by the direct carry chain.
//
// LB i takes Co from the Cout of LB i-1; LB 0 takes a constant 0, so it starts a
// chain only when configured to (the usual adder LSB is programmed with Cin = P = 0).
// Every LB has its own four program bits and its own three data inputs, which come
// from the interconnect stripe above the row. The width of 32 follows the published
// architecture; the chain direction (upwards in index) and the absent carry-out of
// the last LB are this design's choices: the last LB's Cout (carry[N_LB]) is left
// unused, and a carry out of an adder is taken by one more LB of the row configured
// to continue the chain with zero operands. Purely combinational: the longest path
// is the carry chain across the whole row.
module adapto_lb_row
  import adapto_pkg::*;
#(
  parameter int unsigned N_LB = N_LB_DEF
) (
  input  lb_cfg_t          cfg [N_LB],
  input  logic  [N_LB-1:0] d1,
  input  logic  [N_LB-1:0] d2,
  input  logic  [N_LB-1:0] d3,
  output logic  [N_LB-1:0] q
);

  logic [N_LB:0] carry;  // carry[i] enters LB i, carry[i+1] leaves it

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < N_LB; i++) begin : g_lb
    adapto_lb u_lb (
      .cfg (cfg[i]),
      .co  (carry[i]),
      .d1  (d1[i]),
      .d2  (d2[i]),
      .d3  (d3[i]),
      .out (q[i]),
      .cout(carry[i+1])
    );
  end

endmodule
