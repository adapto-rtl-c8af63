// adapto_ic_column: one column of the ADAPTO interconnect.
//
// A vertical wire feeding one LB input pin crosses all N_LINES horizontal lines of
// the stripe; at each crossing a pass switch can join them. The line decoder turns
// the column's stored line number into the single switch that is closed. The pass
// transistors are modelled as an AND-OR of the switch enables with the lines, so a
// column whose code selects no line reads 0 instead of floating (this design's
// choice). Purely combinational.
module adapto_ic_column #(
  parameter int unsigned N_LINES = 33,
  parameter int unsigned SEL_W   = $clog2(N_LINES)
) (
  input  logic [N_LINES-1:0] lines,
  input  logic [SEL_W-1:0]   sel,
  output logic               pin
);

  logic [N_LINES-1:0] en;

  adapto_line_decoder #(.N_LINES(N_LINES), .SEL_W(SEL_W)) u_dec (.sel(sel), .en(en));

  always_comb pin = |(en & lines);

endmodule
