// adapto_interconnect: one interconnect stripe between two rows of the array.
//
// The stripe has N_LB + 1 horizontal lines: line k (k < N_LB) carries the output of
// LB k of the row above (or bit k of the operand word for the top stripe), and line
// N_LB carries the stripe's extra line, a configured constant that lets a shift
// insert a 0 or a 1. Each of the 3 x N_LB LB input pins of the row below has its own
// column that connects it to any one line, chosen by a line number. Shifts, bit
// permutations, fan-out of one bit to many pins and constant inputs are all done
// here. Purely combinational.
module adapto_interconnect
  import adapto_pkg::*;
#(
  parameter int unsigned N_LB  = N_LB_DEF,
  parameter int unsigned SEL_W = $clog2(N_LB + 1)
) (
  input  logic [N_LB-1:0]  word,
  input  logic             extra,
  input  logic [SEL_W-1:0] sel_d1 [N_LB],
  input  logic [SEL_W-1:0] sel_d2 [N_LB],
  input  logic [SEL_W-1:0] sel_d3 [N_LB],
  output logic [N_LB-1:0]  d1,
  output logic [N_LB-1:0]  d2,
  output logic [N_LB-1:0]  d3
);

  localparam int unsigned N_LINES = N_LB + 1;

  logic [N_LINES-1:0] lines;

  assign lines = {extra, word};

  for (genvar i = 0; i < N_LB; i++) begin : g_col
    adapto_ic_column #(.N_LINES(N_LINES), .SEL_W(SEL_W)) u_c1 (.lines(lines), .sel(sel_d1[i]), .pin(d1[i]));
    adapto_ic_column #(.N_LINES(N_LINES), .SEL_W(SEL_W)) u_c2 (.lines(lines), .sel(sel_d2[i]), .pin(d2[i]));
    adapto_ic_column #(.N_LINES(N_LINES), .SEL_W(SEL_W)) u_c3 (.lines(lines), .sel(sel_d3[i]), .pin(d3[i]));
  end

endmodule
