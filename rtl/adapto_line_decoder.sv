// adapto_line_decoder: the column decoder of an interconnect column.
//
// Turns a stored line number into the one-hot enable of one of the N_LINES pass
// switches of the column, so that an LB input is driven by exactly one line. Storing
// a 6-bit number instead of 33 switch bits is what shrinks the interconnect context
// memory of the architecture from 33 to 6 bits per LB input. Codes at or above
// N_LINES enable no switch (this design's choice). Purely combinational.
module adapto_line_decoder #(
  parameter int unsigned N_LINES = 33,
  parameter int unsigned SEL_W   = $clog2(N_LINES)
) (
  input  logic [SEL_W-1:0]   sel,
  output logic [N_LINES-1:0] en
);

  always_comb begin
    for (int unsigned k = 0; k < N_LINES; k++)
      en[k] = (sel == SEL_W'(k));
  end

endmodule
