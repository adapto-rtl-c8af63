// adapto_ctx_ram: a local multicontext configuration memory.
//
// DEPTH words of WIDTH bits, one word per context. The read port is asynchronous:
// the context address selects a word combinationally, so a context chosen in a cycle
// configures the logic it serves within that same cycle, which is how the array is
// reconfigured and executes in one clock cycle. The write port stores one word at the
// rising clock edge. The contents are not reset. Holding the configuration in
// memories local to the logic they configure follows the architecture; the write
// port is this design's own.
module adapto_ctx_ram #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 22,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb rdata = mem[raddr];

  // A context address must name a stored context.
  a_waddr: assert property (@(posedge clk) we |-> (32'(waddr) < DEPTH));

endmodule
