// adapto_stage: one layer of the ADAPTO array.
//
// An interconnect stripe followed by the row of N_LB logic blocks it feeds, together
// with the context memories that configure both. Each LB cell owns a local memory of
// N_CTX words, each word holding the cell's four program bits and the three line
// numbers of its D1, D2 and D3 columns (4 + 3 x 6 = 22 bits at the default size).
// A 1-bit memory per stage holds the value of the stripe's extra line. The context
// address ctx reads every memory at once, so the whole layer changes function in the
// same cycle its data passes.
//
// Interface: word_in are the lines from above, word_out the LB outputs. Writes: with
// cfg_we, the cell cfg_col of context cfg_ctx gets {cfg_sel_d3, cfg_sel_d2,
// cfg_sel_d1, cfg_lb}; with cfg_line_we, the extra line of context cfg_ctx gets
// cfg_line_val. Both are stored at the rising edge of clk; the data path is
// combinational. The per-cell grouping of the memories and the write port are this
// design's choices; the bit counts per LB follow the architecture.
module adapto_stage
  import adapto_pkg::*;
#(
  parameter int unsigned N_LB  = N_LB_DEF,
  parameter int unsigned N_CTX = N_CTX_DEF,
  parameter int unsigned SEL_W = $clog2(N_LB + 1),
  parameter int unsigned CTX_W = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  parameter int unsigned COL_W = (N_LB > 1) ? $clog2(N_LB) : 1
) (
  input  logic             clk,
  // execution
  input  logic [CTX_W-1:0] ctx,
  input  logic [N_LB-1:0]  word_in,
  output logic [N_LB-1:0]  word_out,
  // configuration write
  input  logic             cfg_we,
  input  logic [CTX_W-1:0] cfg_ctx,
  input  logic [COL_W-1:0] cfg_col,
  input  lb_cfg_t          cfg_lb,
  input  logic [SEL_W-1:0] cfg_sel_d1,
  input  logic [SEL_W-1:0] cfg_sel_d2,
  input  logic [SEL_W-1:0] cfg_sel_d3,
  input  logic             cfg_line_we,
  input  logic             cfg_line_val
);

  localparam int unsigned CELL_W = $bits(lb_cfg_t) + 3 * SEL_W;

  lb_cfg_t          lb_cfg [N_LB];
  logic [SEL_W-1:0] sel_d1 [N_LB];
  logic [SEL_W-1:0] sel_d2 [N_LB];
  logic [SEL_W-1:0] sel_d3 [N_LB];
  logic [N_LB-1:0]  d1, d2, d3;
  logic             extra;

  for (genvar i = 0; i < N_LB; i++) begin : g_cell
    logic [CELL_W-1:0] rd;

    adapto_ctx_ram #(.DEPTH(N_CTX), .WIDTH(CELL_W), .AW(CTX_W)) u_mem (
      .clk  (clk),
      .we   (cfg_we && (cfg_col == COL_W'(i))),
      .waddr(cfg_ctx),
      .wdata({cfg_sel_d3, cfg_sel_d2, cfg_sel_d1, cfg_lb}),
      .raddr(ctx),
      .rdata(rd)
    );

    assign {sel_d3[i], sel_d2[i], sel_d1[i], lb_cfg[i]} = rd;
  end

  adapto_ctx_ram #(.DEPTH(N_CTX), .WIDTH(1), .AW(CTX_W)) u_line_mem (
    .clk  (clk),
    .we   (cfg_line_we),
    .waddr(cfg_ctx),
    .wdata(cfg_line_val),
    .raddr(ctx),
    .rdata(extra)
  );

  adapto_interconnect #(.N_LB(N_LB), .SEL_W(SEL_W)) u_ic (
    .word  (word_in),
    .extra (extra),
    .sel_d1(sel_d1),
    .sel_d2(sel_d2),
    .sel_d3(sel_d3),
    .d1    (d1),
    .d2    (d2),
    .d3    (d3)
  );

  adapto_lb_row #(.N_LB(N_LB)) u_row (
    .cfg(lb_cfg),
    .d1 (d1),
    .d2 (d2),
    .d3 (d3),
    .q  (word_out)
  );

  a_col: assert property (@(posedge clk) cfg_we |-> (32'(cfg_col) < N_LB));

endmodule
