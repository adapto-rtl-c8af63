// adapto_ru: the ADAPTO reconfigurable unit, top level.
//
// A coprocessor-style unit for bit-level operations that a processor does poorly
// on its native word: packed short adds, bitwise logic on sub-words, shifts by a
// fixed amount, parity networks such as convolutional encoders. Instead of LUTs its
// cells are full adders, each programmed by only four bits, and its interconnect
// stores a 6-bit line number per LB input rather than one bit per switch. Both are
// held for N_CTX contexts in local memories, so a whole new configuration is one
// context address away.
//
// Structure: N_ROWS layers (adapto_stage), each an interconnect stripe of N_LB + 1
// lines followed by a row of N_LB logic blocks with a carry chain. The operand word
// din enters the top stripe; each stripe feeds the row under it from the outputs of
// the row above; the bottom row drives dout. At the defaults (32 LBs, 3 rows) one
// context holds 3 x 32 x 4 = 384 program bits, 3 x 96 x 6 = 1728 line-select bits and
// 3 extra-line bits.
//
// Timing: dout is a combinational function of ctx and din, so selecting a context
// (reconfiguration) and computing with it happen in the same clock cycle, as the
// architecture intends; the processor's pipeline register captures dout. clk only
// clocks the configuration writes: cfg_we stores one LB cell ({cfg_sel_d3,
// cfg_sel_d2, cfg_sel_d1, cfg_lb}) at (cfg_ctx, cfg_row, cfg_col); cfg_line_we stores
// the extra-line value of stripe cfg_row in context cfg_ctx. A context may be written
// while another is executing. Sizes follow the architecture; N_CTX = 8, the single
// operand word feeding the top stripe and the write port are this design's choices.
module adapto_ru
  import adapto_pkg::*;
#(
  parameter int unsigned N_LB   = N_LB_DEF,
  parameter int unsigned N_ROWS = N_ROWS_DEF,
  parameter int unsigned N_CTX  = N_CTX_DEF,
  parameter int unsigned SEL_W  = $clog2(N_LB + 1),
  parameter int unsigned CTX_W  = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  parameter int unsigned COL_W  = (N_LB > 1) ? $clog2(N_LB) : 1,
  parameter int unsigned ROW_W  = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic             clk,
  // configuration write port
  input  logic             cfg_we,
  input  logic [CTX_W-1:0] cfg_ctx,
  input  logic [ROW_W-1:0] cfg_row,
  input  logic [COL_W-1:0] cfg_col,
  input  lb_cfg_t          cfg_lb,
  input  logic [SEL_W-1:0] cfg_sel_d1,
  input  logic [SEL_W-1:0] cfg_sel_d2,
  input  logic [SEL_W-1:0] cfg_sel_d3,
  input  logic             cfg_line_we,
  input  logic             cfg_line_val,
  // execution
  input  logic [CTX_W-1:0] ctx,
  input  logic [N_LB-1:0]  din,
  output logic [N_LB-1:0]  dout
);

  logic [N_LB-1:0] word [N_ROWS+1];

  assign word[0] = din;

  for (genvar r = 0; r < N_ROWS; r++) begin : g_stage
    adapto_stage #(
      .N_LB (N_LB),
      .N_CTX(N_CTX),
      .SEL_W(SEL_W),
      .CTX_W(CTX_W),
      .COL_W(COL_W)
    ) u_stage (
      .clk         (clk),
      .ctx         (ctx),
      .word_in     (word[r]),
      .word_out    (word[r+1]),
      .cfg_we      (cfg_we && (cfg_row == ROW_W'(r))),
      .cfg_ctx     (cfg_ctx),
      .cfg_col     (cfg_col),
      .cfg_lb      (cfg_lb),
      .cfg_sel_d1  (cfg_sel_d1),
      .cfg_sel_d2  (cfg_sel_d2),
      .cfg_sel_d3  (cfg_sel_d3),
      .cfg_line_we (cfg_line_we && (cfg_row == ROW_W'(r))),
      .cfg_line_val(cfg_line_val)
    );
  end

  assign dout = word[N_ROWS];

  a_row: assert property (@(posedge clk) (cfg_we || cfg_line_we) |-> (32'(cfg_row) < N_ROWS));

endmodule
