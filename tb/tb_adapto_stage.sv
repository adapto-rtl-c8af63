// tb_adapto_stage: one array layer with its context memories.
//
// Random configurations (program bits, line numbers, extra-line value) are written to
// every context; then contexts and input words are changed every cycle and each
// output word is compared with a model built from the line selection rule and
// adapto_tb_pkg::lb_ref with the carry passed along the row. One context is rewritten
// in the middle while others execute.
module tb_adapto_stage;
  import adapto_pkg::*;
  import adapto_tb_pkg::*;

  localparam int unsigned N = 32, C = 4;

  logic         clk = 1'b0;
  logic [1:0]   ctx, cfg_ctx;
  logic [N-1:0] word_in, word_out;
  logic         cfg_we, cfg_line_we, cfg_line_val;
  logic [4:0]   cfg_col;
  lb_cfg_t      cfg_lb;
  logic [5:0]   cfg_sel_d1, cfg_sel_d2, cfg_sel_d3;

  lb_cfg_t    m_lb  [C][N];
  logic [5:0] m_s1  [C][N];
  logic [5:0] m_s2  [C][N];
  logic [5:0] m_s3  [C][N];
  logic       m_ext [C];

  int checks = 0, failures = 0, cycles = 0;

  adapto_stage #(.N_LB(N), .N_CTX(C)) dut (
    .clk(clk), .ctx(ctx), .word_in(word_in), .word_out(word_out),
    .cfg_we(cfg_we), .cfg_ctx(cfg_ctx), .cfg_col(cfg_col), .cfg_lb(cfg_lb),
    .cfg_sel_d1(cfg_sel_d1), .cfg_sel_d2(cfg_sel_d2), .cfg_sel_d3(cfg_sel_d3),
    .cfg_line_we(cfg_line_we), .cfg_line_val(cfg_line_val));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic line(logic [N-1:0] w, logic e, logic [5:0] s);
    if (int'(s) < N)       return w[s[4:0]];
    else if (int'(s) == N) return e;
    else                   return 1'b0;
  endfunction

  function automatic logic [N-1:0] model(int c, logic [N-1:0] w);
    logic [N-1:0] q;
    logic         k;
    k = 1'b0;
    for (int i = 0; i < N; i++) begin
      logic [1:0] e;
      e = lb_ref(m_lb[c][i], k, line(w, m_ext[c], m_s1[c][i]),
                 line(w, m_ext[c], m_s2[c][i]), line(w, m_ext[c], m_s3[c][i]));
      q[i] = e[0];
      k    = e[1];
    end
    return q;
  endfunction

  // write a random configuration for one cell (at the next rising edge)
  task automatic write_cell(int c, int i);
    @(negedge clk);
    cfg_we = 1'b1; cfg_ctx = 2'(c); cfg_col = 5'(i);
    cfg_lb = lb_cfg_t'($urandom);
    cfg_sel_d1 = 6'($urandom_range(0, N)); cfg_sel_d2 = 6'($urandom_range(0, N));
    cfg_sel_d3 = 6'($urandom_range(0, N));
    m_lb[c][i] = cfg_lb; m_s1[c][i] = cfg_sel_d1; m_s2[c][i] = cfg_sel_d2; m_s3[c][i] = cfg_sel_d3;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic write_line(int c, logic v);
    @(negedge clk);
    cfg_line_we = 1'b1; cfg_ctx = 2'(c); cfg_line_val = v; m_ext[c] = v;
    @(negedge clk);
    cfg_line_we = 1'b0;
  endtask

  task automatic run(int n);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      ctx = 2'($urandom); word_in = $urandom;
      #1;
      checks++;
      if (word_out !== model(int'(ctx), word_in)) begin
        failures++;
        $display("FAIL ctx=%0d in=%h out=%h expected %h", ctx, word_in, word_out,
                 model(int'(ctx), word_in));
      end
    end
  endtask

  initial begin
    cfg_we = 1'b0; cfg_line_we = 1'b0; cfg_ctx = '0; cfg_col = '0; cfg_lb = '0;
    cfg_sel_d1 = '0; cfg_sel_d2 = '0; cfg_sel_d3 = '0; cfg_line_val = 1'b0;
    ctx = '0; word_in = '0;
    for (int c = 0; c < C; c++) begin
      for (int i = 0; i < N; i++) write_cell(c, i);
      write_line(c, 1'($urandom));
    end
    run(1000);
    for (int i = 0; i < N; i++) write_cell(2, i);
    write_line(2, ~m_ext[2]);
    run(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
