// tb_adapto_ru: end-to-end test of the reconfigurable unit at its default size
// (32 LBs per row, 3 rows, 8 contexts).
//
// Eight contexts are programmed through the configuration port with the
// applications the architecture is meant for, each checked against a formula that
// does not look at the array:
//   0, 1  decoding step A & ~(B << C) on 8-bit A and B, for C = 1 and C = 3
//         (din = {16'b0, B, A}); the shift and the PASS of A are done by the
//         interconnect, NOT in row 1, AND in row 2
//   2     union of two 16-pixel monochrome image words (0 = black):
//         NOT both, OR, NOT again (din = {B, A})
//   3     the rate-1/4 DRM / Eureka-147 convolutional encoder (generators 133, 171,
//         145, 133 octal); din[6:0] = shift register A0..A6, dout[2:0] = {B2, B1, B0};
//         row 1 forms the 3-input XOR terms temp0..2 and passes A0, A1, A3
//   4     16-bit addition with carry out on the carry chain (din = {B, A})
//   5     shift left by 1 inserting 1 (extra line = 1), then right by 2 inserting 0
//   6     one LB of each function in turn: AND, OR, XOR, XNOR, 3-input XOR,
//         majority, NOT, PASS
//   7     first an all-zero context, later reprogrammed as decoding with C = 5
//         while the other contexts keep executing
// Each operation is issued in one cycle with a new context and checked within that
// cycle: one operation per clock, reconfiguration included. Every mechanism is
// counted and a mechanism that never occurred counts as a failure.
module tb_adapto_ru;
  import adapto_pkg::*;

  localparam int unsigned N = 32;
  localparam logic [5:0]  XL = 6'd32;   // the extra line

  logic        clk = 1'b0;
  logic        cfg_we, cfg_line_we, cfg_line_val;
  logic [2:0]  cfg_ctx, ctx;
  logic [1:0]  cfg_row;
  logic [4:0]  cfg_col;
  lb_cfg_t     cfg_lb;
  logic [5:0]  cfg_sel_d1, cfg_sel_d2, cfg_sel_d3;
  logic [N-1:0] din, dout;

  int checks = 0, failures = 0, cycles = 0;

  // mechanism counters
  int n_ctx_switch = 0, n_one_cycle_reconf = 0, n_carry_ripple = 0, n_carry_out = 0;
  int n_ins0 = 0, n_ins1 = 0, n_bg_write = 0, n_fn [8];
  int n_decode = 0, n_union = 0, n_conv = 0;

  adapto_ru dut (
    .clk(clk), .cfg_we(cfg_we), .cfg_ctx(cfg_ctx), .cfg_row(cfg_row), .cfg_col(cfg_col),
    .cfg_lb(cfg_lb), .cfg_sel_d1(cfg_sel_d1), .cfg_sel_d2(cfg_sel_d2), .cfg_sel_d3(cfg_sel_d3),
    .cfg_line_we(cfg_line_we), .cfg_line_val(cfg_line_val), .ctx(ctx), .din(din), .dout(dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- configuration
  localparam lb_cfg_t PASS = '{mode: MODE_UNARY, s2: OUT_R,    p: 1'b0};
  localparam lb_cfg_t INV  = '{mode: MODE_UNARY, s2: OUT_R,    p: 1'b1};
  localparam lb_cfg_t AND2 = '{mode: MODE_CINP,  s2: OUT_COUT, p: 1'b0};
  localparam lb_cfg_t OR2  = '{mode: MODE_CINP,  s2: OUT_COUT, p: 1'b1};
  localparam lb_cfg_t XOR2 = '{mode: MODE_CINP,  s2: OUT_R,    p: 1'b0};
  localparam lb_cfg_t XNR2 = '{mode: MODE_CINP,  s2: OUT_R,    p: 1'b1};
  localparam lb_cfg_t XOR3 = '{mode: MODE_CIND3, s2: OUT_R,    p: 1'b0};
  localparam lb_cfg_t MAJ3 = '{mode: MODE_CIND3, s2: OUT_COUT, p: 1'b0};
  localparam lb_cfg_t ADDL = '{mode: MODE_CINP,  s2: OUT_R,    p: 1'b0};
  localparam lb_cfg_t ADDC = '{mode: MODE_CHAIN, s2: OUT_R,    p: 1'b0};

  task automatic wcell(int c, int r, int i, lb_cfg_t f, logic [5:0] s1,
                      logic [5:0] s2 = XL, logic [5:0] s3 = XL);
    @(negedge clk);
    cfg_we = 1'b1; cfg_ctx = 3'(c); cfg_row = 2'(r); cfg_col = 5'(i);
    cfg_lb = f; cfg_sel_d1 = s1; cfg_sel_d2 = s2; cfg_sel_d3 = s3;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic xline(int c, int r, logic v);
    @(negedge clk);
    cfg_line_we = 1'b1; cfg_ctx = 3'(c); cfg_row = 2'(r); cfg_line_val = v;
    @(negedge clk);
    cfg_line_we = 1'b0;
  endtask

  // every LB passes the extra line (0): the context outputs zero
  task automatic clear_ctx(int c);
    for (int r = 0; r < 3; r++) begin
      xline(c, r, 1'b0);
      for (int i = 0; i < N; i++) wcell(c, r, i, PASS, XL);
    end
  endtask

  task automatic prog_decode(int c, int sh);
    clear_ctx(c);
    for (int j = 0; j < 8; j++) begin
      wcell(c, 0, j, PASS, 6'(j));                                  // A
      wcell(c, 0, 8 + j, INV, (j >= sh) ? 6'(8 + j - sh) : XL);     // NOT (B << C), 0 shifted in
      wcell(c, 1, j, AND2, 6'(8 + j), 6'(j));                       // NOT(B<<C) AND A
      wcell(c, 2, j, PASS, 6'(j));
    end
  endtask

  task automatic prog_union(int c);
    clear_ctx(c);
    for (int i = 0; i < N; i++) wcell(c, 0, i, INV, 6'(i));
    for (int j = 0; j < 16; j++) begin
      wcell(c, 1, j, OR2, 6'(j + 16), 6'(j));
      wcell(c, 2, j, INV, 6'(j));
    end
  endtask

  // din[k] = Ak; row 1 LB 0..2 = temp0..2, LB 3..5 pass A0, A1, A3
  task automatic prog_conv(int c);
    clear_ctx(c);
    wcell(c, 0, 0, XOR3, 6'd6, 6'd4, 6'd3);   // temp0 = A6 ^ A4 ^ A3
    wcell(c, 0, 1, XOR3, 6'd6, 6'd5, 6'd4);   // temp1 = A6 ^ A5 ^ A4
    wcell(c, 0, 2, XOR3, 6'd6, 6'd5, 6'd2);   // temp2 = A6 ^ A5 ^ A2
    wcell(c, 0, 3, PASS, 6'd0);               // A0
    wcell(c, 0, 4, PASS, 6'd1);               // A1
    wcell(c, 0, 5, PASS, 6'd3);               // A3
    wcell(c, 1, 0, XOR3, 6'd0, 6'd4, 6'd3);   // B0 = temp0 ^ A1 ^ A0
    wcell(c, 1, 1, XOR3, 6'd1, 6'd5, 6'd3);   // B1 = temp1 ^ A3 ^ A0
    wcell(c, 1, 2, XOR2, 6'd2, 6'd3);         // B2 = temp2 ^ A0
    for (int j = 0; j < 3; j++) wcell(c, 2, j, PASS, 6'(j));
  endtask

  task automatic prog_add(int c);
    clear_ctx(c);
    wcell(c, 0, 0, ADDL, 6'd16, 6'd0);
    for (int j = 1; j < 16; j++) wcell(c, 0, j, ADDC, 6'(j + 16), 6'(j));
    wcell(c, 0, 16, ADDC, XL, XL);            // carry out of bit 15
    for (int j = 0; j < 17; j++) begin
      wcell(c, 1, j, PASS, 6'(j));
      wcell(c, 2, j, PASS, 6'(j));
    end
  endtask

  task automatic prog_shift(int c);
    clear_ctx(c);
    xline(c, 0, 1'b1);
    for (int i = 0; i < N; i++) begin
      wcell(c, 0, i, PASS, (i == 0) ? XL : 6'(i - 1));       // << 1, insert 1
      wcell(c, 1, i, PASS, (i + 2 < N) ? 6'(i + 2) : XL);    // >> 2, insert 0
      wcell(c, 2, i, PASS, 6'(i));
    end
  endtask

  // LB i of row 1: function i % 8 on (D1, D2, D3) = bits i, i+1, i+2 (mod 32)
  task automatic prog_mixed(int c);
    lb_cfg_t fns [8] = '{AND2, OR2, XOR2, XNR2, XOR3, MAJ3, INV, PASS};
    clear_ctx(c);
    for (int i = 0; i < N; i++) begin
      wcell(c, 0, i, fns[i % 8], 6'(i), 6'((i + 1) % N), 6'((i + 2) % N));
      wcell(c, 1, i, PASS, 6'(i));
      wcell(c, 2, i, PASS, 6'(i));
    end
  endtask

  // ---------------------------------------------------------------- reference
  function automatic logic [N-1:0] ref_decode(logic [N-1:0] x, int sh);
    logic [7:0] a, b, bs, q;
    a = x[7:0]; b = x[15:8];
    bs = b << sh;
    q  = a & ~bs;
    return N'(q);
  endfunction

  function automatic logic [N-1:0] ref_union(logic [N-1:0] x);
    logic [15:0] a, b, u;
    a = x[15:0]; b = x[31:16];
    u = ~(~a | ~b);
    return N'(u);
  endfunction

  function automatic logic [N-1:0] ref_conv(logic [N-1:0] x);
    logic [6:0] sr;
    sr = x[6:0];                 // sr[6] = A6 (newest) ... sr[0] = A0 (oldest)
    return N'({^(sr & 7'o145), ^(sr & 7'o171), ^(sr & 7'o133)});
  endfunction

  function automatic logic [N-1:0] ref_add(logic [N-1:0] x);
    return N'(17'(x[15:0]) + 17'(x[31:16]));
  endfunction

  function automatic logic [N-1:0] ref_shift(logic [N-1:0] x);
    return {x[N-2:0], 1'b1} >> 2;
  endfunction

  function automatic logic [N-1:0] ref_mixed(logic [N-1:0] x);
    logic [N-1:0] q;
    for (int i = 0; i < N; i++) begin
      logic a, b, c;
      a = x[i]; b = x[(i + 1) % N]; c = x[(i + 2) % N];
      case (i % 8)
        0: q[i] = a & b;
        1: q[i] = a | b;
        2: q[i] = a ^ b;
        3: q[i] = ~(a ^ b);
        4: q[i] = a ^ b ^ c;
        5: q[i] = (a & b) | (a & c) | (b & c);
        6: q[i] = ~a;
        default: q[i] = a;
      endcase
    end
    return q;
  endfunction

  int ctx7_shift = -1;   // -1: context 7 is the all-zero context

  function automatic logic [N-1:0] expected(int c, logic [N-1:0] x);
    case (c)
      0: return ref_decode(x, 1);
      1: return ref_decode(x, 3);
      2: return ref_union(x);
      3: return ref_conv(x);
      4: return ref_add(x);
      5: return ref_shift(x);
      6: return ref_mixed(x);
      default: return (ctx7_shift < 0) ? '0 : ref_decode(x, ctx7_shift);
    endcase
  endfunction

  // ---------------------------------------------------------------- execution
  logic [2:0] prev_ctx = '0;

  task automatic issue(int c, logic [N-1:0] x);
    @(negedge clk);
    ctx = 3'(c); din = x;
    #1;
    checks++;
    if (dout !== expected(c, x)) begin
      failures++;
      $display("FAIL ctx=%0d din=%h dout=%h expected %h", c, x, dout, expected(c, x));
    end
    if (3'(c) != prev_ctx) begin
      n_ctx_switch++;
      if (dout === expected(c, x)) n_one_cycle_reconf++;
    end
    prev_ctx = 3'(c);
    case (c)
      0, 1: begin n_decode++; if (x[15:8] != 0) n_ins0++; n_fn[0]++; n_fn[6]++; n_fn[7]++; end
      2: n_union++;
      3: n_conv++;
      4: begin
           logic [16:0] s;
           s = 17'(x[15:0]) + 17'(x[31:16]);
           if (((s[15:0] ^ x[15:0] ^ x[31:16]) & 16'hfffe) != 0) n_carry_ripple++;
           if (s[16]) n_carry_out++;
         end
      5: begin n_ins1++; n_ins0++; end
      6: for (int f = 0; f < 8; f++) n_fn[f]++;
      default: ;
    endcase
  endtask

  // convolutional encoding of a bit stream: the shift register lives outside the
  // array (in a processor register); the array produces B0..B2 per input bit
  task automatic encode_stream(int nbits);
    logic [6:0] sr = '0;
    for (int t = 0; t < nbits; t++) begin
      sr = {1'($urandom), sr[6:1]};     // new bit enters as A6, A0 is the oldest
      issue(3, N'(sr));
    end
  endtask

  task automatic require(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("  %-34s %0d", what, n);
  endtask

  initial begin
    int t0;
    foreach (n_fn[f]) n_fn[f] = 0;
    cfg_we = 1'b0; cfg_line_we = 1'b0; cfg_ctx = '0; cfg_row = '0; cfg_col = '0;
    cfg_lb = '0; cfg_sel_d1 = '0; cfg_sel_d2 = '0; cfg_sel_d3 = '0; cfg_line_val = 1'b0;
    ctx = '0; din = '0;

    prog_decode(0, 1);
    prog_decode(1, 3);
    prog_union(2);
    prog_conv(3);
    prog_add(4);
    prog_shift(5);
    prog_mixed(6);
    clear_ctx(7);

    // directed cases
    issue(4, {16'h0001, 16'hffff});               // carry through all 16 bits and out
    issue(0, {16'h0, 8'hff, 8'hff});
    issue(2, 32'h0ff0_f00f);
    issue(7, 32'hdead_beef);

    // every context in turn, one operation per cycle
    t0 = cycles;
    for (int t = 0; t < 4000; t++) issue(int'($urandom_range(0, 7)), $urandom);
    if (cycles - t0 != 4000) begin
      failures++;
      $display("FAIL throughput: 4000 operations took %0d cycles", cycles - t0);
    end
    checks++;

    encode_stream(500);

    // reprogram context 7 while the others execute: interleave one configuration
    // write with one operation from another context
    begin
      lb_cfg_t f;
      logic [5:0] s1, s2;
      for (int r = 0; r < 3; r++) begin
        for (int i = 0; i < N; i++) begin
          f = PASS; s1 = XL; s2 = XL;
          if (r == 0 && i < 8)              begin f = PASS; s1 = 6'(i); end
          if (r == 0 && i >= 8 && i < 16)   begin f = INV;  s1 = (i - 8 >= 5) ? 6'(i - 5) : XL; end
          if (r == 1 && i < 8)              begin f = AND2; s1 = 6'(8 + i); s2 = 6'(i); end
          if (r == 2 && i < 8)              begin f = PASS; s1 = 6'(i); end
          @(negedge clk);
          cfg_we = 1'b1; cfg_ctx = 3'd7; cfg_row = 2'(r); cfg_col = 5'(i);
          cfg_lb = f; cfg_sel_d1 = s1; cfg_sel_d2 = s2; cfg_sel_d3 = XL;
          ctx = 3'($urandom_range(0, 6)); din = $urandom;
          #1;
          checks++;
          if (dout !== expected(int'(ctx), din)) begin
            failures++;
            $display("FAIL during background write: ctx=%0d din=%h dout=%h", ctx, din, dout);
          end
          n_bg_write++;
        end
      end
      @(negedge clk) cfg_we = 1'b0;
      ctx7_shift = 5;
    end
    for (int t = 0; t < 1000; t++) issue(int'($urandom_range(0, 7)), $urandom);

    $display("mechanisms:");
    require("context switches", n_ctx_switch);
    require("correct in the switching cycle", n_one_cycle_reconf);
    require("carry rippled along the chain", n_carry_ripple);
    require("carry out of a 16-bit add", n_carry_out);
    require("shift with 0 inserted", n_ins0);
    require("shift with 1 inserted", n_ins1);
    require("writes while executing", n_bg_write);
    require("decoding A & ~(B<<C)", n_decode);
    require("image union", n_union);
    require("convolutional encoder bits", n_conv);
    require("LB as AND", n_fn[0]);
    require("LB as OR", n_fn[1]);
    require("LB as XOR", n_fn[2]);
    require("LB as XNOR", n_fn[3]);
    require("LB as 3-input XOR", n_fn[4]);
    require("LB as majority", n_fn[5]);
    require("LB as NOT", n_fn[6]);
    require("LB as PASS", n_fn[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
