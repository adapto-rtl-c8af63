// tb_adapto_lb_row: a full row of logic blocks.
//
// First the row is set up as a 32-bit ripple-carry adder (LSB with Cin = P = 0, the
// rest chained) and checked against integer addition, then as a subtractor (LSB
// with Cin = P = 1 and the subtrahend inverted by the caller). Then random
// configurations and data are checked LB by LB against adapto_tb_pkg::lb_ref with the
// carry passed along the row.
module tb_adapto_lb_row;
  import adapto_pkg::*;
  import adapto_tb_pkg::*;

  localparam int unsigned N = 32;

  lb_cfg_t       cfg [N];
  logic [N-1:0]  d1, d2, d3, q;
  int checks = 0, failures = 0;

  adapto_lb_row #(.N_LB(N)) dut (.cfg(cfg), .d1(d1), .d2(d2), .d3(d3), .q(q));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [N-1:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    // adder
    for (int i = 0; i < N; i++)
      cfg[i] = '{mode: (i == 0) ? MODE_CINP : MODE_CHAIN, s2: OUT_R, p: 1'b0};
    for (int t = 0; t < 200; t++) begin
      d1 = $urandom; d2 = $urandom; d3 = $urandom;
      if (t == 0) begin d1 = '1; d2 = 1; end     // full-length carry ripple
      #1;
      check("add", d1 + d2);
    end
    // subtractor: d2 - x = d2 + ~x + 1
    cfg[0].p = 1'b1;
    for (int t = 0; t < 100; t++) begin
      logic [N-1:0] x;
      x = $urandom; d2 = $urandom; d1 = ~x; d3 = $urandom;
      #1;
      check("sub", d2 - x);
    end
    // random configurations
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] exp;
      logic         c;
      for (int i = 0; i < N; i++) cfg[i] = lb_cfg_t'($urandom);
      d1 = $urandom; d2 = $urandom; d3 = $urandom;
      #1;
      c = 1'b0;
      for (int i = 0; i < N; i++) begin
        logic [1:0] e;
        e = lb_ref(cfg[i], c, d1[i], d2[i], d3[i]);
        exp[i] = e[0];
        c = e[1];
      end
      check("random", exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
