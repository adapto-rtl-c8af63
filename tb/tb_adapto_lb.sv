// tb_adapto_lb: every configuration of the logic block against every input pattern.
//
// 16 configurations ({S1,S0}, S2, P) x 16 patterns of (Co, D1, D2, D3); the expected
// outputs come from adapto_tb_pkg::lb_ref, which states the intended function of each
// configuration. A few named functions are also checked directly.
module tb_adapto_lb;
  import adapto_pkg::*;
  import adapto_tb_pkg::*;

  lb_cfg_t cfg;
  logic co, d1, d2, d3, out, cout;
  int checks = 0, failures = 0;

  adapto_lb dut (.cfg(cfg), .co(co), .d1(d1), .d2(d2), .d3(d3), .out(out), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic exp_out, logic exp_cout);
    checks++;
    if (out !== exp_out || cout !== exp_cout) begin
      failures++;
      $display("FAIL %s cfg=%b co=%b d1=%b d2=%b d3=%b: out=%b cout=%b, expected %b %b",
               what, cfg, co, d1, d2, d3, out, cout, exp_out, exp_cout);
    end
  endtask

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int v = 0; v < 16; v++) begin
        logic [1:0] e;
        cfg = lb_cfg_t'(c);
        {co, d1, d2, d3} = 4'(v);
        #1;
        e = lb_ref(cfg, co, d1, d2, d3);
        check("table", e[0], e[1]);
      end
    end
    // named functions of the architecture, written out directly
    for (int v = 0; v < 16; v++) begin
      {co, d1, d2, d3} = 4'(v);
      cfg = '{mode: MODE_CINP,  s2: OUT_COUT, p: 1'b0}; #1; check("AND",  d1 & d2, d1 & d2);
      cfg = '{mode: MODE_CINP,  s2: OUT_COUT, p: 1'b1}; #1; check("OR",   d1 | d2, d1 | d2);
      cfg = '{mode: MODE_CINP,  s2: OUT_R,    p: 1'b0}; #1; check("XOR",  d1 ^ d2, d1 & d2);
      cfg = '{mode: MODE_CIND3, s2: OUT_R,    p: 1'b0}; #1;
      check("XOR3", d1 ^ d2 ^ d3, (d1 & d2) | (d1 & d3) | (d2 & d3));
      cfg = '{mode: MODE_UNARY, s2: OUT_R,    p: 1'b1}; #1; check("NOT",  ~d1, d1);
      cfg = '{mode: MODE_UNARY, s2: OUT_R,    p: 1'b0}; #1; check("PASS", d1, 1'b0);
      cfg = '{mode: MODE_CHAIN, s2: OUT_R,    p: 1'b0}; #1;
      check("ADD",  d1 ^ d2 ^ co, (d1 & d2) | (d1 & co) | (d2 & co));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
