// tb_adapto_ic_column: one interconnect column connects exactly the selected line.
//
// For every code, the selected line is driven to both values with all other lines at
// the opposite value, then with random values; codes beyond the last line read 0.
module tb_adapto_ic_column;
  localparam int unsigned NL = 33;
  logic [NL-1:0] lines;
  logic [5:0]    sel;
  logic          pin;
  int checks = 0, failures = 0;

  adapto_ic_column #(.N_LINES(NL), .SEL_W(6)) dut (.lines(lines), .sel(sel), .pin(pin));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic exp;
    exp = (int'(sel) < NL) ? lines[sel] : 1'b0;
    #1;
    checks++;
    if (pin !== exp) begin
      failures++;
      $display("FAIL sel=%0d lines=%h pin=%b expected %b", sel, lines, pin, exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 64; s++) begin
      sel = 6'(s);
      lines = '1; if (s < NL) lines[s] = 1'b0; check();
      lines = '0; if (s < NL) lines[s] = 1'b1; check();
      for (int t = 0; t < 8; t++) begin
        lines = NL'({$urandom, $urandom});
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
