// tb_adapto_line_decoder: all 64 codes of the 6-bit line number.
module tb_adapto_line_decoder;
  localparam int unsigned NL = 33;
  logic [5:0]    sel;
  logic [NL-1:0] en;
  int checks = 0, failures = 0;

  adapto_line_decoder #(.N_LINES(NL), .SEL_W(6)) dut (.sel(sel), .en(en));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 64; s++) begin
      logic [NL-1:0] exp;
      sel = 6'(s);
      exp = (s < NL) ? (NL'(1) << s) : '0;
      #1;
      checks++;
      if (en !== exp) begin
        failures++;
        $display("FAIL sel=%0d en=%h expected %h", s, en, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
