// tb_adapto_fa: exhaustive check of the full adder against integer addition.
module tb_adapto_fa;
  logic x, y, cin, r, cout;
  int checks = 0, failures = 0;

  adapto_fa dut (.x(x), .y(y), .cin(cin), .r(r), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, x, y} = 3'(v);
      #1;
      checks++;
      if ({cout, r} !== 2'(x) + 2'(y) + 2'(cin)) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b -> cout=%b r=%b", x, y, cin, cout, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
