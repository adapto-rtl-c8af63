// tb_adapto_interconnect: a full 33-line stripe with random line selections.
//
// Every pin of the 96 columns must show the line its code names: bit k of the word
// for k < 32, the extra line for 32, 0 for unused codes.
module tb_adapto_interconnect;
  localparam int unsigned N = 32;
  logic [N-1:0] word, d1, d2, d3;
  logic         extra;
  logic [5:0]   s1 [N];
  logic [5:0]   s2 [N];
  logic [5:0]   s3 [N];
  int checks = 0, failures = 0;

  adapto_interconnect #(.N_LB(N), .SEL_W(6)) dut (
    .word(word), .extra(extra), .sel_d1(s1), .sel_d2(s2), .sel_d3(s3),
    .d1(d1), .d2(d2), .d3(d3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic line(logic [5:0] s);
    if (int'(s) < N)       return word[s[4:0]];
    else if (int'(s) == N) return extra;
    else                   return 1'b0;
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] e1, e2, e3;
      word = $urandom; extra = 1'($urandom);
      for (int i = 0; i < N; i++) begin
        // mostly legal codes, sometimes the extra line or an unused code
        s1[i] = 6'($urandom_range(0, 40));
        s2[i] = 6'($urandom_range(0, 33));
        s3[i] = 6'($urandom_range(0, 63));
      end
      #1;
      for (int i = 0; i < N; i++) begin
        e1[i] = line(s1[i]); e2[i] = line(s2[i]); e3[i] = line(s3[i]);
      end
      checks++;
      if ({d1, d2, d3} !== {e1, e2, e3}) begin
        failures++;
        $display("FAIL t=%0d d1=%h/%h d2=%h/%h d3=%h/%h", t, d1, e1, d2, e2, d3, e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
