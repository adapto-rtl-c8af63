// tb_adapto_ctx_ram: context memory writes and same-cycle asynchronous reads.
//
// All contexts are written, then read back by address; writes to one context while
// another is being read must not disturb the read, and a written word must be
// visible right after its clock edge.
module tb_adapto_ctx_ram;
  localparam int unsigned D = 8, W = 22;
  logic         clk = 1'b0;
  logic         we;
  logic [2:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;
  int cycles = 0;

  adapto_ctx_ram #(.DEPTH(D), .WIDTH(W)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(logic [2:0] a);
    raddr = a;
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read ctx %0d: %h expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < D; a++) check_read(3'(a));
    for (int t = 0; t < 1000; t++) begin
      logic [2:0] wa, ra;
      @(negedge clk);
      wa = 3'($urandom); ra = 3'($urandom);
      while (ra == wa) ra = 3'($urandom);
      we = 1'b1; waddr = wa; wdata = W'($urandom);
      check_read(ra);                  // unaffected by the pending write
      @(posedge clk); model[wa] = wdata;
      #1;
      we = 1'b0;
      check_read(wa);                  // new word visible after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
