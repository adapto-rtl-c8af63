// adapto_lb: the ADAPTO logic block (LB).
//
// A full adder surrounded by three programmable selectors: an input multiplexer
// choosing Cin (Co from the previous LB, the program bit P, the data input D3, or 0),
// a selector choosing X (data input D2 or the program bit P), and an output
// multiplexer choosing R or Cout. D1 always drives Y. The input multiplexer and the
// selector share the two select bits S1/S0, as in the published block diagram; the
// four program bits are {S1,S0}, S2 and P.
//
// Which code of S1/S0 picks which source is this design's choice (see
// adapto_pkg::lb_mode_e); with it the block performs every function listed for the
// architecture: ADD (chain or LSB with carry-in P), AND, OR, XOR, XNOR, 3-input XOR,
// majority, PASS and NOT. S2 = 0 selects R.
//
// Timing: purely combinational; cout goes straight to the Co input of the next LB
// (the direct carry chain).
module adapto_lb
  import adapto_pkg::*;
(
  input  lb_cfg_t cfg,
  input  logic    co,    // Cout of the previous LB
  input  logic    d1,
  input  logic    d2,
  input  logic    d3,
  output logic    out,
  output logic    cout
);

  logic x, y, cin, r;

  // input multiplexer (Cin) and selector (X)
  always_comb begin
    y = d1;
    unique case (cfg.mode)
      MODE_CHAIN: begin cin = co;   x = d2;    end
      MODE_CINP:  begin cin = cfg.p; x = d2;   end
      MODE_CIND3: begin cin = d3;   x = d2;    end
      MODE_UNARY: begin cin = 1'b0; x = cfg.p; end
      default:    begin cin = 1'b0; x = d2;    end
    endcase
  end

  adapto_fa u_fa (.x(x), .y(y), .cin(cin), .r(r), .cout(cout));

  // output multiplexer
  always_comb out = (cfg.s2 == OUT_COUT) ? cout : r;

endmodule
