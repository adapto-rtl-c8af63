// adapto_tb_pkg: reference model of one logic block for the ADAPTO testbenches.
//
// The model is written from the functions each configuration is meant to perform
// (adder with chained carry, AND, OR, XOR, XNOR, 3-input XOR, majority, PASS, NOT),
// not from the multiplexer structure of the RTL, so that a wrong selector coding or
// a wrong adder shows up as a mismatch.
package adapto_tb_pkg;
  import adapto_pkg::*;

  // Returns {cout, out} of an LB with configuration c.
  function automatic logic [1:0] lb_ref(lb_cfg_t c, logic co, logic d1, logic d2, logic d3);
    logic [1:0] sum;
    logic       r, k;
    case (c.mode)
      MODE_CHAIN: begin sum = 2'(d2) + 2'(d1) + 2'(co); r = sum[0]; k = sum[1]; end
      MODE_CINP:  begin
                    r = c.p ? ~(d2 ^ d1) : (d2 ^ d1);       // XNOR / XOR
                    k = c.p ? (d2 | d1)  : (d2 & d1);       // OR / AND
                  end
      MODE_CIND3: begin
                    r = ^{d1, d2, d3};                       // 3-input XOR
                    k = (32'(d1) + 32'(d2) + 32'(d3)) >= 2;  // majority
                  end
      default:    begin r = c.p ? ~d1 : d1; k = c.p & d1; end // NOT / PASS
    endcase
    return {k, (c.s2 == OUT_COUT) ? k : r};
  endfunction

endpackage
