// adapto_fa: one-bit full adder, the computational element of every ADAPTO logic block.
//
// R = X xor Y xor Cin and Cout = majority(X, Y, Cin), the truth table of the
// architecture. Forcing one input to a constant turns it into a two-input gate:
// with Cin = 0, Cout is X AND Y and R is X XOR Y; with Cin = 1, Cout is X OR Y and R
// is X XNOR Y; with Cin = 0 and Y = 1, R is NOT X. Purely combinational. The
// transistor-level cell is a circuit choice not reproduced here; only its logic
// function is modelled.
module adapto_fa (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic r,
  output logic cout
);

  always_comb begin
    r    = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end

endmodule
