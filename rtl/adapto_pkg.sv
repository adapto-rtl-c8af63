// adapto_pkg: sizes and configuration types shared by the ADAPTO reconfigurable unit.
//
// The array is three rows of 32 full-adder logic blocks (LBs), each row fed by an
// interconnect stripe of 33 lines (32 outputs of the row above plus one extra line
// holding a configured constant). Every LB is programmed by four bits, S1/S0, S2 and
// P, and each of its three data inputs D1..D3 by a 6-bit line number. The sizes
// (32 LBs, 3 rows, 33 lines, 6-bit line numbers, 4 program bits) follow the
// published architecture; the encoding of S1/S0 and the polarity of S2 are this
// design's own choice, documented at lb_mode_e.
package adapto_pkg;

  localparam int unsigned N_LB_DEF   = 32;  // LBs per row
  localparam int unsigned N_ROWS_DEF = 3;   // rows (layers) in the array
  localparam int unsigned N_CTX_DEF  = 8;   // stored contexts (not fixed by the architecture)

  // {S1,S0}: chooses the Cin source (input multiplexer) and the X source (selector)
  // together, as one two-bit code.
  typedef enum logic [1:0] {
    MODE_CHAIN = 2'b00,  // Cin = Co of the previous LB, X = D2   (multibit adder)
    MODE_CINP  = 2'b01,  // Cin = P,                    X = D2   (AND/OR on Cout, XOR/XNOR on R, adder LSB)
    MODE_CIND3 = 2'b10,  // Cin = D3,                   X = D2   (3-input XOR on R, majority on Cout)
    MODE_UNARY = 2'b11   // Cin = 0,                    X = P    (R = D1 xor P: PASS or NOT)
  } lb_mode_e;

  // S2: output multiplexer.
  typedef enum logic {
    OUT_R    = 1'b0,
    OUT_COUT = 1'b1
  } lb_out_e;

  // The four program bits of one LB.
  typedef struct packed {
    lb_mode_e mode;  // {S1,S0}
    lb_out_e  s2;    // S2
    logic     p;     // P
  } lb_cfg_t;

endpackage
