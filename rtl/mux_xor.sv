// mux_xor: two-input XOR built from one 2:1 multiplexer.
//
// The multiplexer's two data inputs carry the operand a in true and in
// inverted form, and the other operand b drives the select line, so the
// output is a when b = 0 and ~a when b = 1, i.e. a ^ b. Because the true and
// the inverted operand are both present, the same structure gives the
// complementary output (XNOR) for free by swapping the data inputs; both are
// brought out. This gate replaces every XOR in the modified Kogge-Stone
// adder. Purely combinational, no clock.
//
// The mux construction follows the design; bringing out y_n as a port is the
// natural reading of "true and complementary outputs".
module mux_xor (
  input  logic a,    // data operand, applied true and inverted to the mux
  input  logic b,    // select operand
  output logic y,    // a ^ b
  output logic y_n   // ~(a ^ b)
);

  logic a_n;
  assign a_n = ~a;

  // 2:1 multiplexers: select b picks between the true and inverted operand.
  always_comb begin
    y   = b ? a_n : a;
    y_n = b ? a   : a_n;
  end

endmodule
