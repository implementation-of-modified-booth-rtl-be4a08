// complement_generator: true and complemented multiples of the multiplicand.
//
// Signed (two's complement) Booth multiplication needs -x and -2x as well as
// x and 2x. This block forms, once for all partial products, the N+1-bit
// sign-extended multiplicand x1 = x and the doubled multiplicand x2 = 2x
// (a one-bit left shift), together with their bitwise complements x1_n and
// x2_n ("bar" values). A negative multiple is then the bar value plus one;
// the "+1" is not added here but travels as a separate correction bit from
// the decoder into the Wallace tree, so no carry chain is needed here.
//
// Interface: x (N bits, signed) -> x1, x2, x1_n, x2_n (N+1 bits each).
// Purely combinational. The block's role follows the design; the split into
// one's complement here and a correction bit later is this implementation's
// choice.
module complement_generator #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,     // multiplicand, two's complement
  output logic [N:0]   x1,    // +x, sign-extended to N+1 bits
  output logic [N:0]   x2,    // +2x
  output logic [N:0]   x1_n,  // ~x1
  output logic [N:0]   x2_n   // ~x2
);

  always_comb begin
    x1   = {x[N-1], x};
    x2   = {x, 1'b0};
    x1_n = ~x1;
    x2_n = ~x2;
  end

endmodule
