// booth_decoder: forms one radix-4 Booth partial product.
//
// A multiplexer driven by the encoder's one/two/zero lines picks x or 2x,
// and the neg line chooses between the true and the complemented ("bar")
// version supplied by complement_generator. zero forces the row to 0 and
// overrides neg (the encoding table sets neg for the 111 group too). For a
// negative multiple the row carries ~m, and the output neg_bit = 1 asks for
// the "+1" that completes the two's complement; it is added at the row's
// least significant position inside the Wallace tree.
//
// Interface: sel (booth_sel_t) plus the four N+1-bit multiples ->
// pp (N+1 bits, two's complement, weight 4^i in the product) and neg_bit.
// Purely combinational. Behaviour follows the design's description of the
// decoder; the neg_bit correction scheme is this implementation's choice.
module booth_decoder
  import booth_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  booth_sel_t sel,
  input  logic [N:0] x1,     // +x
  input  logic [N:0] x2,     // +2x
  input  logic [N:0] x1_n,   // ~x
  input  logic [N:0] x2_n,   // ~2x
  output logic [N:0] pp,     // partial product before the +1 correction
  output logic       neg_bit // +1 correction for a negative multiple
);

  always_comb begin
    priority case (1'b1)
      sel.zero: pp = '0;
      sel.two:  pp = sel.neg ? x2_n : x2;
      sel.one:  pp = sel.neg ? x1_n : x1;
      default:  pp = '0;
    endcase
    neg_bit = sel.neg & ~sel.zero;
  end

endmodule
