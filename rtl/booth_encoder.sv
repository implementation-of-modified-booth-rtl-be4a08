// booth_encoder: radix-4 (modified) Booth encoder for one partial product.
//
// The multiplier is scanned in overlapping groups of three bits,
// grp = {x[2i+1], x[2i], x[2i-1]} with x[-1] = 0, which halves the number of
// partial products compared with one per multiplier bit. Each group selects a
// multiple of the multiplicand from {-2, -1, 0, +1, +2}:
//
//   grp  multiple  neg two one zero
//   000     +0      0   0   0   1
//   001     +x      0   0   1   0
//   010     +x      0   0   1   0
//   011    +2x      0   1   0   0
//   100    -2x      1   1   0   0
//   101     -x      1   0   1   0
//   110     -x      1   0   1   0
//   111     -0      1   0   0   1
//
// The table is the design's own; in the 111 row neg is set together with
// zero, so the decoder must let zero win (see booth_decoder).
// Purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  grp,  // {x[2i+1], x[2i], x[2i-1]}
  output booth_sel_t  sel   // neg / two / one / zero controls
);

  always_comb begin
    sel.neg  = grp[2];
    sel.one  = grp[1] ^ grp[0];
    sel.two  = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    sel.zero = (grp[2] & grp[1] & grp[0]) | ~(grp[2] | grp[1] | grp[0]);
  end

endmodule
