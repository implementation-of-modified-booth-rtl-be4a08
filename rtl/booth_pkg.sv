// booth_pkg: types shared by the radix-4 Booth encoder, decoder and the
// multiplier top.
//
// A radix-4 Booth encoder looks at three overlapping multiplier bits
// (x[2i+1], x[2i], x[2i-1]) and tells the decoder which multiple of the
// multiplicand to use: 0, +-1x or +-2x. The four control lines follow the
// encoding table of the design: neg (subtract), two (use 2x), one (use 1x)
// and zero (partial product is zero). Exactly one of two/one/zero is set.
package booth_pkg;

  // Control word produced by booth_encoder for one partial product.
  typedef struct packed {
    logic neg;   // multiple is negative: use the complemented value plus one
    logic two;   // magnitude is 2 x multiplicand
    logic one;   // magnitude is 1 x multiplicand
    logic zero;  // magnitude is 0
  } booth_sel_t;

endpackage
