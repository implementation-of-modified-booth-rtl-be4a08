// booth_multiplier: N x N signed multiplier built from a radix-4 (modified)
// Booth front end, a Wallace tree and a modified hybrid final adder.
//
// Data flow, all combinational:
//   1. complement_generator forms x, 2x, ~x and ~2x of the multiplicand a.
//   2. N/2 booth_encoders scan the multiplier b in overlapping 3-bit groups
//      {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0) and N/2 booth_decoders select
//      one of 0, +-x, +-2x for each group, giving N/2 partial products of
//      N+1 bits instead of N.
//   3. Each partial product i is sign-extended to 2N bits and shifted left by
//      2i. The "+1" corrections of the negative partial products (neg_bit of
//      decoder i at bit 2i) form one more row, so the tree gets N/2 + 1 rows.
//   4. wallace_tree compresses these rows to a sum row and a carry row.
//   5. mod_hybrid_adder (carry-select adder of 2-bit modified Kogge-Stone
//      blocks) adds the two rows into the 2N-bit product.
//
// Interface: a (multiplicand), b (multiplier), both N-bit two's complement
// -> p = a * b, 2N bits, two's complement. No clock: the product is valid
// one combinational delay after the operands change.
//
// The architecture (Booth encoder, decoder, complement generator, Wallace
// tree, modified hybrid final adder) follows the design. The operand width
// N = 8, full sign extension of the partial products and the separate
// correction row are this implementation's choices. N must be even.
module booth_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,  // multiplicand, signed
  input  logic [N-1:0]   b,  // multiplier, signed
  output logic [2*N-1:0] p   // product a * b, signed
);

  localparam int unsigned NPP  = N / 2;   // Booth partial products
  localparam int unsigned ROWS = NPP + 1; // plus the correction row
  localparam int unsigned PW   = 2 * N;   // product width

  if ((N % 2) != 0 || N < 4) begin : g_bad_n
    $error("booth_multiplier: N must be even and at least 4");
  end

  // Complement generator.
  logic [N:0] x1, x2, x1_n, x2_n;

  complement_generator #(.N(N)) u_cgen (
    .x   (a),
    .x1  (x1),
    .x2  (x2),
    .x1_n(x1_n),
    .x2_n(x2_n)
  );

  // Booth encoders and decoders.
  logic [N:0]     b_ext;            // {b, 0}: b[-1] = 0 at bit 0
  booth_sel_t     sel [NPP];
  logic [N:0]     pp  [NPP];
  logic [NPP-1:0] neg;

  assign b_ext = {b, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_encoder u_enc (
      .grp(b_ext[2*i +: 3]),
      .sel(sel[i])
    );
    booth_decoder #(.N(N)) u_dec (
      .sel    (sel[i]),
      .x1     (x1),
      .x2     (x2),
      .x1_n   (x1_n),
      .x2_n   (x2_n),
      .pp     (pp[i]),
      .neg_bit(neg[i])
    );
  end

  // Partial-product array: sign-extended, shifted rows plus correction row.
  logic [PW-1:0] rows [ROWS];

  always_comb begin
    for (int unsigned i = 0; i < NPP; i++) begin
      rows[i] = PW'({{(PW-N-1){pp[i][N]}}, pp[i]}) << (2 * i);
    end
    rows[NPP] = '0;
    for (int unsigned i = 0; i < NPP; i++) begin
      rows[NPP][2*i] = neg[i];
    end
  end

  // Wallace tree.
  logic [PW-1:0] wt_sum, wt_carry;

  wallace_tree #(.ROWS(ROWS), .W(PW)) u_tree (
    .rows     (rows),
    .sum_row  (wt_sum),
    .carry_row(wt_carry)
  );

  // Final addition with the modified hybrid adder; the carry out of the top
  // bit lies beyond the product width and is dropped.
  logic fadd_cout;

  mod_hybrid_adder #(.WIDTH(PW), .BLK(2)) u_fadd (
    .a   (wt_sum),
    .b   (wt_carry),
    .cin (1'b0),
    .sum (p),
    .cout(fadd_cout)
  );

endmodule
