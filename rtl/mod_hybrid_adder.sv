// mod_hybrid_adder: modified hybrid adder, a carry-select adder built from
// modified Kogge-Stone blocks.
//
// The operands are cut into blocks of BLK bits. The lowest block is a single
// mod_ks_adder that receives the real carry-in. Every higher block holds two
// mod_ks_adders working in parallel, one assuming a carry-in of 0 and one
// assuming 1, so all blocks finish their additions at the same time. Once
// the carry out of the block below is known, a pair of 2:1 multiplexers per
// bit picks the right sum bits and the right block carry-out; the carry
// therefore ripples only through one multiplexer per block.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Purely combinational.
//
// Following the design: 2-bit Kogge-Stone blocks (BLK = 2), the lowest block
// added once with the true carry, the others twice, and multiplexers for
// selection; WIDTH defaults to 4, the adder size that is characterised on its
// own. WIDTH must be a multiple of BLK (checked at elaboration). The
// multiplier top instantiates this adder at the product width.
module mod_hybrid_adder #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned BLK   = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NB = WIDTH / BLK;

  if ((WIDTH % BLK) != 0 || BLK < 2) begin : g_bad_width
    $error("mod_hybrid_adder: WIDTH must be a multiple of BLK, BLK >= 2");
  end

  logic [BLK-1:0] s0 [NB];  // block sums assuming carry-in 0 (block 0: true sum)
  logic [BLK-1:0] s1 [NB];  // block sums assuming carry-in 1
  logic [NB-1:0]  co0;      // block carry-outs assuming carry-in 0
  logic [NB-1:0]  co1;      // block carry-outs assuming carry-in 1

  // Lowest block: one adder with the real carry-in.
  mod_ks_adder #(.WIDTH(BLK)) u_blk0 (
    .a   (a[BLK-1:0]),
    .b   (b[BLK-1:0]),
    .cin (cin),
    .sum (s0[0]),
    .cout(co0[0])
  );
  assign s1[0]  = s0[0];
  assign co1[0] = co0[0];

  // Higher blocks: both carry assumptions computed in parallel.
  for (genvar j = 1; j < NB; j++) begin : g_blk
    mod_ks_adder #(.WIDTH(BLK)) u_c0 (
      .a   (a[j*BLK +: BLK]),
      .b   (b[j*BLK +: BLK]),
      .cin (1'b0),
      .sum (s0[j]),
      .cout(co0[j])
    );
    mod_ks_adder #(.WIDTH(BLK)) u_c1 (
      .a   (a[j*BLK +: BLK]),
      .b   (b[j*BLK +: BLK]),
      .cin (1'b1),
      .sum (s1[j]),
      .cout(co1[j])
    );
  end

  // Selection: the carry out of each block drives the multiplexers of the
  // next one.
  always_comb begin
    logic c;
    sum[BLK-1:0] = s0[0];
    c            = co0[0];
    for (int unsigned j = 1; j < NB; j++) begin
      sum[j*BLK +: BLK] = c ? s1[j] : s0[j];
      c                 = c ? co1[j] : co0[j];
    end
    cout = c;
  end

endmodule
