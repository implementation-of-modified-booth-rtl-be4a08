// mod_ks_adder: modified Kogge-Stone parallel-prefix adder with carry-in.
//
// A Kogge-Stone adder works in three stages. Pre-processing forms, per bit,
// generate g = a & b and propagate p = a ^ b. The carry-generation stage is a
// prefix tree: at level k every bit i >= 2^k merges its (G, P) pair with the
// pair 2^k positions below, G = G | (P & G_lower), P = P & P_lower, so after
// ceil(log2 WIDTH) levels G[i] is the carry out of bits 0..i. Post-processing
// XORs each propagate bit with the carry into that bit to give the sum.
//
// The "modified" adder differs only in how the XORs are built: every XOR
// (the propagate signals and the sum bits) is a mux_xor, a 2:1 multiplexer fed
// with an operand and its inverse. The carry-in is folded into bit 0's
// generate (g0 | p0 & cin), which lets the carry-select blocks of the hybrid
// adder evaluate one copy with carry-in 0 and one with carry-in 1.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Purely combinational. WIDTH defaults to 2, the block size used in the
// design's hybrid adders; any WIDTH >= 2 works.
module mod_ks_adder #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  logic [WIDTH-1:0] p;  // bit propagate, a ^ b
  logic [WIDTH-1:0] g;  // bit generate, a & b
  logic [WIDTH-1:0] gp; // group generate after the last prefix level
  logic [WIDTH-1:0] c;  // carry into each bit

  if (WIDTH < 2) begin : g_bad_width
    $error("mod_ks_adder: WIDTH must be at least 2");
  end

  // Pre-processing stage.
  for (genvar i = 0; i < WIDTH; i++) begin : g_pre
    mux_xor u_px (.a(a[i]), .b(b[i]), .y(p[i]), .y_n());
    assign g[i] = a[i] & b[i];
  end

  // Carry-generation stage: Kogge-Stone prefix levels of span 2^k. The
  // carry-in enters as part of bit 0's generate.
  always_comb begin
    logic [WIDTH-1:0] gk, pk, gn, pn;
    gk    = g;
    pk    = p;
    gk[0] = g[0] | (p[0] & cin);
    for (int unsigned k = 0; k < LEVELS; k++) begin
      gn = gk;
      pn = pk;
      for (int unsigned i = (1 << k); i < WIDTH; i++) begin
        gn[i] = gk[i] | (pk[i] & gk[i - (1 << k)]);
        pn[i] = pk[i] & pk[i - (1 << k)];
      end
      gk = gn;
      pk = pn;
    end
    gp = gk;
  end

  // Post-processing stage: carry into bit i is the group generate of bits
  // below it; the sum XORs are multiplexers as well.
  always_comb begin
    c = {gp[WIDTH-2:0], cin};
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_post
    mux_xor u_sx (.a(c[i]), .b(p[i]), .y(sum[i]), .y_n());
  end

  assign cout = gp[WIDTH-1];

endmodule
