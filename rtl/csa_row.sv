// csa_row: one row of full adders, a W-bit 3:2 carry-save adder.
//
// Adds three W-bit rows without propagating carries: each bit position is a
// full adder whose sum stays in place and whose carry moves one position up.
// s + c equals x + y + z modulo 2^W (the carry out of the top bit is
// dropped, which is exact for two's complement rows already sign-extended to
// W bits). Purely combinational; the building block of wallace_tree.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,  // bitwise sums
  output logic [W-1:0] c   // carries, already shifted to their weight
);

  logic [W-2:0] maj;  // full-adder carries of bits 0..W-2

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    c   = {maj, 1'b0};
  end

endmodule
