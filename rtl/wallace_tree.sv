// wallace_tree: reduces ROWS partial-product rows to one sum and one carry
// row with layers of carry-save adders.
//
// Every layer groups the rows it receives in threes; each group goes through
// a csa_row (W full adders), which turns three rows into two, and the one or
// two rows left over pass to the next layer unchanged. All groups of a layer
// work in parallel, so the depth is the number of layers,
// about log_{3/2}(ROWS / 2), rather than ROWS - 2. Reduction stops when two
// rows remain: sum_row + carry_row equals the sum of all input rows modulo
// 2^W, and a fast carry-propagate adder finishes the job.
//
// Interface: rows[ROWS] (W bits each) -> sum_row, carry_row (W bits).
// Purely combinational. The Wallace tree and its carry-save adders come from
// the design; reducing whole rows (each already sign-extended to W bits)
// rather than individual bit columns is this implementation's choice. The
// defaults (5 rows of 16 bits) fit the 8x8 multiplier: four Booth partial
// products and one row of negation correction bits.
module wallace_tree #(
  parameter int unsigned ROWS = 5,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  // Rows left after one layer of 3:2 compression.
  function automatic int unsigned next_rows(int unsigned n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  // Rows entering layer k.
  function automatic int unsigned rows_at(int unsigned k);
    int unsigned n = ROWS;
    for (int unsigned i = 0; i < k; i++) n = next_rows(n);
    return n;
  endfunction

  // Number of layers needed to reach two rows.
  function automatic int unsigned num_layers();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  for (genvar k = 0; k < LAYERS; k++) begin : g_layer
    localparam int unsigned NIN  = rows_at(k);
    localparam int unsigned NOUT = next_rows(NIN);
    localparam int unsigned NGRP = NIN / 3;

    logic [W-1:0] in_r  [NIN];
    logic [W-1:0] out_r [NOUT];

    if (k == 0) begin : g_first
      assign in_r = rows;
    end else begin : g_next
      assign in_r = g_layer[k-1].out_r;
    end

    for (genvar g = 0; g < NGRP; g++) begin : g_csa
      csa_row #(.W(W)) u_csa (
        .x(in_r[3*g]),
        .y(in_r[3*g+1]),
        .z(in_r[3*g+2]),
        .s(out_r[2*g]),
        .c(out_r[2*g+1])
      );
    end

    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign out_r[2*NGRP + r] = in_r[3*NGRP + r];
    end
  end

  if (LAYERS == 0) begin : g_no_layer
    assign sum_row = rows[0];
    if (ROWS > 1) begin : g_two
      assign carry_row = rows[1];
    end else begin : g_one
      assign carry_row = '0;
    end
  end else begin : g_out
    assign sum_row   = g_layer[LAYERS-1].out_r[0];
    assign carry_row = g_layer[LAYERS-1].out_r[1];
  end

endmodule
