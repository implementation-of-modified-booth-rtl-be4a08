// tb_booth_multiplier: end-to-end test of the signed 8x8 Booth / Wallace /
// modified-hybrid-adder multiplier at its default size.
//
// Every one of the 65536 operand pairs is applied and the product compared
// with the integer product of the signed operands. Along the way the test
// counts the mechanisms of the design and fails if one never occurs:
//   - each radix-4 Booth multiple (0 from group 000, -0 from group 111,
//     +x, -x, +2x, -2x) selected by some partial product,
//   - a negation correction bit entering the Wallace tree,
//   - the final adder taking a higher block's carry-in-1 result,
//   - a carry running through all higher blocks of the final adder,
//   - negative and zero products.
// Group counts are worked out from the multiplier bits here; the adder
// carries are worked out from the tree's two output rows with integer
// arithmetic.
module tb_booth_multiplier;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 8;

  int checks = 0, failures = 0;
  int cnt_grp [8];
  int max_run = 0;
  int cnt_negbit = 0, cnt_sel1 = 0, cnt_negprod = 0, cnt_zeroprod = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  booth_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) cnt_grp[i] = 0;
    for (int va = 0; va < (1 << N); va++) begin
      @(negedge clk);
      for (int vb = 0; vb < (1 << N); vb++) begin
        int expv;
        logic [N:0]       bext;
        logic [2*N-1:0]   s_row, c_row;
        logic [2*N:0]     part;
        a = N'(va);
        b = N'(vb);
        #1;
        expv = int'($signed(a)) * int'($signed(b));
        checks++;
        if (p !== (2*N)'(expv)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d",
                                      $signed(a), $signed(b), expv, $signed(p));
        end
        if (expv < 0) cnt_negprod++;
        if (expv == 0) cnt_zeroprod++;
        // Booth groups from the multiplier bits
        bext = {b, 1'b0};
        for (int i = 0; i < N / 2; i++) begin
          int g;
          g = int'(bext[2*i +: 3]);
          cnt_grp[g]++;
          if ((g == 4 || g == 5 || g == 6) && a != 0) cnt_negbit++;
        end
        // carries of the final adder, from the tree output rows
        s_row = dut.wt_sum;
        c_row = dut.wt_carry;
        for (int k = 2; k < 2 * N; k += 2) begin
          part = (2*N+1)'(s_row & (2*N)'((32'd1 << k) - 1)) + (2*N+1)'(c_row & (2*N)'((32'd1 << k) - 1));
          if (part[k]) cnt_sel1++;
        end
        // longest run of blocks that a single carry passes through
        begin
          int run;
          run = 0;
          for (int k = 2; k < 2 * N; k += 2) begin
            part = (2*N+1)'(s_row & (2*N)'((32'd1 << k) - 1)) + (2*N+1)'(c_row & (2*N)'((32'd1 << k) - 1));
            if (part[k] && ((s_row[k +: 2] ^ c_row[k +: 2]) == 2'b11)) run++;
            else if (part[k]) run = 1;
            else run = 0;
            if (run > max_run) max_run = run;
          end
        end
      end
    end
    $display("booth groups 000..111: %0d %0d %0d %0d %0d %0d %0d %0d",
             cnt_grp[0], cnt_grp[1], cnt_grp[2], cnt_grp[3],
             cnt_grp[4], cnt_grp[5], cnt_grp[6], cnt_grp[7]);
    $display("correction bits %0d, carry-in-1 selections %0d, longest carry run %0d blocks",
             cnt_negbit, cnt_sel1, max_run);
    $display("negative products %0d, zero products %0d", cnt_negprod, cnt_zeroprod);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (cnt_grp[i] == 0) begin
        failures++;
        $display("Booth group %0d never seen", i);
      end
    end
    checks += 5;
    if (cnt_negbit == 0)    begin failures++; $display("no correction bit"); end
    if (cnt_sel1 == 0)      begin failures++; $display("no carry-in-1 selection"); end
    if (max_run < N - 1)    begin failures++; $display("no carry through all blocks"); end
    if (cnt_negprod == 0)   begin failures++; $display("no negative product"); end
    if (cnt_zeroprod == 0)  begin failures++; $display("no zero product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
