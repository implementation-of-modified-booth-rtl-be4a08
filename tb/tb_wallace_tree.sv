// tb_wallace_tree: feeds random rows into the default 5-row, 16-bit tree
// and into a 9-row instance (four layers), and checks that
// sum_row + carry_row equals the sum of the input rows modulo 2^W.
module tb_wallace_tree;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] r5 [5];
  logic [15:0] s5, c5;
  logic [23:0] r9 [9];
  logic [23:0] s9, c9;

  wallace_tree dut5 (.rows(r5), .sum_row(s5), .carry_row(c5));
  wallace_tree #(.ROWS(9), .W(24)) dut9 (.rows(r9), .sum_row(s9), .carry_row(c9));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [15:0] ref5;
      logic [23:0] ref9;
      ref5 = '0;
      ref9 = '0;
      for (int i = 0; i < 5; i++) begin
        r5[i] = (n < 4) ? {16{n[0]}} : 16'($urandom);
        ref5 += r5[i];
      end
      for (int i = 0; i < 9; i++) begin
        r9[i] = (n < 4) ? {24{n[1]}} : 24'($urandom);
        ref9 += r9[i];
      end
      #1;
      checks += 2;
      if (16'(s5 + c5) !== ref5) begin
        failures++;
        if (failures < 10) $display("FAIL 5-row: %h + %h != %h", s5, c5, ref5);
      end
      if (24'(s9 + c9) !== ref9) begin
        failures++;
        if (failures < 10) $display("FAIL 9-row: %h + %h != %h", s9, c9, ref9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
