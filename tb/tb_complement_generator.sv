// tb_complement_generator: for every 8-bit multiplicand, checks that the
// four outputs have the signed values x, 2x, -x-1 and -2x-1 (the one's
// complements).
module tb_complement_generator;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] x;
  logic [8:0] x1, x2, x1_n, x2_n;

  complement_generator dut (.x(x), .x1(x1), .x2(x2), .x1_n(x1_n), .x2_n(x2_n));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int xv;
      @(negedge clk);
      x  = 8'(v);
      xv = int'($signed(x));
      #1;
      checks++;
      if (int'($signed(x1)) != xv || int'($signed(x2)) != 2 * xv ||
          int'($signed(x1_n)) != -xv - 1 || int'($signed(x2_n)) != -2 * xv - 1) begin
        failures++;
        $display("FAIL x=%0d: %0d %0d %0d %0d", xv, $signed(x1), $signed(x2),
                 $signed(x1_n), $signed(x2_n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
