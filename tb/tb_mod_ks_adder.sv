// tb_mod_ks_adder: checks the modified Kogge-Stone adder against integer
// addition. The default 2-bit block is tested exhaustively (all a, b, cin);
// an 8-bit and a 5-bit instance, which exercise several prefix levels and a
// width that is not a power of two, are tested exhaustively as well.
module tb_mod_ks_adder;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;
  logic       c2, co2;
  logic [7:0] a8, b8, s8;
  logic       c8, co8;
  logic [4:0] a5, b5, s5;
  logic       c5, co5;

  mod_ks_adder dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));
  mod_ks_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));
  mod_ks_adder #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      @(negedge clk);
      {c2, a2, b2} = 5'(v);
      #1;
      checks++;
      if ({co2, s2} !== 3'(a2 + b2 + c2)) begin
        failures++;
        $display("FAIL w2 %0d+%0d+%0d -> %0d", a2, b2, c2, {co2, s2});
      end
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {c8, a8, b8} = 17'(v);
      {c5, a5, b5} = 11'(v);
      #1;
      checks++;
      if ({co8, s8} !== 9'(a8 + b8 + c8)) begin
        failures++;
        if (failures < 10) $display("FAIL w8 %0d+%0d+%0d -> %0d", a8, b8, c8, {co8, s8});
      end
      if (v < (1 << 11)) begin
        checks++;
        if ({co5, s5} !== 6'(a5 + b5 + c5)) begin
          failures++;
          if (failures < 10) $display("FAIL w5 %0d+%0d+%0d -> %0d", a5, b5, c5, {co5, s5});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
