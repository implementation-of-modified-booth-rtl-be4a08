// tb_mod_hybrid_adder: checks the carry-select adder of modified Kogge-Stone
// blocks against integer addition. The default 4-bit adder is tested
// exhaustively; a 16-bit instance (the multiplier's final adder width) is
// tested with random operands plus carry chains that run through every
// block. The test also counts how often a higher block's carry-in-1 copy
// is selected, and fails if that never happens.
module tb_mod_hybrid_adder;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, sel1_4 = 0, sel1_16 = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;

  mod_hybrid_adder dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  mod_hybrid_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  task automatic check16();
    logic [16:0] ref16;
    ref16 = 17'(a16) + 17'(b16) + 17'(c16);
    #1;
    checks++;
    if ({co16, s16} !== ref16) begin
      failures++;
      if (failures < 10) $display("FAIL w16 %h+%h+%b -> %h", a16, b16, c16, {co16, s16});
    end
    // carry into bit 2 (block 1) from integer arithmetic
    if (((a16[1:0] + b16[1:0] + c16) >> 2) != 0) sel1_16++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      @(negedge clk);
      {c4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + c4)) begin
        failures++;
        $display("FAIL w4 %0d+%0d+%0d -> %0d", a4, b4, c4, {co4, s4});
      end
      if (((a4[1:0] + b4[1:0] + c4) >> 2) != 0) sel1_4++;
    end
    // long carry chains: all-ones plus one, through every block
    a16 = 16'hFFFF; b16 = 16'h0000; c16 = 1'b1; check16();
    a16 = 16'hFFFF; b16 = 16'h0001; c16 = 1'b0; check16();
    a16 = 16'hAAAA; b16 = 16'h5555; c16 = 1'b1; check16();
    a16 = 16'h8000; b16 = 16'h8000; c16 = 1'b0; check16();
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      c16 = 1'($urandom);
      check16();
    end
    if (sel1_4 == 0 || sel1_16 == 0) begin
      failures++;
      $display("carry-in-1 block copy never selected");
    end
    $display("carry-in-1 selections: 4-bit %0d, 16-bit %0d", sel1_4, sel1_16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
