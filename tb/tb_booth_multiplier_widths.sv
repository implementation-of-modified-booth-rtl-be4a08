// tb_booth_multiplier_widths: the multiplier at operand widths other than
// the default. N = 4 is checked exhaustively, N = 16 and N = 32 with random
// operands plus the corner pairs (most negative x most negative, -1 x -1,
// most negative x most positive). Products are compared with 64-bit integer
// multiplication of the signed operands.
module tb_booth_multiplier_widths;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] a32, b32;
  logic [63:0] p32;

  booth_multiplier #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  booth_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  booth_multiplier #(.N(32)) dut32 (.a(a32), .b(b32), .p(p32));

  task automatic check_wide();
    longint e32;
    int     e16;
    #1;
    e16 = int'($signed(a16)) * int'($signed(b16));
    e32 = longint'($signed(a32)) * longint'($signed(b32));
    checks += 2;
    if (p16 !== 32'(e16)) begin
      failures++;
      if (failures < 10) $display("FAIL N=16 %0d * %0d -> %0d", $signed(a16), $signed(b16), $signed(p16));
    end
    if (p32 !== 64'(e32)) begin
      failures++;
      if (failures < 10) $display("FAIL N=32 %0d * %0d -> %0d", $signed(a32), $signed(b32), $signed(p32));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 !== 8'(int'($signed(a4)) * int'($signed(b4)))) begin
        failures++;
        $display("FAIL N=4 %0d * %0d -> %0d", $signed(a4), $signed(b4), $signed(p4));
      end
    end
    a16 = 16'h8000; b16 = 16'h8000; a32 = 32'h8000_0000; b32 = 32'h8000_0000; check_wide();
    a16 = 16'hFFFF; b16 = 16'hFFFF; a32 = 32'hFFFF_FFFF; b32 = 32'hFFFF_FFFF; check_wide();
    a16 = 16'h8000; b16 = 16'h7FFF; a32 = 32'h8000_0000; b32 = 32'h7FFF_FFFF; check_wide();
    a16 = 16'h7FFF; b16 = 16'h7FFF; a32 = 32'h7FFF_FFFF; b32 = 32'h7FFF_FFFF; check_wide();
    for (int n = 0; n < 50000; n++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      a32 = $urandom;
      b32 = $urandom;
      check_wide();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
