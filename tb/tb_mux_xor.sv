// tb_mux_xor: exhaustive check of the multiplexer-based XOR gate.
// Applies all four input pairs and compares y with a ^ b and y_n with its
// inverse. A watchdog ends the run if it hangs.
module tb_mux_xor;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, y, y_n;
  int checks = 0, failures = 0;

  mux_xor dut (.a(a), .b(b), .y(y), .y_n(y_n));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== (a ^ b) || y_n !== ~(a ^ b)) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b y_n=%b", a, b, y, y_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
