// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder against
// the encoding table, written out here as expected {neg, two, one, zero}
// per 3-bit group, and against the arithmetic meaning of each group
// (multiple = -2*x[2i+1] + x[2i] + x[2i-1]).
module tb_booth_encoder;
  import booth_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0] grp;
  booth_sel_t sel;

  // Expected {neg, two, one, zero} for grp = 0..7.
  localparam logic [3:0] EXP [8] = '{
    4'b0001, 4'b0010, 4'b0010, 4'b0100,
    4'b1100, 4'b1010, 4'b1010, 4'b1001
  };

  booth_encoder dut (.grp(grp), .sel(sel));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int m, mag;
      @(negedge clk);
      grp = 3'(v);
      #1;
      checks++;
      if (sel !== EXP[v]) begin
        failures++;
        $display("FAIL grp=%b sel=%b exp=%b", grp, sel, EXP[v]);
      end
      m   = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      mag = sel.two ? 2 : (sel.one ? 1 : 0);
      checks++;
      if ((sel.neg && !sel.zero ? -mag : mag) != m) begin
        failures++;
        $display("FAIL grp=%b multiple %0d", grp, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
