// tb_booth_decoder: drives the decoder with every valid encoder word (the
// eight Booth groups) and every 8-bit multiplicand, and checks that
// signed(pp) + neg_bit equals the selected multiple of x. The encoder words
// and the multiples are written out here, independently of the RTL.
module tb_booth_decoder;
  import booth_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  booth_sel_t sel;
  logic [8:0] x1, x2, x1_n, x2_n, pp;
  logic       neg_bit;

  // {neg, two, one, zero} and the multiple for Booth groups 0..7.
  localparam logic [3:0] WORD [8] = '{
    4'b0001, 4'b0010, 4'b0010, 4'b0100,
    4'b1100, 4'b1010, 4'b1010, 4'b1001
  };
  localparam int MULT [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  booth_decoder dut (.sel(sel), .x1(x1), .x2(x2), .x1_n(x1_n), .x2_n(x2_n),
                     .pp(pp), .neg_bit(neg_bit));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int v = 0; v < 256; v++) begin
      for (int g = 0; g < 8; g++) begin
        int xv;
        xv   = int'($signed(8'(v)));
        x1   = 9'(xv);
        x2   = 9'(2 * xv);
        x1_n = ~x1;
        x2_n = ~x2;
        sel  = WORD[g];
        #1;
        checks++;
        if (int'($signed(pp)) + int'(neg_bit) != MULT[g] * xv) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d grp=%0d pp=%0d neg=%b", xv, g, $signed(pp), neg_bit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
