// tb_pp_gen: exhaustive self-checking test of the partial-product generator.
// For all 65536 operand pairs every bit pp[i][j] is compared with the product
// of multiplier bit i and multiplicand bit j, computed with integer
// arithmetic on the operands.
`timescale 1ns/1ps
module tb_pp_gen;
  localparam int unsigned N = 8;
  logic [N-1:0] multiplier, multiplicand;
  logic [N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_gen dut (.multiplier(multiplier), .multiplicand(multiplicand), .pp(pp));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int m = 0; m < (1 << N); m++) begin
      for (int c = 0; c < (1 << N); c++) begin
        multiplier = N'(m);
        multiplicand = N'(c);
        #1;
        for (int i = 0; i < int'(N); i++) begin
          for (int j = 0; j < int'(N); j++) begin
            expected = ((m / (1 << i)) % 2) * ((c / (1 << j)) % 2);
            checks++;
            if (int'(pp[i][j]) != expected) begin
              failures++;
              if (failures < 10)
                $display("FAIL m=%0d c=%0d pp[%0d][%0d]=%0b", m, c, i, j, pp[i][j]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
