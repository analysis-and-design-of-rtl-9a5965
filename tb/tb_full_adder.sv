// tb_full_adder: exhaustive self-checking test of the full adder.
// For all eight input combinations, s + 2*co must equal a + b + ci.
`timescale 1ns/1ps
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      total = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != total) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> s=%0b co=%0b", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
