// tb_xor_xnor2: exhaustive self-checking test of the two-output XOR/XNOR cell.
// For each of the four input pairs, x must be the parity of the number of
// set inputs and xn its complement.
`timescale 1ns/1ps
module tb_xor_xnor2;
  logic a, b, x, xn;
  int checks = 0, failures = 0;

  xor_xnor2 dut (.a(a), .b(b), .x(x), .xn(xn));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      ones = int'(a) + int'(b);
      #1;
      checks += 2;
      if (x !== (ones == 1)) begin
        failures++;
        $display("FAIL x: a=%0b b=%0b x=%0b", a, b, x);
      end
      if (xn !== (ones != 1)) begin
        failures++;
        $display("FAIL xn: a=%0b b=%0b xn=%0b", a, b, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
