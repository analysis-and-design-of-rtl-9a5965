// tb_mux2: exhaustive self-checking test of the 2:1 multiplexer cell.
// Drives all eight input combinations and compares y with the data input
// named by sel, taken from a lookup vector built independently of the cell.
`timescale 1ns/1ps
module tb_mux2;
  logic sel, d0, d1, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] data;
    for (int v = 0; v < 8; v++) begin
      {sel, d1, d0} = 3'(v);
      data = {d1, d0};
      #1;
      checks++;
      if (y !== data[sel]) begin
        failures++;
        $display("FAIL sel=%0b d0=%0b d1=%0b y=%0b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
