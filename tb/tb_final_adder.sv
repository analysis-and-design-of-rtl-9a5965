// tb_final_adder: self-checking test of the 16-bit full-adder chain.
// Random and corner-case operands with both carry-in values; compares
// {cout, sum} with a + b + cin computed in integer arithmetic. Counts a
// full-length carry propagation (0xFFFF + 0 + 1) and fails if it never ran.
`timescale 1ns/1ps
module tb_final_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int full_ripples = 0;

  final_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, y, input logic c);
    longint expect_v, got;
    a = x; b = y; cin = c;
    #1;
    expect_v = longint'(x) + longint'(y) + longint'(c);
    got = (longint'(cout) << W) + longint'(sum);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0b: expect %h got %h", x, y, c, expect_v, got);
    end
    if (x == '1 && y == '0 && c && got == (longint'(1) << W)) full_ripples++;
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply({(W/2){2'b10}}, {(W/2){2'b01}}, 1'b1);
    for (int t = 0; t < 20000; t++) apply(W'($urandom), W'($urandom), 1'($urandom));
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL full-length carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
