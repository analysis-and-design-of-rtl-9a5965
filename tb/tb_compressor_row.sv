// tb_compressor_row: self-checking test of a 16-column row of 4-2 compressors.
//
// Random and corner-case operands (all zeros, all ones, alternating bits).
// Checks, with 64-bit integer arithmetic:
//   - x1 + x2 + x3 + x4 + cin == sum + 2*carry + 2^W*cout;
//   - that toggling the row's cin changes only column 0 (sum[0], carry[0]):
//     the horizontal carry never ripples past one column.
// Counts vectors where horizontal carries were active and fails if none were.
`timescale 1ns/1ps
module tb_compressor_row;
  localparam int unsigned W = 16;
  logic [W-1:0] x1, x2, x3, x4, sum, carry;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int active_links = 0;

  compressor_row dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                               .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] a, b, c, d);
    longint expect_total, got;
    logic [W-1:0] sum0, carry0;
    logic         cout0;
    x1 = a; x2 = b; x3 = c; x4 = d;
    for (int ci = 0; ci < 2; ci++) begin
      cin = 1'(ci);
      #1;
      expect_total = longint'(a) + longint'(b) + longint'(c) + longint'(d) + ci;
      got = longint'(sum) + 2 * longint'(carry) + (longint'(cout) << W);
      checks++;
      if (got != expect_total) begin
        failures++;
        if (failures < 10)
          $display("FAIL sum: %h %h %h %h cin=%0d expect %0d got %0d", a, b, c, d, ci, expect_total, got);
      end
      if (ci == 0) begin
        sum0 = sum; carry0 = carry; cout0 = cout;
      end else begin
        checks++;
        if (sum[W-1:1] != sum0[W-1:1] || carry[W-1:1] != carry0[W-1:1] || cout != cout0) begin
          failures++;
          if (failures < 10) $display("FAIL ripple: %h %h %h %h", a, b, c, d);
        end
      end
    end
    // Horizontal carries present: total exceeds what a carry-free split allows.
    if ((a & b) != 0 || ((a | b) & (c | d)) != 0) active_links++;
  endtask

  initial begin
    apply('0, '0, '0, '0);
    apply('1, '0, '0, '0);
    apply('1, '1, '1, '1);
    apply({(W/2){2'b10}}, {(W/2){2'b01}}, {(W/2){2'b10}}, {(W/2){2'b01}});
    apply({(W/2){2'b10}}, {(W/2){2'b10}}, {(W/2){2'b01}}, '1);
    for (int t = 0; t < 20000; t++) begin
      apply(W'($urandom), W'($urandom), W'($urandom), W'($urandom));
    end
    checks++;
    if (active_links == 0) begin
      failures++;
      $display("FAIL no vector exercised the horizontal carries");
    end
    $display("vectors with horizontal carries: %0d", active_links);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
