// tb_compressor_4_2: exhaustive self-checking test of the 4-2 compressor.
//
// For all 32 input combinations it checks
//   - the defining equation i1+i2+i3+i4+cin = sum + 2*(carry+cout);
//   - that cout does not depend on cin (no carry ripple along a row);
//   - the rows of the general 4-2 compressor truth table: for n set inputs
//     among i1..i4, the fixed (cout, carry) pair wherever the table fixes it,
//     and exactly one of them set where the table leaves the choice open
//     (n = 2);
//   - the sum against the five-input parity.
// It also counts how often each of the two choices for the open n = 2 rows
// is taken and fails if either never occurs.
`timescale 1ns/1ps
module tb_compressor_4_2;
  logic i1, i2, i3, i4, cin;
  logic sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.i1(i1), .i2(i2), .i3(i3), .i4(i4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  // Truth table of a 4-2 compressor, indexed by [cin][n]: {cout, carry};
  // 2'b11 with free set means "exactly one of the two".
  logic [1:0] tt_cc [2][5];
  logic       tt_free [5];
  int neutral_cout = 0, neutral_carry = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: i=%0b%0b%0b%0b cin=%0b -> sum=%0b carry=%0b cout=%0b",
               what, i1, i2, i3, i4, cin, sum, carry, cout);
    end
  endtask

  initial begin
    int n, total;
    logic cout_at_cin0;
    tt_cc[0][0] = 2'b00; tt_cc[0][1] = 2'b00; tt_cc[0][2] = 2'b11;
    tt_cc[0][3] = 2'b10; tt_cc[0][4] = 2'b11;
    tt_cc[1][0] = 2'b00; tt_cc[1][1] = 2'b01; tt_cc[1][2] = 2'b11;
    tt_cc[1][3] = 2'b11; tt_cc[1][4] = 2'b11;
    tt_free = '{0, 0, 1, 0, 0};

    for (int v = 0; v < 16; v++) begin
      {i1, i2, i3, i4} = 4'(v);
      n = int'(i1) + int'(i2) + int'(i3) + int'(i4);
      for (int c = 0; c < 2; c++) begin
        cin = 1'(c);
        total = n + c;
        #1;
        check(int'(sum) + 2 * (int'(carry) + int'(cout)) == total, "equation");
        check(sum == 1'(total % 2), "sum parity");
        if (tt_free[n]) begin
          check((cout ^ carry) == 1'b1, "open row: exactly one of cout/carry");
          if (cout) neutral_cout++;
          if (carry) neutral_carry++;
        end else begin
          check({cout, carry} == tt_cc[c][n], "truth table");
        end
        if (c == 0) cout_at_cin0 = cout;
        else check(cout == cout_at_cin0, "cout independent of cin");
      end
    end
    check(neutral_cout > 0, "open rows resolved as cout at least once");
    check(neutral_carry > 0, "open rows resolved as carry at least once");
    $display("open n=2 rows: cout=%0d carry=%0d", neutral_cout, neutral_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
