// tb_mult8x8: end-to-end, full-size self-checking test of the 8x8 multiplier.
//
// A 500 MHz clock (2 ns period) paces the test: a new operand pair is applied
// just after each rising edge and the product is checked at the next rising
// edge, i.e. the multiplier must deliver one product per 2 ns cycle with no
// pipeline latency. All 65536 operand pairs are applied, each compared with
// the integer product.
//
// It also counts how often each mechanism of the design was active and fails
// if one never was:
//   - horizontal carries (cout -> cin) inside each first-level compressor row;
//   - horizontal carries inside the second-level compressor row;
//   - carries propagating in the final full-adder chain;
//   - a product that needs all 16 bits.
// A cycle-count watchdog ends the run if it hangs.
`timescale 1ns/1ps
module tb_mult8x8;
  import mult_pkg::*;

  localparam int unsigned N = OPERAND_W;
  localparam int unsigned CYCLES_MAX = (1 << (2 * N)) + 100;

  logic clk = 1'b0;
  logic [N-1:0]           multiplier, multiplicand;
  logic [PRODUCT_W-1:0]   product;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_lvl1_links [2] = '{0, 0};
  int n_lvl2_links = 0, n_fadd_carries = 0, n_full_width = 0;

  always #1 clk = ~clk;  // 2 ns period, 500 MHz

  mult8x8 dut (.multiplier(multiplier), .multiplicand(multiplicand), .product(product));

  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles >= int'(CYCLES_MAX));
    failures++;
    $display("watchdog expired after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail_if(input bit bad, input string what);
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int expected, start_cycle;
    multiplier = '0;
    multiplicand = '0;
    @(posedge clk);
    start_cycle = cycles;
    for (int m = 0; m < (1 << N); m++) begin
      for (int c = 0; c < (1 << N); c++) begin
        #0.1;
        multiplier = N'(m);
        multiplicand = N'(c);
        @(posedge clk);
        expected = m * c;
        checks++;
        if (int'(product) != expected) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: expect %0d got %0d", m, c, expected, product);
        end
        if (dut.g_lvl1[0].u_row.h[ROW1_W-1:1] != '0) n_lvl1_links[0]++;
        if (dut.g_lvl1[1].u_row.h[ROW1_W-1:1] != '0) n_lvl1_links[1]++;
        if (dut.u_lvl2.h[ROW2_W-1:1] != '0) n_lvl2_links++;
        if (dut.u_fadd.c[PRODUCT_W-1:1] != '0) n_fadd_carries++;
        if (product[PRODUCT_W-1]) n_full_width++;
      end
    end
    // One product per clock: the whole sweep took exactly one cycle per pair.
    fail_if(cycles - start_cycle != (1 << (2 * N)), "one product per 2 ns cycle");
    fail_if(n_lvl1_links[0] == 0, "first-level row 0 horizontal carries never active");
    fail_if(n_lvl1_links[1] == 0, "first-level row 1 horizontal carries never active");
    fail_if(n_lvl2_links == 0, "second-level horizontal carries never active");
    fail_if(n_fadd_carries == 0, "final adder carries never active");
    fail_if(n_full_width == 0, "no product used bit 15");
    $display("mechanisms: lvl1 row0 links=%0d row1 links=%0d lvl2 links=%0d final-adder carries=%0d 16-bit products=%0d",
             n_lvl1_links[0], n_lvl1_links[1], n_lvl2_links, n_fadd_carries, n_full_width);
    $display("cycles used: %0d for %0d products", cycles - start_cycle, 1 << (2 * N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
