// final_adder: carry-propagate adder made of full adders.
//
// Adds the two vectors left by the compressor tree: a + b + cin = sum +
// 2^W*cout. Bit i is one full_adder whose carry out feeds bit i+1 (ripple
// carry), so the delay grows linearly with W. Purely combinational.
// The published multiplier builds its final 16-bit addition from full adders;
// the ripple arrangement is the simplest such adder and is this design's
// choice.
module final_adder #(
  parameter int unsigned W = 16  // operand width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  assign cout = c[W];

endmodule
