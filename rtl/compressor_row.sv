// compressor_row: one row of 4-2 compressors reducing four operands to two.
//
// Column i holds one compressor_4_2 fed with bit i of the four operands x1..x4.
// The cout of column i drives the cin of column i+1; because a compressor's
// cout does not depend on its cin, this link never ripples further than one
// column. The cin of column 0 is the row's cin input and the cout of the top
// column is brought out as cout.
//
// Result: x1 + x2 + x3 + x4 + cin = sum + 2*carry + 2^W*cout, where carry[i]
// has weight 2^(i+1). The operands must already be aligned to the row's
// columns. Purely combinational.
// The row structure (compressors side by side, Cout to the next Cin) is the
// usual use of the 4-2 compressor; the width is a parameter of this design.
module compressor_row #(
  parameter int unsigned W = 16  // number of columns
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  input  logic         cin,    // into column 0
  output logic [W-1:0] sum,    // sum[i] has weight 2^i
  output logic [W-1:0] carry,  // carry[i] has weight 2^(i+1)
  output logic         cout    // out of column W-1, weight 2^W
);

  logic [W:0] h;  // horizontal links: h[i] is the cin of column i

  assign h[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_col
    compressor_4_2 u_cmp (
      .i1   (x1[i]),
      .i2   (x2[i]),
      .i3   (x3[i]),
      .i4   (x4[i]),
      .cin  (h[i]),
      .sum  (sum[i]),
      .carry(carry[i]),
      .cout (h[i+1])
    );
  end

  assign cout = h[W];

endmodule
