// mult8x8: 8x8-bit unsigned multiplier with a two-level 4-2 compressor tree.
//
// Dataflow (all combinational, inputs to product in one path):
//   1. pp_gen forms the eight partial-product rows pp[i] = multiplicand & b_i.
//   2. Partial-product reduction, first level: rows 0-3 go to one row of 4-2
//      compressors and rows 4-7 to a second, each with row k shifted left by
//      k. Every group of four rows becomes a sum vector and a carry vector.
//   3. Second level: the four vectors of the first level (group 1 at weight
//      1, group 2 at weight 16, carries one column further left) go to a third
//      row of 4-2 compressors, leaving two vectors.
//   4. final_adder, a 16-bit chain of full adders, adds those two vectors into
//      the product.
//
// The block structure (partial-product generation, two 4-2 compressor stages
// in a 2-then-1 tree, a final adder built from full adders, 8-bit operands,
// 16-bit product) is the published one. The column layout, unsigned
// operands, zero carry-ins and ripple final adder are this design's choices.
//
// Bits that fall outside the 16-bit product are dropped: the product of two
// 8-bit numbers is below 2^16, and every stage preserves the sum of its
// inputs, so arithmetic modulo 2^16 is exact. The dropped bits are the
// second-level row's cout, the top bit of the shifted group-2 carry vector and
// the final adder's cout; the first-level rows carry one spare column of zero
// inputs, so their cout is always 0. The linter reports these bits as unused.
//
// Interface: multiplier and multiplicand in, product out; no clock. The
// published circuit is sized for one multiplication per 2 ns clock (500 MHz);
// registers around it are left to the user.
module mult8x8
  import mult_pkg::*;
(
  input  logic [OPERAND_W-1:0] multiplier,
  input  logic [OPERAND_W-1:0] multiplicand,
  output logic [PRODUCT_W-1:0] product
);

  // ---- partial-product generation ----
  logic [OPERAND_W-1:0] pp [OPERAND_W];

  pp_gen #(.N(OPERAND_W)) u_ppg (
    .multiplier  (multiplier),
    .multiplicand(multiplicand),
    .pp          (pp)
  );

  // ---- first level: two rows of 4-2 compressors ----
  // Row k of a group is shifted left by k inside the group's ROW1_W columns.
  logic [ROW1_W-1:0] g_x [2][ROWS_PER_GROUP];
  logic [ROW1_W-1:0] g_sum [2];
  logic [ROW1_W-1:0] g_carry [2];
  logic              g_cout [2];

  always_comb begin
    for (int g = 0; g < 2; g++) begin
      for (int k = 0; k < ROWS_PER_GROUP; k++) begin
        g_x[g][k] = ROW1_W'(pp[g*ROWS_PER_GROUP + k]) << k;
      end
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_lvl1
    compressor_row #(.W(ROW1_W)) u_row (
      .x1   (g_x[g][0]),
      .x2   (g_x[g][1]),
      .x3   (g_x[g][2]),
      .x4   (g_x[g][3]),
      .cin  (1'b0),
      .sum  (g_sum[g]),
      .carry(g_carry[g]),
      .cout (g_cout[g])
    );
  end

  // ---- second level: one row of 4-2 compressors ----
  logic [ROW2_W-1:0] y1, y2, y3, y4;
  logic [ROW2_W-1:0] s2_sum, s2_carry;
  logic              s2_cout;

  always_comb begin
    y1 = ROW2_W'(g_sum[0]);
    y2 = ROW2_W'(g_carry[0]) << 1;
    y3 = ROW2_W'(g_sum[1]) << ROWS_PER_GROUP;
    y4 = ROW2_W'(g_carry[1]) << (ROWS_PER_GROUP + 1);
  end

  compressor_row #(.W(ROW2_W)) u_lvl2 (
    .x1   (y1),
    .x2   (y2),
    .x3   (y3),
    .x4   (y4),
    .cin  (1'b0),
    .sum  (s2_sum),
    .carry(s2_carry),
    .cout (s2_cout)
  );

  // ---- final carry-propagate addition ----
  logic fa_cout;

  final_adder #(.W(PRODUCT_W)) u_fadd (
    .a   (s2_sum),
    .b   ({s2_carry[PRODUCT_W-2:0], 1'b0}),
    .cin (1'b0),
    .sum (product),
    .cout(fa_cout)
  );

endmodule
