// mult_pkg: sizes shared by the 8x8 compressor-tree multiplier.
//
// The multiplier takes two 8-bit unsigned operands and produces a 16-bit
// product. Its eight partial-product rows are split into two groups of four;
// each group is reduced by one row of 4-2 compressors, and the two results are
// reduced again by a third row before the final carry-propagate adder.
// OPERAND_W and PRODUCT_W are the sizes of the published multiplier. The row
// widths (ROW1_W, ROW2_W) follow from them and are this design's own layout.
package mult_pkg;

  // Operand width of the multiplier (8x8 multiplier).
  localparam int unsigned OPERAND_W = 8;
  // Width of the final product.
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;
  // Partial-product rows handled by one 4-2 compressor row.
  localparam int unsigned ROWS_PER_GROUP = 4;
  // Columns of a first-level compressor row: four rows shifted by 0..3 span
  // OPERAND_W+3 columns; one spare column absorbs the last Cout.
  localparam int unsigned ROW1_W = OPERAND_W + ROWS_PER_GROUP;
  // Columns of the second-level compressor row and of the final adder.
  localparam int unsigned ROW2_W = PRODUCT_W;

endpackage
