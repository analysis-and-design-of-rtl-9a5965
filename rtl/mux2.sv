// mux2: 2:1 multiplexer cell of the 4-2 compressor.
//
// Every output of the compressor is produced by a tree of these cells: the
// data inputs come from the first-level XOR/XNOR, NAND and NOR gates, and the
// select lines are themselves gate outputs or the carry input. y follows d0
// while sel is 0 and d1 while sel is 1. Purely combinational.
// The compressor is built around 2:1 multiplexers as published; the cell's
// transistor-level form (a pass-transistor multiplexer) is not modelled, only
// its logic function.
module mux2 (
  input  logic sel,  // select: 0 picks d0, 1 picks d1
  input  logic d0,   // data input taken when sel = 0
  input  logic d1,   // data input taken when sel = 1
  output logic y     // selected value
);

  always_comb y = sel ? d1 : d0;

endmodule
