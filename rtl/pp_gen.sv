// pp_gen: partial-product generator of the array multiplier.
//
// Row i of the output is the multiplicand gated by bit i of the multiplier:
// pp[i][j] = multiplicand[j] & multiplier[i], an N x N array of AND gates.
// Row i has weight 2^i; the shifting is done by how the rows are wired into
// the compressor tree, not here. Purely combinational.
// The published multiplier forms its partial products with plain AND/NAND
// logic and no recoding (no Booth encoding); operands are unsigned here.
module pp_gen #(
  parameter int unsigned N = 8  // operand width
) (
  input  logic [N-1:0] multiplier,
  input  logic [N-1:0] multiplicand,
  output logic [N-1:0] pp [N]     // pp[i] = multiplicand & {N{multiplier[i]}}
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = multiplicand & {N{multiplier[i]}};
    end
  end

endmodule
