// full_adder: one-bit full adder (3:2 counter).
//
// a + b + ci = s + 2*co. Used as the bit cell of the final carry-propagate
// adder of the multiplier. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,  // carry in, weight 1
  output logic s,   // sum, weight 1
  output logic co   // carry out, weight 2
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end

endmodule
