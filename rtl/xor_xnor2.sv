// xor_xnor2: two-output XOR/XNOR gate of the 4-2 compressor.
//
// Produces both polarities of a XOR b at once, so that a following
// multiplexer can take either the true or the complemented value without an
// extra gate delay. x = a ^ b and xn = ~(a ^ b). Purely combinational.
// In silicon this is a small non-full-swing XOR gate followed by an inverter;
// only the logic function is modelled here.
module xor_xnor2 (
  input  logic a,
  input  logic b,
  output logic x,   // a XOR b
  output logic xn   // a XNOR b
);

  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end

endmodule
