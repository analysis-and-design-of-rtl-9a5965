// compressor_4_2: high-speed 4-2 compressor built from multiplexers.
//
// Adds five bits of equal weight, i1+i2+i3+i4+cin = sum + 2*(carry + cout),
// with cout a function of i1..i4 only, so that a row of these cells has no
// carry ripple: the cout of one column reaches the cin of the next, but no cin
// ever reaches a cout.
//
// How it works. A first level of gates forms, from each input pair, the
// signals the multiplexers need, each in both polarities:
//   A = i1 ^ i2, B = i3 ^ i4          (two-output XOR/XNOR cells)
//   C = ~(i1 & i2), D = ~(i1 | i2)    (pair 1: both set / none set)
//   E = ~(i3 | i4), F = ~(i3 & i4)    (pair 2: none set / both set)
// A second level of 2:1 multiplexers then forms every output, so each output
// path is one gate plus at most two multiplexers (about two XOR delays):
//   sum   = cin ? (B ? A : ~A) : (B ? ~A : A)       = A ^ B ^ cin
//   carry = cin ? (A ? ~B : ~E) : (F ? 0 : ~A)
//   cout  = E ? ~C : ~D     (i3=i4=0: i1&i2, otherwise i1|i2)
// The carry/cout split uses the freedom of the counts where exactly two of
// the five bits are set (either output may carry the 2): cout takes the
// inputs' pairs, carry the rest.
//
// What is published and what is chosen here: the first-level signals A..F,
// the select signals of all seven multiplexers, the constant-0 input and the
// sum tree follow the published circuit. Two details of the carry and cout
// multiplexers are set so that the equation above holds for all 32 input
// combinations: the select-A multiplexer takes ~E for A=0 and ~B for A=1, and
// the cout multiplexer takes ~D for E=0 and ~C for E=1, giving cout in true
// polarity (the first-level gates provide both polarities of C and D).
//
// Interface: five one-bit inputs, three one-bit outputs, purely
// combinational, no clock.
module compressor_4_2 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,    // horizontal carry from the next lower column, weight 1
  output logic sum,    // weight 1
  output logic carry,  // weight 2, to the next column of the following stage
  output logic cout    // weight 2, horizontal carry to cin of the next column
);

  // First level: both polarities of every gate output.
  logic a, a_n, b, b_n;
  logic c_n, d_n, e, e_n, f;
  logic cin_n;

  xor_xnor2 u_xa (.a(i1), .b(i2), .x(a), .xn(a_n));
  xor_xnor2 u_xb (.a(i3), .b(i4), .x(b), .xn(b_n));

  always_comb begin
    c_n   = i1 & i2;        // complement of C = NAND(i1, i2)
    d_n   = i1 | i2;        // complement of D = NOR(i1, i2)
    e     = ~(i3 | i4);     // E = NOR(i3, i4)
    e_n   = i3 | i4;
    f     = ~(i3 & i4);     // F = NAND(i3, i4)
    cin_n = ~cin;
  end

  // Sum: A ^ B selected by cin.
  logic s_lo, s_hi;
  mux2 u_s0 (.sel(b),   .d0(a),   .d1(a_n), .y(s_lo));  // A ^ B
  mux2 u_s1 (.sel(b),   .d0(a_n), .d1(a),   .y(s_hi));  // ~(A ^ B)
  mux2 u_s2 (.sel(cin), .d0(s_lo), .d1(s_hi), .y(sum));

  // Carry: one half for cin = 1, one for cin = 0, selected by ~cin.
  logic c_cin1, c_cin0;
  mux2 u_c0 (.sel(a),     .d0(e_n),  .d1(b_n),  .y(c_cin1));
  mux2 u_c1 (.sel(f),     .d0(a_n),  .d1(1'b0), .y(c_cin0));
  mux2 u_c2 (.sel(cin_n), .d0(c_cin1), .d1(c_cin0), .y(carry));

  // Cout: depends on i1..i4 only.
  mux2 u_o0 (.sel(e), .d0(d_n), .d1(c_n), .y(cout));

endmodule
