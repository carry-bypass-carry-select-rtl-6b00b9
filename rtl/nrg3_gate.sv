// NRG3: a 4x4 reversible gate that works as a half adder.
//
// With input b tied to 1 (the supply) the outputs are
//   p = a,  q = c & d (carry),  r = c ^ d (sum),  s = ~d,
// a half adder on (c, d) plus a NOT of d, with a passed through.
// For all 16 input combinations the gate follows its published truth table,
// which is p = a and {q, r, s} = {b, c, d} + 5 (modulo 8); in gate form
// q = b ^ ~(c & d), r = c ^ d, s = ~d. Adding a constant modulo 8 is a
// permutation, so the gate is reversible.
//
// Purely combinational, no clock.
module nrg3_gate (
  input  logic a,
  input  logic b,  // tie to 1 for half-adder use
  input  logic c,
  input  logic d,
  output logic p,  // = a
  output logic q,  // carry c & d when b = 1
  output logic r,  // sum c ^ d
  output logic s   // NOT d
);
  always_comb begin
    p = a;
    q = b ^ ~(c & d);
    r = c ^ d;
    s = ~d;
  end
endmodule
