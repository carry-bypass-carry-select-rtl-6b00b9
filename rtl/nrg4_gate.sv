// NRG4: a 4x4 reversible gate whose fourth output is a parity check.
//
// The first three inputs pass through as garbage outputs (p = a, q = b,
// r = c). The fourth output is the even-parity flag of all four inputs,
//   s = ~(a ^ b ^ c ^ d),
// which is 1 when an even number of inputs are 1. This follows the published
// truth table row by row (s = 1 for input 0000); the gate's prose formula
// writes the same check without the inversion. Inverting d given a, b, c is a
// permutation, so the gate is reversible.
//
// Purely combinational, no clock.
module nrg4_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,  // garbage (= a)
  output logic q,  // garbage (= b)
  output logic r,  // garbage (= c)
  output logic s   // 1 when a, b, c, d hold an even number of ones
);
  always_comb begin
    p = a;
    q = b;
    r = c;
    s = ~(a ^ b ^ c ^ d);
  end
endmodule
