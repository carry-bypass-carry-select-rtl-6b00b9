// NRG1: a 4x4 reversible gate giving NOR, XNOR and NOT of two inputs.
//
// With input b held at 0 the outputs are
//   p = a,  q = ~(c | d),  r = ~(c ^ d),  s = ~d,
// one NOR, one XNOR and one NOT of (c, d), with a passed through.
// For all 16 input combinations the gate follows its published truth table,
// which is p = a and {q, r, s} = {b, c, d} - 1 (modulo 8). In gate form that
// is q = b ^ ~(c | d), r = ~(c ^ d), s = ~d. Subtracting 1 modulo 8 is a
// permutation, so the gate is reversible.
//
// Purely combinational, no clock.
module nrg1_gate (
  input  logic a,
  input  logic b,  // tie to 0 for NOR/XNOR/NOT use
  input  logic c,
  input  logic d,
  output logic p,  // = a
  output logic q,  // NOR(c, d) when b = 0
  output logic r,  // XNOR(c, d)
  output logic s   // NOT d
);
  always_comb begin
    p = a;
    q = b ^ ~(c | d);
    r = ~(c ^ d);
    s = ~d;
  end
endmodule
