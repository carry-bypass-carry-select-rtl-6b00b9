// NRG2: a 4x4 reversible gate whose third output is a 2:1 multiplexer.
//
// Output r selects, under control of a, between the XNOR (a = 0) and the
// XOR (a = 1) of c and d:
//   r = a'(c xnor d) + a(c ^ d).
// The other outputs are garbage and follow the published truth table:
//   p = a,  s = ~d,
//   q = b ^ ~(c | d) when a = 0,  q = b ^ ~(c & d) when a = 1.
// Taken together {q, r, s} = {b, c, d} - 1 when a = 0 and {b, c, d} + 5 when
// a = 1 (both modulo 8), so each half of the table is a permutation and the
// gate is reversible.
//
// Purely combinational, no clock.
module nrg2_gate (
  input  logic a,  // select
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,  // garbage (= a)
  output logic q,  // garbage
  output logic r,  // a ? (c ^ d) : ~(c ^ d)
  output logic s   // garbage (= ~d)
);
  always_comb begin
    p = a;
    q = a ? (b ^ ~(c & d)) : (b ^ ~(c | d));
    r = a ? (c ^ d) : ~(c ^ d);
    s = ~d;
  end
endmodule
