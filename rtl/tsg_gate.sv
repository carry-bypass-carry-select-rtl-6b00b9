// TSG gate: a 4x4 reversible gate that works as a full adder.
//
// With its third input c held at 0, the gate computes a full adder on
// a, b and the carry-in d:
//   p = a                      (garbage)
//   q = a ^ b                  (the propagate bit; garbage for a plain adder)
//   r = a ^ b ^ d              (sum)
//   s = ((a ^ b) & d) ^ (a & b)  (carry out)
// For the general case, with c free, the gate follows the usual TSG
// definition:
//   q = (a' & c') ^ b',  r = q ^ d,  s = (q & d) ^ ((a & b) ^ c),
// which reduces to the equations above at c = 0 and keeps the mapping from
// (a, b, c, d) to (p, q, r, s) one-to-one. The full-adder behaviour is the
// one this library relies on; the c != 0 behaviour is taken from the standard
// gate definition.
//
// Purely combinational, no clock.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,  // tie to 0 for full-adder use
  input  logic d,  // carry in
  output logic p,  // = a
  output logic q,  // = a ^ b when c = 0
  output logic r,  // sum when c = 0
  output logic s   // carry out when c = 0
);
  always_comb begin
    p = a;
    q = (~a & ~c) ^ ~b;
    r = q ^ d;
    s = (q & d) ^ ((a & b) ^ c);
  end
endmodule
