// Toffoli gate: the 3x3 reversible controlled-controlled-NOT gate.
//
//   p = a,  q = b,  r = ab ^ c.
// The target line c is inverted when both controls are 1. The gate is its own
// inverse. With c tied to 0, r is the AND of a and b and p, q are garbage
// outputs; the carry bypass adder uses it that way to multiply propagate bits.
//
// Purely combinational, no clock.
module toffoli_gate (
  input  logic a,  // control 1
  input  logic b,  // control 2
  input  logic c,  // target
  output logic p,  // = a
  output logic q,  // = b
  output logic r   // = (a & b) ^ c
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule
