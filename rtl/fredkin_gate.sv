// Fredkin gate: the 3x3 reversible controlled-swap gate.
//
// The control input a passes straight through to p. When a is 0, b goes to q
// and c goes to r; when a is 1 the two data lines are swapped:
//   p = a,  q = a'b ^ ac,  r = a'c ^ ab.
// The gate is its own inverse: feeding (p, q, r) back in returns (a, b, c).
// Output q alone is a 2:1 multiplexer (q = a ? c : b), which is how the adders
// in this library use it; p and r are then garbage outputs.
//
// Purely combinational, no clock. The equations are the standard Fredkin
// definition; writing q and r as a multiplexer is this implementation's choice.
module fredkin_gate (
  input  logic a,  // control
  input  logic b,
  input  logic c,
  output logic p,  // = a
  output logic q,  // a ? c : b
  output logic r   // a ? b : c
);
  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end
endmodule
