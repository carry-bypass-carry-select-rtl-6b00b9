// Shared types for the reversible logic library.
//
// gate4_t bundles the four lines of a 4x4 reversible gate. The same type is
// used for a gate's inputs (a, b, c, d) and its outputs (p, q, r, s), in that
// order from the most significant bit down.
package reversible_pkg;
  typedef struct packed {
    logic l0;  // a / p
    logic l1;  // b / q
    logic l2;  // c / r
    logic l3;  // d / s
  } gate4_t;
endpackage
