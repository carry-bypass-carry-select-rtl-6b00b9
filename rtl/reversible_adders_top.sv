// Reversible-logic adder library: top level.
//
// Two independent 4-bit adders built only from reversible gates stand side by
// side with the four new 4x4 reversible gates NRG1..NRG4. Nothing is shared
// between them; each has its own ports.
//   byp_*  carry bypass adder: TSG full adders, Toffoli AND tree for the
//          bypass product, Fredkin carry multiplexer. byp_bypass shows when
//          all bits propagate and the carry in skips the ripple chain.
//   sel_*  carry select adder: two TSG ripple adders (carry in 0 and 1) and
//          Fredkin multiplexers steered by the carry in.
//   nrgN_in / nrgN_out  the four lines of each NRG gate, in = (a, b, c, d),
//          out = (p, q, r, s).
// Everything is combinational; there is no clock or reset. The set of blocks
// follows the published design; bringing the NRG gates out at the top and
// the port naming are this design's own choices.
module reversible_adders_top
  import reversible_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  // carry bypass adder
  input  logic [WIDTH-1:0] byp_a,
  input  logic [WIDTH-1:0] byp_b,
  input  logic             byp_cin,
  output logic [WIDTH-1:0] byp_sum,
  output logic             byp_cout,
  output logic             byp_bypass,
  // carry select adder
  input  logic [WIDTH-1:0] sel_a,
  input  logic [WIDTH-1:0] sel_b,
  input  logic             sel_cin,
  output logic [WIDTH-1:0] sel_sum,
  output logic             sel_cout,
  // new reversible gates
  input  gate4_t           nrg1_in,
  output gate4_t           nrg1_out,
  input  gate4_t           nrg2_in,
  output gate4_t           nrg2_out,
  input  gate4_t           nrg3_in,
  output gate4_t           nrg3_out,
  input  gate4_t           nrg4_in,
  output gate4_t           nrg4_out
);
  carry_bypass_adder #(.WIDTH(WIDTH)) u_bypass (
    .a      (byp_a),
    .b      (byp_b),
    .cin    (byp_cin),
    .sum    (byp_sum),
    .cout   (byp_cout),
    .bypass (byp_bypass)
  );

  carry_select_adder #(.WIDTH(WIDTH)) u_select (
    .a    (sel_a),
    .b    (sel_b),
    .cin  (sel_cin),
    .sum  (sel_sum),
    .cout (sel_cout)
  );

  nrg1_gate u_nrg1 (
    .a (nrg1_in.l0), .b (nrg1_in.l1), .c (nrg1_in.l2), .d (nrg1_in.l3),
    .p (nrg1_out.l0), .q (nrg1_out.l1), .r (nrg1_out.l2), .s (nrg1_out.l3)
  );

  nrg2_gate u_nrg2 (
    .a (nrg2_in.l0), .b (nrg2_in.l1), .c (nrg2_in.l2), .d (nrg2_in.l3),
    .p (nrg2_out.l0), .q (nrg2_out.l1), .r (nrg2_out.l2), .s (nrg2_out.l3)
  );

  nrg3_gate u_nrg3 (
    .a (nrg3_in.l0), .b (nrg3_in.l1), .c (nrg3_in.l2), .d (nrg3_in.l3),
    .p (nrg3_out.l0), .q (nrg3_out.l1), .r (nrg3_out.l2), .s (nrg3_out.l3)
  );

  nrg4_gate u_nrg4 (
    .a (nrg4_in.l0), .b (nrg4_in.l1), .c (nrg4_in.l2), .d (nrg4_in.l3),
    .p (nrg4_out.l0), .q (nrg4_out.l1), .r (nrg4_out.l2), .s (nrg4_out.l3)
  );
endmodule
