// Ripple carry adder made of TSG reversible gates.
//
// Each bit position is one TSG gate with its third input tied to 0, so it is
// a full adder: a[i], b[i] and the incoming carry give sum[i] and the carry
// into the next position. The carries ripple from bit 0 to bit WIDTH-1. The
// gate's second output, a[i] ^ b[i], is the bit's propagate signal and is
// brought out on prop for the carry bypass logic. The TSG first outputs
// (copies of a[i]) are garbage and are left open.
//
// Interface: a, b, cin in; sum, cout, prop out. Purely combinational; the
// delay is WIDTH full-adder stages. The structure follows the TSG rows of the
// carry bypass and carry select adders; WIDTH is a parameter of this design.
module tsg_ripple_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] prop   // a ^ b per bit
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    tsg_gate u_tsg (
      .a (a[i]),
      .b (b[i]),
      .c (1'b0),
      .d (carry[i]),
      .p (),
      .q (prop[i]),
      .r (sum[i]),
      .s (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
