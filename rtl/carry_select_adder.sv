// Carry select adder built only from reversible gates.
//
// Two TSG ripple carry adders work on the same operands in parallel, one with
// its carry in tied to 0 and one with it tied to 1. Once the real carry in
// arrives it only has to steer WIDTH + 1 Fredkin gates used as 2:1
// multiplexers: each sum bit and the carry out come from the first adder when
// cin is 0 and from the second when cin is 1. For WIDTH = 4 that is 8 TSG and
// 5 Fredkin gates.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational; cin reaches
// the outputs through one Fredkin gate. The structure follows the published
// design; WIDTH as a parameter is this design's own generalisation.
module carry_select_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // Results of the two speculative adders, carry out in the top bit.
  logic [WIDTH:0] res0, res1;

  tsg_ripple_adder #(.WIDTH(WIDTH)) u_rca0 (
    .a    (a),
    .b    (b),
    .cin  (1'b0),
    .sum  (res0[WIDTH-1:0]),
    .cout (res0[WIDTH]),
    .prop ()
  );

  tsg_ripple_adder #(.WIDTH(WIDTH)) u_rca1 (
    .a    (a),
    .b    (b),
    .cin  (1'b1),
    .sum  (res1[WIDTH-1:0]),
    .cout (res1[WIDTH]),
    .prop ()
  );

  logic [WIDTH:0] res;

  for (genvar i = 0; i <= WIDTH; i++) begin : g_mux
    fredkin_gate u_mux (
      .a (cin),
      .b (res0[i]),
      .c (res1[i]),
      .p (),
      .q (res[i]),
      .r ()
    );
  end

  assign sum  = res[WIDTH-1:0];
  assign cout = res[WIDTH];
endmodule
