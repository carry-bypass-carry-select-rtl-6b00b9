// Carry bypass (carry skip) adder built only from reversible gates.
//
// A row of WIDTH TSG full adders ripples the carry as usual. Their propagate
// outputs p[i] = a[i] ^ b[i] are multiplied together by a binary tree of
// Toffoli gates (target input tied to 0, so each is a 2-input AND) into the
// bypass signal BP = p[0] p[1] ... p[WIDTH-1]. A Fredkin gate used as a 2:1
// multiplexer then forms the carry out: when BP is 1 every bit propagates,
// so the carry in is passed straight to cout; otherwise cout is the carry
// out of the last TSG stage. For WIDTH = 4 that is 4 TSG, 3 Toffoli and
// 1 Fredkin gates: pairs (p0, p1) and (p2, p3) feed the first two Toffolis
// and the third combines their results.
//
// Interface: a, b, cin in; sum, cout out, plus bypass (BP) for observing when
// the skip path is taken. Purely combinational. The gate structure follows
// the published design; WIDTH as a parameter and the heap-ordered tree for
// widths other than 4 are this design's own generalisation.
module carry_bypass_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             bypass  // BP: all bits propagate
);
  logic [WIDTH-1:0]   prop;
  logic               ripple_cout;
  // AND tree in heap order: node[0] is the root, leaves are
  // node[WIDTH-1 .. 2*WIDTH-2] = prop[0 .. WIDTH-1].
  logic [2*WIDTH-2:0] node;

  tsg_ripple_adder #(.WIDTH(WIDTH)) u_rca (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (sum),
    .cout (ripple_cout),
    .prop (prop)
  );

  assign node[2*WIDTH-2:WIDTH-1] = prop;

  for (genvar i = 0; i < int'(WIDTH) - 1; i++) begin : g_and
    toffoli_gate u_toffoli (
      .a (node[2*i+1]),
      .b (node[2*i+2]),
      .c (1'b0),
      .p (),
      .q (),
      .r (node[i])
    );
  end

  assign bypass = node[0];

  // Fredkin as multiplexer: control BP, q = BP ? cin : ripple carry.
  fredkin_gate u_mux (
    .a (bypass),
    .b (ripple_cout),
    .c (cin),
    .p (),
    .q (cout),
    .r ()
  );
endmodule
