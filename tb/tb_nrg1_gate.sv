// Self-checking testbench for nrg1_gate.
//
// Applies all 16 input vectors (a, b, c, d) and compares the outputs
// (p, q, r, s) with the gate's truth table, written out below as one 4-bit
// entry per input. It also checks that the 16 outputs are all different (the
// gate is reversible) and checks the gate in its intended use: with b = 0, q = NOR(c, d), r = XNOR(c, d), s = NOT d.
module tb_nrg1_gate;

  int checks = 0, failures = 0;
  logic [3:0] in_v, out_v;
  logic [15:0] seen;

  // expected {p, q, r, s} for inputs {a, b, c, d} = 0 .. 15
  localparam logic [3:0] TRUTH [16] = '{4'b0111, 4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110,
                                        4'b1111, 4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1101, 4'b1110};

  nrg1_gate dut (.a(in_v[3]), .b(in_v[2]), .c(in_v[1]), .d(in_v[0]),
          .p(out_v[3]), .q(out_v[2]), .r(out_v[1]), .s(out_v[0]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%b out=%b", what, in_v, out_v);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b, c, d;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      in_v = 4'(v);
      #1;
      {a, b, c, d} = in_v;
      check(out_v == TRUTH[v], "truth table");
      check(!seen[out_v], "one-to-one");
      seen[out_v] = 1'b1;
      if (!b) begin
        check(out_v[2] == !(c || d), "NOR");
        check(out_v[1] == (c == d), "XNOR");
        check(out_v[0] == !d, "NOT");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
