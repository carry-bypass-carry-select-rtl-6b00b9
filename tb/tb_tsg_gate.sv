// Self-checking testbench for tsg_gate.
//
// With the third input at 0 the gate must be a full adder: for all 8
// combinations of a, b and carry in d it checks p = a, q = a ^ b, and that
// {s, r} equals the arithmetic sum a + b + d. Over all 16 inputs it checks
// that the outputs are all different (the gate is reversible) and that each
// output vector can be run backwards: a reverse lookup table built from the
// forward outputs must return the original input.
module tb_tsg_gate;

  int checks = 0, failures = 0;
  logic [3:0] in_v, out_v;
  logic [15:0] seen;
  logic [3:0] inverse [16];

  tsg_gate dut (.a(in_v[3]), .b(in_v[2]), .c(in_v[1]), .d(in_v[0]),
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
    seen = '0;
    // full adder use: c = 0
    for (int v = 0; v < 8; v++) begin
      logic a, b, d;
      {a, b, d} = 3'(v);
      in_v = {a, b, 1'b0, d};
      #1;
      check(out_v[3] == a, "p = a");
      check(out_v[2] == (a ^ b), "q = propagate");
      check({out_v[0], out_v[1]} == 2'(int'(a) + int'(b) + int'(d)), "full adder sum/carry");
    end
    // reversibility over all 16 inputs
    for (int v = 0; v < 16; v++) begin
      in_v = 4'(v);
      #1;
      check(!seen[out_v], "one-to-one");
      seen[out_v] = 1'b1;
      inverse[out_v] = in_v;
    end
    for (int v = 0; v < 16; v++) begin
      in_v = 4'(v);
      #1;
      check(inverse[out_v] == in_v, "backward computation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
