// Self-checking testbench for toffoli_gate.
//
// Applies all 8 input vectors and compares the outputs with p = a, q = b,
// r = ab ^ c. It runs each output vector backwards through a second gate and
// checks that the inputs come back (the Toffoli gate is its own inverse),
// checks that the outputs are all different, and checks the AND use of the
// gate (c = 0 gives r = a & b).
module tb_toffoli_gate;

  int checks = 0, failures = 0;
  logic [2:0] in_v, out_v, back_v;
  logic [7:0] seen;

  toffoli_gate dut (.a(in_v[2]), .b(in_v[1]), .c(in_v[0]),
                    .p(out_v[2]), .q(out_v[1]), .r(out_v[0]));
  toffoli_gate inv (.a(out_v[2]), .b(out_v[1]), .c(out_v[0]),
                    .p(back_v[2]), .q(back_v[1]), .r(back_v[0]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%b out=%b back=%b", what, in_v, out_v, back_v);
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
    logic a, b, c;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      in_v = 3'(v);
      #1;
      {a, b, c} = in_v;
      check(out_v[2] == a, "p");
      check(out_v[1] == b, "q");
      check(out_v[0] == ((a & b) ^ c), "r");
      if (!c) check(out_v[0] == (a & b), "AND use");
      check(back_v == in_v, "backward computation");
      check(!seen[out_v], "one-to-one");
      seen[out_v] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
