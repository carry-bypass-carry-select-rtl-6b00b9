// Self-checking testbench for fredkin_gate.
//
// Applies all 8 input vectors and compares p, q, r with the controlled-swap
// equations p = a, q = a'b ^ ac, r = a'c ^ ab. It also runs each output
// vector backwards through a second gate and checks that the original inputs
// come back (the Fredkin gate is its own inverse), and that the 8 outputs are
// all different (the gate is reversible).
module tb_fredkin_gate;

  int checks = 0, failures = 0;
  logic [2:0] in_v, out_v, back_v;
  logic [7:0] seen;

  fredkin_gate dut (.a(in_v[2]), .b(in_v[1]), .c(in_v[0]),
                    .p(out_v[2]), .q(out_v[1]), .r(out_v[0]));
  fredkin_gate inv (.a(out_v[2]), .b(out_v[1]), .c(out_v[0]),
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
      check(out_v[1] == ((~a & b) ^ (a & c)), "q");
      check(out_v[0] == ((~a & c) ^ (a & b)), "r");
      check(back_v == in_v, "backward computation");
      check(!seen[out_v], "one-to-one");
      seen[out_v] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
