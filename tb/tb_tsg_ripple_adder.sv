// Self-checking testbench for tsg_ripple_adder.
//
// At the default width of 4 it applies every combination of a, b and cin
// (512 vectors) and compares {cout, sum} with the integer sum a + b + cin and
// prop with a ^ b. A second instance at width 9 is checked the same way on
// random operands.
module tb_tsg_ripple_adder;

  localparam int unsigned W2 = 9;

  int checks = 0, failures = 0;

  logic [3:0] a, b, sum, prop;
  logic       cin, cout;
  logic [W2-1:0] a2, b2, sum2, prop2;
  logic          cin2, cout2;

  tsg_ripple_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .prop(prop));
  tsg_ripple_adder #(.WIDTH(W2)) dut2 (.a(a2), .b(b2), .cin(cin2), .sum(sum2),
                                       .cout(cout2), .prop(prop2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h cin=%b sum=%h cout=%b", what, a, b, cin, sum, cout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a2 = '0; b2 = '0; cin2 = 1'b0;
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      check({cout, sum} == 5'(int'(a) + int'(b) + int'(cin)), "sum");
      check(prop == (a ^ b), "propagate");
    end
    for (int n = 0; n < 500; n++) begin
      a2 = W2'($urandom); b2 = W2'($urandom); cin2 = 1'($urandom);
      #1;
      check({cout2, sum2} == (W2+1)'(int'(a2) + int'(b2) + int'(cin2)), "sum, width 9");
      check(prop2 == (a2 ^ b2), "propagate, width 9");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
