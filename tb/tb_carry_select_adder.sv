// Self-checking testbench for carry_select_adder.
//
// At the default width of 4 it applies all 512 combinations of a, b and cin
// and compares {cout, sum} with the integer sum a + b + cin. For each operand
// pair it also checks that toggling cin alone moves the result by exactly
// one, which exercises both speculative adders through the multiplexers. A
// second instance at width 10 is checked on random operands.
module tb_carry_select_adder;

  localparam int unsigned W2 = 10;

  int checks = 0, failures = 0;
  int sel0 = 0, sel1 = 0;

  logic [3:0] a, b, sum;
  logic       cin, cout;
  logic [W2-1:0] a2, b2, sum2;
  logic          cin2, cout2;

  carry_select_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  carry_select_adder #(.WIDTH(W2)) dut2 (.a(a2), .b(b2), .cin(cin2), .sum(sum2), .cout(cout2));

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
    logic [4:0] r0;
    a2 = '0; b2 = '0; cin2 = 1'b0;
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      cin = 1'b0;
      #1;
      check({cout, sum} == 5'(int'(a) + int'(b)), "sum, cin=0");
      r0 = {cout, sum};
      sel0++;
      cin = 1'b1;
      #1;
      check({cout, sum} == 5'(int'(a) + int'(b) + 1), "sum, cin=1");
      check({cout, sum} == r0 + 5'd1, "cin=1 result is cin=0 result plus one");
      sel1++;
    end
    for (int n = 0; n < 500; n++) begin
      a2 = W2'($urandom); b2 = W2'($urandom); cin2 = 1'($urandom);
      #1;
      check({cout2, sum2} == (W2+1)'(int'(a2) + int'(b2) + int'(cin2)), "sum, width 10");
    end
    $display("selected carry-in-0 adder %0d times, carry-in-1 adder %0d times", sel0, sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
