// Self-checking testbench for carry_bypass_adder.
//
// At the default width of 4 it applies all 512 combinations of a, b and cin
// and compares {cout, sum} with the integer sum a + b + cin, and bypass with
// the product of the propagate bits (a ^ b all ones). It counts how often
// the bypass path is taken and fails if it never is, or never with cin = 1.
// A second instance at width 7 (a Toffoli tree that is not a power of two)
// is checked on random operands, with operands forced to b = ~a half the
// time so that its bypass path is exercised too.
module tb_carry_bypass_adder;

  localparam int unsigned W2 = 7;

  int checks = 0, failures = 0;
  int bypass_hits = 0, bypass_hits_cin1 = 0, bypass_hits_w2 = 0;

  logic [3:0] a, b, sum;
  logic       cin, cout, bypass;
  logic [W2-1:0] a2, b2, sum2;
  logic          cin2, cout2, bypass2;

  carry_bypass_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .bypass(bypass));
  carry_bypass_adder #(.WIDTH(W2)) dut2 (.a(a2), .b(b2), .cin(cin2), .sum(sum2),
                                         .cout(cout2), .bypass(bypass2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h cin=%b sum=%h cout=%b bp=%b", what, a, b, cin, sum, cout, bypass);
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
      check(bypass == ((a ^ b) == 4'hF), "bypass product");
      if (bypass) begin
        bypass_hits++;
        if (cin) bypass_hits_cin1++;
      end
    end
    for (int n = 0; n < 500; n++) begin
      a2 = W2'($urandom); cin2 = 1'($urandom);
      b2 = n[0] ? ~a2 : W2'($urandom);
      #1;
      check({cout2, sum2} == (W2+1)'(int'(a2) + int'(b2) + int'(cin2)), "sum, width 7");
      check(bypass2 == &(a2 ^ b2), "bypass product, width 7");
      if (bypass2) bypass_hits_w2++;
    end
    checks++;
    if (bypass_hits == 0 || bypass_hits_cin1 == 0 || bypass_hits_w2 == 0) begin
      failures++;
      $display("FAIL bypass path never exercised");
    end
    $display("bypass taken %0d times (%0d with cin=1), %0d at width 7",
             bypass_hits, bypass_hits_cin1, bypass_hits_w2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
