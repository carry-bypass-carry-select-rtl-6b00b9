// End-to-end testbench for reversible_adders_top at its default parameters.
//
// Both 4-bit adders get the same operands, all 512 combinations of a, b and
// cin: each result is compared with the integer sum a + b + cin, the two
// adders are compared with each other, and the bypass flag with the product
// of the propagate bits. The four NRG gates are driven through all 16 inputs
// each and checked in their intended uses (NRG1 with b = 0: NOR, XNOR, NOT;
// NRG2: XOR/XNOR multiplexer; NRG3 with b = 1: half adder; NRG4: parity
// check) and for reversibility (16 distinct outputs).
// Each mechanism is counted: carry bypass taken and not taken, the carry
// select adder choosing its carry-in-0 and its carry-in-1 adder, both
// multiplexer settings of NRG2, the half-adder carry of NRG3, even and odd
// parity at NRG4. A mechanism that never happens counts as a failure.
module tb_reversible_adders_top;
  import reversible_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] a, b, byp_sum, sel_sum;
  logic       cin, byp_cout, byp_bypass, sel_cout;
  gate4_t     nrg_in, nrg1_out, nrg2_out, nrg3_out, nrg4_out;
  logic [15:0] seen1, seen2, seen3, seen4;

  int n_bypass = 0, n_ripple = 0, n_sel0 = 0, n_sel1 = 0;
  int n_nrg1_nor = 0, n_nrg2_xor = 0, n_nrg2_xnor = 0, n_nrg3_carry = 0;
  int n_par_even = 0, n_par_odd = 0;

  reversible_adders_top dut (
    .byp_a (a), .byp_b (b), .byp_cin (cin),
    .byp_sum (byp_sum), .byp_cout (byp_cout), .byp_bypass (byp_bypass),
    .sel_a (a), .sel_b (b), .sel_cin (cin),
    .sel_sum (sel_sum), .sel_cout (sel_cout),
    .nrg1_in (nrg_in), .nrg1_out (nrg1_out),
    .nrg2_in (nrg_in), .nrg2_out (nrg2_out),
    .nrg3_in (nrg_in), .nrg3_out (nrg3_out),
    .nrg4_in (nrg_in), .nrg4_out (nrg4_out)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h cin=%b nrg_in=%b", what, a, b, cin, nrg_in);
    end
  endtask

  task automatic expect_seen(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
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
    logic [4:0] expected;
    logic ia, ib, ic, id;
    nrg_in = '0;
    // adders
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      expected = 5'(int'(a) + int'(b) + int'(cin));
      check({byp_cout, byp_sum} == expected, "carry bypass adder sum");
      check({sel_cout, sel_sum} == expected, "carry select adder sum");
      check({byp_cout, byp_sum} == {sel_cout, sel_sum}, "adders agree");
      check(byp_bypass == ((a ^ b) == 4'hF), "bypass product");
      if (byp_bypass) n_bypass++; else n_ripple++;
      if (cin) n_sel1++; else n_sel0++;
    end
    // new reversible gates
    a = '0; b = '0; cin = 1'b0;
    seen1 = '0; seen2 = '0; seen3 = '0; seen4 = '0;
    for (int v = 0; v < 16; v++) begin
      nrg_in = gate4_t'(v);
      #1;
      {ia, ib, ic, id} = nrg_in;
      // reversibility
      check(!seen1[nrg1_out] && !seen2[nrg2_out] && !seen3[nrg3_out] && !seen4[nrg4_out],
            "one-to-one");
      seen1[nrg1_out] = 1'b1; seen2[nrg2_out] = 1'b1;
      seen3[nrg3_out] = 1'b1; seen4[nrg4_out] = 1'b1;
      // NRG1 with b = 0
      check(nrg1_out.l0 == ia, "NRG1 p");
      if (!ib) begin
        check(nrg1_out.l1 == !(ic || id) && nrg1_out.l2 == (ic == id) && nrg1_out.l3 == !id,
              "NRG1 NOR/XNOR/NOT");
        n_nrg1_nor++;
      end
      // NRG2 multiplexer
      check(nrg2_out.l2 == (ia ? (ic != id) : (ic == id)), "NRG2 multiplexer");
      if (ia) n_nrg2_xor++; else n_nrg2_xnor++;
      // NRG3 half adder with b = 1
      check(nrg3_out.l0 == ia, "NRG3 p");
      if (ib) begin
        check({nrg3_out.l1, nrg3_out.l2} == 2'(int'(ic) + int'(id)) && nrg3_out.l3 == !id,
              "NRG3 half adder");
        if (nrg3_out.l1) n_nrg3_carry++;
      end
      // NRG4 parity
      check({nrg4_out.l0, nrg4_out.l1, nrg4_out.l2} == {ia, ib, ic}, "NRG4 pass-through");
      check(nrg4_out.l3 == ($countones(nrg_in) % 2 == 0), "NRG4 parity");
      if (nrg4_out.l3) n_par_even++; else n_par_odd++;
    end
    expect_seen(n_bypass, "carry bypass taken");
    expect_seen(n_ripple, "carry through ripple chain");
    expect_seen(n_sel0, "carry select: carry-in-0 adder");
    expect_seen(n_sel1, "carry select: carry-in-1 adder");
    expect_seen(n_nrg1_nor, "NRG1 NOR/XNOR/NOT use");
    expect_seen(n_nrg2_xor, "NRG2 selects XOR");
    expect_seen(n_nrg2_xnor, "NRG2 selects XNOR");
    expect_seen(n_nrg3_carry, "NRG3 half-adder carry");
    expect_seen(n_par_even, "NRG4 even parity");
    expect_seen(n_par_odd, "NRG4 odd parity");
    $display("bypass %0d, ripple %0d, select cin0 %0d, cin1 %0d, NRG2 xor %0d xnor %0d, NRG3 carry %0d, NRG4 even %0d odd %0d",
             n_bypass, n_ripple, n_sel0, n_sel1, n_nrg2_xor, n_nrg2_xnor, n_nrg3_carry,
             n_par_even, n_par_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
