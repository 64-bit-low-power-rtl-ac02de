// tb_comp82: exhaustive test of the XOR-MUX 8:2 compressor in both variants.
//
// All 8192 combinations of the thirteen inputs are applied to an exact and an
// approximate instance. Checked against values computed here from the inputs:
//   exact:  sum + 2*(co[0]+...+co[4]+carry) equals the number of ones on the inputs;
//           co[0] is the majority of a[2:0]; sum is the parity of all inputs.
//   approx: sum is the parity of all inputs, co[4:0] match the exact instance,
//           carry equals ci[4].
// It also counts the combinations on which the approximate outputs all equal the exact
// ones; the bypassed carry is right for three quarters of them, 6144 of 8192.
module tb_comp82;

  logic [7:0] a;
  logic [4:0] ci;
  logic [4:0] co_e, co_a;
  logic       sum_e, sum_a, carry_e, carry_a;
  int         checks = 0, failures = 0, n_match = 0;

  comp82 #(.APPROX(1'b0)) dut_exact  (.a(a), .ci(ci), .co(co_e), .sum(sum_e), .carry(carry_e));
  comp82 #(.APPROX(1'b1)) dut_approx (.a(a), .ci(ci), .co(co_a), .sum(sum_a), .carry(carry_a));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%b ci=%b", what, a, ci);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8192; v++) begin
      {ci, a} = 13'(v);
      #1;
      check(int'(sum_e) + 2 * ($countones(co_e) + int'(carry_e)) == $countones({ci, a}),
            "exact weighted count");
      check(co_e[0] == ((a[0] & a[1]) | (a[0] & a[2]) | (a[1] & a[2])), "co0 majority");
      check(sum_e == ^{ci, a}, "exact sum parity");
      check(sum_a == ^{ci, a}, "approx sum parity");
      check(co_a == co_e, "approx co equal exact co");
      check(carry_a == ci[4], "approx carry bypass");
      if ({co_a, sum_a, carry_a} == {co_e, sum_e, carry_e}) n_match++;
    end
    $display("approximate compressor agrees with the exact one on %0d of 8192 inputs", n_match);
    check(n_match == 6144, "75 percent match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
