// tb_comp42: exhaustive test of the exact 4:2 compressor. For all 32 input combinations
// the weighted output sum + 2*(carry + cout) must equal the number of ones on the
// inputs, and cout must be the majority of x[2:0] (so that it does not depend on cin,
// which keeps a row of compressors free of a rippling carry).
module tb_comp42;

  logic [3:0] x;
  logic       cin, cout, sum, carry;
  int         checks = 0, failures = 0;

  comp42 dut (.x(x), .cin(cin), .cout(cout), .sum(sum), .carry(carry));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {cin, x} = 5'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones({cin, x})) begin
        failures++;
        $display("FAIL x=%b cin=%b -> sum=%b carry=%b cout=%b", x, cin, sum, carry, cout);
      end
      checks++;
      if (cout != ((x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]))) begin
        failures++;
        $display("FAIL cout not majority of x[2:0]: x=%b cin=%b cout=%b", x, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
