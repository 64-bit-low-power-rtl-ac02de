// tb_fa_xm: exhaustive test of the XOR-MUX full adder. All eight input combinations are
// applied and {cout, sum} is compared with the arithmetic sum a + b + cin.
module tb_fa_xm;

  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;

  fa_xm dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(a + b + cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
