// tb_mul8_42: exhaustive test of the 8x8 4:2-compressor multiplier. All 65536 operand
// pairs are applied and z is compared with a * b.
module tb_mul8_42;

  logic [7:0]  a, b;
  logic [15:0] z;
  int          checks = 0, failures = 0;

  mul8_42 dut (.a(a), .b(b), .z(z));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (z != 16'(i * j)) begin
          failures++;
          if (failures < 20) $display("FAIL %0d * %0d = %0d, got %0d", i, j, i * j, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
