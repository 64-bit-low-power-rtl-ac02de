// tb_mul16_comp: checks the 16x16 compressor-tree multiplier.
//
// Exact instance (APPROX_COLS = 0): z must equal a * b on corner operands, on every pair
// of 6-bit operands placed at the bottom and at the top of the word, and on random
// operands.
// Approximate instance (default APPROX_COLS = 16): the difference z - a*b must be smaller
// in magnitude than 2^18 (sum of 2^(c+1) over the approximate compressors) and, unless
// z saturated to 32'hffffffff, a multiple of 8 (the lowest approximate compressor sits
// in column 2, so its carry has weight 8). A zero operand must give 0. The test requires
// that approximation errors occur, and prints the error rate, the number of saturated
// results and the mean error distance.
module tb_mul16_comp;

  logic [15:0] a, b;
  logic [31:0] z_ex, z_ap;
  int          checks = 0, failures = 0, n_err = 0, n_vec = 0, n_sat = 0;
  real         sum_ed = 0.0;

  mul16_comp #(.APPROX_COLS(0)) dut_exact  (.a(a), .b(b), .z(z_ex));
  mul16_comp                    dut_approx (.a(a), .b(b), .z(z_ap));

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [31:0]        prod;
    longint             err;
    a = x; b = y;
    #1;
    prod = 32'(x) * 32'(y);
    checks++;
    if (z_ex != prod) begin
      failures++;
      if (failures < 20) $display("FAIL exact %h * %h = %h, got %h", x, y, prod, z_ex);
    end
    err = longint'(z_ap) - longint'(prod);
    if (z_ap == '1) n_sat++;
    checks++;
    if ((z_ap != '1 && err % 8 != 0) || err >= 262144 || err <= -262144) begin
      failures++;
      if (failures < 20) $display("FAIL approx %h * %h: error %0d out of bounds", x, y, err);
    end
    if (x == 16'd0 || y == 16'd0) begin
      checks++;
      if (z_ap != 32'd0) begin
        failures++;
        $display("FAIL approx zero operand %h * %h -> %h", x, y, z_ap);
      end
    end
    n_vec++;
    if (err != 0) n_err++;
    sum_ed += (err < 0) ? -real'(err) : real'(err);

  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'hffff, 16'hffff);
    apply(16'hffff, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'habcd, 16'h0000);
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        apply(16'(i), 16'(j));
        apply(16'(i) << 10, 16'(j) << 10);
      end
    end
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom));
    $display("approximate 16x16: %0d of %0d products differ from a*b, %0d saturated, mean error distance %f",
             n_err, n_vec, n_sat, sum_ed / n_vec);
    checks++;
    if (n_err == 0) begin
      failures++;
      $display("FAIL the approximate instance never differed from the exact product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
