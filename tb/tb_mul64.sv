// tb_mul64: checks the 64x64 multiplier.
//
// Exact instance (APPROX_COLS = 0) against a * b, including the operand pairs shown in
// the published simulation of the exact multiplier. The approximate instance (default)
// is checked against its decomposition: each 32x32 quarter is the sum of four 16x16
// approximate products a[16i+15:16i] * b[16j+15:16j] shifted by 16(i+j) (taken from
// separate mul16_comp instances) saturated to 64 bits, and the product is the sum of the
// four shifted quarters saturated to 128 bits. Random operands and all-ones operands exercise the carry-outs of the two
// 64-bit middle adders.
module tb_mul64;

  logic [63:0]  a, b;
  logic [127:0] z_ex, z_ap;
  logic [31:0]  r [4][4];
  int           checks = 0, failures = 0, n_sat = 0;

  mul64 #(.APPROX_COLS(0)) dut_exact  (.a(a), .b(b), .z(z_ex));
  mul64                    dut_approx (.a(a), .b(b), .z(z_ap));

  for (genvar i = 0; i < 4; i++) begin : g_i
    for (genvar j = 0; j < 4; j++) begin : g_j
      mul16_comp ref16 (.a(a[16*i +: 16]), .b(b[16*j +: 16]), .z(r[i][j]));
    end
  end

  task automatic apply(input logic [63:0] x, input logic [63:0] y);
    logic [127:0] prod, expect_ap;
    logic [65:0]  q;
    logic [129:0] acc;
    a = x; b = y;
    #1;
    prod = 128'(x) * 128'(y);
    acc = '0;
    for (int qi = 0; qi < 2; qi++) begin
      for (int qj = 0; qj < 2; qj++) begin
        q = 66'(r[2*qi][2*qj]) + (66'(r[2*qi+1][2*qj]) << 16) + (66'(r[2*qi][2*qj+1]) << 16)
          + (66'(r[2*qi+1][2*qj+1]) << 32);
        if (q[65:64] != 2'b00) q = {2'b00, 64'hffff_ffff_ffff_ffff};
        acc += 130'(q) << (32 * (qi + qj));
      end
    end
    expect_ap = (acc[129:128] != 2'b00) ? '1 : acc[127:0];
    if (expect_ap == '1 && prod != '1) n_sat++;
    checks += 2;
    if (z_ex != prod) begin
      failures++;
      if (failures < 20) $display("FAIL exact %h * %h = %h, got %h", x, y, prod, z_ex);
    end
    if (z_ap != expect_ap) begin
      failures++;
      if (failures < 20) $display("FAIL approx %h * %h: expected %h, got %h", x, y, expect_ap, z_ap);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(64'h1234123412341234, 64'h4321432143214321);
    apply(64'habcdabcdabcdabcd, 64'habcdabcdabcdabcd);
    apply(64'hffffffffffffffff, 64'hffffffffffffffff);
    apply(64'h1234567890abcdef, 64'hfedcba0987654321);
    apply('0, '0);
    apply('1, 64'd1);
    for (int i = 0; i < 5000; i++) apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("approximate results that saturated: %0d", n_sat);
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL the saturating corner was never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
