// tb_mul32: checks the 32x32 multiplier.
//
// Exact instance (APPROX_COLS = 0) against a * b. The approximate instance (default) is
// checked against its decomposition: the sum, saturated to 64 bits, of the four 16x16
// approximate products aL*bL, aH*bL, aL*bH and aH*bH shifted to their weights, the 16x16 products
// coming from separate mul16_comp instances (tested on their own in tb_mul16_comp).
// This checks the split into halves, the three adders and the half adder that merges
// the two carry-outs. Corner cases force both carry-outs and their sum.
module tb_mul32;

  logic [31:0] a, b;
  logic [63:0] z_ex, z_ap;
  logic [31:0] r_ll, r_hl, r_lh, r_hh;
  int          checks = 0, failures = 0, n_sat = 0;

  mul32 #(.APPROX_COLS(0)) dut_exact  (.a(a), .b(b), .z(z_ex));
  mul32                    dut_approx (.a(a), .b(b), .z(z_ap));

  mul16_comp ref_ll (.a(a[15:0]),  .b(b[15:0]),  .z(r_ll));
  mul16_comp ref_hl (.a(a[31:16]), .b(b[15:0]),  .z(r_hl));
  mul16_comp ref_lh (.a(a[15:0]),  .b(b[31:16]), .z(r_lh));
  mul16_comp ref_hh (.a(a[31:16]), .b(b[31:16]), .z(r_hh));

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] prod, expect_ap;
    logic [65:0] acc;
    a = x; b = y;
    #1;
    prod = 64'(x) * 64'(y);
    acc = 66'(r_ll) + (66'(r_hl) << 16) + (66'(r_lh) << 16) + (66'(r_hh) << 32);
    expect_ap = (acc[65:64] != 2'b00) ? '1 : acc[63:0];
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
    apply('0, '0);
    apply('1, '1);
    apply('1, 32'd1);
    apply(32'hffff_0000, 32'h0000_ffff);
    apply(32'hffff_ffff, 32'hffff_0001);
    apply(32'h8000_0001, 32'hffff_ffff);
    apply(32'hffff_fff0, 32'hffff_fff3);
    for (int i = 0; i < 20000; i++) apply($urandom, $urandom);
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
