// tb_approx_mult64_top: end-to-end test of the top at its default parameters.
//
// Exact output: compared with a * b, including the four operand pairs of the published
// simulation of the exact multiplier, whose products are also checked against constants.
// Approximate output: must lie within the error bound of the construction - the sum
// over the sixteen 16x16 trees of 2^18 shifted to each tree's weight - or be saturated
// to all ones when the exact product lies that close to 2^128.
// The test counts how often each mechanism of the design was exercised and fails if one
// never was: an approximate result that differs from the exact one, one that equals it,
// a carry out of the cross-product adder (s1), a carry out of the second adder (s2),
// both at once (the half adder's carry), and a saturated approximate result. The carries
// are predicted here from the operands, not read from the design.
// The 8x8 example multiplier on the side ports is checked against a8 * b8 on every
// operand pair.
module tb_approx_mult64_top;

  logic [63:0]  a, b;
  logic [127:0] z_exact, z_approx;
  logic [7:0]   a8, b8;
  logic [15:0]  z8;
  int           checks = 0, failures = 0;
  int           n_apx_diff = 0, n_apx_same = 0, n_c1 = 0, n_c2 = 0, n_c12 = 0, n_sat = 0;
  logic [129:0] bound;

  approx_mult64_top dut (.a(a), .b(b), .z_exact(z_exact), .z_approx(z_approx),
                         .a8(a8), .b8(b8), .z8(z8));

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic apply(input logic [63:0] x, input logic [63:0] y);
    logic [127:0] prod, diff;
    logic [128:0] xsum;
    logic [64:0]  t2;
    logic         c1, c2;
    a = x; b = y;
    #1;
    prod = 128'(x) * 128'(y);
    // carries of the two middle adders, from the operand halves
    xsum = 129'(128'(x[63:32]) * 128'(y[31:0])) + 129'(128'(x[31:0]) * 128'(y[63:32]));
    c1 = (xsum >= (129'(1) << 64));
    t2 = 65'(xsum[63:0]) + (65'(32'(64'(x[63:32]) * 64'(y[63:32]))) << 32)
       + 65'((64'(x[31:0]) * 64'(y[31:0])) >> 32);
    c2 = t2[64];
    if (c1) n_c1++;
    if (c2) n_c2++;
    if (c1 && c2) n_c12++;

    checks++;
    if (z_exact != prod) fail($sformatf("exact %h * %h = %h, got %h", x, y, prod, z_exact));

    checks++;
    if (z_approx == '1 && prod != '1) begin
      n_sat++;
      if ({2'b00, {128{1'b1}}} - 130'(prod) >= bound) fail($sformatf("approx %h * %h saturated too early", x, y));
    end else begin
      diff = (z_approx >= prod) ? z_approx - prod : prod - z_approx;
      if (130'(diff) >= bound)
        fail($sformatf("approx %h * %h = %h, exact %h: error out of bound", x, y, z_approx, prod));
    end
    if (z_approx == z_exact) n_apx_same++; else n_apx_diff++;
  endtask

  task automatic mechanism(input string name, input int count);
    $display("  %-34s %0d", name, count);
    checks++;
    if (count == 0) fail($sformatf("mechanism never exercised: %s", name));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = 8'd0; b8 = 8'd0;
    bound = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        bound += 130'(1) << (18 + 16 * (i + j));

    // operand pairs of the published simulation of the exact multiplier
    apply(64'h1234123412341234, 64'h4321432143214321);
    checks++; if (z_exact != 128'h04c5fe3ff7b9f133e121e7a7ee2df4b4) fail("published product 1");
    apply(64'habcdabcdabcdabcd, 64'habcdabcdabcdabcd);
    checks++; if (z_exact != 128'h734c68c15e3653aa62876d12779d8229) fail("published product 2");
    apply(64'hffffffffffffffff, 64'hffffffffffffffff);
    checks++; if (z_exact != 128'hfffffffffffffffe0000000000000001) fail("published product 3");
    apply(64'h1234567890abcdef, 64'hfedcba0987654321);
    checks++; if (z_exact != 128'h121fa000a3723a57c24a442fe55618cf) fail("published product 4");
    // operand pairs of the published simulation of the approximate multiplier
    apply(64'hab12ab1234567890, 64'h0965348751239684);
    apply(64'hffffffffffffffff, 64'habcdabcdefabcdef);
    apply(64'h456789abcdefabab, 64'h4321432143214321);
    // corners
    apply('0, '0);
    apply('0, '1);
    apply('1, 64'd1);
    apply(64'hffffffff_00000000, 64'hffffffff_ffffffff);
    for (int i = 0; i < 4000; i++) apply({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 1000; i++) apply(~64'({$urandom} & 32'h0000_ffff), ~64'({$urandom} & 32'h0000_ffff));

    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (z8 != 16'(a8) * 16'(b8)) fail($sformatf("8x8 %0d * %0d = %0d", a8, b8, z8));
    end

    $display("mechanisms exercised:");
    mechanism("approximate result differs", n_apx_diff);
    mechanism("approximate result is exact", n_apx_same);
    mechanism("carry out of cross-product adder", n_c1);
    mechanism("carry out of second adder", n_c2);
    mechanism("both carries (half-adder carry)", n_c12);
    mechanism("approximate result saturated", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
