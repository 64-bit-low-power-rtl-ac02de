// tb_cla_adder: checks the carry-lookahead adder at 64 bits (the default) and at 32 bits
// against the arithmetic sum, on corner cases (all ones, carry through every group,
// single bits) and on random operands.
module tb_cla_adder;

  logic [63:0] a64, b64, s64;
  logic        c64;
  logic [31:0] a32, b32, s32;
  logic        c32;
  int          checks = 0, failures = 0;

  cla_adder            dut64 (.a(a64), .b(b64), .sum(s64), .cout(c64));
  cla_adder #(.W(32))  dut32 (.a(a32), .b(b32), .sum(s32), .cout(c32));

  task automatic apply(input logic [63:0] x, input logic [63:0] y);
    logic [64:0] ref64;
    logic [32:0] ref32;
    a64 = x; b64 = y; a32 = x[31:0]; b32 = y[31:0];
    #1;
    ref64 = {1'b0, x} + {1'b0, y};
    ref32 = {1'b0, x[31:0]} + {1'b0, y[31:0]};
    checks += 2;
    if ({c64, s64} != ref64) begin
      failures++;
      $display("FAIL W=64 %h + %h = %h, got %b_%h", x, y, ref64, c64, s64);
    end
    if ({c32, s32} != ref32) begin
      failures++;
      $display("FAIL W=32 %h + %h = %h, got %b_%h", x[31:0], y[31:0], ref32, c32, s32);
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
    apply('0, '0);
    apply('1, '1);
    apply('1, 64'd1);
    apply(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaab);
    for (int i = 0; i < 64; i++) begin
      apply(64'd1 << i, 64'd1 << i);
      apply(~(64'd0) >> i, 64'd1);
    end
    for (int i = 0; i < 5000; i++) apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
