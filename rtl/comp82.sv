// comp82: XOR-MUX 8:2 compressor with an exact and an approximate variant.
//
// Thirteen inputs of equal weight - eight operand bits a[7:0] and five carry-ins
// ci[4:0] coming from the compressor one column lower - are reduced by a chain of six
// XOR-MUX full adders:
//   FA0 (a0, a1, a2)   -> co[0]      FA3 (s2, a7, ci0)  -> co[3]
//   FA1 (s0, a3, a4)   -> co[1]      FA4 (s3, ci1, ci2) -> co[4]
//   FA2 (s1, a5, a6)   -> co[2]      FA5 (s4, ci3, ci4) -> carry, sum
// co[4:0] and carry have twice the weight of the inputs; co[4:0] go to the ci[4:0] of
// the next column. In exact mode sum(inputs) = sum + 2*(co[0]+...+co[4]+carry).
//
// APPROX = 1 removes the multiplexer of the last adder and passes ci[4] straight to
// carry. sum is unchanged. carry is then right in 6144 of the 8192 input combinations
// (75 %): whenever s4 ^ ci3 is 1 the exact carry is ci4 anyway, and otherwise it is s4,
// which equals ci4 half of the time. Each wrong carry changes the column total by plus
// or minus 2.
//
// The adder chain, the port names and the bypass of ci4 follow the published
// compressor; the order of inputs within each adder is read from its drawing.
// Purely combinational.
module comp82 #(
  parameter bit APPROX = 1'b0
) (
  input  logic [7:0] a,
  input  logic [4:0] ci,
  output logic [4:0] co,
  output logic       sum,
  output logic       carry
);

  logic [4:0] s;  // running sums between the six adders

  fa_xm u_fa0 (.a(a[0]), .b(a[1]),  .cin(a[2]),  .sum(s[0]), .cout(co[0]));
  fa_xm u_fa1 (.a(s[0]), .b(a[3]),  .cin(a[4]),  .sum(s[1]), .cout(co[1]));
  fa_xm u_fa2 (.a(s[1]), .b(a[5]),  .cin(a[6]),  .sum(s[2]), .cout(co[2]));
  fa_xm u_fa3 (.a(s[2]), .b(a[7]),  .cin(ci[0]), .sum(s[3]), .cout(co[3]));
  fa_xm u_fa4 (.a(s[3]), .b(ci[1]), .cin(ci[2]), .sum(s[4]), .cout(co[4]));

  generate
    if (APPROX) begin : g_approx
      // Last stage: two XORs for the sum, carry bypassed from ci[4].
      assign sum   = s[4] ^ ci[3] ^ ci[4];
      assign carry = ci[4];
    end else begin : g_exact
      logic carry_ex;
      fa_xm u_fa5 (.a(s[4]), .b(ci[3]), .cin(ci[4]), .sum(sum), .cout(carry_ex));
      assign carry = carry_ex;
    end
  endgenerate

endmodule
