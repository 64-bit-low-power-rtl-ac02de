// mul32: 32x32 unsigned multiplier assembled from four 16x16 compressor-tree multipliers (mul16_comp).
//
// With a = {aH, aL} and b = {bH, bL} split into 16-bit halves:
//   v1 = aL*bL, v2 = aH*bL, v3 = aL*bH, v4 = aH*bH          (32-bit products)
//   s1: v2 + v3                                -> sum1 (32 bits), c1 (weight 2^48)
//   s2: sum1 + {v4[15:0], v1[31:16]}           -> sum2 (32 bits), c2 (weight 2^48)
//   ha: c1 + c2                                -> {hc, hs}
//   s3: v4[31:16] + {hc, hs}                   -> top (16 bits)
//   z = {top, sum2, v1[15:0]}
// The four sub-multipliers, the two 32-bit carry-lookahead adders s1 and s2, the half
// adder that merges their carry-outs and the third adder follow the published block
// diagram of the 64-bit multiplier. The third adder is 16 bits wide here because only
// that many of its bits carry information. Which cross product feeds which port of s1
// does not matter and is this design's choice.
// The same arrangement one level down (32 bits from four 16x16 trees) is this
// design's reading of the 32-bit sub-module, whose insides are not shown in the
// published material; only its name and ports are.
//
// APPROX_COLS is passed unchanged to every 16x16 tree below, so each of them makes its
// low APPROX_COLS columns approximate; 0 gives the exact multiplier. All adders here are
// exact, so the error of the product is the sum of the shifted errors of the trees.
// When the approximate sum reaches 2^64 (possible only for operands close to all ones)
// the carry out of s3 is 1 and z saturates to all ones rather than wrapping around;
// that saturation is this design's choice and is generated only when APPROX_COLS > 0,
// since the exact product never produces that carry.
// Ports: a, b (32 bits); z (64 bits). Purely combinational.
module mul32 #(
  parameter int unsigned APPROX_COLS = mult_pkg::APPROX_COLS_DEFAULT
) (
  input  logic [31:0]  a,
  input  logic [31:0]  b,
  output logic [63:0] z
);

  localparam int unsigned H = mult_pkg::SUB_W;

  logic [31:0]  v1, v2, v3, v4;
  logic [31:0]  sum1, sum2;
  logic         c1, c2, hc, hs;
  logic [H-1:0] top;
  logic         top_cout;  // weight 2^64: always 0 for an exact product
  logic [63:0] total;

  mul16_comp #(.APPROX_COLS(APPROX_COLS)) u_v1 (.a(a[H-1:0]),  .b(b[H-1:0]),  .z(v1));
  mul16_comp #(.APPROX_COLS(APPROX_COLS)) u_v2 (.a(a[31:H]), .b(b[H-1:0]),  .z(v2));
  mul16_comp #(.APPROX_COLS(APPROX_COLS)) u_v3 (.a(a[H-1:0]),  .b(b[31:H]), .z(v3));
  mul16_comp #(.APPROX_COLS(APPROX_COLS)) u_v4 (.a(a[31:H]), .b(b[31:H]), .z(v4));

  cla_adder #(.W(32)) u_s1 (.a(v2),   .b(v3),                     .sum(sum1), .cout(c1));
  cla_adder #(.W(32)) u_s2 (.a(sum1), .b({v4[H-1:0], v1[31:H]}), .sum(sum2), .cout(c2));
  half_adder        u_ha (.a(c1), .b(c2), .sum(hs), .carry(hc));
  cla_adder #(.W(H))  u_s3 (.a(v4[31:H]), .b({{(H-2){1'b0}}, hc, hs}), .sum(top), .cout(top_cout));

  assign total = {top, sum2, v1[H-1:0]};

  if (APPROX_COLS > 0) begin : g_saturate
    assign z = top_cout ? '1 : total;
  end else begin : g_exact
    assign z = total;  // top_cout is provably 0 here
  end

endmodule
