// mul16_comp: 16x16 unsigned multiplier with a two-stage compressor tree.
//
// Partial products: pp[i][j] = b[i] & a[j] (AND array, 256 bits, weight 2^(i+j)).
//
// Stage 1 - 8:2 compressors. Column c (weight 2^c, heights 1..16..1) receives
//   k(c) = max(ceil(max(0, h(c) - 2) / 8), k(c-1)) XOR-MUX 8:2 compressors. Compressor j
//   of column c takes eight bits of the column on a[7:0] and the five co outputs of
//   compressor j of column c-1 on ci[4:0], so each "chain" j runs from the column where
//   it starts up to the top column. A chain that starts in column c fills its ci inputs
//   with bits of that column. Two chains exist: from column 2 and from column 10. Unused
//   compressor inputs are tied to 0. After this stage no column holds more than 4 bits.
// Stage 2 - 4:2 compressors. One chain of exact 4:2 compressors, cout of column c into
//   cin of column c+1, placed in every column that has at least three bits counting the
//   incoming cout (or any bit at all when a cout arrives). After it every column holds
//   at most two bits, so no full-adder stage is needed for this size.
// Final addition - the two remaining rows are added by a 32-bit carry-lookahead adder.
//
// Outputs of weight 2^32 (the co/carry wires of the top column, collected in "spill",
// and the carry-out of the final adder) are always 0 for an exact product, since a*b is
// below 2^32 and every wire carries a non-negative weight. In the approximate variant a
// wrong carry can push the represented value to 2^32 or above, near a = b = 16'hffff;
// any of those wires being 1 then saturates z to 32'hffffffff instead of letting the
// product wrap around to a small number. Saturation is this design's choice; it is
// generated only when APPROX_COLS > 0.
//
// APPROX_COLS: every 8:2 compressor in a column below APPROX_COLS uses the approximate
// carry (carry = ci[4]); columns at and above it are exact. APPROX_COLS = 0 gives the
// exact multiplier. With the default of 16 the product differs from a*b by a multiple of
// 8 whose magnitude is below 2^18 (unless it saturates, which keeps it within that
// distance too).
//
// The AND array, the order 8:2 -> 4:2 -> carry-lookahead adder and exact compressors in
// the more significant columns follow the published multiplier; the column-by-column
// placement above is this design's own.
//
// The instance list below is regular but written out compressor by compressor. Net
// names: s<stage>_c<column>_k<chain>_<pin>. Purely combinational; the timing is the depth
// of one 8:2 chain segment, one 4:2 compressor and the 32-bit adder.
module mul16_comp #(
  parameter int unsigned APPROX_COLS = mult_pkg::APPROX_COLS_DEFAULT
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] z
);

  localparam int unsigned NSPILL = 14;

  logic [15:0][15:0] pp;         // pp[i][j] = b[i] & a[j]
  logic [31:0]       row_a, row_b;
  logic [31:0]       total;       // row_a + row_b modulo 2^32
  logic              final_cout;  // weight 2^32
  logic [NSPILL-1:0] spill;       // tree outputs of weight 2^32

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        pp[i][j] = b[i] & a[j];
      end
    end
  end

  // Nets between the stages (named s<stage>_c<column>_...)
  logic s1_c2_k0_co0, s1_c2_k0_co1, s1_c2_k0_co2, s1_c2_k0_co3, s1_c2_k0_co4, s1_c2_k0_sum;
  logic s1_c2_k0_carry, s1_c3_k0_co0, s1_c3_k0_co1, s1_c3_k0_co2, s1_c3_k0_co3, s1_c3_k0_co4;
  logic s1_c3_k0_sum, s1_c3_k0_carry, s1_c4_k0_co0, s1_c4_k0_co1, s1_c4_k0_co2, s1_c4_k0_co3;
  logic s1_c4_k0_co4, s1_c4_k0_sum, s1_c4_k0_carry, s1_c5_k0_co0, s1_c5_k0_co1, s1_c5_k0_co2;
  logic s1_c5_k0_co3, s1_c5_k0_co4, s1_c5_k0_sum, s1_c5_k0_carry, s1_c6_k0_co0, s1_c6_k0_co1;
  logic s1_c6_k0_co2, s1_c6_k0_co3, s1_c6_k0_co4, s1_c6_k0_sum, s1_c6_k0_carry, s1_c7_k0_co0;
  logic s1_c7_k0_co1, s1_c7_k0_co2, s1_c7_k0_co3, s1_c7_k0_co4, s1_c7_k0_sum, s1_c7_k0_carry;
  logic s1_c8_k0_co0, s1_c8_k0_co1, s1_c8_k0_co2, s1_c8_k0_co3, s1_c8_k0_co4, s1_c8_k0_sum;
  logic s1_c8_k0_carry, s1_c9_k0_co0, s1_c9_k0_co1, s1_c9_k0_co2, s1_c9_k0_co3, s1_c9_k0_co4;
  logic s1_c9_k0_sum, s1_c9_k0_carry, s1_c10_k0_co0, s1_c10_k0_co1, s1_c10_k0_co2, s1_c10_k0_co3;
  logic s1_c10_k0_co4, s1_c10_k0_sum, s1_c10_k0_carry, s1_c10_k1_co0, s1_c10_k1_co1, s1_c10_k1_co2;
  logic s1_c10_k1_co3, s1_c10_k1_co4, s1_c10_k1_sum, s1_c10_k1_carry, s1_c11_k0_co0, s1_c11_k0_co1;
  logic s1_c11_k0_co2, s1_c11_k0_co3, s1_c11_k0_co4, s1_c11_k0_sum, s1_c11_k0_carry, s1_c11_k1_co0;
  logic s1_c11_k1_co1, s1_c11_k1_co2, s1_c11_k1_co3, s1_c11_k1_co4, s1_c11_k1_sum, s1_c11_k1_carry;
  logic s1_c12_k0_co0, s1_c12_k0_co1, s1_c12_k0_co2, s1_c12_k0_co3, s1_c12_k0_co4, s1_c12_k0_sum;
  logic s1_c12_k0_carry, s1_c12_k1_co0, s1_c12_k1_co1, s1_c12_k1_co2, s1_c12_k1_co3, s1_c12_k1_co4;
  logic s1_c12_k1_sum, s1_c12_k1_carry, s1_c13_k0_co0, s1_c13_k0_co1, s1_c13_k0_co2, s1_c13_k0_co3;
  logic s1_c13_k0_co4, s1_c13_k0_sum, s1_c13_k0_carry, s1_c13_k1_co0, s1_c13_k1_co1, s1_c13_k1_co2;
  logic s1_c13_k1_co3, s1_c13_k1_co4, s1_c13_k1_sum, s1_c13_k1_carry, s1_c14_k0_co0, s1_c14_k0_co1;
  logic s1_c14_k0_co2, s1_c14_k0_co3, s1_c14_k0_co4, s1_c14_k0_sum, s1_c14_k0_carry, s1_c14_k1_co0;
  logic s1_c14_k1_co1, s1_c14_k1_co2, s1_c14_k1_co3, s1_c14_k1_co4, s1_c14_k1_sum, s1_c14_k1_carry;
  logic s1_c15_k0_co0, s1_c15_k0_co1, s1_c15_k0_co2, s1_c15_k0_co3, s1_c15_k0_co4, s1_c15_k0_sum;
  logic s1_c15_k0_carry, s1_c15_k1_co0, s1_c15_k1_co1, s1_c15_k1_co2, s1_c15_k1_co3, s1_c15_k1_co4;
  logic s1_c15_k1_sum, s1_c15_k1_carry, s1_c16_k0_co0, s1_c16_k0_co1, s1_c16_k0_co2, s1_c16_k0_co3;
  logic s1_c16_k0_co4, s1_c16_k0_sum, s1_c16_k0_carry, s1_c16_k1_co0, s1_c16_k1_co1, s1_c16_k1_co2;
  logic s1_c16_k1_co3, s1_c16_k1_co4, s1_c16_k1_sum, s1_c16_k1_carry, s1_c17_k0_co0, s1_c17_k0_co1;
  logic s1_c17_k0_co2, s1_c17_k0_co3, s1_c17_k0_co4, s1_c17_k0_sum, s1_c17_k0_carry, s1_c17_k1_co0;
  logic s1_c17_k1_co1, s1_c17_k1_co2, s1_c17_k1_co3, s1_c17_k1_co4, s1_c17_k1_sum, s1_c17_k1_carry;
  logic s1_c18_k0_co0, s1_c18_k0_co1, s1_c18_k0_co2, s1_c18_k0_co3, s1_c18_k0_co4, s1_c18_k0_sum;
  logic s1_c18_k0_carry, s1_c18_k1_co0, s1_c18_k1_co1, s1_c18_k1_co2, s1_c18_k1_co3, s1_c18_k1_co4;
  logic s1_c18_k1_sum, s1_c18_k1_carry, s1_c19_k0_co0, s1_c19_k0_co1, s1_c19_k0_co2, s1_c19_k0_co3;
  logic s1_c19_k0_co4, s1_c19_k0_sum, s1_c19_k0_carry, s1_c19_k1_co0, s1_c19_k1_co1, s1_c19_k1_co2;
  logic s1_c19_k1_co3, s1_c19_k1_co4, s1_c19_k1_sum, s1_c19_k1_carry, s1_c20_k0_co0, s1_c20_k0_co1;
  logic s1_c20_k0_co2, s1_c20_k0_co3, s1_c20_k0_co4, s1_c20_k0_sum, s1_c20_k0_carry, s1_c20_k1_co0;
  logic s1_c20_k1_co1, s1_c20_k1_co2, s1_c20_k1_co3, s1_c20_k1_co4, s1_c20_k1_sum, s1_c20_k1_carry;
  logic s1_c21_k0_co0, s1_c21_k0_co1, s1_c21_k0_co2, s1_c21_k0_co3, s1_c21_k0_co4, s1_c21_k0_sum;
  logic s1_c21_k0_carry, s1_c21_k1_co0, s1_c21_k1_co1, s1_c21_k1_co2, s1_c21_k1_co3, s1_c21_k1_co4;
  logic s1_c21_k1_sum, s1_c21_k1_carry, s1_c22_k0_co0, s1_c22_k0_co1, s1_c22_k0_co2, s1_c22_k0_co3;
  logic s1_c22_k0_co4, s1_c22_k0_sum, s1_c22_k0_carry, s1_c22_k1_co0, s1_c22_k1_co1, s1_c22_k1_co2;
  logic s1_c22_k1_co3, s1_c22_k1_co4, s1_c22_k1_sum, s1_c22_k1_carry, s1_c23_k0_co0, s1_c23_k0_co1;
  logic s1_c23_k0_co2, s1_c23_k0_co3, s1_c23_k0_co4, s1_c23_k0_sum, s1_c23_k0_carry, s1_c23_k1_co0;
  logic s1_c23_k1_co1, s1_c23_k1_co2, s1_c23_k1_co3, s1_c23_k1_co4, s1_c23_k1_sum, s1_c23_k1_carry;
  logic s1_c24_k0_co0, s1_c24_k0_co1, s1_c24_k0_co2, s1_c24_k0_co3, s1_c24_k0_co4, s1_c24_k0_sum;
  logic s1_c24_k0_carry, s1_c24_k1_co0, s1_c24_k1_co1, s1_c24_k1_co2, s1_c24_k1_co3, s1_c24_k1_co4;
  logic s1_c24_k1_sum, s1_c24_k1_carry, s1_c25_k0_co0, s1_c25_k0_co1, s1_c25_k0_co2, s1_c25_k0_co3;
  logic s1_c25_k0_co4, s1_c25_k0_sum, s1_c25_k0_carry, s1_c25_k1_co0, s1_c25_k1_co1, s1_c25_k1_co2;
  logic s1_c25_k1_co3, s1_c25_k1_co4, s1_c25_k1_sum, s1_c25_k1_carry, s1_c26_k0_co0, s1_c26_k0_co1;
  logic s1_c26_k0_co2, s1_c26_k0_co3, s1_c26_k0_co4, s1_c26_k0_sum, s1_c26_k0_carry, s1_c26_k1_co0;
  logic s1_c26_k1_co1, s1_c26_k1_co2, s1_c26_k1_co3, s1_c26_k1_co4, s1_c26_k1_sum, s1_c26_k1_carry;
  logic s1_c27_k0_co0, s1_c27_k0_co1, s1_c27_k0_co2, s1_c27_k0_co3, s1_c27_k0_co4, s1_c27_k0_sum;
  logic s1_c27_k0_carry, s1_c27_k1_co0, s1_c27_k1_co1, s1_c27_k1_co2, s1_c27_k1_co3, s1_c27_k1_co4;
  logic s1_c27_k1_sum, s1_c27_k1_carry, s1_c28_k0_co0, s1_c28_k0_co1, s1_c28_k0_co2, s1_c28_k0_co3;
  logic s1_c28_k0_co4, s1_c28_k0_sum, s1_c28_k0_carry, s1_c28_k1_co0, s1_c28_k1_co1, s1_c28_k1_co2;
  logic s1_c28_k1_co3, s1_c28_k1_co4, s1_c28_k1_sum, s1_c28_k1_carry, s1_c29_k0_co0, s1_c29_k0_co1;
  logic s1_c29_k0_co2, s1_c29_k0_co3, s1_c29_k0_co4, s1_c29_k0_sum, s1_c29_k0_carry, s1_c29_k1_co0;
  logic s1_c29_k1_co1, s1_c29_k1_co2, s1_c29_k1_co3, s1_c29_k1_co4, s1_c29_k1_sum, s1_c29_k1_carry;
  logic s1_c30_k0_co0, s1_c30_k0_co1, s1_c30_k0_co2, s1_c30_k0_co3, s1_c30_k0_co4, s1_c30_k0_sum;
  logic s1_c30_k0_carry, s1_c30_k1_co0, s1_c30_k1_co1, s1_c30_k1_co2, s1_c30_k1_co3, s1_c30_k1_co4;
  logic s1_c30_k1_sum, s1_c30_k1_carry, s1_c31_k0_co0, s1_c31_k0_co1, s1_c31_k0_co2, s1_c31_k0_co3;
  logic s1_c31_k0_co4, s1_c31_k0_sum, s1_c31_k0_carry, s1_c31_k1_co0, s1_c31_k1_co1, s1_c31_k1_co2;
  logic s1_c31_k1_co3, s1_c31_k1_co4, s1_c31_k1_sum, s1_c31_k1_carry, s2_c8_cout, s2_c8_sum;
  logic s2_c8_carry, s2_c9_cout, s2_c9_sum, s2_c9_carry, s2_c10_cout, s2_c10_sum;
  logic s2_c10_carry, s2_c11_cout, s2_c11_sum, s2_c11_carry, s2_c12_cout, s2_c12_sum;
  logic s2_c12_carry, s2_c13_cout, s2_c13_sum, s2_c13_carry, s2_c14_cout, s2_c14_sum;
  logic s2_c14_carry, s2_c15_cout, s2_c15_sum, s2_c15_carry, s2_c16_cout, s2_c16_sum;
  logic s2_c16_carry, s2_c17_cout, s2_c17_sum, s2_c17_carry, s2_c18_cout, s2_c18_sum;
  logic s2_c18_carry, s2_c19_cout, s2_c19_sum, s2_c19_carry, s2_c20_cout, s2_c20_sum;
  logic s2_c20_carry, s2_c21_cout, s2_c21_sum, s2_c21_carry, s2_c22_cout, s2_c22_sum;
  logic s2_c22_carry, s2_c23_cout, s2_c23_sum, s2_c23_carry, s2_c24_cout, s2_c24_sum;
  logic s2_c24_carry, s2_c25_cout, s2_c25_sum, s2_c25_carry, s2_c26_cout, s2_c26_sum;
  logic s2_c26_carry, s2_c27_cout, s2_c27_sum, s2_c27_carry, s2_c28_cout, s2_c28_sum;
  logic s2_c28_carry, s2_c29_cout, s2_c29_sum, s2_c29_carry, s2_c30_cout, s2_c30_sum;
  logic s2_c30_carry, s2_c31_cout, s2_c31_sum, s2_c31_carry;

  // Stage 1: 8:2 compressor chains
  comp82 #(.APPROX(APPROX_COLS > 2)) u_s1_c2_k0 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, pp[2][0], pp[1][1], pp[0][2]}),
    .ci({1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .co({s1_c2_k0_co4, s1_c2_k0_co3, s1_c2_k0_co2, s1_c2_k0_co1, s1_c2_k0_co0}),
    .sum(s1_c2_k0_sum), .carry(s1_c2_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 3)) u_s1_c3_k0 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, pp[3][0], pp[2][1], pp[1][2], pp[0][3]}),
    .ci({s1_c2_k0_co4, s1_c2_k0_co3, s1_c2_k0_co2, s1_c2_k0_co1, s1_c2_k0_co0}),
    .co({s1_c3_k0_co4, s1_c3_k0_co3, s1_c3_k0_co2, s1_c3_k0_co1, s1_c3_k0_co0}),
    .sum(s1_c3_k0_sum), .carry(s1_c3_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 4)) u_s1_c4_k0 (
    .a ({1'b0, 1'b0, 1'b0, pp[4][0], pp[3][1], pp[2][2], pp[1][3], pp[0][4]}),
    .ci({s1_c3_k0_co4, s1_c3_k0_co3, s1_c3_k0_co2, s1_c3_k0_co1, s1_c3_k0_co0}),
    .co({s1_c4_k0_co4, s1_c4_k0_co3, s1_c4_k0_co2, s1_c4_k0_co1, s1_c4_k0_co0}),
    .sum(s1_c4_k0_sum), .carry(s1_c4_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 5)) u_s1_c5_k0 (
    .a ({1'b0, 1'b0, pp[5][0], pp[4][1], pp[3][2], pp[2][3], pp[1][4], pp[0][5]}),
    .ci({s1_c4_k0_co4, s1_c4_k0_co3, s1_c4_k0_co2, s1_c4_k0_co1, s1_c4_k0_co0}),
    .co({s1_c5_k0_co4, s1_c5_k0_co3, s1_c5_k0_co2, s1_c5_k0_co1, s1_c5_k0_co0}),
    .sum(s1_c5_k0_sum), .carry(s1_c5_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 6)) u_s1_c6_k0 (
    .a ({1'b0, pp[6][0], pp[5][1], pp[4][2], pp[3][3], pp[2][4], pp[1][5], pp[0][6]}),
    .ci({s1_c5_k0_co4, s1_c5_k0_co3, s1_c5_k0_co2, s1_c5_k0_co1, s1_c5_k0_co0}),
    .co({s1_c6_k0_co4, s1_c6_k0_co3, s1_c6_k0_co2, s1_c6_k0_co1, s1_c6_k0_co0}),
    .sum(s1_c6_k0_sum), .carry(s1_c6_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 7)) u_s1_c7_k0 (
    .a ({pp[7][0], pp[6][1], pp[5][2], pp[4][3], pp[3][4], pp[2][5], pp[1][6], pp[0][7]}),
    .ci({s1_c6_k0_co4, s1_c6_k0_co3, s1_c6_k0_co2, s1_c6_k0_co1, s1_c6_k0_co0}),
    .co({s1_c7_k0_co4, s1_c7_k0_co3, s1_c7_k0_co2, s1_c7_k0_co1, s1_c7_k0_co0}),
    .sum(s1_c7_k0_sum), .carry(s1_c7_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 8)) u_s1_c8_k0 (
    .a ({pp[7][1], pp[6][2], pp[5][3], pp[4][4], pp[3][5], pp[2][6], pp[1][7], pp[0][8]}),
    .ci({s1_c7_k0_co4, s1_c7_k0_co3, s1_c7_k0_co2, s1_c7_k0_co1, s1_c7_k0_co0}),
    .co({s1_c8_k0_co4, s1_c8_k0_co3, s1_c8_k0_co2, s1_c8_k0_co1, s1_c8_k0_co0}),
    .sum(s1_c8_k0_sum), .carry(s1_c8_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 9)) u_s1_c9_k0 (
    .a ({pp[7][2], pp[6][3], pp[5][4], pp[4][5], pp[3][6], pp[2][7], pp[1][8], pp[0][9]}),
    .ci({s1_c8_k0_co4, s1_c8_k0_co3, s1_c8_k0_co2, s1_c8_k0_co1, s1_c8_k0_co0}),
    .co({s1_c9_k0_co4, s1_c9_k0_co3, s1_c9_k0_co2, s1_c9_k0_co1, s1_c9_k0_co0}),
    .sum(s1_c9_k0_sum), .carry(s1_c9_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 10)) u_s1_c10_k0 (
    .a ({pp[7][3], pp[6][4], pp[5][5], pp[4][6], pp[3][7], pp[2][8], pp[1][9], pp[0][10]}),
    .ci({s1_c9_k0_co4, s1_c9_k0_co3, s1_c9_k0_co2, s1_c9_k0_co1, s1_c9_k0_co0}),
    .co({s1_c10_k0_co4, s1_c10_k0_co3, s1_c10_k0_co2, s1_c10_k0_co1, s1_c10_k0_co0}),
    .sum(s1_c10_k0_sum), .carry(s1_c10_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 10)) u_s1_c10_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, pp[10][0], pp[9][1], pp[8][2]}),
    .ci({1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .co({s1_c10_k1_co4, s1_c10_k1_co3, s1_c10_k1_co2, s1_c10_k1_co1, s1_c10_k1_co0}),
    .sum(s1_c10_k1_sum), .carry(s1_c10_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 11)) u_s1_c11_k0 (
    .a ({pp[7][4], pp[6][5], pp[5][6], pp[4][7], pp[3][8], pp[2][9], pp[1][10], pp[0][11]}),
    .ci({s1_c10_k0_co4, s1_c10_k0_co3, s1_c10_k0_co2, s1_c10_k0_co1, s1_c10_k0_co0}),
    .co({s1_c11_k0_co4, s1_c11_k0_co3, s1_c11_k0_co2, s1_c11_k0_co1, s1_c11_k0_co0}),
    .sum(s1_c11_k0_sum), .carry(s1_c11_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 11)) u_s1_c11_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, pp[11][0], pp[10][1], pp[9][2], pp[8][3]}),
    .ci({s1_c10_k1_co4, s1_c10_k1_co3, s1_c10_k1_co2, s1_c10_k1_co1, s1_c10_k1_co0}),
    .co({s1_c11_k1_co4, s1_c11_k1_co3, s1_c11_k1_co2, s1_c11_k1_co1, s1_c11_k1_co0}),
    .sum(s1_c11_k1_sum), .carry(s1_c11_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 12)) u_s1_c12_k0 (
    .a ({pp[7][5], pp[6][6], pp[5][7], pp[4][8], pp[3][9], pp[2][10], pp[1][11], pp[0][12]}),
    .ci({s1_c11_k0_co4, s1_c11_k0_co3, s1_c11_k0_co2, s1_c11_k0_co1, s1_c11_k0_co0}),
    .co({s1_c12_k0_co4, s1_c12_k0_co3, s1_c12_k0_co2, s1_c12_k0_co1, s1_c12_k0_co0}),
    .sum(s1_c12_k0_sum), .carry(s1_c12_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 12)) u_s1_c12_k1 (
    .a ({1'b0, 1'b0, 1'b0, pp[12][0], pp[11][1], pp[10][2], pp[9][3], pp[8][4]}),
    .ci({s1_c11_k1_co4, s1_c11_k1_co3, s1_c11_k1_co2, s1_c11_k1_co1, s1_c11_k1_co0}),
    .co({s1_c12_k1_co4, s1_c12_k1_co3, s1_c12_k1_co2, s1_c12_k1_co1, s1_c12_k1_co0}),
    .sum(s1_c12_k1_sum), .carry(s1_c12_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 13)) u_s1_c13_k0 (
    .a ({pp[7][6], pp[6][7], pp[5][8], pp[4][9], pp[3][10], pp[2][11], pp[1][12], pp[0][13]}),
    .ci({s1_c12_k0_co4, s1_c12_k0_co3, s1_c12_k0_co2, s1_c12_k0_co1, s1_c12_k0_co0}),
    .co({s1_c13_k0_co4, s1_c13_k0_co3, s1_c13_k0_co2, s1_c13_k0_co1, s1_c13_k0_co0}),
    .sum(s1_c13_k0_sum), .carry(s1_c13_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 13)) u_s1_c13_k1 (
    .a ({1'b0, 1'b0, pp[13][0], pp[12][1], pp[11][2], pp[10][3], pp[9][4], pp[8][5]}),
    .ci({s1_c12_k1_co4, s1_c12_k1_co3, s1_c12_k1_co2, s1_c12_k1_co1, s1_c12_k1_co0}),
    .co({s1_c13_k1_co4, s1_c13_k1_co3, s1_c13_k1_co2, s1_c13_k1_co1, s1_c13_k1_co0}),
    .sum(s1_c13_k1_sum), .carry(s1_c13_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 14)) u_s1_c14_k0 (
    .a ({pp[7][7], pp[6][8], pp[5][9], pp[4][10], pp[3][11], pp[2][12], pp[1][13], pp[0][14]}),
    .ci({s1_c13_k0_co4, s1_c13_k0_co3, s1_c13_k0_co2, s1_c13_k0_co1, s1_c13_k0_co0}),
    .co({s1_c14_k0_co4, s1_c14_k0_co3, s1_c14_k0_co2, s1_c14_k0_co1, s1_c14_k0_co0}),
    .sum(s1_c14_k0_sum), .carry(s1_c14_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 14)) u_s1_c14_k1 (
    .a ({1'b0, pp[14][0], pp[13][1], pp[12][2], pp[11][3], pp[10][4], pp[9][5], pp[8][6]}),
    .ci({s1_c13_k1_co4, s1_c13_k1_co3, s1_c13_k1_co2, s1_c13_k1_co1, s1_c13_k1_co0}),
    .co({s1_c14_k1_co4, s1_c14_k1_co3, s1_c14_k1_co2, s1_c14_k1_co1, s1_c14_k1_co0}),
    .sum(s1_c14_k1_sum), .carry(s1_c14_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 15)) u_s1_c15_k0 (
    .a ({pp[7][8], pp[6][9], pp[5][10], pp[4][11], pp[3][12], pp[2][13], pp[1][14], pp[0][15]}),
    .ci({s1_c14_k0_co4, s1_c14_k0_co3, s1_c14_k0_co2, s1_c14_k0_co1, s1_c14_k0_co0}),
    .co({s1_c15_k0_co4, s1_c15_k0_co3, s1_c15_k0_co2, s1_c15_k0_co1, s1_c15_k0_co0}),
    .sum(s1_c15_k0_sum), .carry(s1_c15_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 15)) u_s1_c15_k1 (
    .a ({pp[15][0], pp[14][1], pp[13][2], pp[12][3], pp[11][4], pp[10][5], pp[9][6], pp[8][7]}),
    .ci({s1_c14_k1_co4, s1_c14_k1_co3, s1_c14_k1_co2, s1_c14_k1_co1, s1_c14_k1_co0}),
    .co({s1_c15_k1_co4, s1_c15_k1_co3, s1_c15_k1_co2, s1_c15_k1_co1, s1_c15_k1_co0}),
    .sum(s1_c15_k1_sum), .carry(s1_c15_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 16)) u_s1_c16_k0 (
    .a ({pp[8][8], pp[7][9], pp[6][10], pp[5][11], pp[4][12], pp[3][13], pp[2][14], pp[1][15]}),
    .ci({s1_c15_k0_co4, s1_c15_k0_co3, s1_c15_k0_co2, s1_c15_k0_co1, s1_c15_k0_co0}),
    .co({s1_c16_k0_co4, s1_c16_k0_co3, s1_c16_k0_co2, s1_c16_k0_co1, s1_c16_k0_co0}),
    .sum(s1_c16_k0_sum), .carry(s1_c16_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 16)) u_s1_c16_k1 (
    .a ({1'b0, pp[15][1], pp[14][2], pp[13][3], pp[12][4], pp[11][5], pp[10][6], pp[9][7]}),
    .ci({s1_c15_k1_co4, s1_c15_k1_co3, s1_c15_k1_co2, s1_c15_k1_co1, s1_c15_k1_co0}),
    .co({s1_c16_k1_co4, s1_c16_k1_co3, s1_c16_k1_co2, s1_c16_k1_co1, s1_c16_k1_co0}),
    .sum(s1_c16_k1_sum), .carry(s1_c16_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 17)) u_s1_c17_k0 (
    .a ({pp[9][8], pp[8][9], pp[7][10], pp[6][11], pp[5][12], pp[4][13], pp[3][14], pp[2][15]}),
    .ci({s1_c16_k0_co4, s1_c16_k0_co3, s1_c16_k0_co2, s1_c16_k0_co1, s1_c16_k0_co0}),
    .co({s1_c17_k0_co4, s1_c17_k0_co3, s1_c17_k0_co2, s1_c17_k0_co1, s1_c17_k0_co0}),
    .sum(s1_c17_k0_sum), .carry(s1_c17_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 17)) u_s1_c17_k1 (
    .a ({1'b0, 1'b0, pp[15][2], pp[14][3], pp[13][4], pp[12][5], pp[11][6], pp[10][7]}),
    .ci({s1_c16_k1_co4, s1_c16_k1_co3, s1_c16_k1_co2, s1_c16_k1_co1, s1_c16_k1_co0}),
    .co({s1_c17_k1_co4, s1_c17_k1_co3, s1_c17_k1_co2, s1_c17_k1_co1, s1_c17_k1_co0}),
    .sum(s1_c17_k1_sum), .carry(s1_c17_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 18)) u_s1_c18_k0 (
    .a ({pp[10][8], pp[9][9], pp[8][10], pp[7][11], pp[6][12], pp[5][13], pp[4][14], pp[3][15]}),
    .ci({s1_c17_k0_co4, s1_c17_k0_co3, s1_c17_k0_co2, s1_c17_k0_co1, s1_c17_k0_co0}),
    .co({s1_c18_k0_co4, s1_c18_k0_co3, s1_c18_k0_co2, s1_c18_k0_co1, s1_c18_k0_co0}),
    .sum(s1_c18_k0_sum), .carry(s1_c18_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 18)) u_s1_c18_k1 (
    .a ({1'b0, 1'b0, 1'b0, pp[15][3], pp[14][4], pp[13][5], pp[12][6], pp[11][7]}),
    .ci({s1_c17_k1_co4, s1_c17_k1_co3, s1_c17_k1_co2, s1_c17_k1_co1, s1_c17_k1_co0}),
    .co({s1_c18_k1_co4, s1_c18_k1_co3, s1_c18_k1_co2, s1_c18_k1_co1, s1_c18_k1_co0}),
    .sum(s1_c18_k1_sum), .carry(s1_c18_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 19)) u_s1_c19_k0 (
    .a ({pp[11][8], pp[10][9], pp[9][10], pp[8][11], pp[7][12], pp[6][13], pp[5][14], pp[4][15]}),
    .ci({s1_c18_k0_co4, s1_c18_k0_co3, s1_c18_k0_co2, s1_c18_k0_co1, s1_c18_k0_co0}),
    .co({s1_c19_k0_co4, s1_c19_k0_co3, s1_c19_k0_co2, s1_c19_k0_co1, s1_c19_k0_co0}),
    .sum(s1_c19_k0_sum), .carry(s1_c19_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 19)) u_s1_c19_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, pp[15][4], pp[14][5], pp[13][6], pp[12][7]}),
    .ci({s1_c18_k1_co4, s1_c18_k1_co3, s1_c18_k1_co2, s1_c18_k1_co1, s1_c18_k1_co0}),
    .co({s1_c19_k1_co4, s1_c19_k1_co3, s1_c19_k1_co2, s1_c19_k1_co1, s1_c19_k1_co0}),
    .sum(s1_c19_k1_sum), .carry(s1_c19_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 20)) u_s1_c20_k0 (
    .a ({pp[12][8], pp[11][9], pp[10][10], pp[9][11], pp[8][12], pp[7][13], pp[6][14], pp[5][15]}),
    .ci({s1_c19_k0_co4, s1_c19_k0_co3, s1_c19_k0_co2, s1_c19_k0_co1, s1_c19_k0_co0}),
    .co({s1_c20_k0_co4, s1_c20_k0_co3, s1_c20_k0_co2, s1_c20_k0_co1, s1_c20_k0_co0}),
    .sum(s1_c20_k0_sum), .carry(s1_c20_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 20)) u_s1_c20_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, pp[15][5], pp[14][6], pp[13][7]}),
    .ci({s1_c19_k1_co4, s1_c19_k1_co3, s1_c19_k1_co2, s1_c19_k1_co1, s1_c19_k1_co0}),
    .co({s1_c20_k1_co4, s1_c20_k1_co3, s1_c20_k1_co2, s1_c20_k1_co1, s1_c20_k1_co0}),
    .sum(s1_c20_k1_sum), .carry(s1_c20_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 21)) u_s1_c21_k0 (
    .a ({pp[13][8], pp[12][9], pp[11][10], pp[10][11], pp[9][12], pp[8][13], pp[7][14], pp[6][15]}),
    .ci({s1_c20_k0_co4, s1_c20_k0_co3, s1_c20_k0_co2, s1_c20_k0_co1, s1_c20_k0_co0}),
    .co({s1_c21_k0_co4, s1_c21_k0_co3, s1_c21_k0_co2, s1_c21_k0_co1, s1_c21_k0_co0}),
    .sum(s1_c21_k0_sum), .carry(s1_c21_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 21)) u_s1_c21_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, pp[15][6], pp[14][7]}),
    .ci({s1_c20_k1_co4, s1_c20_k1_co3, s1_c20_k1_co2, s1_c20_k1_co1, s1_c20_k1_co0}),
    .co({s1_c21_k1_co4, s1_c21_k1_co3, s1_c21_k1_co2, s1_c21_k1_co1, s1_c21_k1_co0}),
    .sum(s1_c21_k1_sum), .carry(s1_c21_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 22)) u_s1_c22_k0 (
    .a ({pp[14][8], pp[13][9], pp[12][10], pp[11][11], pp[10][12], pp[9][13], pp[8][14], pp[7][15]}),
    .ci({s1_c21_k0_co4, s1_c21_k0_co3, s1_c21_k0_co2, s1_c21_k0_co1, s1_c21_k0_co0}),
    .co({s1_c22_k0_co4, s1_c22_k0_co3, s1_c22_k0_co2, s1_c22_k0_co1, s1_c22_k0_co0}),
    .sum(s1_c22_k0_sum), .carry(s1_c22_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 22)) u_s1_c22_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, pp[15][7]}),
    .ci({s1_c21_k1_co4, s1_c21_k1_co3, s1_c21_k1_co2, s1_c21_k1_co1, s1_c21_k1_co0}),
    .co({s1_c22_k1_co4, s1_c22_k1_co3, s1_c22_k1_co2, s1_c22_k1_co1, s1_c22_k1_co0}),
    .sum(s1_c22_k1_sum), .carry(s1_c22_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 23)) u_s1_c23_k0 (
    .a ({pp[15][8], pp[14][9], pp[13][10], pp[12][11], pp[11][12], pp[10][13], pp[9][14], pp[8][15]}),
    .ci({s1_c22_k0_co4, s1_c22_k0_co3, s1_c22_k0_co2, s1_c22_k0_co1, s1_c22_k0_co0}),
    .co({s1_c23_k0_co4, s1_c23_k0_co3, s1_c23_k0_co2, s1_c23_k0_co1, s1_c23_k0_co0}),
    .sum(s1_c23_k0_sum), .carry(s1_c23_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 23)) u_s1_c23_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c22_k1_co4, s1_c22_k1_co3, s1_c22_k1_co2, s1_c22_k1_co1, s1_c22_k1_co0}),
    .co({s1_c23_k1_co4, s1_c23_k1_co3, s1_c23_k1_co2, s1_c23_k1_co1, s1_c23_k1_co0}),
    .sum(s1_c23_k1_sum), .carry(s1_c23_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 24)) u_s1_c24_k0 (
    .a ({1'b0, pp[15][9], pp[14][10], pp[13][11], pp[12][12], pp[11][13], pp[10][14], pp[9][15]}),
    .ci({s1_c23_k0_co4, s1_c23_k0_co3, s1_c23_k0_co2, s1_c23_k0_co1, s1_c23_k0_co0}),
    .co({s1_c24_k0_co4, s1_c24_k0_co3, s1_c24_k0_co2, s1_c24_k0_co1, s1_c24_k0_co0}),
    .sum(s1_c24_k0_sum), .carry(s1_c24_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 24)) u_s1_c24_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c23_k1_co4, s1_c23_k1_co3, s1_c23_k1_co2, s1_c23_k1_co1, s1_c23_k1_co0}),
    .co({s1_c24_k1_co4, s1_c24_k1_co3, s1_c24_k1_co2, s1_c24_k1_co1, s1_c24_k1_co0}),
    .sum(s1_c24_k1_sum), .carry(s1_c24_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 25)) u_s1_c25_k0 (
    .a ({1'b0, 1'b0, pp[15][10], pp[14][11], pp[13][12], pp[12][13], pp[11][14], pp[10][15]}),
    .ci({s1_c24_k0_co4, s1_c24_k0_co3, s1_c24_k0_co2, s1_c24_k0_co1, s1_c24_k0_co0}),
    .co({s1_c25_k0_co4, s1_c25_k0_co3, s1_c25_k0_co2, s1_c25_k0_co1, s1_c25_k0_co0}),
    .sum(s1_c25_k0_sum), .carry(s1_c25_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 25)) u_s1_c25_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c24_k1_co4, s1_c24_k1_co3, s1_c24_k1_co2, s1_c24_k1_co1, s1_c24_k1_co0}),
    .co({s1_c25_k1_co4, s1_c25_k1_co3, s1_c25_k1_co2, s1_c25_k1_co1, s1_c25_k1_co0}),
    .sum(s1_c25_k1_sum), .carry(s1_c25_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 26)) u_s1_c26_k0 (
    .a ({1'b0, 1'b0, 1'b0, pp[15][11], pp[14][12], pp[13][13], pp[12][14], pp[11][15]}),
    .ci({s1_c25_k0_co4, s1_c25_k0_co3, s1_c25_k0_co2, s1_c25_k0_co1, s1_c25_k0_co0}),
    .co({s1_c26_k0_co4, s1_c26_k0_co3, s1_c26_k0_co2, s1_c26_k0_co1, s1_c26_k0_co0}),
    .sum(s1_c26_k0_sum), .carry(s1_c26_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 26)) u_s1_c26_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c25_k1_co4, s1_c25_k1_co3, s1_c25_k1_co2, s1_c25_k1_co1, s1_c25_k1_co0}),
    .co({s1_c26_k1_co4, s1_c26_k1_co3, s1_c26_k1_co2, s1_c26_k1_co1, s1_c26_k1_co0}),
    .sum(s1_c26_k1_sum), .carry(s1_c26_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 27)) u_s1_c27_k0 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, pp[15][12], pp[14][13], pp[13][14], pp[12][15]}),
    .ci({s1_c26_k0_co4, s1_c26_k0_co3, s1_c26_k0_co2, s1_c26_k0_co1, s1_c26_k0_co0}),
    .co({s1_c27_k0_co4, s1_c27_k0_co3, s1_c27_k0_co2, s1_c27_k0_co1, s1_c27_k0_co0}),
    .sum(s1_c27_k0_sum), .carry(s1_c27_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 27)) u_s1_c27_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c26_k1_co4, s1_c26_k1_co3, s1_c26_k1_co2, s1_c26_k1_co1, s1_c26_k1_co0}),
    .co({s1_c27_k1_co4, s1_c27_k1_co3, s1_c27_k1_co2, s1_c27_k1_co1, s1_c27_k1_co0}),
    .sum(s1_c27_k1_sum), .carry(s1_c27_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 28)) u_s1_c28_k0 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, pp[15][13], pp[14][14], pp[13][15]}),
    .ci({s1_c27_k0_co4, s1_c27_k0_co3, s1_c27_k0_co2, s1_c27_k0_co1, s1_c27_k0_co0}),
    .co({s1_c28_k0_co4, s1_c28_k0_co3, s1_c28_k0_co2, s1_c28_k0_co1, s1_c28_k0_co0}),
    .sum(s1_c28_k0_sum), .carry(s1_c28_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 28)) u_s1_c28_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c27_k1_co4, s1_c27_k1_co3, s1_c27_k1_co2, s1_c27_k1_co1, s1_c27_k1_co0}),
    .co({s1_c28_k1_co4, s1_c28_k1_co3, s1_c28_k1_co2, s1_c28_k1_co1, s1_c28_k1_co0}),
    .sum(s1_c28_k1_sum), .carry(s1_c28_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 29)) u_s1_c29_k0 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, pp[15][14], pp[14][15]}),
    .ci({s1_c28_k0_co4, s1_c28_k0_co3, s1_c28_k0_co2, s1_c28_k0_co1, s1_c28_k0_co0}),
    .co({s1_c29_k0_co4, s1_c29_k0_co3, s1_c29_k0_co2, s1_c29_k0_co1, s1_c29_k0_co0}),
    .sum(s1_c29_k0_sum), .carry(s1_c29_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 29)) u_s1_c29_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c28_k1_co4, s1_c28_k1_co3, s1_c28_k1_co2, s1_c28_k1_co1, s1_c28_k1_co0}),
    .co({s1_c29_k1_co4, s1_c29_k1_co3, s1_c29_k1_co2, s1_c29_k1_co1, s1_c29_k1_co0}),
    .sum(s1_c29_k1_sum), .carry(s1_c29_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 30)) u_s1_c30_k0 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, pp[15][15]}),
    .ci({s1_c29_k0_co4, s1_c29_k0_co3, s1_c29_k0_co2, s1_c29_k0_co1, s1_c29_k0_co0}),
    .co({s1_c30_k0_co4, s1_c30_k0_co3, s1_c30_k0_co2, s1_c30_k0_co1, s1_c30_k0_co0}),
    .sum(s1_c30_k0_sum), .carry(s1_c30_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 30)) u_s1_c30_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c29_k1_co4, s1_c29_k1_co3, s1_c29_k1_co2, s1_c29_k1_co1, s1_c29_k1_co0}),
    .co({s1_c30_k1_co4, s1_c30_k1_co3, s1_c30_k1_co2, s1_c30_k1_co1, s1_c30_k1_co0}),
    .sum(s1_c30_k1_sum), .carry(s1_c30_k1_carry));
  comp82 #(.APPROX(APPROX_COLS > 31)) u_s1_c31_k0 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c30_k0_co4, s1_c30_k0_co3, s1_c30_k0_co2, s1_c30_k0_co1, s1_c30_k0_co0}),
    .co({s1_c31_k0_co4, s1_c31_k0_co3, s1_c31_k0_co2, s1_c31_k0_co1, s1_c31_k0_co0}),
    .sum(s1_c31_k0_sum), .carry(s1_c31_k0_carry));
  comp82 #(.APPROX(APPROX_COLS > 31)) u_s1_c31_k1 (
    .a ({1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}),
    .ci({s1_c30_k1_co4, s1_c30_k1_co3, s1_c30_k1_co2, s1_c30_k1_co1, s1_c30_k1_co0}),
    .co({s1_c31_k1_co4, s1_c31_k1_co3, s1_c31_k1_co2, s1_c31_k1_co1, s1_c31_k1_co0}),
    .sum(s1_c31_k1_sum), .carry(s1_c31_k1_carry));

  // Stage 2: 4:2 compressor chain
  comp42 u_s2_c8 (.x({1'b0, pp[8][0], s1_c8_k0_sum, s1_c7_k0_carry}), .cin(1'b0), .cout(s2_c8_cout), .sum(s2_c8_sum), .carry(s2_c8_carry));
  comp42 u_s2_c9 (.x({pp[9][0], pp[8][1], s1_c9_k0_sum, s1_c8_k0_carry}), .cin(s2_c8_cout), .cout(s2_c9_cout), .sum(s2_c9_sum), .carry(s2_c9_carry));
  comp42 u_s2_c10 (.x({1'b0, s1_c10_k1_sum, s1_c10_k0_sum, s1_c9_k0_carry}), .cin(s2_c9_cout), .cout(s2_c10_cout), .sum(s2_c10_sum), .carry(s2_c10_carry));
  comp42 u_s2_c11 (.x({s1_c11_k1_sum, s1_c11_k0_sum, s1_c10_k1_carry, s1_c10_k0_carry}), .cin(s2_c10_cout), .cout(s2_c11_cout), .sum(s2_c11_sum), .carry(s2_c11_carry));
  comp42 u_s2_c12 (.x({s1_c12_k1_sum, s1_c12_k0_sum, s1_c11_k1_carry, s1_c11_k0_carry}), .cin(s2_c11_cout), .cout(s2_c12_cout), .sum(s2_c12_sum), .carry(s2_c12_carry));
  comp42 u_s2_c13 (.x({s1_c13_k1_sum, s1_c13_k0_sum, s1_c12_k1_carry, s1_c12_k0_carry}), .cin(s2_c12_cout), .cout(s2_c13_cout), .sum(s2_c13_sum), .carry(s2_c13_carry));
  comp42 u_s2_c14 (.x({s1_c14_k1_sum, s1_c14_k0_sum, s1_c13_k1_carry, s1_c13_k0_carry}), .cin(s2_c13_cout), .cout(s2_c14_cout), .sum(s2_c14_sum), .carry(s2_c14_carry));
  comp42 u_s2_c15 (.x({s1_c15_k1_sum, s1_c15_k0_sum, s1_c14_k1_carry, s1_c14_k0_carry}), .cin(s2_c14_cout), .cout(s2_c15_cout), .sum(s2_c15_sum), .carry(s2_c15_carry));
  comp42 u_s2_c16 (.x({s1_c16_k1_sum, s1_c16_k0_sum, s1_c15_k1_carry, s1_c15_k0_carry}), .cin(s2_c15_cout), .cout(s2_c16_cout), .sum(s2_c16_sum), .carry(s2_c16_carry));
  comp42 u_s2_c17 (.x({s1_c17_k1_sum, s1_c17_k0_sum, s1_c16_k1_carry, s1_c16_k0_carry}), .cin(s2_c16_cout), .cout(s2_c17_cout), .sum(s2_c17_sum), .carry(s2_c17_carry));
  comp42 u_s2_c18 (.x({s1_c18_k1_sum, s1_c18_k0_sum, s1_c17_k1_carry, s1_c17_k0_carry}), .cin(s2_c17_cout), .cout(s2_c18_cout), .sum(s2_c18_sum), .carry(s2_c18_carry));
  comp42 u_s2_c19 (.x({s1_c19_k1_sum, s1_c19_k0_sum, s1_c18_k1_carry, s1_c18_k0_carry}), .cin(s2_c18_cout), .cout(s2_c19_cout), .sum(s2_c19_sum), .carry(s2_c19_carry));
  comp42 u_s2_c20 (.x({s1_c20_k1_sum, s1_c20_k0_sum, s1_c19_k1_carry, s1_c19_k0_carry}), .cin(s2_c19_cout), .cout(s2_c20_cout), .sum(s2_c20_sum), .carry(s2_c20_carry));
  comp42 u_s2_c21 (.x({s1_c21_k1_sum, s1_c21_k0_sum, s1_c20_k1_carry, s1_c20_k0_carry}), .cin(s2_c20_cout), .cout(s2_c21_cout), .sum(s2_c21_sum), .carry(s2_c21_carry));
  comp42 u_s2_c22 (.x({s1_c22_k1_sum, s1_c22_k0_sum, s1_c21_k1_carry, s1_c21_k0_carry}), .cin(s2_c21_cout), .cout(s2_c22_cout), .sum(s2_c22_sum), .carry(s2_c22_carry));
  comp42 u_s2_c23 (.x({s1_c23_k1_sum, s1_c23_k0_sum, s1_c22_k1_carry, s1_c22_k0_carry}), .cin(s2_c22_cout), .cout(s2_c23_cout), .sum(s2_c23_sum), .carry(s2_c23_carry));
  comp42 u_s2_c24 (.x({s1_c24_k1_sum, s1_c24_k0_sum, s1_c23_k1_carry, s1_c23_k0_carry}), .cin(s2_c23_cout), .cout(s2_c24_cout), .sum(s2_c24_sum), .carry(s2_c24_carry));
  comp42 u_s2_c25 (.x({s1_c25_k1_sum, s1_c25_k0_sum, s1_c24_k1_carry, s1_c24_k0_carry}), .cin(s2_c24_cout), .cout(s2_c25_cout), .sum(s2_c25_sum), .carry(s2_c25_carry));
  comp42 u_s2_c26 (.x({s1_c26_k1_sum, s1_c26_k0_sum, s1_c25_k1_carry, s1_c25_k0_carry}), .cin(s2_c25_cout), .cout(s2_c26_cout), .sum(s2_c26_sum), .carry(s2_c26_carry));
  comp42 u_s2_c27 (.x({s1_c27_k1_sum, s1_c27_k0_sum, s1_c26_k1_carry, s1_c26_k0_carry}), .cin(s2_c26_cout), .cout(s2_c27_cout), .sum(s2_c27_sum), .carry(s2_c27_carry));
  comp42 u_s2_c28 (.x({s1_c28_k1_sum, s1_c28_k0_sum, s1_c27_k1_carry, s1_c27_k0_carry}), .cin(s2_c27_cout), .cout(s2_c28_cout), .sum(s2_c28_sum), .carry(s2_c28_carry));
  comp42 u_s2_c29 (.x({s1_c29_k1_sum, s1_c29_k0_sum, s1_c28_k1_carry, s1_c28_k0_carry}), .cin(s2_c28_cout), .cout(s2_c29_cout), .sum(s2_c29_sum), .carry(s2_c29_carry));
  comp42 u_s2_c30 (.x({s1_c30_k1_sum, s1_c30_k0_sum, s1_c29_k1_carry, s1_c29_k0_carry}), .cin(s2_c29_cout), .cout(s2_c30_cout), .sum(s2_c30_sum), .carry(s2_c30_carry));
  comp42 u_s2_c31 (.x({s1_c31_k1_sum, s1_c31_k0_sum, s1_c30_k1_carry, s1_c30_k0_carry}), .cin(s2_c30_cout), .cout(s2_c31_cout), .sum(s2_c31_sum), .carry(s2_c31_carry));

  // The two rows left for the carry-propagate adder
  assign row_a = {s2_c30_carry, s2_c29_carry, s2_c28_carry, s2_c27_carry, s2_c26_carry, s2_c25_carry, s2_c24_carry, s2_c23_carry, s2_c22_carry, s2_c21_carry, s2_c20_carry, s2_c19_carry, s2_c18_carry, s2_c17_carry, s2_c16_carry, s2_c15_carry, s2_c14_carry, s2_c13_carry, s2_c12_carry, s2_c11_carry, s2_c10_carry, s2_c9_carry, s2_c8_carry, s2_c8_sum, s1_c6_k0_carry, s1_c5_k0_carry, s1_c4_k0_carry, s1_c3_k0_carry, s1_c2_k0_carry, s1_c2_k0_sum, pp[0][1], pp[0][0]};
  assign row_b = {s2_c31_sum, s2_c30_sum, s2_c29_sum, s2_c28_sum, s2_c27_sum, s2_c26_sum, s2_c25_sum, s2_c24_sum, s2_c23_sum, s2_c22_sum, s2_c21_sum, s2_c20_sum, s2_c19_sum, s2_c18_sum, s2_c17_sum, s2_c16_sum, s2_c15_sum, s2_c14_sum, s2_c13_sum, s2_c12_sum, s2_c11_sum, s2_c10_sum, s2_c9_sum, 1'b0, s1_c7_k0_sum, s1_c6_k0_sum, s1_c5_k0_sum, s1_c4_k0_sum, s1_c3_k0_sum, 1'b0, pp[1][0], 1'b0};

  // Wires of weight 2^32 that the tree leaves over (0 for an exact product)
  assign spill = {s1_c31_k0_carry, s1_c31_k1_carry, s1_c31_k0_co0, s1_c31_k0_co1, s1_c31_k0_co2, s1_c31_k0_co3, s1_c31_k0_co4, s1_c31_k1_co0, s1_c31_k1_co1, s1_c31_k1_co2, s1_c31_k1_co3, s1_c31_k1_co4, s2_c31_carry, s2_c31_cout};


  cla_adder #(.W(32)) u_final (.a(row_a), .b(row_b), .sum(total), .cout(final_cout));

  if (APPROX_COLS > 0) begin : g_saturate
    assign z = (final_cout || (|spill)) ? '1 : total;
  end else begin : g_exact
    assign z = total;  // spill and final_cout are provably 0 here
  end

endmodule
