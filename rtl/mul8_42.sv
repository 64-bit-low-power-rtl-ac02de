// mul8_42: 8x8 unsigned multiplier reduced with exact 4:2 compressors.
//
// This is the small example of the column-compression principle used by the larger
// multipliers: the 64 AND-array partial products pp[i][j] = b[i] & a[j] (weight
// 2^(i+j), column heights 1..8..1) are reduced in two stages and the last two rows are
// added by a 16-bit carry-lookahead adder.
//   Stage 1 brings every column down to at most four bits, stage 2 to at most two.
//   Within a stage the columns are visited from the least significant one up; while a
//   column would still leave the stage with more bits than the target, the next cell is
//   an exact 4:2 compressor if at least four bits are left (its cin takes the cout of a
//   compressor in the column below, else a bit of the column), else a full adder, else
//   a half adder. A 4:2 compressor's cout that is not taken up as a cin stays in the next
//   column as an ordinary bit.
// The cell types (exact 4:2 compressors with chained couts, full and half adders), the
// two stages and the final carry-propagate adder follow the published 8x8 example; the
// exact cell placement above is this design's own, as the example only gives a dot
// diagram.
// Ports: a, b (8 bits); z (16 bits) = a * b. Purely combinational.
module mul8_42 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] z
);

  logic [7:0][7:0] pp;           // pp[i][j] = b[i] & a[j]
  logic [15:0]     row_a, row_b;
  logic            final_cout;   // weight 2^16: always 0, unused

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        pp[i][j] = b[i] & a[j];
      end
    end
  end

  // Nets between the stages (named s<stage>_c<column>_<n>_<pin>)
  logic s1_c4_0_cout, s1_c4_0_sum, s1_c4_0_carry, s1_c5_0_cout, s1_c5_0_sum, s1_c5_0_carry;
  logic s1_c6_0_cout, s1_c6_0_sum, s1_c6_0_carry, s1_c6_1_sum, s1_c6_1_cout, s1_c7_0_cout;
  logic s1_c7_0_sum, s1_c7_0_carry, s1_c7_1_cout, s1_c7_1_sum, s1_c7_1_carry, s1_c8_0_cout;
  logic s1_c8_0_sum, s1_c8_0_carry, s1_c8_1_cout, s1_c8_1_sum, s1_c8_1_carry, s1_c9_0_cout;
  logic s1_c9_0_sum, s1_c9_0_carry, s1_c9_1_sum, s1_c9_1_cout, s1_c10_0_cout, s1_c10_0_sum;
  logic s1_c10_0_carry, s1_c11_0_cout, s1_c11_0_sum, s1_c11_0_carry, s1_c12_0_cout, s1_c12_0_sum;
  logic s1_c12_0_carry, s2_c2_0_sum, s2_c2_0_cout, s2_c3_0_cout, s2_c3_0_sum, s2_c3_0_carry;
  logic s2_c4_0_sum, s2_c4_0_carry, s2_c5_0_cout, s2_c5_0_sum, s2_c5_0_carry, s2_c6_0_cout;
  logic s2_c6_0_sum, s2_c6_0_carry, s2_c7_0_cout, s2_c7_0_sum, s2_c7_0_carry, s2_c8_0_cout;
  logic s2_c8_0_sum, s2_c8_0_carry, s2_c9_0_cout, s2_c9_0_sum, s2_c9_0_carry, s2_c10_0_cout;
  logic s2_c10_0_sum, s2_c10_0_carry, s2_c11_0_sum, s2_c11_0_cout, s2_c12_0_sum, s2_c12_0_carry;
  logic s2_c13_0_cout, s2_c13_0_sum, s2_c13_0_carry, s2_c14_0_sum, s2_c14_0_carry;

  // Stage 1: reduce every column to at most 4 bits
  comp42 u_s1_c4_0 (.x({pp[3][1], pp[2][2], pp[1][3], pp[0][4]}), .cin(pp[4][0]), .cout(s1_c4_0_cout), .sum(s1_c4_0_sum), .carry(s1_c4_0_carry));
  comp42 u_s1_c5_0 (.x({pp[3][2], pp[2][3], pp[1][4], pp[0][5]}), .cin(s1_c4_0_cout), .cout(s1_c5_0_cout), .sum(s1_c5_0_sum), .carry(s1_c5_0_carry));
  comp42 u_s1_c6_0 (.x({pp[3][3], pp[2][4], pp[1][5], pp[0][6]}), .cin(s1_c5_0_cout), .cout(s1_c6_0_cout), .sum(s1_c6_0_sum), .carry(s1_c6_0_carry));
  fa_xm u_s1_c6_1 (.a(pp[4][2]), .b(pp[5][1]), .cin(pp[6][0]), .sum(s1_c6_1_sum), .cout(s1_c6_1_cout));
  comp42 u_s1_c7_0 (.x({pp[3][4], pp[2][5], pp[1][6], pp[0][7]}), .cin(s1_c6_0_cout), .cout(s1_c7_0_cout), .sum(s1_c7_0_sum), .carry(s1_c7_0_carry));
  comp42 u_s1_c7_1 (.x({pp[7][0], pp[6][1], pp[5][2], pp[4][3]}), .cin(1'b0), .cout(s1_c7_1_cout), .sum(s1_c7_1_sum), .carry(s1_c7_1_carry));
  comp42 u_s1_c8_0 (.x({pp[4][4], pp[3][5], pp[2][6], pp[1][7]}), .cin(s1_c7_0_cout), .cout(s1_c8_0_cout), .sum(s1_c8_0_sum), .carry(s1_c8_0_carry));
  comp42 u_s1_c8_1 (.x({s1_c7_1_cout, pp[7][1], pp[6][2], pp[5][3]}), .cin(1'b0), .cout(s1_c8_1_cout), .sum(s1_c8_1_sum), .carry(s1_c8_1_carry));
  comp42 u_s1_c9_0 (.x({pp[5][4], pp[4][5], pp[3][6], pp[2][7]}), .cin(s1_c8_0_cout), .cout(s1_c9_0_cout), .sum(s1_c9_0_sum), .carry(s1_c9_0_carry));
  fa_xm u_s1_c9_1 (.a(pp[6][3]), .b(pp[7][2]), .cin(s1_c8_1_cout), .sum(s1_c9_1_sum), .cout(s1_c9_1_cout));
  comp42 u_s1_c10_0 (.x({pp[6][4], pp[5][5], pp[4][6], pp[3][7]}), .cin(s1_c9_0_cout), .cout(s1_c10_0_cout), .sum(s1_c10_0_sum), .carry(s1_c10_0_carry));
  comp42 u_s1_c11_0 (.x({pp[7][4], pp[6][5], pp[5][6], pp[4][7]}), .cin(s1_c10_0_cout), .cout(s1_c11_0_cout), .sum(s1_c11_0_sum), .carry(s1_c11_0_carry));
  comp42 u_s1_c12_0 (.x({s1_c11_0_cout, pp[7][5], pp[6][6], pp[5][7]}), .cin(1'b0), .cout(s1_c12_0_cout), .sum(s1_c12_0_sum), .carry(s1_c12_0_carry));

  // Stage 2: reduce every column to at most 2 bits
  fa_xm u_s2_c2_0 (.a(pp[0][2]), .b(pp[1][1]), .cin(pp[2][0]), .sum(s2_c2_0_sum), .cout(s2_c2_0_cout));
  comp42 u_s2_c3_0 (.x({pp[3][0], pp[2][1], pp[1][2], pp[0][3]}), .cin(1'b0), .cout(s2_c3_0_cout), .sum(s2_c3_0_sum), .carry(s2_c3_0_carry));
  half_adder u_s2_c4_0 (.a(s1_c4_0_sum), .b(s2_c3_0_cout), .sum(s2_c4_0_sum), .carry(s2_c4_0_carry));
  comp42 u_s2_c5_0 (.x({pp[5][0], pp[4][1], s1_c5_0_sum, s1_c4_0_carry}), .cin(1'b0), .cout(s2_c5_0_cout), .sum(s2_c5_0_sum), .carry(s2_c5_0_carry));
  comp42 u_s2_c6_0 (.x({s2_c5_0_cout, s1_c6_1_sum, s1_c6_0_sum, s1_c5_0_carry}), .cin(1'b0), .cout(s2_c6_0_cout), .sum(s2_c6_0_sum), .carry(s2_c6_0_carry));
  comp42 u_s2_c7_0 (.x({s1_c7_1_sum, s1_c7_0_sum, s1_c6_1_cout, s1_c6_0_carry}), .cin(s2_c6_0_cout), .cout(s2_c7_0_cout), .sum(s2_c7_0_sum), .carry(s2_c7_0_carry));
  comp42 u_s2_c8_0 (.x({s1_c8_1_sum, s1_c8_0_sum, s1_c7_1_carry, s1_c7_0_carry}), .cin(s2_c7_0_cout), .cout(s2_c8_0_cout), .sum(s2_c8_0_sum), .carry(s2_c8_0_carry));
  comp42 u_s2_c9_0 (.x({s1_c9_1_sum, s1_c9_0_sum, s1_c8_1_carry, s1_c8_0_carry}), .cin(s2_c8_0_cout), .cout(s2_c9_0_cout), .sum(s2_c9_0_sum), .carry(s2_c9_0_carry));
  comp42 u_s2_c10_0 (.x({pp[7][3], s1_c10_0_sum, s1_c9_1_cout, s1_c9_0_carry}), .cin(s2_c9_0_cout), .cout(s2_c10_0_cout), .sum(s2_c10_0_sum), .carry(s2_c10_0_carry));
  fa_xm u_s2_c11_0 (.a(s1_c10_0_carry), .b(s1_c11_0_sum), .cin(s2_c10_0_cout), .sum(s2_c11_0_sum), .cout(s2_c11_0_cout));
  half_adder u_s2_c12_0 (.a(s1_c11_0_carry), .b(s1_c12_0_sum), .sum(s2_c12_0_sum), .carry(s2_c12_0_carry));
  comp42 u_s2_c13_0 (.x({s1_c12_0_cout, pp[7][6], pp[6][7], s1_c12_0_carry}), .cin(1'b0), .cout(s2_c13_0_cout), .sum(s2_c13_0_sum), .carry(s2_c13_0_carry));
  half_adder u_s2_c14_0 (.a(pp[7][7]), .b(s2_c13_0_cout), .sum(s2_c14_0_sum), .carry(s2_c14_0_carry));

  // The two rows left for the carry-propagate adder
  assign row_a = {s2_c14_0_carry, s2_c13_0_carry, s2_c12_0_carry, s2_c11_0_cout, s2_c10_0_carry, s2_c9_0_carry, s2_c8_0_carry, s2_c7_0_carry, s2_c6_0_carry, s2_c5_0_carry, s2_c4_0_carry, s2_c3_0_carry, s2_c2_0_cout, s2_c2_0_sum, pp[0][1], pp[0][0]};
  assign row_b = {1'b0, s2_c14_0_sum, s2_c13_0_sum, s2_c12_0_sum, s2_c11_0_sum, s2_c10_0_sum, s2_c9_0_sum, s2_c8_0_sum, s2_c7_0_sum, s2_c6_0_sum, s2_c5_0_sum, s2_c4_0_sum, s2_c3_0_sum, 1'b0, pp[1][0], 1'b0};


  cla_adder #(.W(16)) u_final (.a(row_a), .b(row_b), .sum(z), .cout(final_cout));

endmodule
