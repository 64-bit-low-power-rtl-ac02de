// approx_mult64_top: the exact and the approximate 64x64 unsigned multiplier side by side.
//
// Both multipliers get the same operands. u_exact is built with APPROX_COLS = 0, so all
// its 8:2 compressors are exact and z_exact = a * b. u_approx is the same structure with
// the approximate 8:2 compressor (carry taken straight from the fifth carry-in) in the
// low APPROX_COLS columns of each of its sixteen 16x16 compressor trees; the
// higher columns stay exact. Putting both in one top lets the two be compared
// bit for bit on the same inputs. Offering an exact and an approximate 64-bit
// multiplier of the same construction follows the published design; instantiating them
// together is this design's choice.
//
// Beside them, with ports of its own, stands the small 8x8 multiplier reduced with exact
// 4:2 compressors that illustrates the column-compression principle (a8, b8 -> z8).
//
// Ports: a, b (64 bits); z_exact, z_approx (128 bits); a8, b8 (8 bits); z8 (16 bits).
// Purely combinational: the outputs follow the inputs after the delay of one
// multiplier, with no clock.
module approx_mult64_top #(
  parameter int unsigned APPROX_COLS = mult_pkg::APPROX_COLS_DEFAULT
) (
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [127:0] z_exact,
  output logic [127:0] z_approx,
  input  logic [7:0]   a8,
  input  logic [7:0]   b8,
  output logic [15:0]  z8
);

  mul64 #(.APPROX_COLS(0))           u_exact  (.a(a), .b(b), .z(z_exact));
  mul64 #(.APPROX_COLS(APPROX_COLS)) u_approx (.a(a), .b(b), .z(z_approx));

  mul8_42 u_mul8 (.a(a8), .b(b8), .z(z8));

endmodule
