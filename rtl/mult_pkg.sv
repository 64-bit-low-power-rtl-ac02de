// mult_pkg: constants shared by the compressor-tree multipliers.
//
// SUB_W is the operand width of the compressor-tree multiplier (mul16_comp) that every
// wider multiplier is assembled from. APPROX_COLS_DEFAULT is the number of low product
// columns, counted inside each 16x16 tree, whose 8:2 compressors use the approximate
// carry; columns at and above it keep the exact compressor. The split at half the
// 16x16 product width is this design's choice: the approximation is applied to the
// less significant columns and the more significant ones stay exact.
package mult_pkg;

  localparam int unsigned SUB_W = 16;
  localparam int unsigned APPROX_COLS_DEFAULT = 16;

endpackage
