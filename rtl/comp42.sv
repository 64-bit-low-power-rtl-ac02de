// comp42: exact 4:2 compressor made of two chained XOR-MUX full adders.
//
// Five inputs of equal weight (x[3:0] and cin) are reduced to sum (same weight) and two
// outputs of double weight, carry and cout, with
//   x[0] + x[1] + x[2] + x[3] + cin = sum + 2 * (carry + cout).
// cout depends on x[2:0] only, so in a row of compressors the cout of one column can
// feed the cin of the next without forming a ripple path. The internal arrangement
// (first adder on x[2:0], second on its sum, x[3] and cin) is this design's choice; the
// compressor is used as an exact cell.
// Purely combinational.
module comp42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       cout,
  output logic       sum,
  output logic       carry
);

  logic s0;

  fa_xm u_fa0 (.a(x[0]), .b(x[1]), .cin(x[2]), .sum(s0),  .cout(cout));
  fa_xm u_fa1 (.a(s0),   .b(x[3]), .cin(cin),  .sum(sum), .cout(carry));

endmodule
