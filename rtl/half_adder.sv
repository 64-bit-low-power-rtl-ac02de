// half_adder: adds two bits. sum = a ^ b (weight 1), carry = a & b (weight 2).
// In the 64-bit multiplier it merges the carry-outs of the two 64-bit middle adders
// into a two-bit value that is added to the top quarter of the product.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
