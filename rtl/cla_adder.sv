// cla_adder: W-bit carry-lookahead adder, sum = a + b, with carry-out.
//
// The operands are cut into 4-bit groups. Inside a group every carry is formed in two
// gate levels from the bit generate (g = a & b) and propagate (p = a ^ b) signals;
// each group also forms a group generate and propagate, and the group carries are
// passed from group to group. W must be a multiple of 4.
//
// The two-level arrangement (4-bit lookahead groups, group carries passed in a row)
// is this design's choice; the multiplier uses a carry-lookahead adder for its final
// addition and for merging partial products.
// Ports: a, b (W bits); sum (W bits); cout. No carry-in. Purely combinational.
module cla_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = W / 4;

  logic [W-1:0]  g, p, c;     // bit generate, propagate, carry into each bit
  logic [NG:0]   gc;          // carry into each group, gc[NG] = carry out
  logic [NG-1:0] gg, gp;      // group generate / propagate

  initial begin
    assert (W % 4 == 0 && W >= 4) else $fatal(1, "cla_adder: W must be a multiple of 4");
  end

  assign g     = a & b;
  assign p     = a ^ b;
  assign gc[0] = 1'b0;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    // carries inside group k, each from gc[k] in two gate levels
    assign c[4*k]   = gc[k];
    assign c[4*k+1] = g[4*k] | (p[4*k] & gc[k]);
    assign c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & gc[k]);
    assign c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
                    | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    // group generate / propagate and the carry into the next group
    assign gg[k] = g[4*k+3] | (p[4*k+3] & g[4*k+2]) | (p[4*k+3] & p[4*k+2] & g[4*k+1])
                 | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    assign gp[k] = &p[4*k +: 4];
    assign gc[k+1] = gg[k] | (gp[k] & gc[k]);
  end

  assign sum  = p ^ c;
  assign cout = gc[NG];

endmodule
