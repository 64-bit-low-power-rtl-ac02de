// fa_xm: full adder (3:2 compressor) built from two XOR gates and one 2:1 multiplexer.
//
// t = a ^ b selects the carry: when a and b differ the carry equals cin, when they agree
// it equals a (which is then also b). sum = t ^ cin. The truth table is that of an
// ordinary full adder; only the gate structure differs. This cell is the "X X M" unit
// that is repeated six times inside the 8:2 compressor.
//
// Ports: a, b, cin (weight 1); sum (weight 1), cout (weight 2). Purely combinational.
module fa_xm (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic t;

  always_comb begin
    t    = a ^ b;
    sum  = t ^ cin;
    cout = t ? cin : a;
  end

endmodule
