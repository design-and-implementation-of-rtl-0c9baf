// full_adder: one-bit full adder, the FA cell of the ripple-carry chain.
//
// Written with the generate/propagate terms of the look-ahead equations:
// g = a & b, p = a ^ b, sum = p ^ cin, cout = g | (p & cin).
// Purely combinational, no timing of its own.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g, p;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    sum  = p ^ cin;
    cout = g | (p & cin);
  end
endmodule
