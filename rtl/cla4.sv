// cla4: 4-bit carry look-ahead group.
//
// Each bit forms a generate term G_i = A_i & B_i and a propagate term
// P_i = A_i ^ B_i. The carries C1..C4 are then formed in parallel as
// two-level sum-of-products of G, P and C0 (no carry ripples inside the
// group), and S_i = P_i ^ C_i. This follows the look-ahead equations of the
// design exactly. Combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & c[0]);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c[0]);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
         | (p[2] & p[1] & p[0] & c[0]);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
         | (p[3] & p[2] & p[1] & g[0]) | (p[3] & p[2] & p[1] & p[0] & c[0]);
    sum  = p ^ c[3:0];
    cout = c[4];
  end
endmodule
