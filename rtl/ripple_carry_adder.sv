// ripple_carry_adder: W-bit adder made of a chain of full-adder cells.
//
// Bit i takes a[i], b[i] and the carry of bit i-1 and passes its carry to
// bit i+1, so the carry ripples from cin (c0) to cout (cW). This is the
// 4-bit "RCA" block of the carry select adder and the conventional adder of
// the error tolerant adder. Combinational; delay grows linearly with W.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
