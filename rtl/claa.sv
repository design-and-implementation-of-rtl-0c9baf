// claa: W-bit carry look-ahead adder (CLAA), W a multiple of 4.
//
// The operands are cut into 4-bit look-ahead groups (cla4). Inside a group
// all carries are computed in parallel from the group's carry in; the
// group carry out feeds the next group. The 4-bit group size and the
// group-to-group carry chain are this design's choice: only the 4-bit
// look-ahead equations are given. Combinational.
module claa #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [NG:0] gc;

  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    cla4 u_grp (
      .a   (a[4*k +: 4]),
      .b   (b[4*k +: 4]),
      .cin (gc[k]),
      .sum (sum[4*k +: 4]),
      .cout(gc[k+1])
    );
  end

  assign cout = gc[NG];

  initial begin
    assert (W % 4 == 0 && W >= 4) else $error("claa: W must be a multiple of 4");
  end
endmodule
