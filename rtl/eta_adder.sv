// eta_adder: W-bit error tolerant adder (ETA).
//
// The operands are split into an accurate high part (bits W-1..L) and an
// inaccurate low part (bits L-1..0). The high part is added exactly by a
// conventional ripple-carry adder with carry in 0. The low part never
// propagates a carry: a control unit scans it from its MSB down, and from
// the first position where both input bits are 1, that bit and every bit
// below it are set to 1; above that position each sum bit is a ^ b. No
// carry passes from the low part into the high part.
//
// The control unit is a prefix OR from the low part's MSB downwards:
// ctl[i] = OR of (a[j] & b[j]) for j = i..L-1. The carry-free addition
// block then gives sum[i] = ctl[i] | (a[i] ^ b[i]).
//
// The split point L (default half the width, as in the 8-bit worked
// example) and the choice of a ripple-carry adder as the conventional adder
// are this design's own. cout is the carry out of the accurate part.
// Combinational.
module eta_adder #(
  parameter int unsigned W = 32,
  parameter int unsigned L = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  // Accurate part: conventional adder.
  ripple_carry_adder #(.W(W-L)) u_acc (
    .a   (a[W-1:L]),
    .b   (b[W-1:L]),
    .cin (1'b0),
    .sum (sum[W-1:L]),
    .cout(cout)
  );

  // Inaccurate part: control unit and carry-free addition block.
  logic [L-1:0] both_one;
  logic [L-1:0] ctl;

  always_comb begin
    both_one = a[L-1:0] & b[L-1:0];
    ctl[L-1] = both_one[L-1];
    for (int i = int'(L) - 2; i >= 0; i--) begin
      ctl[i] = ctl[i+1] | both_one[i];
    end
    sum[L-1:0] = ctl | (a[L-1:0] ^ b[L-1:0]);
  end

  initial begin
    assert (L >= 1 && L < W) else $error("eta_adder: need 1 <= L < W");
  end
endmodule
