// csla: W-bit carry select adder (CSLA), W a multiple of BLK.
//
// The lowest BLK bits are added by one ripple-carry adder fed by cin. Every
// higher BLK-bit block holds two ripple-carry adders working at the same
// time, one with carry in 0 and one with carry in 1. When the carry from
// the block below arrives, a 2:1 mux picks that block's sum and a second
// 2:1 mux picks its carry out, so the carry only passes one mux per block.
// This is the 8-bit arrangement (4-bit blocks) extended block by block to
// W bits; the uniform block size is this design's choice. Combinational.
module csla #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = W / BLK;

  logic [NB:0] bc;   // carry into each block

  ripple_carry_adder #(.W(BLK)) u_blk0 (
    .a   (a[BLK-1:0]),
    .b   (b[BLK-1:0]),
    .cin (cin),
    .sum (sum[BLK-1:0]),
    .cout(bc[1])
  );
  assign bc[0] = cin;

  for (genvar k = 1; k < NB; k++) begin : g_blk
    logic [BLK-1:0] s0, s1;
    logic           c0, c1;

    ripple_carry_adder #(.W(BLK)) u_rca0 (
      .a   (a[BLK*k +: BLK]),
      .b   (b[BLK*k +: BLK]),
      .cin (1'b0),
      .sum (s0),
      .cout(c0)
    );
    ripple_carry_adder #(.W(BLK)) u_rca1 (
      .a   (a[BLK*k +: BLK]),
      .b   (b[BLK*k +: BLK]),
      .cin (1'b1),
      .sum (s1),
      .cout(c1)
    );

    assign sum[BLK*k +: BLK] = bc[k] ? s1 : s0;
    assign bc[k+1]           = bc[k] ? c1 : c0;
  end

  assign cout = bc[NB];

  initial begin
    assert (W % BLK == 0 && W >= BLK) else $error("csla: W must be a multiple of BLK");
  end
endmodule
