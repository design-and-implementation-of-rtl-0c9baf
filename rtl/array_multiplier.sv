// array_multiplier: combinational W x W unsigned multiplier from a chain of
// W adders, one per multiplier bit.
//
// This is the shift-and-add algorithm unrolled in space. The running upper
// half of the product register starts at zero. Stage i adds the
// multiplicand a to it and, if b[i] is 1, keeps the (W+1)-bit result,
// otherwise keeps the running value unchanged. The lowest bit of the kept
// value is product bit i (the bit shifted out), and the remaining W bits,
// with the adder's carry as their MSB, are the running value passed to
// stage i+1. The last stage's running value is prod[2W-1:W].
//
// KIND chooses the adder of every stage: ADD_CLAA and ADD_CSLA give exact
// products, ADD_ETA gives an approximate product (its low L bits of each
// addition are carry-free). Purely combinational, no clock: the delay is
// the chain of W adders.
module array_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter adder_kind_e KIND = ADD_CSLA,
  parameter int unsigned L    = W / 2
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] prod
);
  logic [W-1:0] upper [W+1];

  assign upper[0] = '0;

  for (genvar i = 0; i < W; i++) begin : g_stage
    logic [W-1:0] s;
    logic         c;
    logic [W:0]   kept;

    adder_select #(.KIND(KIND), .W(W), .L(L)) u_add (
      .a   (upper[i]),
      .b   (a),
      .sum (s),
      .cout(c)
    );

    assign kept        = b[i] ? {c, s} : {1'b0, upper[i]};
    assign prod[i]     = kept[0];
    assign upper[i+1]  = kept[W:1];
  end

  assign prod[2*W-1:W] = upper[W];
endmodule
