// mult32_top: the 32-bit unsigned multipliers side by side.
//
// Three combinational 32 x 32 -> 64 array multipliers, identical except for
// the adder in each of their 32 stages: carry look-ahead (CLAA), carry
// select (CSLA) and error tolerant (ETA). The first two give the exact
// product; the ETA one gives an approximate product whose error comes from
// the carry-free low half of each addition. Next to them sits the
// sequential shift-and-add multiplier, which runs the same algorithm one
// step per clock with a carry select adder. Each multiplier has its own
// ports so that they can be driven and compared independently.
//
// Timing: the array multipliers are purely combinational (no registers);
// the sequential one takes W clocks from start to done.
module mult32_top
  import mult_pkg::*;
#(
  parameter int unsigned W = MULT_W
) (
  // CLAA-based array multiplier
  input  logic [W-1:0]   claa_a,
  input  logic [W-1:0]   claa_b,
  output logic [2*W-1:0] claa_prod,
  // CSLA-based array multiplier
  input  logic [W-1:0]   csla_a,
  input  logic [W-1:0]   csla_b,
  output logic [2*W-1:0] csla_prod,
  // ETA-based array multiplier
  input  logic [W-1:0]   eta_a,
  input  logic [W-1:0]   eta_b,
  output logic [2*W-1:0] eta_prod,
  // sequential shift-and-add multiplier
  input  logic           clk,
  input  logic           rst_n,
  input  logic           seq_start,
  input  logic [W-1:0]   seq_multiplicand,
  input  logic [W-1:0]   seq_multiplier,
  output logic           seq_busy,
  output logic           seq_done,
  output logic [2*W-1:0] seq_prod
);
  array_multiplier #(.W(W), .KIND(ADD_CLAA)) u_mul_claa (
    .a(claa_a), .b(claa_b), .prod(claa_prod)
  );

  array_multiplier #(.W(W), .KIND(ADD_CSLA)) u_mul_csla (
    .a(csla_a), .b(csla_b), .prod(csla_prod)
  );

  array_multiplier #(.W(W), .KIND(ADD_ETA), .L(W / 2)) u_mul_eta (
    .a(eta_a), .b(eta_b), .prod(eta_prod)
  );

  shift_add_multiplier #(.W(W), .KIND(ADD_CSLA)) u_mul_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (seq_start),
    .multiplicand(seq_multiplicand),
    .multiplier  (seq_multiplier),
    .busy        (seq_busy),
    .done        (seq_done),
    .prod        (seq_prod)
  );
endmodule
