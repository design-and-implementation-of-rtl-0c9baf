// adder_select: one W-bit adder of the kind chosen by KIND, with carry in 0.
//
// Builds a claa, csla or eta_adder so that the multipliers can be written
// once for all three adder types. Returns the W-bit sum and the carry out.
// Combinational.
module adder_select
  import mult_pkg::*;
#(
  parameter adder_kind_e KIND = ADD_CSLA,
  parameter int unsigned W    = 32,
  parameter int unsigned L    = W / 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  if (KIND == ADD_CLAA) begin : g_claa
    claa #(.W(W)) u_add (.a(a), .b(b), .cin(1'b0), .sum(sum), .cout(cout));
  end else if (KIND == ADD_CSLA) begin : g_csla
    csla #(.W(W), .BLK(4)) u_add (.a(a), .b(b), .cin(1'b0), .sum(sum), .cout(cout));
  end else begin : g_eta
    eta_adder #(.W(W), .L(L)) u_add (.a(a), .b(b), .sum(sum), .cout(cout));
  end
endmodule
