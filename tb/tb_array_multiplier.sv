// tb_array_multiplier: checks the combinational 32 x 32 array multiplier
// built with each of the three adders.
//  - the three operand pairs of the reference waveforms, e.g.
//    3782682799 * 1404927549 = 5314395273443529651, which the CLAA and CSLA
//    versions must reproduce exactly;
//  - corner cases (zero, one, all ones, single bits) and 3000 random pairs.
// CLAA and CSLA are compared with the exact product; the ETA version with
// the shift-and-add algorithm run on the reference error tolerant addition.
// An 8-bit CSLA instance is also checked exhaustively.
module tb_array_multiplier;
  import mult_pkg::*;
  import mult_ref_pkg::*;

  int checks = 0, failures = 0;
  int eta_inexact = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [63:0] p_claa, p_csla, p_eta;
  logic [7:0]  a8, b8;
  logic [15:0] p8;

  array_multiplier #(.KIND(ADD_CLAA)) dut_claa (.a(a), .b(b), .prod(p_claa));
  array_multiplier #(.KIND(ADD_CSLA)) dut_csla (.a(a), .b(b), .prod(p_csla));
  array_multiplier #(.KIND(ADD_ETA))  dut_eta  (.a(a), .b(b), .prod(p_eta));
  array_multiplier #(.W(8), .KIND(ADD_CSLA)) dut8 (.a(a8), .b(b8), .prod(p8));

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [63:0] exact, approx;
    a = x; b = y;
    #1;
    exact  = 64'(x) * 64'(y);
    approx = mult_ref(x, y, 32, 1'b1, 16);
    checks += 3;
    if (p_claa !== exact) begin
      failures++;
      $display("FAIL CLAA %0d * %0d: got %0d exp %0d", x, y, p_claa, exact);
    end
    if (p_csla !== exact) begin
      failures++;
      $display("FAIL CSLA %0d * %0d: got %0d exp %0d", x, y, p_csla, exact);
    end
    if (p_eta !== approx) begin
      failures++;
      $display("FAIL ETA %0d * %0d: got %0d exp %0d", x, y, p_eta, approx);
    end
    if (p_eta != exact) eta_inexact++;
  endtask

  initial begin
    // reference waveform vectors
    check(32'd3782682799, 32'd1404927549);
    checks++;
    if (p_csla !== 64'd5314395273443529651) failures++;
    check(32'd4230476960, 32'd1699019376);
    checks++;
    if (p_csla !== 64'd7187662324761576960) failures++;
    check(32'd3048485111, 32'd1908060884);
    checks++;
    if (p_csla !== 64'd5816695195755498124) failures++;
    // corners
    check(32'd0, 32'd0);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'hFFFF_FFFF, 32'd1);
    check(32'd1, 32'hFFFF_FFFF);
    check(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 3000; i++) check($urandom, $urandom);
    if (eta_inexact == 0) begin
      failures++;
      $display("FAIL ETA multiplier never gave an approximate product");
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        $display("FAIL w8 %0d * %0d: got %0d", a8, b8, p8);
      end
    end
    $display("ETA approximate products: %0d", eta_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
