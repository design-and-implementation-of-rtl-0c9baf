// tb_ripple_carry_adder: exhaustive check of the 4-bit ripple-carry adder
// (all 512 combinations of a, b and cin) and a random check of a 16-bit
// instance, against the integer sum a + b + cin.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;

  ripple_carry_adder #(.W(4))  dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  ripple_carry_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL w4 a=%0d b=%0d cin=%0d got %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      if (i == 0) begin a16 = 16'hFFFF; b16 = 16'h0000; ci16 = 1'b1; end
      #1;
      checks++;
      if ({co16, s16} !== 17'(a16) + 17'(b16) + 17'(ci16)) begin
        failures++;
        $display("FAIL w16 a=%h b=%h cin=%0d got %h", a16, b16, ci16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
