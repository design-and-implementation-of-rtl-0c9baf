// tb_cla4: exhaustive check of the 4-bit carry look-ahead group: all 512
// combinations of a, b and C0, sum and C4 against a + b + C0.
module tb_cla4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a, b, s;
  logic       ci, co;

  cla4 dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci, a, b} = 9'(i);
      #1;
      checks++;
      if ({co, s} !== 5'(a) + 5'(b) + 5'(ci)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got %0d", a, b, ci, {co, s});
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
