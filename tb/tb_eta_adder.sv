// tb_eta_adder: checks the error tolerant adder.
//  - the 8-bit worked example with a 4/4 split: 183 + 109 gives 287
//    (accurate part 1011 + 0110 = 10001, inaccurate part 1111);
//  - every pair of 8-bit operands (65536) against the reference procedure;
//  - 5000 random pairs at the default 32-bit width with a 16/16 split.
// It also checks the error measures: the accurate part keeps the overall
// error below 2^L, and counts how often the "set all lower bits to 1" rule
// fired and how often the result was exact.
module tb_eta_adder;
  import mult_ref_pkg::*;

  int checks = 0, failures = 0;
  int saturated = 0, exact = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, s8;
  logic        co8;
  logic [31:0] a, b, s;
  logic        co;

  eta_adder #(.W(8), .L(4)) dut8 (.a(a8), .b(b8), .sum(s8), .cout(co8));
  eta_adder                 dut  (.a(a),  .b(b),  .sum(s),  .cout(co));

  initial begin
    logic [32:0] exp_v;
    longint      oe;

    a8 = 8'd183; b8 = 8'd109;
    #1;
    checks++;
    if ({co8, s8} !== 9'd287) begin
      failures++;
      $display("FAIL worked example: got %0d", {co8, s8});
    end

    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      exp_v = eta_add_ref({24'd0, a8}, {24'd0, b8}, 8, 4);
      checks++;
      if ({co8, s8} !== exp_v[8:0]) begin
        failures++;
        $display("FAIL w8 a=%0d b=%0d got %0d exp %0d", a8, b8, {co8, s8}, exp_v[8:0]);
      end
    end

    for (int i = 0; i < 5000; i++) begin
      a = $urandom; b = $urandom;
      #1;
      exp_v = eta_add_ref(a, b, 32, 16);
      checks++;
      if ({co, s} !== exp_v) begin
        failures++;
        $display("FAIL w32 a=%h b=%h got %h exp %h", a, b, {co, s}, exp_v);
      end
      oe = longint'(33'(a) + 33'(b)) - longint'({co, s});
      if (oe < 0) oe = -oe;
      checks++;
      if (oe >= 65536) begin
        failures++;
        $display("FAIL overall error %0d not below 2^16", oe);
      end
      if (oe == 0) exact++;
      if ((a[15:0] & b[15:0]) != 0) saturated++;
    end
    if (saturated == 0 || exact == 0) begin
      failures++;
      $display("FAIL saturation rule or exact case never exercised");
    end
    $display("saturated=%0d exact=%0d", saturated, exact);
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
