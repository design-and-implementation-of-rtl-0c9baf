// tb_csla: checks the 32-bit carry select adder against the integer sum a + b + cin:
// corner cases (full-length carry chains, all ones, zero) and 5000 random
// operand pairs, with cin both 0 and 1. Also counts how often a carry
// crossed a 4-bit block boundary, so the carry path between blocks is
// known to have been used with both values.
module tb_csla;
  int checks = 0, failures = 0;
  int crossed = 0, not_crossed = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b, s;
  logic        ci, co;

  csla #(.W(32)) dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));

  task automatic check();
    logic [32:0] exp_v;
    exp_v = 33'(a) + 33'(b) + 33'(ci);
    #1;
    checks++;
    if ({co, s} !== exp_v) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %h exp %h", a, b, ci, {co, s}, exp_v);
    end
    for (int k = 1; k < 8; k++) begin
      if (((33'(a) & ((33'd1 << (4*k)) - 1)) + (33'(b) & ((33'd1 << (4*k)) - 1)) + 33'(ci)) >> (4*k) != 0)
        crossed++;
      else
        not_crossed++;
    end
  endtask

  initial begin
    a = 32'hFFFF_FFFF; b = 32'h0; ci = 1'b1; check();
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; ci = 1'b1; check();
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; ci = 1'b0; check();
    a = 32'h0; b = 32'h0; ci = 1'b0; check();
    a = 32'h8000_0000; b = 32'h8000_0000; ci = 1'b0; check();
    a = 32'h0F0F_0F0F; b = 32'h00F0_F0F1; ci = 1'b0; check();
    for (int i = 0; i < 5000; i++) begin
      a = $urandom; b = $urandom; ci = 1'($urandom);
      check();
    end
    if (crossed == 0 || not_crossed == 0) begin
      failures++;
      $display("FAIL block carries were not exercised both ways");
    end
    $display("block carries: crossed=%0d not_crossed=%0d", crossed, not_crossed);
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
