// tb_shift_add_multiplier: checks the sequential shift-and-add multiplier
// (32-bit, carry select adder) on the reference waveform operands, corner
// cases and 300 random pairs. For each product it checks that done comes
// exactly 32 clocks after the edge that took start, that busy is high in
// between, that a start pulse while busy is ignored, and that the product
// equals a * b. A second instance built with the error tolerant adder is
// compared with the reference approximate algorithm.
module tb_shift_add_multiplier;
  import mult_pkg::*;
  import mult_ref_pkg::*;

  localparam int unsigned W = 32;

  int checks = 0, failures = 0;
  int add_steps = 0, skip_steps = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, start;
  logic [W-1:0]  mc, ml;
  logic          busy, done, busy_e, done_e;
  logic [2*W-1:0] prod, prod_e;

  shift_add_multiplier dut (
    .clk(clk), .rst_n(rst_n), .start(start), .multiplicand(mc), .multiplier(ml),
    .busy(busy), .done(done), .prod(prod)
  );
  shift_add_multiplier #(.KIND(ADD_ETA)) dut_eta (
    .clk(clk), .rst_n(rst_n), .start(start), .multiplicand(mc), .multiplier(ml),
    .busy(busy_e), .done(done_e), .prod(prod_e)
  );

  task automatic run(logic [W-1:0] x, logic [W-1:0] y);
    int cyc;
    @(negedge clk);
    mc = x; ml = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;   // clock edges since the one that took start
    for (int i = 0; i < W; i++) begin
      if (y[i]) add_steps++; else skip_steps++;
    end
    while (!done && cyc < 100) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low before done");
      end
      // a start while busy must be ignored; change operands too
      if (cyc == 5) begin
        start = 1'b1; mc = ~x; ml = ~y;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      cyc++;
    end
    start = 1'b0;
    checks += 3;
    if (cyc != W) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, W);
    end
    if (prod !== 64'(x) * 64'(y)) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d", x, y, prod);
    end
    if (!done_e || prod_e !== mult_ref(x, y, W, 1'b1, W / 2)) begin
      failures++;
      $display("FAIL ETA %0d * %0d: got %0d exp %0d", x, y, prod_e, mult_ref(x, y, W, 1'b1, W / 2));
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done is not a single pulse or busy stayed high");
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; mc = '0; ml = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL not idle after reset");
    end
    run(32'd3782682799, 32'd1404927549);
    run(32'd4230476960, 32'd1699019376);
    run(32'd3048485111, 32'd1908060884);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run(32'd0, 32'hFFFF_FFFF);
    run(32'hFFFF_FFFF, 32'd0);
    for (int i = 0; i < 300; i++) run($urandom, $urandom);
    if (add_steps == 0 || skip_steps == 0) begin
      failures++;
      $display("FAIL add or skip step never exercised");
    end
    $display("add steps=%0d skip steps=%0d", add_steps, skip_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
