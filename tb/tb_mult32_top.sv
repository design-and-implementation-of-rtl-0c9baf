// tb_mult32_top: end-to-end test of the whole design at its default size
// (32-bit operands, no parameter overrides).
//
// Each operand pair (the three reference-waveform pairs, corner cases and
// random pairs) is applied to all four multipliers. The CLAA and CSLA array
// multipliers and the sequential multiplier must give the exact 64-bit
// product; the ETA array multiplier must give the product of the
// shift-and-add algorithm run on error tolerant additions. The sequential
// multiplier's done must come 32 clocks after start.
//
// It counts how often each mechanism of the design was used and fails if
// one never was: a stage adding (multiplier bit 1) and a stage passing
// (bit 0); a carry entering a higher 4-bit block of the carry select adder
// with value 1 and with value 0; the ETA's "set the lower bits to 1" rule;
// an ETA product that is exact and one that is approximate; a start pulse
// ignored while the sequential multiplier is busy.
module tb_mult32_top;
  import mult_ref_pkg::*;

  localparam int unsigned W = 32;

  int checks = 0, failures = 0;
  int n_add = 0, n_pass = 0, n_sel1 = 0, n_sel0 = 0, n_sat = 0;
  int n_eta_exact = 0, n_eta_approx = 0, n_ignored = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p_claa, p_csla, p_eta, p_seq;
  logic           rst_n, start, busy, done;

  mult32_top dut (
    .claa_a(a), .claa_b(b), .claa_prod(p_claa),
    .csla_a(a), .csla_b(b), .csla_prod(p_csla),
    .eta_a(a),  .eta_b(b),  .eta_prod(p_eta),
    .clk(clk), .rst_n(rst_n), .seq_start(start),
    .seq_multiplicand(a), .seq_multiplier(b),
    .seq_busy(busy), .seq_done(done), .seq_prod(p_seq)
  );

  // Count, from the operands alone, the mechanisms the 32 exact additions
  // of one multiplication use.
  task automatic count_mechanisms(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] upper;
    logic [W:0]   s;
    upper = '0;
    for (int i = 0; i < int'(W); i++) begin
      if (y[i]) begin
        n_add++;
        for (int k = 1; k < int'(W) / 4; k++) begin
          if (((33'(upper) & ((33'd1 << (4*k)) - 1)) + (33'(x) & ((33'd1 << (4*k)) - 1))) >> (4*k) != 0)
            n_sel1++;
          else
            n_sel0++;
        end
        s = 33'(upper) + 33'(x);
      end else begin
        n_pass++;
        s = 33'(upper);
      end
      upper = s[W:1];
    end
  endtask

  task automatic run(logic [W-1:0] x, logic [W-1:0] y);
    logic [63:0] exact, approx;
    int cyc;
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    exact  = 64'(x) * 64'(y);
    approx = mult_ref(x, y, W, 1'b1, W / 2);
    count_mechanisms(x, y);
    @(negedge clk);
    start = 1'b0;
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
    if (approx == exact) n_eta_exact++; else n_eta_approx++;
    cyc = 0;
    while (!done && cyc < 100) begin
      if (cyc == 3) begin
        start = 1'b1;
        if (busy) n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      cyc++;
    end
    start = 1'b0;
    checks += 2;
    if (cyc != int'(W)) begin
      failures++;
      $display("FAIL sequential latency %0d, expected %0d", cyc, W);
    end
    if (p_seq !== exact) begin
      failures++;
      $display("FAIL sequential %0d * %0d: got %0d exp %0d", x, y, p_seq, exact);
    end
    // the ETA rule fires when any ETA addition meets a 1/1 pair in its low half
    begin
      logic [W-1:0] up;
      logic [32:0]  s;
      up = '0;
      for (int i = 0; i < int'(W); i++) begin
        if (y[i]) begin
          if ((up[W/2-1:0] & x[W/2-1:0]) != 0) n_sat++;
          s = eta_add_ref(up, x, W, W / 2);
        end else begin
          s = 33'(up);
        end
        up = s[W:1];
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32'd3782682799, 32'd1404927549);
    run(32'd4230476960, 32'd1699019376);
    run(32'd3048485111, 32'd1908060884);
    run(32'd0, 32'd0);
    run(32'd1, 32'd1);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run(32'h0001_0000, 32'h0001_0000);
    for (int i = 0; i < 200; i++) run($urandom, $urandom);
    $display("stage adds=%0d passes=%0d, CSLA block carry 1=%0d 0=%0d, ETA rule fired=%0d",
             n_add, n_pass, n_sel1, n_sel0, n_sat);
    $display("ETA products exact=%0d approximate=%0d, starts ignored while busy=%0d",
             n_eta_exact, n_eta_approx, n_ignored);
    if (n_add == 0)        begin failures++; $display("FAIL no adding stage"); end
    if (n_pass == 0)       begin failures++; $display("FAIL no passing stage"); end
    if (n_sel1 == 0)       begin failures++; $display("FAIL no carry-1 block selection"); end
    if (n_sel0 == 0)       begin failures++; $display("FAIL no carry-0 block selection"); end
    if (n_sat == 0)        begin failures++; $display("FAIL ETA rule never fired"); end
    if (n_eta_exact == 0)  begin failures++; $display("FAIL no exact ETA product"); end
    if (n_eta_approx == 0) begin failures++; $display("FAIL no approximate ETA product"); end
    if (n_ignored == 0)    begin failures++; $display("FAIL no start ignored while busy"); end
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
