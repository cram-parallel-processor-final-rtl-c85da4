// tb_clk_div: prescaler rates.
// With the report's ratios (25, then decades) the 1 MHz and 100 kHz ticks
// are counted over 25,000 clocks (1 ms at 25 MHz): exactly 1000 and 100.
// A reduced instance (5, then 3) is run long enough to count every stage,
// and the spacing of consecutive ticks is checked.
module tb_clk_div;
  logic clk = 0, rst;
  logic [6:0] tick_full, tick_small;
  int checks = 0, failures = 0;
  int n_full [7], n_small [7];

  clk_div dut_full (.clk(clk), .rst(rst), .tick(tick_full));
  clk_div #(.PRE_DIV(5), .DECADE(3)) dut_small (.clk(clk), .rst(rst), .tick(tick_small));

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int last, gap_bad;
    rst = 1; @(posedge clk); #1; rst = 0;
    foreach (n_full[k]) begin n_full[k] = 0; n_small[k] = 0; end
    last = -1; gap_bad = 0;
    for (int c = 0; c < 5 * 729 * 2; c++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 7; k++) begin
        if (c < 25000 && tick_full[k]) n_full[k]++;
        if (tick_small[k]) n_small[k]++;
      end
      if (tick_small[0]) begin
        if (last >= 0 && c - last != 5) gap_bad++;
        last = c;
      end
    end
    for (int c = 5 * 729 * 2; c < 25000; c++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 7; k++) if (tick_full[k]) n_full[k]++;
    end
    check(n_full[0], 1000, "1 MHz ticks in 1 ms");
    check(n_full[1], 100, "100 kHz ticks in 1 ms");
    check(n_full[2], 10, "10 kHz ticks in 1 ms");
    check(n_full[3], 1, "1 kHz ticks in 1 ms");
    check(n_small[0], 1458, "small stage 0");
    for (int k = 1; k < 7; k++) check(n_small[k], 1458 / (3 ** k), $sformatf("small stage %0d", k));
    check(gap_bad, 0, "tick spacing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
