// tb_lcd_out: one LCD write.
// With short delays (SHORT 20, LONG 60) a character and a clear command
// are written. Checks: data and RS on the pins, the enable pulse of two
// clocks, and the busy time from latch to complete for the short and the
// long delay (latch cycle + LOAD + SET_COUNT + delay + 1 clocks).
module tb_lcd_out;
  localparam int SHORT = 20, LONG = 60;
  logic clk = 0, rst, extra_delay, latch, complete, lcd_rs, lcd_e;
  logic [8:0] data_in;
  logic [7:0] lcd_data;
  int checks = 0, failures = 0;

  lcd_out #(.SHORT_DELAY(SHORT), .LONG_DELAY(LONG)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic write(input logic [8:0] w, input logic long_d, input int exp_busy);
    int busy, e_high;
    logic e_prev;
    data_in = w; extra_delay = long_d; latch = 1;
    @(posedge clk); #1;
    latch = 0; data_in = 9'h0AA;   // data only needs to be valid at the latch
    busy = 1; e_high = 0;
    while (!complete) begin
      @(posedge clk); #1;
      busy++;
      if (lcd_e) e_high++;
    end
    check(busy, exp_busy, "busy clocks");
    check(e_high, 2, "enable pulse length");
    check(lcd_data, w[7:0], "data pins");
    check(lcd_rs, w[8], "register select");
  endtask

  initial begin
    rst = 1; latch = 0; data_in = '0; extra_delay = 0;
    @(posedge clk); #1; rst = 0;
    check(complete, 1, "idle complete");
    write(9'h143, 0, SHORT + 4);
    write(9'h001, 1, LONG + 4);
    // latch ignored while busy
    data_in = 9'h155; latch = 1; @(posedge clk); #1;
    data_in = 9'h166; repeat (3) @(posedge clk); #1; latch = 0;
    while (!complete) @(posedge clk);
    #1; check(lcd_data, 8'h55, "second latch while busy ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
