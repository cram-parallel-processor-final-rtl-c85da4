// tb_lcd_ctrl: LCD initialisation and instruction display.
// A model panel captures {RS, data} on each falling edge of E. Checks the
// power-up wait, the four initialisation commands, and the line written
// for an operation word and for a write-address word, including that a
// show pulse during a line is ignored.
module tb_lcd_ctrl;
  localparam int WAITC = 50;
  logic clk = 0, rst, show, done, lcd_rs, lcd_rw, lcd_e, e_q;
  logic [15:0] instr;
  logic [7:0] lcd_data;
  logic [8:0] got [$];
  int checks = 0, failures = 0, first_e = -1, cyc = 0;

  lcd_ctrl #(.INIT_WAIT(WAITC), .SHORT_DELAY(10), .LONG_DELAY(30)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    e_q <= lcd_e;
    if (e_q && !lcd_e) got.push_back({lcd_rs, lcd_data});
    if (lcd_e && first_e < 0) first_e = cyc;
  end

  task automatic check(input int got_v, input int exp, input string what);
    checks++;
    if (got_v != exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got_v, exp);
    end
  endtask

  task automatic expect_words(input logic [8:0] w [], input string what);
    check(got.size(), w.size(), {what, " count"});
    foreach (w[i]) if (i < got.size()) check(got[i], w[i], $sformatf("%s word %0d", what, i));
    got.delete();
  endtask

  initial begin
    rst = 1; show = 0; instr = '0;
    @(posedge clk); #1; rst = 0;
    wait (done); @(posedge clk); #1;
    checks++; if (first_e < WAITC) begin failures++; $display("FAIL power-up wait"); end
    expect_words('{9'h001, 9'h03C, 9'h00C, 9'h006}, "init");
    instr = 16'hD50A; show = 1; @(posedge clk); #1; show = 0;
    instr = 16'h0000; repeat (5) @(posedge clk); #1;
    show = 1; @(posedge clk); #1; show = 0;        // ignored: busy
    wait (done); @(posedge clk); #1;
    expect_words('{9'h080, 9'h14F, 9'h120, 9'h144, 9'h135, 9'h130, 9'h141, 9'h120}, "op line");
    instr = 16'h400C; show = 1; @(posedge clk); #1; show = 0;
    wait (done); @(posedge clk); #1;
    expect_words('{9'h080, 9'h157, 9'h120, 9'h134, 9'h130, 9'h130, 9'h143, 9'h120}, "write line");
    check(lcd_rw, 0, "write only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
