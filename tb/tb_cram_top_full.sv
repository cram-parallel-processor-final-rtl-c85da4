// tb_cram_top_full: the processor at its default size and timing.
// No parameter is overridden: 25 MHz clock, 100 Hz button sampling, 15 ms
// LCD power-up wait. The preloaded program adds 1111 + 1111 on PE0 and
// 1010 + 0101 on PE1 in free-running mode (28 clocks), then the program is
// started again in push-button mode and stepped once, and the LCD line for
// the first instruction is checked.
module tb_cram_top_full;
  import cram_pkg::*;
  logic clk = 0, rst, start, step_mode, pb_step_n;
  logic prog_we, mem_we;
  logic [7:0] prog_addr, mem_addr;
  logic [15:0] prog_data;
  logic [1:0] mem_wdata, mem_rdata;
  logic shift_in_left, shift_in_right, shift_out_left, shift_out_right;
  logic [7:0] pc;
  logic running, bus_and;
  logic [1:0] x, y, wreg;
  logic [15:0] instr_issued;
  logic [6:0] seg_xy, seg_m;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_e, lcd_done;
  int checks = 0, failures = 0;
  logic e_q;
  logic [8:0] words [$];

  cram_top dut (.*);

  always #20 clk = ~clk;   // 25 MHz
  always @(posedge clk) begin
    e_q <= lcd_e;
    if (e_q && !lcd_e) words.push_back({lcd_rs, lcd_data});
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    int clocks;
    logic [4:0] s0, s1;
    rst = 1; start = 0; step_mode = 0; pb_step_n = 1; prog_we = 0; mem_we = 0;
    prog_addr = '0; prog_data = '0; mem_addr = '0; mem_wdata = '0;
    shift_in_left = 0; shift_in_right = 0;
    repeat (2) @(posedge clk); #1; rst = 0;
    start = 1; @(posedge clk); #1; start = 0;
    clocks = 0;
    while (running) begin @(posedge clk); #1; clocks++; end
    check(clocks, 28, "program length in clocks");
    for (int i = 0; i < 5; i++) begin
      mem_addr = 8'(8 + i); #1;
      s0[i] = mem_rdata[0]; s1[i] = mem_rdata[1];
    end
    check(s0, 5'b11110, "PE0 1111+1111");
    check(s1, 5'b01111, "PE1 1010+0101");
    // push-button step once
    wait (lcd_done); @(posedge clk); #1;
    words.delete();
    step_mode = 1;
    start = 1; @(posedge clk); #1; start = 0;
    pb_step_n = 0;
    wait (dut.pressed); @(posedge clk); #1;
    pb_step_n = 1;
    check(pc, 1, "one step");
    wait (!dut.pressed); @(posedge clk); #1;
    wait (lcd_done); @(posedge clk); #1;
    check(words.size(), 8, "LCD line words");
    if (words.size() == 8) begin
      check(words[1], 9'h14F, "LCD O");
      check(words[3], 9'h138, "LCD 8");
      check(words[6], 9'h134, "LCD 4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
