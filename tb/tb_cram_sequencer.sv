// tb_cram_sequencer: program counter, halt, restart and start.
// A small program table drives instr from pc. Checks: stopped after reset,
// one issue per step, no advance without step, stop at a halt word (the
// halt word itself is issued), wrap to 0 at a restart word, and restart
// from 0 on start.
module tb_cram_sequencer;
  import cram_pkg::*;
  logic clk = 0, rst, step, start;
  logic [15:0] instr;
  logic [7:0] pc;
  logic running, issue;
  logic [15:0] prog [256];
  int checks = 0, failures = 0;

  cram_sequencer dut (.*);

  always #5 clk = ~clk;
  assign instr = prog[pc];

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d exp %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) prog[i] = mk_rd(8'(i));
    prog[5]  = mk_halt();
    prog[12] = mk_rd(8'd3) | (16'd1 << RESTART_BIT);
    rst = 1; step = 1; start = 0;
    @(posedge clk); #1; rst = 0;
    check(running, 0, "stopped after reset");
    @(posedge clk); #1; check(pc, 0, "no run without start");
    start = 1; @(posedge clk); #1; start = 0;
    check(running, 1, "running");
    check(issue, 1, "issue");
    for (int i = 1; i <= 5; i++) begin @(posedge clk); #1; check(pc, i, "count"); end
    check(issue, 1, "halt word issued");
    @(posedge clk); #1;
    check(running, 0, "halted"); check(pc, 5, "pc at halt");
    repeat (3) @(posedge clk); #1;
    check(pc, 5, "stays halted"); check(issue, 0, "no issue when halted");
    // step gating and restart flag
    prog[5] = mk_rd(8'd5);
    start = 1; @(posedge clk); #1; start = 0;
    check(pc, 0, "start from 0");
    step = 0; repeat (3) @(posedge clk); #1;
    check(pc, 0, "no step no count"); check(issue, 0, "no issue without step");
    step = 1;
    for (int i = 1; i <= 12; i++) begin @(posedge clk); #1; check(pc, i, "count 2"); end
    @(posedge clk); #1; check(pc, 0, "restart flag wraps to 0");
    check(running, 1, "still running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
