// tb_cram_pe: one processing element against a reference model.
// Runs the report's PE test sequence (load X from M, write X back to
// memory, load Y, X = X AND M) and then random commands, comparing X, Y,
// the write-enable register, the memory write strobe and data, the ALU
// output and the bus contribution after every clock.
module tb_cram_pe;
  import cram_pkg::*;
  logic clk = 0, rst, step, cmd_valid, m, left_in, right_in;
  pe_cmd_t cmd;
  logic alu_out, x, y, wreg, mem_we, mem_wdata, bus_drive;
  logic rx, ry, rw;
  int checks = 0, failures = 0;

  cram_pe dut (.*);

  always #5 clk = ~clk;

  function automatic logic f(input logic [7:0] op, input logic a, input logic b, input logic c);
    return op[{a, b, c}];
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  // apply one command for one clock and compare with the model
  task automatic apply(input logic [7:0] op, input pe_ctrl_t c, input logic mv,
                       input logic s, input logic v);
    logic a, ew;
    cmd = '{opcode: op, ctrl: c};
    m = mv; step = s; cmd_valid = v;
    #1;
    a  = f(op, rx, ry, mv);
    ew = s && v && c.en_mem && rw;
    check(alu_out, a, "alu");
    check(mem_we, ew, "mem_we");
    if (ew) check(mem_wdata, a, "mem_wdata");
    check(bus_drive, (v && c.bus_en) ? a : 1'b1, "bus");
    @(posedge clk);
    if (s && v) begin
      if (c.shift_l) rx = right_in; else if (c.en_x) rx = a;
      if (c.shift_r) ry = left_in;  else if (c.en_y) ry = a;
      if (c.en_wreg) rw = a;
    end
    #1;
    check(x, rx, "x");
    check(y, ry, "y");
    check(wreg, rw, "wreg");
  endtask

  initial begin
    rst = 1; step = 0; cmd_valid = 0; m = 0; left_in = 0; right_in = 0; cmd = '0;
    @(posedge clk); #1;
    rst = 0;
    rx = 0; ry = 0; rw = 1;
    check(x, 0, "reset x"); check(wreg, 1, "reset wreg");
    // report's PE test sequence
    apply(8'hAA, 7'b0000010, 1, 1, 1);   // X = M = 1
    check(x, 1, "x loaded");
    apply(8'hF0, 7'b0001000, 0, 1, 1);   // memory <= X
    apply(8'hAA, 7'b0000100, 1, 1, 1);   // Y = 1
    apply(8'hAA, 7'b0000100, 0, 1, 1);   // Y = 0
    apply(8'hA0, 7'b0000010, 0, 1, 1);   // X = X & M = 0
    check(x, 0, "x and m");
    // conditional write: WREG = 0 blocks the memory write
    apply(8'h00, 7'b1000000, 0, 1, 1);
    check(wreg, 0, "wreg cleared");
    apply(8'hFF, 7'b0001000, 0, 1, 1);
    apply(8'hFF, 7'b1000000, 0, 1, 1);
    // no step, or no valid command: nothing changes
    apply(8'hFF, 7'b0000110, 1, 0, 1);
    apply(8'hFF, 7'b0000110, 1, 1, 0);
    // random commands
    repeat (3000) begin
      left_in = 1'($urandom); right_in = 1'($urandom);
      apply(8'($urandom), 7'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
