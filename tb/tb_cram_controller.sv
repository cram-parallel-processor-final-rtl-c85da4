// tb_cram_controller: instruction decoding.
// Uses the report's worked examples: 1101010100001010 gives opcode
// 10101010 with enable X and enable memory; 1101000000000100 gives opcode
// 10100000 with enable Y; 0000000000000001 sets read address 1; a word with
// bits 15:14 = 01 sets the write address. Also random words against a
// decoder model, reset values, one-step command validity and step gating.
module tb_cram_controller;
  import cram_pkg::*;
  logic clk = 0, rst, step, issue;
  logic [15:0] instr, last_instr;
  logic [7:0] rd_addr, wr_addr;
  pe_cmd_t cmd;
  logic cmd_valid, instr_stb;
  logic [7:0] e_rd, e_wr;
  pe_cmd_t e_cmd;
  logic e_valid;
  int checks = 0, failures = 0;

  cram_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h exp %h", what, $time, got, exp);
    end
  endtask

  task automatic send(input logic [15:0] w);
    instr = w; issue = 1; step = 1;
    @(posedge clk); #1;
    issue = 0;
  endtask

  initial begin
    rst = 1; step = 0; issue = 0; instr = '0;
    @(posedge clk); #1; rst = 0;
    check(cmd_valid, 0, "reset valid"); check(cmd, 0, "reset cmd");
    send(16'b1101010100001010);
    check(cmd.opcode, 8'b10101010, "opcode AA");
    check(cmd.ctrl.en_x, 1, "en_x"); check(cmd.ctrl.en_mem, 1, "en_mem");
    check(cmd.ctrl.en_y, 0, "en_y off"); check(cmd_valid, 1, "valid");
    check(last_instr, 16'b1101010100001010, "last_instr"); check(instr_stb, 1, "stb");
    send(16'b0000000000000001);
    check(rd_addr, 1, "read address 1"); check(cmd_valid, 0, "valid drops");
    check(cmd.opcode, 8'b10101010, "opcode held");
    send(16'b1101000000000100);
    check(cmd.opcode, 8'b10100000, "opcode A0"); check(cmd.ctrl.en_y, 1, "en_y");
    check(cmd.ctrl.en_x, 0, "en_x off");
    send(16'b0100000000000111);
    check(wr_addr, 7, "write address 7"); check(rd_addr, 1, "read addr held");
    // valid stays without a step, drops on a step without issue
    send(mk_op(8'h3C, 7'b1111111));
    step = 0; repeat (2) @(posedge clk); #1;
    check(cmd_valid, 1, "held without step");
    step = 1; @(posedge clk); #1;
    check(cmd_valid, 0, "drops on idle step");
    check(instr_stb, 0, "no stb");
    // random decoding
    e_rd = rd_addr; e_wr = wr_addr; e_cmd = cmd;
    repeat (2000) begin
      logic [15:0] w;
      w = 16'($urandom);
      instr = w; issue = ($urandom % 3) != 0; step = issue | 1'($urandom);
      e_valid = cmd_valid;
      if (issue) begin
        if (w[15]) begin e_cmd = {w[14:7], w[6:0]}; e_valid = 1; end
        else begin
          if (w[14]) e_wr = w[7:0]; else e_rd = w[7:0];
          e_valid = 0;
        end
      end else if (step) e_valid = 0;
      @(posedge clk); #1;
      check(rd_addr, e_rd, "rand rd"); check(wr_addr, e_wr, "rand wr");
      check(cmd, e_cmd, "rand cmd"); check(cmd_valid, e_valid, "rand valid");
    end
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
