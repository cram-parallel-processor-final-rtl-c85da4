// tb_cram_alu: exhaustive test of the truth-table ALU.
// Every opcode is applied with every (X, Y, M); the expected bit is the
// opcode bit selected by X*4 + Y*2 + M, and the named operations used by
// the programs (load M, X AND M, sum, carry, Y) are checked against their
// Boolean formulas.
module tb_cram_alu;
  import cram_pkg::*;
  logic [7:0] opcode;
  logic x, y, m, result;
  int checks = 0, failures = 0;

  cram_alu dut (.opcode(opcode), .x(x), .y(y), .m(m), .result(result));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: op=%h x=%b y=%b m=%b got %b exp %b", what, opcode, x, y, m, got, exp);
    end
  endtask

  initial begin
    for (int op = 0; op < 256; op++) begin
      for (int i = 0; i < 8; i++) begin
        opcode = 8'(op);
        {x, y, m} = 3'(i);
        #1;
        check(result, 1'((op >> (x * 4 + y * 2 + m)) & 1), "table");
      end
    end
    for (int i = 0; i < 8; i++) begin
      {x, y, m} = 3'(i);
      opcode = OP_M;     #1; check(result, m, "M");
      opcode = OP_XANDM; #1; check(result, x & m, "X&M");
      opcode = OP_SUM;   #1; check(result, x ^ y ^ m, "sum");
      opcode = OP_CARRY; #1; check(result, (x & y) | (x & m) | (y & m), "carry");
      opcode = OP_Y;     #1; check(result, y, "Y");
      opcode = OP_NOTM;  #1; check(result, !m, "!M");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
