// tb_cram_instr_rom: instruction store preload and host load.
// Checks the default program's first words (taken from the four-bit
// addition program: clear carry, read B[0], X = M, ...) and that words
// written through the load port read back, with unwritten words unchanged.
module tb_cram_instr_rom;
  logic clk = 0, load_we;
  logic [7:0] addr, load_addr;
  logic [15:0] instr, load_data;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  cram_instr_rom dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] head [6] = '{16'h8004, 16'h0000, 16'hd502, 16'h0004, 16'h4008, 16'hcb08};
    load_we = 0;
    for (int i = 0; i < 6; i++) begin addr = 8'(i); #1; check(instr, head[i], "program"); end
    addr = 8'd27; #1; check(instr, 16'h0100, "halt at end");
    addr = 8'd200; #1; check(instr, 16'h0100, "unused word is halt");
    for (int i = 0; i < 256; i++) begin addr = 8'(i); #1; model[i] = instr; end
    repeat (500) begin
      load_we = 1; load_addr = 8'($urandom); load_data = 16'($urandom);
      model[load_addr] = load_data;
      @(posedge clk); #1;
      load_we = 0;
      addr = 8'($urandom); #1; check(instr, model[addr], "readback");
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
