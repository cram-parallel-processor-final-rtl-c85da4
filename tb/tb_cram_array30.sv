// tb_cram_array30: the whole processor with 30 PEs, the largest array the
// original FPGA was estimated to hold. Each PE gets its own random pair of
// four-bit operands through the host data port, in the layout of the
// default add program (B in rows 0-3, A in rows 4-7, least significant bit
// first). The default program then runs once from ROM, and every PE's sum
// (rows 8-11) and carry (row 12) is compared with testbench arithmetic.
// The run must take 28 clocks after the start clock whatever the array
// width, since all PEs work in the same steps (SIMD). Only NUM_PE is
// overridden; program, data and timing parameters keep their defaults.
// Eight rounds with fresh operands.
module tb_cram_array30;
  import cram_pkg::*;
  localparam int N = 30;
  localparam int PROG_CYCLES = 28;
  logic clk = 0, rst, start, step_mode, pb_step_n;
  logic prog_we, mem_we;
  logic [7:0] prog_addr, mem_addr;
  logic [15:0] prog_data;
  logic [N-1:0] mem_wdata, mem_rdata;
  logic shift_in_left, shift_in_right, shift_out_left, shift_out_right;
  logic [7:0] pc;
  logic running, bus_and;
  logic [N-1:0] x, y, wreg;
  logic [15:0] instr_issued;
  logic [6:0] seg_xy, seg_m;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_e, lcd_done;
  int checks = 0, failures = 0;

  cram_top #(.NUM_PE(N)) dut (.*);

  always #20 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [3:0] a [N], b [N];
    int cycles, v;
    rst = 1; start = 0; step_mode = 0; pb_step_n = 1; prog_we = 0; mem_we = 0;
    prog_addr = '0; prog_data = '0; mem_addr = '0; mem_wdata = '0;
    shift_in_left = 0; shift_in_right = 0;
    repeat (2) @(posedge clk); #1; rst = 0;

    for (int t = 0; t < 8; t++) begin
      for (int p = 0; p < N; p++) begin a[p] = 4'($urandom); b[p] = 4'($urandom); end
      if (t == 0) for (int p = 0; p < N; p++) begin a[p] = 4'(p); b[p] = 4'(15 - p % 16); end
      for (int i = 0; i < 4; i++) begin
        for (int p = 0; p < N; p++) mem_wdata[p] = b[p][i];
        mem_we = 1; mem_addr = 8'(i); @(posedge clk); #1;
        for (int p = 0; p < N; p++) mem_wdata[p] = a[p][i];
        mem_addr = 8'(4 + i); @(posedge clk); #1;
      end
      mem_we = 0;

      start = 1; @(posedge clk); #1; start = 0;
      cycles = 0;
      while (running) begin @(posedge clk); #1; cycles++; end
      check(cycles, PROG_CYCLES, "clocks for one add");

      for (int p = 0; p < N; p++) begin
        v = 0;
        for (int i = 0; i < 5; i++) begin
          mem_addr = 8'(8 + i); #1;
          v |= int'(mem_rdata[p]) << i;
        end
        check(v, int'(a[p]) + int'(b[p]), $sformatf("PE%0d %0d+%0d", p, b[p], a[p]));
      end
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
