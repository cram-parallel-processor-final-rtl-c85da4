// tb_cram_workloads: the report's evaluated programs on the default design.
// The programs are built here from instruction-builder functions and loaded
// through the program port; operands go in through the host data port, so
// each PE holds its own operands (SIMD). Memory layout: B in rows 0-3, A in
// rows 4-7 (least significant bit first), results from row 8.
//   - M = !Y case: each of rows 0-3 is inverted into Y and written back to
//     rows 16-19.
//   - subtraction B - A (mod 16) as B + !A + 1, the carry starting at 1.
//   - unsigned multiplication B x A (8-bit product) by shift and add: the
//     write-enable register is loaded with A[j], so only PEs whose
//     multiplier bit is 1 add B << j into the product rows. Each sum bit
//     goes through a scratch row: written in place, it would change the
//     memory bit that the following carry operation still has to read.
// Every result is compared with arithmetic done in the testbench.
module tb_cram_workloads;
  import cram_pkg::*;
  localparam int N = 2;
  localparam int SCRATCH = 30;
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
  logic [15:0] prog [$];

  cram_top dut (.*);

  always #20 clk = ~clk;

  localparam pe_ctrl_t EX = 7'b0000010, EY = 7'b0000100, EM = 7'b0001000, EW = 7'b1000000;

  // truth table of a function given as its value for each {X, Y, M}
  function automatic logic [7:0] tt(input int kind);
    logic [7:0] t;
    for (int i = 0; i < 8; i++) begin
      logic xx, yy, mm;
      {xx, yy, mm} = 3'(i);
      unique case (kind)
        0: t[i] = xx ^ yy ^ !mm;                          // difference bit
        1: t[i] = (xx & yy) | (xx & !mm) | (yy & !mm);     // borrow-free carry
        default: t[i] = !mm;
      endcase
    end
    return t;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic load_and_run();
    prog.push_back(mk_halt());
    foreach (prog[i]) begin
      prog_we = 1; prog_addr = 8'(i); prog_data = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    start = 1; @(posedge clk); #1; start = 0;
    while (running) @(posedge clk);
    #1;
  endtask

  task automatic put(input int row, input logic [N-1:0] v);
    mem_we = 1; mem_addr = 8'(row); mem_wdata = v;
    @(posedge clk); #1; mem_we = 0;
  endtask

  task automatic operands(input logic [3:0] a [N], input logic [3:0] b [N]);
    for (int i = 0; i < 4; i++) begin
      logic [N-1:0] ra, rb;
      for (int p = 0; p < N; p++) begin ra[p] = a[p][i]; rb[p] = b[p][i]; end
      put(i, rb); put(4 + i, ra);
    end
  endtask

  task automatic read_field(input int p, input int row0, input int bits, output int v);
    v = 0;
    for (int i = 0; i < bits; i++) begin
      mem_addr = 8'(row0 + i); #1;
      v |= int'(mem_rdata[p]) << i;
    end
  endtask

  initial begin
    logic [3:0] a [N], b [N];
    int v;
    rst = 1; start = 0; step_mode = 0; pb_step_n = 1; prog_we = 0; mem_we = 0;
    prog_addr = '0; prog_data = '0; mem_addr = '0; mem_wdata = '0;
    shift_in_left = 0; shift_in_right = 0;
    repeat (2) @(posedge clk); #1; rst = 0;

    // M = !Y case: rows 0-3 hold 0,0,1,1 on PE0
    prog.delete();
    for (int r = 0; r < 4; r++) begin
      prog.push_back(mk_rd(8'(r)));
      prog.push_back(mk_op(tt(2), EY));
      prog.push_back(mk_wr(8'(16 + r)));
      prog.push_back(mk_op(OP_Y, EM));
    end
    for (int t = 0; t < 4; t++) begin
      a = '{4'($urandom), 4'($urandom)}; b = '{4'b1100, 4'($urandom)};
      operands(a, b);
      load_and_run();
      for (int p = 0; p < N; p++) begin
        read_field(p, 16, 4, v);
        check(v, 4'(~b[p]), $sformatf("invert PE%0d", p));
      end
    end

    // subtraction B - A
    prog.delete();
    prog.push_back(mk_op(OP_ONE, EY));
    for (int i = 0; i < 4; i++) begin
      prog.push_back(mk_rd(8'(i)));
      prog.push_back(mk_op(OP_M, EX));
      prog.push_back(mk_rd(8'(4 + i)));
      prog.push_back(mk_wr(8'(8 + i)));
      prog.push_back(mk_op(tt(0), EM));
      prog.push_back(mk_op(tt(1), EY));
    end
    for (int t = 0; t < 12; t++) begin
      for (int p = 0; p < N; p++) begin a[p] = 4'($urandom); b[p] = 4'($urandom); end
      operands(a, b);
      load_and_run();
      for (int p = 0; p < N; p++) begin
        read_field(p, 8, 4, v);
        check(v, 4'(b[p] - a[p]), $sformatf("subtract PE%0d %0d-%0d", p, b[p], a[p]));
      end
    end

    // multiplication B x A
    prog.delete();
    for (int r = 8; r < 16; r++) begin
      prog.push_back(mk_wr(8'(r)));
      prog.push_back(mk_op(OP_ZERO, EM));
    end
    for (int j = 0; j < 4; j++) begin
      prog.push_back(mk_rd(8'(4 + j)));
      prog.push_back(mk_op(OP_M, EW));              // WREG = A[j]
      prog.push_back(mk_op(OP_ZERO, EY));           // carry = 0
      for (int i = 0; i < 4; i++) begin
        prog.push_back(mk_rd(8'(i)));
        prog.push_back(mk_op(OP_M, EX));            // X = B[i]
        prog.push_back(mk_rd(8'(8 + j + i)));
        prog.push_back(mk_wr(8'(SCRATCH)));         // sum to scratch first: an
        prog.push_back(mk_op(OP_SUM, EM));          // in-place write would change
        prog.push_back(mk_op(OP_CARRY, EY));        // M before the carry reads it
        prog.push_back(mk_rd(8'(SCRATCH)));
        prog.push_back(mk_wr(8'(8 + j + i)));
        prog.push_back(mk_op(OP_M, EM));
      end
      prog.push_back(mk_wr(8'(8 + j + 4)));
      prog.push_back(mk_op(OP_Y, EM));
      prog.push_back(mk_op(OP_ONE, EW));            // WREG = 1
    end
    check(prog.size(), 184, "multiply program length");
    for (int t = 0; t < 12; t++) begin
      for (int p = 0; p < N; p++) begin a[p] = 4'($urandom); b[p] = 4'($urandom); end
      if (t == 0) begin a = '{4'd15, 4'd0}; b = '{4'd15, 4'd9}; end
      operands(a, b);
      load_and_run();
      for (int p = 0; p < N; p++) begin
        read_field(p, 8, 8, v);
        check(v, int'(b[p]) * int'(a[p]), $sformatf("multiply PE%0d %0d*%0d", p, b[p], a[p]));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
