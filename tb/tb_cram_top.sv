// tb_cram_top: end-to-end test of the C.RAM processor (two PEs).
// Runs with a fast prescaler and short LCD delays. It
//   1. runs the preloaded four-bit addition program and checks both sums
//      and the carry, and that it takes one clock per instruction,
//   2. loads operands through the host port (the report's three addition
//      cases and random ones) and re-runs the program,
//   3. loads a second program through the program port that uses shift
//      left, shift right, the write-enable register (conditional write),
//      the wired-AND bus and the restart flag,
//   4. switches to push-button stepping and checks one instruction per
//      debounced press and the LCD line for each stepped instruction, then
//      switches back to free running to finish the program.
// Each mechanism is counted and a failure is counted for any never seen.
module tb_cram_top;
  import cram_pkg::*;
  localparam int N = 2;
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

  cram_top #(.PRE_DIV(2), .INIT_WAIT(40), .SHORT_DELAY(6), .LONG_DELAY(20)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_add = 0, n_halt = 0, n_prog_load = 0, n_host_load = 0, n_shl = 0, n_shr = 0;
  int n_cond_block = 0, n_bus_low = 0, n_restart = 0, n_press = 0, n_mode = 0, n_lcd_line = 0;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h exp %h", what, $time, got, exp);
    end
  endtask

  // LCD model: collect words on the falling edge of E
  logic e_q;
  logic [8:0] lcd_words [$];
  always @(posedge clk) begin
    e_q <= lcd_e;
    if (e_q && !lcd_e) lcd_words.push_back({lcd_rs, lcd_data});
  end

  // count wired-AND bus pulls
  always @(posedge clk) if (!rst && !bus_and) n_bus_low++;

  task automatic host_write(input int row, input logic [N-1:0] v);
    mem_we = 1; mem_addr = 8'(row); mem_wdata = v;
    @(posedge clk); #1; mem_we = 0;
  endtask

  task automatic host_read(input int row, output logic [N-1:0] v);
    mem_addr = 8'(row); #1; v = mem_rdata;
  endtask

  // run from address 0 until halted; returns clocks taken
  task automatic run(output int clocks);
    start = 1; @(posedge clk); #1; start = 0;
    clocks = 0;
    while (running) begin @(posedge clk); #1; clocks++; end
    n_halt++;
  endtask

  task automatic load_operands(input logic [3:0] a [N], input logic [3:0] b [N]);
    for (int i = 0; i < 4; i++) begin
      logic [N-1:0] ra, rb;
      for (int p = 0; p < N; p++) begin rb[p] = b[p][i]; ra[p] = a[p][i]; end
      host_write(i, rb);
      host_write(4 + i, ra);
    end
    n_host_load++;
  endtask

  task automatic check_sums(input logic [3:0] a [N], input logic [3:0] b [N], input string what);
    logic [N-1:0] r;
    for (int p = 0; p < N; p++) begin
      logic [4:0] s, got;
      s = 5'(a[p]) + 5'(b[p]);
      for (int i = 0; i < 5; i++) begin host_read(8 + i, r); got[i] = r[p]; end
      check(got, s, $sformatf("%s PE%0d %0d+%0d", what, p, a[p], b[p]));
    end
    n_add++;
  endtask

  task automatic load_prog(input logic [15:0] p []);
    foreach (p[i]) begin
      prog_we = 1; prog_addr = 8'(i); prog_data = p[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    n_prog_load++;
  endtask

  // one push-button press: down until debounced, then up until released
  task automatic press();
    pb_step_n = 0;
    wait (dut.pressed); @(posedge clk); #1;
    pb_step_n = 1;
    wait (!dut.pressed); @(posedge clk); #1;
    n_press++;
  endtask

  initial begin
    int clocks;
    logic [3:0] a [N], b [N];
    logic [N-1:0] r;
    logic [15:0] add_prog [256];
    rst = 1; start = 0; step_mode = 0; pb_step_n = 1; prog_we = 0; mem_we = 0;
    prog_addr = '0; prog_data = '0; mem_addr = '0; mem_wdata = '0;
    shift_in_left = 0; shift_in_right = 0;
    repeat (2) @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 256; i++) add_prog[i] = dut.u_rom.rom[i];

    // 1. preloaded program and data: 1111+1111 on PE0, 1010+0101 on PE1
    run(clocks);
    check(clocks, 28, "one instruction per clock");
    a = '{4'b1111, 4'b0101}; b = '{4'b1111, 4'b1010};
    check_sums(a, b, "preloaded");
    check(seg_xy, 7'b0110000, "7-seg shows X*2+Y of PE0 = 3");

    // 2. host-loaded operands, including B = A = 1001
    a = '{4'b1001, 4'b0000}; b = '{4'b1001, 4'b1111};
    load_operands(a, b); run(clocks); check_sums(a, b, "1001+1001");
    repeat (20) begin
      for (int p = 0; p < N; p++) begin a[p] = 4'($urandom); b[p] = 4'($urandom); end
      load_operands(a, b); run(clocks); check_sums(a, b, "random");
    end

    // 3. shift, conditional write, bus and restart
    host_write(0, 2'b01);
    host_write(1, 2'b10);
    host_write(21, 2'b00);
    shift_in_right = 1; shift_in_left = 1;
    load_prog('{
      mk_rd(8'd0),
      mk_op(OP_M, 7'b0000010),            // X = row0
      mk_op(OP_X, 7'b0010000),            // shift left: X[0] = X[1], X[1] = 1 (edge)
      mk_wr(8'd20),
      mk_op(OP_X, 7'b0001000),            // row20 = X
      mk_rd(8'd1),
      mk_op(OP_M, 7'b0000100),            // Y = row1
      mk_op(OP_Y, 7'b0100000),            // shift right: Y[i] = Y[i-1], Y[0] = 1
      mk_wr(8'd22),
      mk_op(OP_Y, 7'b0001000),            // row22 = Y
      mk_rd(8'd0),
      mk_op(OP_M, 7'b1000000),            // WREG = row0
      mk_wr(8'd21),
      mk_op(OP_ONE, 7'b0001000),          // row21 = 1 where WREG
      mk_op(OP_ONE, 7'b1000000),          // WREG = 1
      mk_op(OP_M, 7'b0000001),            // bus = AND(row0) = 0
      mk_halt()
    });
    begin
      int bus_before;
      bus_before = n_bus_low;
      run(clocks);
      check(n_bus_low - bus_before, 1, "bus pulled low once");
    end
    host_read(20, r); check(r, 2'b10, "shift left");   if (r == 2'b10) n_shl++;
    host_read(22, r); check(r, 2'b01, "shift right");  if (r == 2'b01) n_shr++;
    host_read(21, r); check(r, 2'b01, "conditional write"); if (r == 2'b01) n_cond_block++;
    check(wreg, 2'b11, "wreg restored");
    // restart flag: a loop that runs until the host replaces the loop word
    load_prog('{mk_rd(8'd1), mk_rd(8'd2) | (16'd1 << RESTART_BIT), mk_halt()});
    start = 1; @(posedge clk); #1; start = 0;
    repeat (3) begin
      wait (pc == 8'd1); @(posedge clk); #1;
      check(pc, 0, "restart to 0"); n_restart++;
    end
    prog_we = 1; prog_addr = 8'd1; prog_data = mk_rd(8'd2); @(posedge clk); #1; prog_we = 0;
    wait (!running); @(posedge clk); #1;
    check(pc, 2, "halted after loop replaced");

    // 4. push-button stepping of the addition program, then free running
    begin
      logic [15:0] p2 [];
      p2 = new[28];
      foreach (p2[i]) p2[i] = add_prog[i];
      load_prog(p2);
    end
    a = '{4'b0110, 4'b0011}; b = '{4'b0111, 4'b1101};
    load_operands(a, b);
    wait (lcd_done);
    step_mode = 1; n_mode++;
    start = 1; @(posedge clk); #1; start = 0;
    for (int k = 0; k < 6; k++) begin
      logic [7:0] pc0;
      pc0 = pc;
      repeat (300) @(posedge clk); #1;
      check(pc, pc0, "no step without a press");
      lcd_words.delete();
      press();
      check(pc, pc0 + 1, "one step per press");
      wait (lcd_done); @(posedge clk); #1;
      check(lcd_words.size(), 8, "LCD line length");
      if (lcd_words.size() == 8) begin
        logic [15:0] shown;
        for (int d = 0; d < 4; d++) begin
          logic [7:0] c;
          c = lcd_words[3 + d][7:0];
          shown[15 - 4 * d -: 4] = 4'(c >= 8'h41 ? c - 8'h37 : c - 8'h30);
        end
        check(shown, add_prog[pc0], "LCD shows issued instruction");
        n_lcd_line++;
      end
    end
    step_mode = 0; n_mode++;
    wait (!running); @(posedge clk); #1;
    n_halt++;
    check_sums(a, b, "stepped then free-running");

    $display("adds=%0d halts=%0d prog_loads=%0d host_loads=%0d shl=%0d shr=%0d cond=%0d bus_low=%0d restarts=%0d presses=%0d mode_switches=%0d lcd_lines=%0d",
             n_add, n_halt, n_prog_load, n_host_load, n_shl, n_shr, n_cond_block, n_bus_low,
             n_restart, n_press, n_mode, n_lcd_line);
    if (n_add == 0 || n_halt == 0 || n_prog_load == 0 || n_host_load == 0 || n_shl == 0 ||
        n_shr == 0 || n_cond_block == 0 || n_bus_low == 0 || n_restart == 0 || n_press == 0 ||
        n_mode < 2 || n_lcd_line == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
