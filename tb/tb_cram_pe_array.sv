// tb_cram_pe_array: a 4-PE array against a reference model.
// Random commands and memory bits are applied; after every clock the X, Y
// and write-enable registers of every PE, the per-column memory writes, the
// wired-AND broadcast bus and the shift chain (left and right, including
// the chain-end inputs and outputs) are compared with the model.
module tb_cram_pe_array;
  import cram_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst, step, cmd_valid, shift_in_left, shift_in_right;
  pe_cmd_t cmd;
  logic [N-1:0] m, mem_we, mem_wdata, x, y, wreg;
  logic shift_out_left, shift_out_right, bus_and;
  logic [N-1:0] rx, ry, rw, a;
  int checks = 0, failures = 0, shifts = 0, bus_low = 0;

  cram_pe_array #(.NUM_PE(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  initial begin
    rst = 1; step = 0; cmd_valid = 0; cmd = '0; m = '0;
    shift_in_left = 0; shift_in_right = 0;
    @(posedge clk); #1;
    rst = 0; rx = '0; ry = '0; rw = '1;
    repeat (4000) begin
      logic bus_exp;
      cmd = pe_cmd_t'($urandom);
      m = N'($urandom); step = ($urandom % 4) != 0; cmd_valid = ($urandom % 4) != 0;
      shift_in_left = 1'($urandom); shift_in_right = 1'($urandom);
      #1;
      for (int i = 0; i < N; i++) a[i] = cmd.opcode[{rx[i], ry[i], m[i]}];
      bus_exp = 1'b1;
      if (cmd_valid && cmd.ctrl.bus_en) bus_exp = &a;
      check(mem_we, (step && cmd_valid && cmd.ctrl.en_mem) ? rw : '0, "mem_we");
      check(mem_wdata, a, "mem_wdata");
      check(N'(bus_and), N'(bus_exp), "bus");
      check(N'({shift_out_left, shift_out_right}), N'({a[0], a[N-1]}), "chain ends");
      if (cmd_valid && cmd.ctrl.bus_en && !bus_exp) bus_low++;
      @(posedge clk);
      if (step && cmd_valid) begin
        for (int i = 0; i < N; i++) begin
          logic l, r;
          l = (i == 0)     ? shift_in_left  : a[i-1];
          r = (i == N - 1) ? shift_in_right : a[i+1];
          if (cmd.ctrl.shift_l) rx[i] = r; else if (cmd.ctrl.en_x) rx[i] = a[i];
          if (cmd.ctrl.shift_r) ry[i] = l; else if (cmd.ctrl.en_y) ry[i] = a[i];
          if (cmd.ctrl.en_wreg) rw[i] = a[i];
        end
        if (cmd.ctrl.shift_l || cmd.ctrl.shift_r) shifts++;
      end
      #1;
      check(x, rx, "x"); check(y, ry, "y"); check(wreg, rw, "wreg");
    end
    if (shifts == 0) begin failures++; $display("FAIL no shifts"); end
    if (bus_low == 0) begin failures++; $display("FAIL bus never pulled low"); end
    $display("shifts=%0d bus_low=%0d", shifts, bus_low);
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
