// tb_cram_data_mem: data memory against a reference array.
// Random host row writes and per-column PE writes are applied; the PE read
// port and the host read port are compared with the model every cycle, and
// the preload file is checked first.
module tb_cram_data_mem;
  localparam int N = 3;
  logic clk = 0;
  logic [7:0] rd_addr, wr_addr, host_addr;
  logic [N-1:0] m, we, wdata, host_wdata, host_rdata;
  logic host_we;
  logic [N-1:0] model [256];
  int checks = 0, failures = 0;

  cram_data_mem #(.NUM_PE(N), .INIT_FILE("rtl/cram_add4_data.hex")) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] pre [8] = '{3'd1, 3'd3, 3'd1, 3'd3, 3'd3, 3'd1, 3'd3, 3'd1};
    host_we = 0; we = '0;
    for (int i = 0; i < 8; i++) begin
      rd_addr = 8'(i); #1; check(m, pre[i], "preload");
    end
    // fill
    for (int i = 0; i < 256; i++) begin
      host_we = 1; host_addr = 8'(i); host_wdata = N'($urandom); model[i] = host_wdata;
      @(posedge clk); #1;
    end
    host_we = 0;
    repeat (3000) begin
      rd_addr = 8'($urandom); wr_addr = 8'($urandom); host_addr = 8'($urandom);
      we = N'($urandom); wdata = N'($urandom);
      host_we = ($urandom % 4) == 0; host_wdata = N'($urandom);
      #1;
      check(m, model[rd_addr], "read");
      check(host_rdata, model[host_addr], "host read");
      @(posedge clk);
      if (host_we) model[host_addr] = host_wdata;
      for (int i = 0; i < N; i++) if (we[i]) model[wr_addr][i] = wdata[i];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
