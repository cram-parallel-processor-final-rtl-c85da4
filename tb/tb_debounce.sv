// tb_debounce: push-button filter.
// The sample tick is driven every 4 clocks. A press is reported within two
// samples; a bouncing release (button up for fewer than four samples
// between contacts) keeps the output pressed; four samples up release it.
module tb_debounce;
  logic clk = 0, rst, sample = 0, pb_n, pressed;
  int checks = 0, failures = 0, cyc = 0;

  debounce dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; sample <= ((cyc + 1) % 4) == 0; end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  task automatic samples(input int n);
    repeat (n) @(posedge clk iff sample);
    #1;
  endtask

  initial begin
    rst = 1; pb_n = 1;
    repeat (2) @(posedge clk); #1; rst = 0;
    samples(6); check(pressed, 0, "idle");
    pb_n = 0; samples(3); check(pressed, 1, "pressed after bounce-free press");
    // bounce on release: up 2 samples, down 1, up 2, down 1
    repeat (2) begin
      pb_n = 1; samples(2); check(pressed, 1, "bounce held");
      pb_n = 0; samples(1); check(pressed, 1, "bounce held 2");
    end
    pb_n = 1; samples(3); check(pressed, 1, "three up samples not enough");
    samples(3); check(pressed, 0, "released");
    // level changes between samples are not seen
    pb_n = 0; repeat (2) @(posedge clk); pb_n = 1;
    samples(8); check(pressed, 0, "glitch between samples ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
