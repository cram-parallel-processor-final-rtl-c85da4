// debounce: push-button filter.
//
// On every sample tick (100 Hz, about 10 ms apart) the inverted, active-low
// button level is shifted into a 4-bit register. The output is released
// (0) only after four consecutive samples saw the button up, and pressed
// (1) as soon as one sample sees it down, so contact bounce on release,
// shorter than about 40 ms, never shows as a second press. The output is
// registered and changes only on a sample tick. The shift-register filter
// is the report's; sampling on an enable instead of a divided clock and the
// two-flop synchroniser on the button input are this design's choices.
module debounce #(
  parameter int unsigned SAMPLES = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic sample,     // 100 Hz enable tick
  input  logic pb_n,       // raw button, active low
  output logic pressed
);

  logic [1:0]         sync;
  logic [SAMPLES-1:0] hist;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= 2'b11;
      hist    <= '0;
      pressed <= 1'b0;
    end else begin
      sync <= {sync[0], pb_n};
      if (sample) begin
        hist    <= {!sync[1], hist[SAMPLES-1:1]};
        pressed <= |hist;
      end
    end
  end

endmodule
