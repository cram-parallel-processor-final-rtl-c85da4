// clk_div: clock prescaler for the user interface.
//
// Divides the 25 MHz board clock by PRE_DIV (25) to 1 MHz and then by
// DECADE (10) six times, to 100 kHz, 10 kHz, 1 kHz, 100 Hz, 10 Hz and 1 Hz.
// Instead of ripple clocks each rate is a one-cycle enable pulse (tick) in
// the clk domain, so every consumer stays on the single system clock:
// tick[0] = 1 MHz, tick[1] = 100 kHz, ... tick[6] = 1 Hz. A counter that
// reaches its terminal count while the rate below it ticks fires the next
// rate's tick in the same cycle. The division ratios are the report's;
// enable pulses in place of divided clocks are this design's choice.
module clk_div #(
  parameter int unsigned PRE_DIV = 25,
  parameter int unsigned DECADE  = 10,
  parameter int unsigned STAGES  = 6
) (
  input  logic            clk,
  input  logic            rst,
  output logic [STAGES:0] tick
);

  logic [$clog2(PRE_DIV)-1:0] pre_cnt;
  logic [$clog2(DECADE)-1:0]  dec_cnt [STAGES];

  always_ff @(posedge clk) begin
    if (rst) pre_cnt <= '0;
    else if (pre_cnt == ($bits(pre_cnt))'(PRE_DIV - 1)) pre_cnt <= '0;
    else pre_cnt <= pre_cnt + 1'b1;
  end

  assign tick[0] = !rst && (pre_cnt == ($bits(pre_cnt))'(PRE_DIV - 1));

  for (genvar k = 1; k <= STAGES; k++) begin : g_dec
    always_ff @(posedge clk) begin
      if (rst) dec_cnt[k-1] <= '0;
      else if (tick[k-1]) begin
        if (dec_cnt[k-1] == ($bits(dec_cnt[0]))'(DECADE - 1)) dec_cnt[k-1] <= '0;
        else dec_cnt[k-1] <= dec_cnt[k-1] + 1'b1;
      end
    end
    assign tick[k] = tick[k-1] && (dec_cnt[k-1] == ($bits(dec_cnt[0]))'(DECADE - 1));
  end

endmodule
