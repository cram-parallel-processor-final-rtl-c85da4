// lcd_out: writes one word to an HD44780-style character LCD.
//
// A four-state machine: WAIT_CHAR (idle, complete = 1; a latch pulse
// captures data_in and extra_delay) -> LOAD (word on the pins) -> SET_COUNT (the delay
// counter is cleared and loaded with its limit) -> WAIT_TIME (count up to
// the limit, then back to WAIT_CHAR). data_in is {RS, D7..D0}: RS = 1 for a
// character, 0 for a command. lcd_e is high during LOAD and SET_COUNT and
// low otherwise, registered, so the panel latches the word on its falling
// edge at the start of the wait. The wait is SHORT_DELAY clocks, or
// LONG_DELAY clocks when extra_delay is set (for the slow clear-display
// command). latch starts a write and is only accepted while complete is 1.
// The state machine and delay limits (0x0FFF and 0xFFFF clocks) are the
// report's.
module lcd_out #(
  parameter int unsigned SHORT_DELAY = 32'h0FFF,
  parameter int unsigned LONG_DELAY  = 32'hFFFF
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [8:0] data_in,
  input  logic       extra_delay,
  input  logic       latch,
  output logic       complete,
  output logic [7:0] lcd_data,
  output logic       lcd_rs,
  output logic       lcd_e
);

  typedef enum logic [1:0] {WAIT_CHAR, LOAD, SET_COUNT, WAIT_TIME} state_e;
  state_e      state;
  logic [15:0] time_count, limit;
  logic        long_wait;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= WAIT_CHAR;
      time_count <= '0;
      limit      <= '0;
      long_wait  <= 1'b0;
      lcd_data   <= '0;
      lcd_rs     <= 1'b0;
      lcd_e      <= 1'b0;
    end else begin
      lcd_e <= (state == LOAD) || (state == SET_COUNT);
      unique case (state)
        WAIT_CHAR: if (latch) begin
          state     <= LOAD;
          long_wait <= extra_delay;
          lcd_data  <= data_in[7:0];
          lcd_rs    <= data_in[8];
        end
        LOAD: state <= SET_COUNT;
        SET_COUNT: begin
          time_count <= '0;
          limit      <= long_wait ? 16'(LONG_DELAY) : 16'(SHORT_DELAY);
          state      <= WAIT_TIME;
        end
        WAIT_TIME: begin
          if (time_count == limit) state <= WAIT_CHAR;
          else time_count <= time_count + 1'b1;
        end
      endcase
    end
  end

  assign complete = (state == WAIT_CHAR);

endmodule
