// lcd_ctrl: shows the processor's current instruction on the LCD.
//
// After reset the controller waits INIT_WAIT clocks (15 ms at 25 MHz) for
// the panel to power up, then sends the initialisation commands clear
// display (0x01), function set two lines / 8-bit (0x3C), display on (0x0C)
// and entry mode increment (0x06). It then idles with done = 1. A show
// pulse while idle captures instr and writes one line: a cursor-home
// command (0x80) and seven characters, the instruction kind ("R" read
// address, "W" write address, "O" operation), a space, the 16-bit word as
// four hexadecimal digits and a trailing space. show pulses that arrive
// while a line is being written are ignored; the line shown is always a
// whole instruction. Each word goes through lcd_out, which is waited on
// until it reports complete. The power-up wait, command words and the
// character-writer handshake are the report's; the line format is this
// design's choice, as the report only says the instruction is displayed.
module lcd_ctrl
  import cram_pkg::*;
#(
  parameter int unsigned INIT_WAIT   = 32'h5B8D8,
  parameter int unsigned SHORT_DELAY = 32'h0FFF,
  parameter int unsigned LONG_DELAY  = 32'hFFFF
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               show,
  input  logic [INSTR_W-1:0] instr,
  output logic               done,
  output logic [7:0]         lcd_data,
  output logic               lcd_rs,
  output logic               lcd_rw,
  output logic               lcd_e
);

  localparam int unsigned N_INIT = 4;
  localparam int unsigned N_LINE = 8;

  typedef enum logic [2:0] {POWER_WAIT, INIT, IDLE, LINE, GAP, WAIT_DONE} state_e;
  state_e             state;
  logic               in_init;
  logic [31:0]        wait_count;
  logic [3:0]         idx;
  logic [INSTR_W-1:0] shown;
  logic [8:0]         word;
  logic               latch, wr_complete;

  function automatic logic [7:0] hex_ascii(input logic [3:0] v);
    return (v < 4'd10) ? 8'h30 + 8'(v) : 8'h37 + 8'(v);
  endfunction

  // Word to send: index idx of the init table or of the display line.
  always_comb begin
    word = 9'h000;
    if (in_init) begin
      unique case (idx)
        4'd0:    word = 9'h001;
        4'd1:    word = 9'h03C;
        4'd2:    word = 9'h00C;
        default: word = 9'h006;
      endcase
    end else begin
      unique case (idx)
        4'd0: word = 9'h080;
        4'd1: word = {1'b1, shown[15] ? 8'h4F : (shown[14] ? 8'h57 : 8'h52)};
        4'd2: word = {1'b1, 8'h20};
        4'd3: word = {1'b1, hex_ascii(shown[15:12])};
        4'd4: word = {1'b1, hex_ascii(shown[11:8])};
        4'd5: word = {1'b1, hex_ascii(shown[7:4])};
        4'd6: word = {1'b1, hex_ascii(shown[3:0])};
        default: word = {1'b1, 8'h20};
      endcase
    end
  end

  lcd_out #(
    .SHORT_DELAY (SHORT_DELAY),
    .LONG_DELAY  (LONG_DELAY)
  ) u_out (
    .clk         (clk),
    .rst         (rst),
    .data_in     (word),
    .extra_delay (word == 9'h001),
    .latch       (latch),
    .complete    (wr_complete),
    .lcd_data    (lcd_data),
    .lcd_rs      (lcd_rs),
    .lcd_e       (lcd_e)
  );

  assign latch  = (state == INIT || state == LINE) && wr_complete;
  assign done   = (state == IDLE);
  assign lcd_rw = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= POWER_WAIT;
      in_init    <= 1'b1;
      wait_count <= '0;
      idx        <= '0;
      shown      <= '0;
    end else begin
      unique case (state)
        POWER_WAIT: begin
          if (wait_count == INIT_WAIT) state <= INIT;
          else wait_count <= wait_count + 1'b1;
        end
        INIT, LINE: if (latch) state <= GAP;
        GAP: state <= WAIT_DONE;
        WAIT_DONE: if (wr_complete) begin
          if (in_init && idx == 4'(N_INIT - 1)) begin
            in_init <= 1'b0;
            idx     <= '0;
            state   <= IDLE;
          end else if (!in_init && idx == 4'(N_LINE - 1)) begin
            idx   <= '0;
            state <= IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= in_init ? INIT : LINE;
          end
        end
        IDLE: if (show) begin
          shown <= instr;
          idx   <= '0;
          state <= LINE;
        end
        default: state <= POWER_WAIT;
      endcase
    end
  end

endmodule
