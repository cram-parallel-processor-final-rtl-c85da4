// cram_top: C.RAM, a small SIMD processor-in-memory.
//
// A sequencer steps through a 256 x 16 bit instruction ROM; a controller
// decodes each word into a memory read address, a memory write address or
// an 8-bit opcode with seven control bits, and broadcasts the opcode to an
// array of NUM_PE one-bit processing elements. Each PE owns one column of a
// 256-row data memory and computes any Boolean function of its X and Y
// registers and the addressed memory bit, so multi-bit arithmetic runs
// bit-serially on every PE at once.
//
// Timing: one instruction is issued per step. A step is every clock when
// step_mode = 0, or one debounced press of the active-low pb_step_n button
// when step_mode = 1 (the button is sampled at 100 Hz from the 25 MHz
// clock). An instruction decoded on one step takes effect on the next: an
// address selects the memory row the PEs see, an operation updates X, Y,
// the write-enable register and memory on the following step.
// start (one clock) runs the program from address 0; it stops at an
// address instruction with the halt flag. The host ports load the
// instruction ROM and read or write whole memory rows (bit i = PE i) while
// the program is stopped. The seven-segment outputs show X and Y (as
// 2*X + Y) and M of PE 0, and the LCD shows each issued instruction.
// The structure (ROM, sequencer, controller, PE array, RAM, debounced push
// button, seven-segment and LCD output) and NUM_PE = 2 follow the report;
// the free-running mode, host ports and halt flag are this design's.
module cram_top
  import cram_pkg::*;
#(
  parameter int unsigned NUM_PE      = 2,
  parameter string       PROG_FILE   = "rtl/cram_add4_prog.hex",
  parameter string       DATA_FILE   = "rtl/cram_add4_data.hex",
  parameter int unsigned PRE_DIV     = 25,
  parameter int unsigned INIT_WAIT   = 32'h5B8D8,
  parameter int unsigned SHORT_DELAY = 32'h0FFF,
  parameter int unsigned LONG_DELAY  = 32'hFFFF
) (
  input  logic               clk,            // 25 MHz board clock
  input  logic               rst,            // synchronous, active high
  input  logic               start,
  input  logic               step_mode,      // 1: push-button stepping
  input  logic               pb_step_n,      // push button, active low
  // host access
  input  logic               prog_we,
  input  logic [ADDR_W-1:0]  prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  input  logic               mem_we,
  input  logic [ADDR_W-1:0]  mem_addr,
  input  logic [NUM_PE-1:0]  mem_wdata,
  output logic [NUM_PE-1:0]  mem_rdata,
  // array edges, for chaining arrays
  input  logic               shift_in_left,
  input  logic               shift_in_right,
  output logic               shift_out_left,
  output logic               shift_out_right,
  // status
  output logic [ADDR_W-1:0]  pc,
  output logic               running,
  output logic               bus_and,
  output logic [NUM_PE-1:0]  x,
  output logic [NUM_PE-1:0]  y,
  output logic [NUM_PE-1:0]  wreg,
  output logic [INSTR_W-1:0] instr_issued,
  // board displays
  output logic [6:0]         seg_xy,
  output logic [6:0]         seg_m,
  output logic [7:0]         lcd_data,
  output logic               lcd_rs,
  output logic               lcd_rw,
  output logic               lcd_e,
  output logic               lcd_done
);

  logic [6:0]         tick;
  logic               pressed, pressed_q, step;
  logic [INSTR_W-1:0] instr;
  logic               issue, cmd_valid, instr_stb;
  logic [ADDR_W-1:0]  rd_addr, wr_addr;
  pe_cmd_t            cmd;
  logic [NUM_PE-1:0]  m, pe_we, pe_wdata;

  // push-button stepping
  clk_div #(.PRE_DIV(PRE_DIV)) u_clk_div (
    .clk  (clk),
    .rst  (rst),
    .tick (tick)
  );

  debounce u_debounce (
    .clk     (clk),
    .rst     (rst),
    .sample  (tick[4]),            // 100 Hz
    .pb_n    (pb_step_n),
    .pressed (pressed)
  );

  always_ff @(posedge clk) begin
    if (rst) pressed_q <= 1'b0;
    else     pressed_q <= pressed;
  end

  assign step = step_mode ? (pressed && !pressed_q) : 1'b1;

  // control unit
  cram_instr_rom #(.INIT_FILE(PROG_FILE)) u_rom (
    .clk       (clk),
    .addr      (pc),
    .instr     (instr),
    .load_we   (prog_we),
    .load_addr (prog_addr),
    .load_data (prog_data)
  );

  cram_sequencer u_seq (
    .clk     (clk),
    .rst     (rst),
    .step    (step),
    .start   (start),
    .instr   (instr),
    .pc      (pc),
    .running (running),
    .issue   (issue)
  );

  cram_controller u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .step       (step),
    .issue      (issue),
    .instr      (instr),
    .rd_addr    (rd_addr),
    .wr_addr    (wr_addr),
    .cmd        (cmd),
    .cmd_valid  (cmd_valid),
    .last_instr (instr_issued),
    .instr_stb  (instr_stb)
  );

  // SIMD array and its memory
  cram_pe_array #(.NUM_PE(NUM_PE)) u_array (
    .clk             (clk),
    .rst             (rst),
    .step            (step),
    .cmd_valid       (cmd_valid),
    .cmd             (cmd),
    .m               (m),
    .shift_in_left   (shift_in_left),
    .shift_in_right  (shift_in_right),
    .shift_out_left  (shift_out_left),
    .shift_out_right (shift_out_right),
    .mem_we          (pe_we),
    .mem_wdata       (pe_wdata),
    .x               (x),
    .y               (y),
    .wreg            (wreg),
    .bus_and         (bus_and)
  );

  cram_data_mem #(.NUM_PE(NUM_PE), .INIT_FILE(DATA_FILE)) u_mem (
    .clk        (clk),
    .rd_addr    (rd_addr),
    .m          (m),
    .wr_addr    (wr_addr),
    .we         (pe_we),
    .wdata      (pe_wdata),
    .host_we    (mem_we),
    .host_addr  (mem_addr),
    .host_wdata (mem_wdata),
    .host_rdata (mem_rdata)
  );

  // displays
  seg7_decoder u_seg_xy (.digit({2'b00, x[0], y[0]}), .seg(seg_xy));
  seg7_decoder u_seg_m  (.digit({3'b000, m[0]}),      .seg(seg_m));

  lcd_ctrl #(
    .INIT_WAIT   (INIT_WAIT),
    .SHORT_DELAY (SHORT_DELAY),
    .LONG_DELAY  (LONG_DELAY)
  ) u_lcd (
    .clk      (clk),
    .rst      (rst),
    .show     (instr_stb),
    .instr    (instr_issued),
    .done     (lcd_done),
    .lcd_data (lcd_data),
    .lcd_rs   (lcd_rs),
    .lcd_rw   (lcd_rw),
    .lcd_e    (lcd_e)
  );

endmodule
