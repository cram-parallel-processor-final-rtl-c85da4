// cram_pe: one bit-serial C.RAM processing element.
//
// Each PE holds three one-bit registers, X, Y and the write-enable register
// (WREG), and a 256-function ALU that computes opcode[{X,Y,M}] where M is the
// bit read from the PE's own column of the data memory. The same broadcast
// command reaches every PE; on a step in which the command is valid:
//   - en_x loads X from the ALU; shift_l loads X from the right
//     neighbour's ALU output instead (data moves one PE to the left),
//   - en_y loads Y from the ALU; shift_r loads Y from the left
//     neighbour's ALU output instead (data moves one PE to the right),
//   - en_wreg loads WREG from the ALU,
//   - en_mem writes the ALU output to memory, but only where WREG is 1
//     (conditional execution), via mem_we / mem_wdata,
//   - bus_en closes the bus tie, so the PE drives its ALU output onto the
//     wired-AND broadcast bus (bus_drive); an open tie drives 1.
// Registers change on the rising clock edge when step is high; the memory
// write is issued in the same cycle and lands on the same edge.
// The registers, ALU, shift paths, write-enable register and bus tie follow
// the report's PE diagram; which register each shift loads follows the
// diagram (shift left beside X, shift right beside Y). Reset values
// (X = Y = 0, WREG = 1 so writes are unconditional) are this design's choice.
module cram_pe
  import cram_pkg::*;
(
  input  logic    clk,
  input  logic    rst,        // synchronous, active high
  input  logic    step,       // advance enable
  input  logic    cmd_valid,  // cmd holds an operation for this step
  input  pe_cmd_t cmd,
  input  logic    m,          // memory bit at the read address
  input  logic    left_in,    // ALU output of the left neighbour
  input  logic    right_in,   // ALU output of the right neighbour
  output logic    alu_out,
  output logic    x,
  output logic    y,
  output logic    wreg,
  output logic    mem_we,
  output logic    mem_wdata,
  output logic    bus_drive
);

  logic fire;

  cram_alu u_alu (
    .opcode (cmd.opcode),
    .x      (x),
    .y      (y),
    .m      (m),
    .result (alu_out)
  );

  assign fire = step && cmd_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      x    <= 1'b0;
      y    <= 1'b0;
      wreg <= 1'b1;
    end else if (fire) begin
      if (cmd.ctrl.shift_l)      x <= right_in;
      else if (cmd.ctrl.en_x)    x <= alu_out;
      if (cmd.ctrl.shift_r)      y <= left_in;
      else if (cmd.ctrl.en_y)    y <= alu_out;
      if (cmd.ctrl.en_wreg)      wreg <= alu_out;
    end
  end

  assign mem_we    = fire && cmd.ctrl.en_mem && wreg;
  assign mem_wdata = alu_out;
  assign bus_drive = (cmd_valid && cmd.ctrl.bus_en) ? alu_out : 1'b1;

endmodule
