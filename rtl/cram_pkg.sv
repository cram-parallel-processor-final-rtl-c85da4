// cram_pkg: types and constants shared by the C.RAM processor.
//
// The 16-bit instruction word has two kinds:
//   - memory instruction: bit 15 = 0. Bit 14 chooses the read address (0)
//     or the write address (1); bits 7:0 are the data-memory row. Bits 13:8
//     are masked off by the decoder except bits 9:8, which this design uses
//     as sequencer flags (bit 8 = halt, bit 9 = restart).
//   - operation instruction: bit 15 = 1. Bits 14:7 are the 8-bit ALU opcode
//     (a truth table) and bits 6:0 are the PE control bits:
//       0 bus enable, 1 enable X, 2 enable Y, 3 enable memory write,
//       4 shift left, 5 shift right, 6 enable write-enable register.
// The field positions follow the report's decoder description and worked
// examples; the halt/restart bits are this design's own choice.
package cram_pkg;

  localparam int unsigned INSTR_W   = 16;
  localparam int unsigned OPCODE_W  = 8;
  localparam int unsigned ADDR_W    = 8;
  localparam int unsigned MEM_DEPTH = 1 << ADDR_W;

  // Control bits sent to every PE with an operation instruction.
  typedef struct packed {
    logic en_wreg;   // bit 6: load the write-enable register
    logic shift_r;   // bit 5: Y takes the left neighbour's ALU output
    logic shift_l;   // bit 4: X takes the right neighbour's ALU output
    logic en_mem;    // bit 3: write the ALU output to memory
    logic en_y;      // bit 2: load Y from the ALU
    logic en_x;      // bit 1: load X from the ALU
    logic bus_en;    // bit 0: close the bus tie onto the broadcast bus
  } pe_ctrl_t;

  // Broadcast command: opcode plus control bits, valid for one step.
  typedef struct packed {
    logic [OPCODE_W-1:0] opcode;
    pe_ctrl_t            ctrl;
  } pe_cmd_t;

  typedef enum logic [1:0] {
    KIND_READ_ADDR  = 2'b00,
    KIND_WRITE_ADDR = 2'b01,
    KIND_OP         = 2'b10   // 2'b11 is also an operation
  } instr_kind_e;

  localparam int unsigned HALT_BIT    = 8;
  localparam int unsigned RESTART_BIT = 9;

  // Instruction builders, used by the default program and by testbenches.
  function automatic logic [INSTR_W-1:0] mk_rd(input logic [ADDR_W-1:0] a);
    return {2'b00, 6'd0, a};
  endfunction

  function automatic logic [INSTR_W-1:0] mk_wr(input logic [ADDR_W-1:0] a);
    return {2'b01, 6'd0, a};
  endfunction

  function automatic logic [INSTR_W-1:0] mk_halt();
    return INSTR_W'(1) << HALT_BIT;
  endfunction

  function automatic logic [INSTR_W-1:0] mk_op(input logic [OPCODE_W-1:0] op,
                                               input pe_ctrl_t c);
    return {1'b1, op, c};
  endfunction

  // Common truth tables; the ALU select index is {X, Y, M}.
  localparam logic [7:0] OP_M    = 8'hAA;  // M
  localparam logic [7:0] OP_NOTM = 8'h55;  // !M
  localparam logic [7:0] OP_X    = 8'hF0;  // X
  localparam logic [7:0] OP_Y    = 8'hCC;  // Y
  localparam logic [7:0] OP_NOTY = 8'h33;  // !Y
  localparam logic [7:0] OP_ZERO = 8'h00;
  localparam logic [7:0] OP_ONE  = 8'hFF;
  localparam logic [7:0] OP_XANDM = 8'hA0; // X & M
  localparam logic [7:0] OP_SUM  = 8'h96;  // X ^ Y ^ M
  localparam logic [7:0] OP_CARRY = 8'hE8; // majority(X, Y, M)

endpackage
