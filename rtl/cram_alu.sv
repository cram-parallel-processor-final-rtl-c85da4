// cram_alu: the 256-function one-bit ALU of a C.RAM processing element.
//
// The ALU is an 8-to-1 multiplexer. Its eight data inputs are the 8-bit
// opcode, which is the truth table of the operation, and its three select
// lines are the X register, the Y register and the memory bit M, with X as
// the most significant select bit and M as the least. Any Boolean function
// of X, Y and M is one opcode (e.g. 8'hAA = M, 8'hA0 = X & M). Purely
// combinational. The multiplexer structure is the report's; the select order
// was worked out from its test table (10101010 loads M, 10100000 is X AND M).
module cram_alu
  import cram_pkg::*;
(
  input  logic [OPCODE_W-1:0] opcode,
  input  logic                x,
  input  logic                y,
  input  logic                m,
  output logic                result
);

  always_comb result = opcode[{x, y, m}];

endmodule
