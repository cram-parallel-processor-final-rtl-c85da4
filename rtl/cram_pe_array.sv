// cram_pe_array: the SIMD array of NUM_PE processing elements.
//
// Every PE receives the same command (opcode and control bits) in the same
// step and works on its own column of the data memory: PE i reads m[i] and
// drives mem_we[i] / mem_wdata[i]. The PEs form a chain for shifts: PE i's
// left neighbour is PE i-1 and its right neighbour is PE i+1; the two chain
// ends take shift_in_left / shift_in_right and the outermost ALU outputs are
// given out as shift_out_left / shift_out_right so arrays can be chained.
// The broadcast bus is a wired AND of every PE's bus_drive, so bus_and is 0
// when any PE with its bus tie closed has ALU output 0 (a global "some PE"
// test). NUM_PE defaults to 2, the array size of the report's final design.
module cram_pe_array
  import cram_pkg::*;
#(
  parameter int unsigned NUM_PE = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              step,
  input  logic              cmd_valid,
  input  pe_cmd_t           cmd,
  input  logic [NUM_PE-1:0] m,
  input  logic              shift_in_left,
  input  logic              shift_in_right,
  output logic              shift_out_left,
  output logic              shift_out_right,
  output logic [NUM_PE-1:0] mem_we,
  output logic [NUM_PE-1:0] mem_wdata,
  output logic [NUM_PE-1:0] x,
  output logic [NUM_PE-1:0] y,
  output logic [NUM_PE-1:0] wreg,
  output logic              bus_and
);

  logic [NUM_PE-1:0] alu;
  logic [NUM_PE-1:0] drive;
  logic [NUM_PE+1:0] chain;   // chain[i+1] = alu[i]; ends are the inputs

  assign chain[0]        = shift_in_left;
  assign chain[NUM_PE+1] = shift_in_right;
  assign chain[NUM_PE:1] = alu;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    cram_pe u_pe (
      .clk       (clk),
      .rst       (rst),
      .step      (step),
      .cmd_valid (cmd_valid),
      .cmd       (cmd),
      .m         (m[i]),
      .left_in   (chain[i]),
      .right_in  (chain[i+2]),
      .alu_out   (alu[i]),
      .x         (x[i]),
      .y         (y[i]),
      .wreg      (wreg[i]),
      .mem_we    (mem_we[i]),
      .mem_wdata (mem_wdata[i]),
      .bus_drive (drive[i])
    );
  end

  assign shift_out_left  = alu[0];
  assign shift_out_right = alu[NUM_PE-1];
  assign bus_and         = &drive;

endmodule
