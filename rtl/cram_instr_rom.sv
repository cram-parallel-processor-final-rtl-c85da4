// cram_instr_rom: the 256 x 16 bit instruction store of the sequencer.
//
// The word at addr is presented on instr combinationally, so the sequencer
// sees the instruction of its current program counter in the same cycle.
// The store is preloaded from INIT_FILE ($readmemh, one 16-bit hex word per
// line) in place of the FPGA's memory initialisation file, and a host can
// overwrite words through load_we / load_addr / load_data on the rising
// clock edge (the "from CPU" path of a minimalist sequencer). The default
// file holds the two-PE four-bit addition program. Size and preloading are
// the report's; the load port is this design's choice.
module cram_instr_rom
  import cram_pkg::*;
#(
  parameter int unsigned DEPTH     = MEM_DEPTH,
  parameter string       INIT_FILE = "rtl/cram_add4_prog.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [INSTR_W-1:0]       instr,
  input  logic                     load_we,
  input  logic [$clog2(DEPTH)-1:0] load_addr,
  input  logic [INSTR_W-1:0]       load_data
);

  logic [INSTR_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = mk_halt();
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (load_we) rom[load_addr] <= load_data;
  end

  assign instr = rom[addr];

endmodule
