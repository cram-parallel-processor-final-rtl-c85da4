// cram_data_mem: the C.RAM data memory, one 256 x 1 bit RAM per PE.
//
// The memories of all PEs are kept as one array of DEPTH rows by NUM_PE
// columns, the way a C.RAM chip lays them out: a row address selects one
// bit for every PE at once and column i belongs to PE i.
//   - PE read port: row rd_addr is presented on m combinationally.
//   - PE write port: on the rising clock edge, each column i with we[i] set
//     takes wdata[i] at row wr_addr. Read and write addresses are separate,
//     as the report's controller keeps a read and a write address.
//   - Host port: host_we writes the whole row host_addr on the clock edge
//     (PE writes to the same row and column win); host_rdata shows row
//     host_addr combinationally. It loads operands and reads results.
// INIT_FILE, when not empty, preloads the array with $readmemh (one hex
// word per row), standing in for the memory initialisation file of the
// FPGA build. The 256 x 1 bit size and preloading follow the report; the
// host port and the row-wide layout are this design's choice.
module cram_data_mem
  import cram_pkg::*;
#(
  parameter int unsigned NUM_PE    = 2,
  parameter int unsigned DEPTH     = MEM_DEPTH,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [NUM_PE-1:0]        m,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [NUM_PE-1:0]        we,
  input  logic [NUM_PE-1:0]        wdata,
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic [NUM_PE-1:0]        host_wdata,
  output logic [NUM_PE-1:0]        host_rdata
);

  logic [NUM_PE-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    for (int i = 0; i < int'(NUM_PE); i++) begin
      if (we[i]) mem[wr_addr][i] <= wdata[i];
    end
  end

  assign m          = mem[rd_addr];
  assign host_rdata = mem[host_addr];

endmodule
