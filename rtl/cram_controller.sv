// cram_controller: instruction decoder of the C.RAM control unit.
//
// A selector on the two most significant instruction bits, registered on
// the rising clock edge whenever issue is high:
//   00  read address:  rd_addr <= instr[7:0]
//   01  write address: wr_addr <= instr[7:0]
//   1x  operation:     cmd.opcode <= instr[14:7], cmd.ctrl <= instr[6:0],
//                      cmd_valid <= 1
// Bits 13:8 of an address instruction are masked off. Addresses are held
// until replaced. The command is valid for exactly one step: cmd_valid
// falls on the next step that does not issue an operation, so the PEs
// execute each operation once, one step after it was decoded. last_instr
// and instr_stb (one clock) show the instruction just decoded.
// The field positions and the selector follow the report. Reset clears the
// opcode, the control bits and (this design's choice) both addresses. In
// the report the control bits stay set until the next operation
// instruction; here they last one step, so a program needs no extra
// instruction to switch them off.
module cram_controller
  import cram_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               step,
  input  logic               issue,
  input  logic [INSTR_W-1:0] instr,
  output logic [ADDR_W-1:0]  rd_addr,
  output logic [ADDR_W-1:0]  wr_addr,
  output pe_cmd_t            cmd,
  output logic               cmd_valid,
  output logic [INSTR_W-1:0] last_instr,
  output logic               instr_stb
);

  instr_kind_e kind;

  assign kind = instr_kind_e'(instr[INSTR_W-1] ? 2'b10 : instr[INSTR_W-1 -: 2]);

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_addr    <= '0;
      wr_addr    <= '0;
      cmd        <= '0;
      cmd_valid  <= 1'b0;
      last_instr <= '0;
      instr_stb  <= 1'b0;
    end else begin
      instr_stb <= issue;
      if (issue) begin
        last_instr <= instr;
        unique case (kind)
          KIND_READ_ADDR: begin
            rd_addr   <= instr[ADDR_W-1:0];
            cmd_valid <= 1'b0;
          end
          KIND_WRITE_ADDR: begin
            wr_addr   <= instr[ADDR_W-1:0];
            cmd_valid <= 1'b0;
          end
          default: begin
            cmd.opcode <= instr[INSTR_W-2 -: OPCODE_W];
            cmd.ctrl   <= pe_ctrl_t'(instr[$bits(pe_ctrl_t)-1:0]);
            cmd_valid  <= 1'b1;
          end
        endcase
      end else if (step) begin
        cmd_valid <= 1'b0;
      end
    end
  end

endmodule
