// cram_sequencer: the minimalist C.RAM sequencer, a program counter.
//
// The program counter addresses the instruction ROM; the instruction at the
// current count (instr) is issued to the controller on every step while the
// sequencer runs (issue = step & running), and the count then advances by
// one. Two flag bits of a memory instruction steer the counter, the way the
// instruction store of a minimalist sequencer feeds "halt" and "restart"
// back to it: with the halt bit the instruction is issued and the sequencer
// stops at that address; with the restart bit it is issued and the count
// returns to 0. The start input (one clock) resets the count to 0 and
// starts running; reset leaves the sequencer stopped at address 0.
// The counter itself is the report's; the start input and the placement of
// the halt and restart flags in unused address-instruction bits are this
// design's choices.
module cram_sequencer
  import cram_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     step,
  input  logic                     start,
  input  logic [INSTR_W-1:0]       instr,
  output logic [$clog2(DEPTH)-1:0] pc,
  output logic                     running,
  output logic                     issue
);

  logic is_mem;

  assign is_mem = !instr[INSTR_W-1];
  assign issue  = step && running;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      running <= 1'b0;
    end else if (start) begin
      pc      <= '0;
      running <= 1'b1;
    end else if (issue) begin
      if (is_mem && instr[HALT_BIT])         running <= 1'b0;
      else if (is_mem && instr[RESTART_BIT]) pc <= '0;
      else                                   pc <= pc + 1'b1;
    end
  end

endmodule
