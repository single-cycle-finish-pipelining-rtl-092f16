// y86_pc_update: the PC register and the MUX that chooses its next value.
//
// Each rising clock edge loads the PC with the value pc_sel chooses:
// valP (the following instruction, the usual case), valC (call, taken jXX),
// valM (ret, the return address read from the stack) or the current PC
// (hold: after halt or an invalid instruction the processor stays there).
// A synchronous, active-high reset loads RESET_PC.  pc is the register
// output, so the next instruction is fetched right after the edge.
//
// The next-PC choices follow the document's "Update PC" step; the reset
// address and the hold on halt are this design's own.
module y86_pc_update
  import y86_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic    clk,
  input  logic    rst,
  input  pc_sel_t pc_sel,
  input  word_t   valp,
  input  word_t   valc,
  input  word_t   valm,
  output word_t   pc
);

  word_t pc_next;

  always_comb begin
    unique case (pc_sel)
      PC_VALP: pc_next = valp;
      PC_VALC: pc_next = valc;
      PC_VALM: pc_next = valm;
      PC_HOLD: pc_next = pc;
      default: pc_next = pc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

endmodule
