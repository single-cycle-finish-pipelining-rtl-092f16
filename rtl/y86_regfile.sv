// y86_regfile: the 15-entry, 64-bit register file of the Y86-64 processor.
//
// Two read ports (srcA -> R[srcA] = valA, srcB -> R[srcB] = valB) are
// combinational: they show the register contents as soon as the register
// numbers arrive.  Two write ports (dstE <- next R[dstE], dstM <- next
// R[dstM]) are written together at the rising clock edge.  Register number
// 0xF names no register: reading it gives 0 and writing it does nothing,
// which is how an instruction disables a write port.  When both write ports
// name the same register the M port (memory value) wins.  A third read port
// (dbg_id -> dbg_val) lets a test bench or a debugger inspect the registers.
// All registers clear to 0 at reset (synchronous, active high).
//
// The port names, the combinational read and edge-triggered write, and the
// use of 0xF as "no register" follow the SEQ processor; the write-port
// priority, the reset and the debug port are this design's own choices.
module y86_regfile
  import y86_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  regid_t src_a,
  input  regid_t src_b,
  output word_t  val_a,
  output word_t  val_b,
  input  regid_t dst_e,
  input  word_t  val_e,
  input  regid_t dst_m,
  input  word_t  val_m,
  input  regid_t dbg_id,
  output word_t  dbg_val
);

  word_t regs [15];

  function automatic word_t rd(regid_t id, word_t r [15]);
    return (id == R_NONE) ? '0 : r[id];
  endfunction

  assign val_a   = rd(src_a, regs);
  assign val_b   = rd(src_b, regs);
  assign dbg_val = rd(dbg_id, regs);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) regs[i] <= '0;
    end else begin
      if (dst_e != R_NONE) regs[dst_e] <= val_e;
      if (dst_m != R_NONE) regs[dst_m] <= val_m;
    end
  end

endmodule
