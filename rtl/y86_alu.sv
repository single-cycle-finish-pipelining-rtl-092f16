// y86_alu: the 64-bit ALU of the execute stage.
//
// Computes valE = aluB OP aluA, with OP chosen by alu_fn: add, subtract
// (aluB - aluA), and, xor.  The operand order makes "subq rA, rB" give
// rB - rA and lets pushq/call form %rsp - 8 with aluA = 8, aluB = %rsp.
// Also reports the flags a result would set: sf (bit 63 of valE) and zf
// (valE == 0).  Purely combinational.
//
// The four operations follow the document's ALU (add/sub, xor/and as a
// function of the instruction); the operand order is the Y86-64 convention.
module y86_alu
  import y86_pkg::*;
(
  input  word_t  alu_a,
  input  word_t  alu_b,
  input  alufn_t alu_fn,
  output word_t  val_e,
  output cc_t    new_cc
);

  always_comb begin
    unique case (alu_fn)
      ALU_ADD: val_e = alu_b + alu_a;
      ALU_SUB: val_e = alu_b - alu_a;
      ALU_AND: val_e = alu_b & alu_a;
      ALU_XOR: val_e = alu_b ^ alu_a;
      default: val_e = alu_b + alu_a;
    endcase
  end

  assign new_cc.sf = val_e[63];
  assign new_cc.zf = (val_e == '0);

endmodule
