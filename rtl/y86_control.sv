// y86_control: the logic functions that set the MUXes of the SEQ datapath.
//
// From the fetched instruction (icode, ifun, rA, rB, validity) and the
// condition result Cnd it produces, combinationally, one control word:
//
//   instruction   srcA  srcB  dstE        dstM  aluA  aluB  ALU   mem addr/data/op   next PC
//   halt          F     F     F           F     -     -     -     -                  hold
//   nop           F     F     F           F     -     -     -     -                  valP
//   rrmovq/cmovXX rA    F     Cnd?rB:F    F     valA  0     add   -                  valP
//   irmovq        F     F     rB          F     valC  0     add   -                  valP
//   rmmovq        rA    rB    F           F     valC  valB  add   valE / valA / write valP
//   mrmovq        F     rB    F           rA    valC  valB  add   valE / -  / read   valP
//   OPq           rA    rB    rB          F     valA  valB  ifun  - (sets CC)        valP
//   jXX           F     F     F           F     -     -     -     -                  Cnd?valC:valP
//   call          F     %rsp  %rsp        F     8     valB  sub   valE / valP / write valC
//   ret           F     %rsp  %rsp        F     8     valB  add   valB / -  / read   valM
//   pushq         rA    %rsp  %rsp        F     8     valB  sub   valE / valA / write valP
//   popq          rA    %rsp  %rsp        rA    8     valB  add   valB / -  / read   valP
//
// (valA = R[srcA], valB = R[srcB], F = 0xF = no register.)  An invalid
// instruction behaves like halt.  stat reports AOK, HLT (halt) or INS
// (invalid instruction).
//
// The srcA/srcB choices follow the document's table of registers to read;
// the dstE (rB, %rsp, 0xF, with NOT Cnd disabling a cmov), dstM (rA, 0xF),
// aluA (valA, valC, 8), aluB (valB, 0), memory address (ALU output, or
// R[srcB] for popq and ret) and memory data (valA, or PC+9 = valP for call)
// MUXes, and the next-PC exceptions for call, jCC and ret, follow its
// datapath figures.  Passing rrmovq and irmovq through the ALU with aluB = 0
// is the document's second write-back variant.  The don't-care entries
// ("-") are driven to fixed values of this design's choosing.
module y86_control
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  logic [3:0] ifun,
  input  regid_t     ra,
  input  regid_t     rb,
  input  logic       instr_valid,
  input  logic       cnd,
  output ctrl_t      ctrl,
  output stat_t      stat
);

  always_comb begin
    ctrl = '{src_a: R_NONE, src_b: R_NONE, dst_e: R_NONE, dst_m: R_NONE,
             alua_sel: ALUA_VALA, alub_sel: ALUB_VALB, alu_fn: ALU_ADD,
             set_cc: 1'b0, maddr_sel: MADDR_VALE, mdata_sel: MDATA_VALA,
             mem_read: 1'b0, mem_write: 1'b0, pc_sel: PC_VALP};
    stat = STAT_AOK;
    if (!instr_valid) begin
      ctrl.pc_sel = PC_HOLD;
      stat        = STAT_INS;
    end else begin
      unique case (icode)
        I_HALT: begin
          ctrl.pc_sel = PC_HOLD;
          stat        = STAT_HLT;
        end
        I_NOP: ;
        I_RRMOVQ: begin
          ctrl.src_a    = ra;
          ctrl.dst_e    = cnd ? rb : R_NONE;
          ctrl.alua_sel = ALUA_VALA;
          ctrl.alub_sel = ALUB_ZERO;
        end
        I_IRMOVQ: begin
          ctrl.dst_e    = rb;
          ctrl.alua_sel = ALUA_VALC;
          ctrl.alub_sel = ALUB_ZERO;
        end
        I_RMMOVQ: begin
          ctrl.src_a     = ra;
          ctrl.src_b     = rb;
          ctrl.alua_sel  = ALUA_VALC;
          ctrl.mem_write = 1'b1;
        end
        I_MRMOVQ: begin
          ctrl.src_b    = rb;
          ctrl.dst_m    = ra;
          ctrl.alua_sel = ALUA_VALC;
          ctrl.mem_read = 1'b1;
        end
        I_OPQ: begin
          ctrl.src_a  = ra;
          ctrl.src_b  = rb;
          ctrl.dst_e  = rb;
          ctrl.alu_fn = alufn_t'(ifun);
          ctrl.set_cc = 1'b1;
        end
        I_JXX: begin
          ctrl.pc_sel = cnd ? PC_VALC : PC_VALP;
        end
        I_CALL: begin
          ctrl.src_b     = R_RSP;
          ctrl.dst_e     = R_RSP;
          ctrl.alua_sel  = ALUA_EIGHT;
          ctrl.alu_fn    = ALU_SUB;
          ctrl.mdata_sel = MDATA_VALP;
          ctrl.mem_write = 1'b1;
          ctrl.pc_sel    = PC_VALC;
        end
        I_RET: begin
          ctrl.src_b     = R_RSP;
          ctrl.dst_e     = R_RSP;
          ctrl.alua_sel  = ALUA_EIGHT;
          ctrl.maddr_sel = MADDR_VALB;
          ctrl.mem_read  = 1'b1;
          ctrl.pc_sel    = PC_VALM;
        end
        I_PUSHQ: begin
          ctrl.src_a     = ra;
          ctrl.src_b     = R_RSP;
          ctrl.dst_e     = R_RSP;
          ctrl.alua_sel  = ALUA_EIGHT;
          ctrl.alu_fn    = ALU_SUB;
          ctrl.mem_write = 1'b1;
        end
        I_POPQ: begin
          ctrl.src_a     = ra;
          ctrl.src_b     = R_RSP;
          ctrl.dst_e     = R_RSP;
          ctrl.dst_m     = ra;
          ctrl.alua_sel  = ALUA_EIGHT;
          ctrl.maddr_sel = MADDR_VALB;
          ctrl.mem_read  = 1'b1;
        end
        default: begin
          ctrl.pc_sel = PC_HOLD;
          stat        = STAT_INS;
        end
      endcase
    end
  end

endmodule
