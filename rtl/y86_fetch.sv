// y86_fetch: instruction split and length logic of the fetch stage.
//
// Takes the ten bytes read from memory at PC and splits them into the
// fields the rest of the datapath uses:
//   icode:ifun  - opcode and function, upper and lower nibble of byte 0;
//   rA, rB      - register numbers, upper and lower nibble of byte 1;
//   valC        - the 64-bit little-endian constant: bytes 2..9 for
//                 irmovq/rmmovq/mrmovq, bytes 1..8 for jXX/call;
//   valP        - PC + instruction length, the address of the next instruction.
// The length is 1 (halt, nop, ret), 2 (rrmovq/cmovXX, OPq, pushq, popq),
// 9 (jXX, call) or 10 (irmovq, rmmovq, mrmovq).  Instructions that carry no
// register byte report rA = rB = 0xF.  instr_valid is low for an icode above
// 0xB or for an ifun the instruction does not define.  Purely combinational.
//
// The split into icode:ifun, rA, rB, valC and the adder that forms valP
// follow the fetch stage of the SEQ processor; the byte layout and lengths
// are the standard Y86-64 encoding.
module y86_fetch
  import y86_pkg::*;
(
  input  word_t            pc,
  input  logic [9:0][7:0]  ibytes,
  output logic [3:0]       icode,
  output logic [3:0]       ifun,
  output regid_t           ra,
  output regid_t           rb,
  output word_t            valc,
  output word_t            valp,
  output logic [3:0]       ilen,
  output logic             instr_valid
);

  logic need_regids, need_valc;

  assign icode = ibytes[0][7:4];
  assign ifun  = ibytes[0][3:0];

  always_comb begin
    need_regids = 1'b0;
    need_valc   = 1'b0;
    instr_valid = 1'b1;
    unique case (icode)
      I_HALT, I_NOP, I_RET:           instr_valid = (ifun == 4'h0);
      I_RRMOVQ, I_JXX:                instr_valid = (ifun <= C_G);
      I_OPQ:                          instr_valid = (ifun <= 4'(ALU_XOR));
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
      I_CALL, I_PUSHQ, I_POPQ:        instr_valid = (ifun == 4'h0);
      default:                        instr_valid = 1'b0;
    endcase
    unique case (icode)
      I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ: need_regids = 1'b1;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:     begin need_regids = 1'b1; need_valc = 1'b1; end
      I_JXX, I_CALL:                    need_valc = 1'b1;
      default:                          ;
    endcase
  end

  assign ra = need_regids ? ibytes[1][7:4] : R_NONE;
  assign rb = need_regids ? ibytes[1][3:0] : R_NONE;

  always_comb begin
    for (int i = 0; i < 8; i++)
      valc[8*i +: 8] = need_regids ? ibytes[2+i] : ibytes[1+i];
    if (!need_valc) valc = '0;
  end

  assign ilen = 4'd1 + (need_regids ? 4'd1 : 4'd0) + (need_valc ? 4'd8 : 4'd0);
  assign valp = pc + word_t'(ilen);

endmodule
