// y86_cc: condition-code register and condition logic (Cnd).
//
// The register holds the sign and zero flags (SF, ZF).  When set_cc is high
// (an OPq instruction) it takes new_cc from the ALU at the rising clock
// edge; otherwise it keeps its value.  Reset sets ZF = 1, SF = 0.
// Cnd is a MUX over the stored ("prior") flags, selected by the ifun of the
// jXX / cmovXX instruction:
//   0 always: 1         1 le: SF | ZF      2 l: SF
//   3 e:      ZF        4 ne: ~ZF          5 ge: ~SF      6 g: ~SF & ~ZF
// Other ifun values give Cnd = 0.  Cnd is combinational from the register.
//
// The (always), (le) and (l) inputs of the MUX are as the document draws
// them; it draws the remaining four inputs without labels, and this design
// fills them with the complements and equality tests above.  Like the
// document's le and l terms, no overflow flag is kept.
module y86_cc
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       set_cc,
  input  cc_t        new_cc,
  input  logic [3:0] ifun,
  output cc_t        cc,
  output logic       cnd
);

  always_ff @(posedge clk) begin
    if (rst)         cc <= '{sf: 1'b0, zf: 1'b1};
    else if (set_cc) cc <= new_cc;
  end

  always_comb begin
    unique case (ifun)
      C_ALWAYS: cnd = 1'b1;
      C_LE:     cnd = cc.sf | cc.zf;
      C_L:      cnd = cc.sf;
      C_E:      cnd = cc.zf;
      C_NE:     cnd = ~cc.zf;
      C_GE:     cnd = ~cc.sf;
      C_G:      cnd = ~cc.sf & ~cc.zf;
      default:  cnd = 1'b0;
    endcase
  end

endmodule
