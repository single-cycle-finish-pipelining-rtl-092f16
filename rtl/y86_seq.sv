// y86_seq: single-cycle (SEQ) Y86-64 processor.
//
// Every instruction completes in one clock cycle.  After a rising edge the
// new PC selects ten bytes of the unified memory; the fetch logic splits them
// into icode:ifun, rA, rB and valC and forms valP; the control logic turns
// icode/ifun (and Cnd) into register numbers and MUX selects; the register
// file reads valA and valB; the ALU forms valE from aluA (valA, valC or 8)
// and aluB (valB or 0); the data memory reads valM at valE (or at valB for
// popq/ret).  All of that is combinational.  At the next rising edge the
// writing components act together: the register file writes valE to dstE
// and valM to dstM, the memory writes valA (or valP for call), the
// condition codes take the ALU flags (OPq only) and the PC takes valP, valC
// or valM.  Register number 0xF disables a register write.
//
// Interface: clk, rst (synchronous, active high; PC <- RESET_PC, registers
// <- 0, ZF <- 1).  While rst is high the datapath writes nothing and a
// program can be placed in memory one byte per cycle through load_we /
// load_addr / load_data.  stat is AOK while running, HLT once a halt
// instruction is reached and INS on an invalid instruction; in both of the
// latter the PC holds and nothing more is written.  pc, cc and the debug
// register port (dbg_reg_id -> dbg_reg_val) show the architectural state.
//
// The fetch length (ilen) and the control's mem_read are not needed here:
// valP already includes the length, and the memory read has no side effect,
// so it is always performed.
//
// The datapath, its MUXes and the single-cycle timing follow the SEQ
// processor of the document; the memory size, reset values, status
// reporting and load/debug ports are this design's own.
module y86_seq
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 1024,
  parameter word_t       RESET_PC  = '0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       load_we,
  input  word_t      load_addr,
  input  logic [7:0] load_data,
  output word_t      pc,
  output stat_t      stat,
  output cc_t        cc,
  input  regid_t     dbg_reg_id,
  output word_t      dbg_reg_val
);

  // fetch
  logic [9:0][7:0] ibytes;
  logic [3:0]      icode, ifun;
  regid_t          ra, rb;
  word_t           valc, valp;
  logic [3:0]      ilen;
  logic            instr_valid;
  // decode / execute / memory
  ctrl_t           ctrl;
  logic            cnd;
  word_t           vala, valb, alua, alub, vale, valm;
  cc_t             new_cc;
  word_t           dmem_addr, dmem_wdata;

  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk        (clk),
    .imem_addr  (pc),
    .imem_bytes (ibytes),
    .dmem_addr  (dmem_addr),
    .dmem_rdata (valm),
    .dmem_we    (ctrl.mem_write && !rst),
    .dmem_wdata (dmem_wdata),
    .load_we    (load_we),
    .load_addr  (load_addr),
    .load_data  (load_data)
  );

  y86_fetch u_fetch (
    .pc          (pc),
    .ibytes      (ibytes),
    .icode       (icode),
    .ifun        (ifun),
    .ra          (ra),
    .rb          (rb),
    .valc        (valc),
    .valp        (valp),
    .ilen        (ilen),
    .instr_valid (instr_valid)
  );

  y86_control u_ctrl (
    .icode       (icode),
    .ifun        (ifun),
    .ra          (ra),
    .rb          (rb),
    .instr_valid (instr_valid),
    .cnd         (cnd),
    .ctrl        (ctrl),
    .stat        (stat)
  );

  y86_regfile u_rf (
    .clk     (clk),
    .rst     (rst),
    .src_a   (ctrl.src_a),
    .src_b   (ctrl.src_b),
    .val_a   (vala),
    .val_b   (valb),
    .dst_e   (ctrl.dst_e),
    .val_e   (vale),
    .dst_m   (ctrl.dst_m),
    .val_m   (valm),
    .dbg_id  (dbg_reg_id),
    .dbg_val (dbg_reg_val)
  );

  // aluA / aluB MUXes
  always_comb begin
    unique case (ctrl.alua_sel)
      ALUA_VALA:  alua = vala;
      ALUA_VALC:  alua = valc;
      ALUA_EIGHT: alua = 64'd8;
      default:    alua = vala;
    endcase
    alub = (ctrl.alub_sel == ALUB_ZERO) ? '0 : valb;
  end

  y86_alu u_alu (
    .alu_a  (alua),
    .alu_b  (alub),
    .alu_fn (ctrl.alu_fn),
    .val_e  (vale),
    .new_cc (new_cc)
  );

  y86_cc u_cc (
    .clk    (clk),
    .rst    (rst),
    .set_cc (ctrl.set_cc),
    .new_cc (new_cc),
    .ifun   (ifun),
    .cc     (cc),
    .cnd    (cnd)
  );

  // dmemAddr / dmemIn MUXes
  assign dmem_addr  = (ctrl.maddr_sel == MADDR_VALB) ? valb : vale;
  assign dmem_wdata = (ctrl.mdata_sel == MDATA_VALP) ? valp : vala;

  y86_pc_update #(.RESET_PC(RESET_PC)) u_pc (
    .clk    (clk),
    .rst    (rst),
    .pc_sel (ctrl.pc_sel),
    .valp   (valp),
    .valc   (valc),
    .valm   (valm),
    .pc     (pc)
  );

  // A stopped processor writes nothing.
  a_no_write_when_stopped: assert property (@(posedge clk) disable iff (rst)
    stat != STAT_AOK |-> !ctrl.mem_write && ctrl.dst_e == R_NONE
                        && ctrl.dst_m == R_NONE && !ctrl.set_cc);

endmodule
