// tb_y86_control: self-checking test of the MUX-setting logic.
// For each instruction (and both values of Cnd) it compares the control
// word and status with the row of the expected-settings table below:
// register numbers to read and write, ALU inputs and function, memory
// address/data/write, condition-code write and next-PC source.
module tb_y86_control;
  import y86_pkg::*;

  logic [3:0] icode, ifun;
  regid_t     ra, rb;
  logic       instr_valid, cnd;
  ctrl_t      ctrl;
  stat_t      stat;
  int         checks = 0, failures = 0;

  y86_control dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Register codes in the table: 0..14 literal, 16 = rA, 17 = rB, 18 = rsp,
  // 15 = none, 19 = "rB if Cnd else none".
  localparam int RA = 16, RB = 17, SP = 18, F = 15, RBC = 19;
  // PC source: 0 valP, 1 valC, 2 valM, 3 hold, 4 "valC if Cnd else valP".
  typedef struct {
    int srca, srcb, dste, dstm;
    int alua;      // 0 valA, 1 valC, 2 eight, -1 don't care
    int alub;      // 0 valB, 1 zero, -1 don't care
    int fn;        // 0..3, 4 = ifun, -1 don't care
    int setcc, mw;
    int maddr;     // 0 valE, 1 valB, -1 don't care
    int mdata;     // 0 valA, 1 valP, -1 don't care
    int pcsrc;
    stat_t st;
  } row_t;

  function automatic row_t expect_row(logic [3:0] ic);
    case (ic)
      4'h0: return '{F, F, F, F,  -1, -1, -1, 0, 0, -1, -1, 3, STAT_HLT};
      4'h1: return '{F, F, F, F,  -1, -1, -1, 0, 0, -1, -1, 0, STAT_AOK};
      4'h2: return '{RA, F, RBC, F, 0, 1, 0, 0, 0, -1, -1, 0, STAT_AOK};
      4'h3: return '{F, F, RB, F,  1, 1, 0, 0, 0, -1, -1, 0, STAT_AOK};
      4'h4: return '{RA, RB, F, F, 1, 0, 0, 0, 1, 0, 0, 0, STAT_AOK};
      4'h5: return '{F, RB, F, RA, 1, 0, 0, 0, 0, 0, -1, 0, STAT_AOK};
      4'h6: return '{RA, RB, RB, F, 0, 0, 4, 1, 0, -1, -1, 0, STAT_AOK};
      4'h7: return '{F, F, F, F,  -1, -1, -1, 0, 0, -1, -1, 4, STAT_AOK};
      4'h8: return '{F, SP, SP, F, 2, 0, 1, 0, 1, 0, 1, 1, STAT_AOK};
      4'h9: return '{F, SP, SP, F, 2, 0, 0, 0, 0, 1, -1, 2, STAT_AOK};
      4'hA: return '{RA, SP, SP, F, 2, 0, 1, 0, 1, 0, 0, 0, STAT_AOK};
      4'hB: return '{RA, SP, SP, RA, 2, 0, 0, 0, 0, 1, -1, 0, STAT_AOK};
      default: return '{F, F, F, F, -1, -1, -1, 0, 0, -1, -1, 3, STAT_INS};
    endcase
  endfunction

  function automatic int reg_of(int code);
    case (code)
      RA:  return int'(ra);
      RB:  return int'(rb);
      SP:  return 4;
      RBC: return cnd ? int'(rb) : 15;
      default: return code;
    endcase
  endfunction

  task automatic cmp(int got, int want, string what);
    checks++;
    if (want >= 0 && got != want) begin
      failures++;
      $display("FAIL icode=%h ifun=%h cnd=%b %s: got %0d want %0d", icode, ifun, cnd, what, got, want);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int ic = 0; ic < 16; ic++) begin
        row_t r;
        icode = 4'(ic);
        ifun  = (ic == 6) ? 4'($urandom_range(0, 3)) : (ic == 2 || ic == 7) ? 4'($urandom_range(0, 6)) : 4'h0;
        ra = 4'($urandom_range(0, 14));
        rb = 4'($urandom_range(0, 14));
        cnd = 1'($urandom);
        instr_valid = (ic <= 11);
        #1;
        r = expect_row(icode);
        cmp(int'(ctrl.src_a), reg_of(r.srca), "srcA");
        cmp(int'(ctrl.src_b), reg_of(r.srcb), "srcB");
        cmp(int'(ctrl.dst_e), reg_of(r.dste), "dstE");
        cmp(int'(ctrl.dst_m), reg_of(r.dstm), "dstM");
        cmp(int'(ctrl.alua_sel), r.alua, "aluA");
        cmp(int'(ctrl.alub_sel), r.alub, "aluB");
        cmp(int'(ctrl.alu_fn), r.fn == 4 ? int'(ifun) : r.fn, "alu fn");
        cmp(int'(ctrl.set_cc), r.setcc, "set_cc");
        cmp(int'(ctrl.mem_write), r.mw, "mem write");
        cmp(int'(ctrl.maddr_sel), r.maddr, "mem addr");
        cmp(int'(ctrl.mdata_sel), r.mdata, "mem data");
        cmp(int'(ctrl.pc_sel), r.pcsrc == 4 ? (cnd ? 1 : 0) : r.pcsrc, "pc");
        cmp(int'(stat), int'(r.st), "stat");
      end
    end
    // a valid icode flagged invalid by fetch (bad ifun) stops the processor
    icode = 4'h6; ifun = 4'h9; instr_valid = 0; cnd = 1; #1;
    cmp(int'(stat), int'(STAT_INS), "invalid stat");
    cmp(int'(ctrl.dst_e), 15, "invalid dstE");
    cmp(int'(ctrl.set_cc), 0, "invalid set_cc");
    cmp(int'(ctrl.pc_sel), 3, "invalid pc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
