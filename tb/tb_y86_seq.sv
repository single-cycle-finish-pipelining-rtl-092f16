// tb_y86_seq: end-to-end test of the single-cycle Y86-64 processor at its
// default size (no parameter overrides).
//
// Each program is assembled here, loaded byte by byte through the load port
// while the processor is held in reset, and run in lockstep with the
// instruction-level model of y86_iss_pkg: after every clock edge the PC,
// all 15 registers, the condition codes and the status must match the
// model having executed exactly one instruction (one instruction per
// cycle).  At the end the whole memory is compared.
//   1. A program that sums and finds the maximum of an array through two
//      called functions (call/ret, push/pop, mrmovq/rmmovq, cmovg, jne, jle,
//      add/sub/and/xor); the results are also checked against values
//      computed here from the array, and the cycle count against the
//      model's instruction count.
//   2. Random instruction streams (random jumps, calls, returns, stack and
//      memory traffic), checked only against the model.
//   3. An invalid instruction: the processor must stop with status INS and
//      change nothing afterwards.
// The test counts how often each mechanism of the datapath was used (each
// instruction, taken and not-taken cmov and jXX, memory read and write,
// condition-code write, a write port disabled by register 0xF, both write
// ports at once, halt, invalid instruction) and fails for one never used.
module tb_y86_seq;
  import y86_pkg::*;
  import y86_iss_pkg::*;

  localparam int MEMB = 1024;   // the processor's default memory size

  logic       clk = 0, rst = 1;
  logic       load_we = 0;
  word_t      load_addr = 0;
  logic [7:0] load_data = 0;
  word_t      pc;
  stat_t      stat;
  cc_t        cc;
  regid_t     dbg_reg_id = 0;
  word_t      dbg_reg_val;

  y86_seq dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  y86_iss iss;
  y86_asm a;

  // mechanism counters
  int n_icode [16];
  int n_cmov_taken, n_cmov_not, n_jmp_taken, n_jmp_not;
  int n_mem_wr, n_mem_rd, n_cc_wr, n_wr_disabled, n_dual_wr, n_halt, n_ins;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Load a.code[0 .. MEMB-1] into the processor and the model, then reset.
  task automatic load_and_reset();
    rst = 1;
    iss = new(MEMB);
    for (int i = 0; i < MEMB; i++) begin
      load_we = 1; load_addr = word_t'(i); load_data = a.code[i];
      iss.mem[i] = a.code[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;
    iss.reset();
  endtask

  task automatic compare_state(string tag);
    checks++;
    if (pc !== iss.pc) fail($sformatf("%s pc %h want %h", tag, pc, iss.pc));
    for (int i = 0; i < 15; i++) begin
      checks++;
      if (dut.u_rf.regs[i] !== iss.r[i])
        fail($sformatf("%s pc=%h r%0d %h want %h", tag, pc, i, dut.u_rf.regs[i], iss.r[i]));
    end
    checks++;
    if (cc.sf !== iss.sf || cc.zf !== iss.zf)
      fail($sformatf("%s pc=%h cc sf=%b zf=%b want %b %b", tag, pc, cc.sf, cc.zf, iss.sf, iss.zf));
  endtask

  task automatic compare_memory(string tag);
    for (int i = 0; i < MEMB; i++) begin
      checks++;
      if (dut.u_mem.mem[i] !== iss.mem[i])
        fail($sformatf("%s mem[%h] %h want %h", tag, i, dut.u_mem.mem[i], iss.mem[i]));
    end
  endtask

  // Record which mechanisms the instruction now at the PC uses.
  task automatic count_mechanisms();
    if (stat == STAT_HLT) n_halt++;
    if (stat == STAT_INS) n_ins++;
    if (stat != STAT_AOK) return;
    n_icode[dut.icode]++;
    if (dut.icode == I_RRMOVQ && dut.ifun != 0) begin
      if (dut.cnd) n_cmov_taken++; else n_cmov_not++;
    end
    if (dut.icode == I_JXX && dut.ifun != 0) begin
      if (dut.cnd) n_jmp_taken++; else n_jmp_not++;
    end
    if (dut.ctrl.mem_write) n_mem_wr++;
    if (dut.ctrl.mem_read) n_mem_rd++;
    if (dut.ctrl.set_cc) n_cc_wr++;
    if (dut.icode == I_RRMOVQ && dut.ctrl.dst_e == R_NONE) n_wr_disabled++;
    if (dut.ctrl.dst_e != R_NONE && dut.ctrl.dst_m != R_NONE) n_dual_wr++;
  endtask

  // Run in lockstep for at most max_cycles or until both have stopped;
  // returns the number of cycles in which an instruction was executed.
  task automatic run_lockstep(int max_cycles, string tag, output int executed);
    stat_t dut_stat;
    executed = 0;
    for (int c = 0; c < max_cycles; c++) begin
      dut_stat = stat;
      count_mechanisms();
      @(posedge clk);
      if (iss.stat == 0) begin
        iss.step();
        if (iss.stat == 0) executed++;
      end
      #1;
      checks++;
      if (int'(dut_stat) != iss.stat)
        fail($sformatf("%s status %0d want %0d at pc %h", tag, dut_stat, iss.stat, pc));
      compare_state(tag);
      if (iss.stat != 0 && c > 0 && dut_stat != STAT_AOK) begin
        // stay stopped for a few more cycles: nothing may change
        repeat (3) begin
          @(posedge clk); #1;
          compare_state({tag, " stopped"});
        end
        break;
      end
    end
    compare_memory(tag);
  endtask

  // ---------------- program 1: array sum and maximum ----------------
  localparam longint unsigned ARR = 64'h280, RES = 64'h300, STK = 64'h3F0;
  localparam int NELEM = 6;
  longint signed arr [NELEM] = '{17, -5, 42, 3, -10, 9};

  task automatic build_program1();
    int unsigned sum_at, max_at, j_test, loop, test, loopm, j_skip;
    a = new;
    // main
    a.irmov(STK, 4);               // %rsp
    a.irmov(ARR, 7);               // %rdi = array
    a.irmov(NELEM, 6);             // %rsi = count
    sum_at = a.pos + 1; a.call(0); // call sum
    a.irmov(ARR, 7);
    a.irmov(NELEM, 6);
    max_at = a.pos + 1; a.call(0); // call max
    a.irmov(RES, 13);
    a.rmmov(0, 0, 13);             // rmmovq %rax, 0(%r13)
    a.rmmov(3, 8, 13);             // rmmovq %rbx, 8(%r13)
    a.op(ALU_AND, 0, 0);           // andq %rax, %rax
    j_skip = a.pos + 1; a.jxx(C_LE, 0);  // jle skip (sum > 0: not taken)
    a.irmov(1, 12);
    a.patch64(j_skip, a.pos);
    a.mrmov(8, 13, 14);            // mrmovq 8(%r13), %r14
    a.halt();
    // sum(%rdi, %rsi) -> %rax
    a.pos = 'h100;
    a.patch64(sum_at, a.pos);
    a.irmov(8, 8);
    a.irmov(1, 9);
    a.op(ALU_XOR, 0, 0);
    a.op(ALU_AND, 6, 6);
    j_test = a.pos + 1; a.jxx(C_ALWAYS, 0);
    loop = a.pos;
    a.mrmov(0, 7, 10);
    a.op(ALU_ADD, 10, 0);
    a.op(ALU_ADD, 8, 7);
    a.op(ALU_SUB, 9, 6);
    a.patch64(j_test, a.pos);
    a.jxx(C_NE, loop);
    a.ret();
    // max(%rdi, %rsi) -> %rbx, keeps %rdi and %rsi
    a.pos = 'h180;
    a.patch64(max_at, a.pos);
    a.push(7);
    a.push(6);
    a.mrmov(0, 7, 3);
    loopm = a.pos;
    a.mrmov(0, 7, 10);
    a.cmov(C_ALWAYS, 10, 11);      // rrmovq %r10, %r11
    a.op(ALU_SUB, 3, 11);
    a.cmov(C_G, 10, 3);            // cmovg %r10, %rbx
    a.op(ALU_ADD, 8, 7);
    a.op(ALU_SUB, 9, 6);
    a.jxx(C_NE, loopm);
    a.pop(6);
    a.pop(7);
    a.ret();
    // data
    a.pos = ARR;
    foreach (arr[i]) a.b64(arr[i]);
  endtask

  // ---------------- program 2: random instruction stream ----------------
  task automatic build_random(int unsigned len);
    a = new;
    a.irmov(64'h380, 4);
    while (a.pos < len) begin
      bit [3:0] r1 = 4'($urandom_range(0, 15)), r2 = 4'($urandom_range(0, 15));
      longint unsigned k = $urandom_range(0, 1) ? longint'($urandom_range(0, 1023))
                                                : {$urandom, $urandom};
      case ($urandom_range(0, 14))
        0:  a.nop();
        1, 2: a.op(4'($urandom_range(0, 3)), r1, r2);
        3:  a.cmov(4'($urandom_range(0, 6)), r1, r2);
        4, 5: a.irmov(k, r2);
        6:  a.rmmov(r1, 64'($urandom_range(0, 63)), r2);
        7:  a.mrmov(64'($urandom_range(0, 63)), r2, r1);
        8:  a.jxx(4'($urandom_range(0, 6)), 64'($urandom_range(0, len)));
        9:  a.call(64'($urandom_range(0, len)));
        10: a.ret();
        11: a.push(r1);
        12: a.pop(r1);
        13: a.irmov(64'($urandom_range(512, 1000)), r2);
        default: a.op(ALU_SUB, r1, r2);
      endcase
    end
    a.halt();
  endtask

  int executed, cycles_run;
  longint signed want_sum, want_max;

  initial begin
    dbg_reg_id = 0;
    // ---- program 1
    build_program1();
    load_and_reset();
    run_lockstep(2000, "prog1", executed);
    checks++;
    if (stat != STAT_HLT) fail("prog1 did not halt");
    want_sum = 0; want_max = arr[0];
    foreach (arr[i]) begin
      want_sum += arr[i];
      if (arr[i] > want_max) want_max = arr[i];
    end
    dbg_reg_id = 4'd0; #1;
    checks++;
    if (dbg_reg_val !== word_t'(want_sum)) fail($sformatf("sum %0d want %0d", dbg_reg_val, want_sum));
    dbg_reg_id = 4'd3; #1;
    checks++;
    if (dbg_reg_val !== word_t'(want_max)) fail($sformatf("max %0d want %0d", dbg_reg_val, want_max));
    dbg_reg_id = 4'd4; #1;
    checks++;
    if (dbg_reg_val !== STK) fail("stack pointer not restored");
    dbg_reg_id = 4'd14; #1;
    checks++;
    if (dbg_reg_val !== word_t'(want_max)) fail("stored maximum not read back");
    dbg_reg_id = 4'd12; #1;
    checks++;
    if (dbg_reg_val !== 64'd1) fail("jle wrongly taken");
    // one instruction per cycle: cycles from reset to halt = instructions
    cycles_run = n_icode.sum();
    checks++;
    if (cycles_run != executed) fail($sformatf("cycles %0d, instructions %0d", cycles_run, executed));
    $display("program 1: %0d instructions in %0d cycles, sum=%0d max=%0d",
             executed, cycles_run, want_sum, want_max);

    // ---- program 2
    for (int p = 0; p < 100; p++) begin
      build_random(300);
      load_and_reset();
      run_lockstep(400, $sformatf("rand%0d", p), executed);
    end

    // ---- program 3: invalid instruction
    a = new;
    a.irmov(64'h1234, 2);
    a.op(ALU_SUB, 2, 2);
    a.b8(8'hC0);
    a.irmov(64'h5678, 2);
    a.halt();
    load_and_reset();
    run_lockstep(20, "invalid", executed);
    checks++;
    if (stat != STAT_INS || pc != 64'd12) fail($sformatf("invalid: stat %0d pc %h", stat, pc));

    // ---- every mechanism exercised
    for (int i = 1; i < 12; i++) begin
      checks++;
      if (n_icode[i] == 0) fail($sformatf("icode %h never executed", i));
    end
    begin
      automatic int cnt [11] = '{n_cmov_taken, n_cmov_not, n_jmp_taken, n_jmp_not, n_mem_wr,
                       n_mem_rd, n_cc_wr, n_wr_disabled, n_dual_wr, n_halt, n_ins};
      automatic string nm [11] = '{"cmov taken", "cmov not taken", "jump taken", "jump not taken",
                         "memory write", "memory read", "cc write", "write disabled (0xF)",
                         "two register writes", "halt", "invalid instruction"};
      for (int i = 0; i < 11; i++) begin
        checks++;
        $display("  %-22s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) fail($sformatf("mechanism '%s' never happened", nm[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
