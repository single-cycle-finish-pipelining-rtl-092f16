// tb_y86_mux_exercises: runs, on the default-size processor, each
// instruction of the classic "what do the MUXes select" exercises
// (addq %r8,%r9; rmmovq; irmovq; mrmovq; jle; cmove; ret; popq; call, plus
// pushq) and checks, in the cycle the instruction executes, the values on
// the datapath MUX outputs: aluA, aluB, valE, dstE, dstM, the data-memory
// address, the data written, the memory write enable, and, after the clock
// edge, the new PC and the written register.  jle and cmove run once with
// the condition false and once with it true.  The expected values are
// worked out by hand from the register set-up at the top of the program.
module tb_y86_mux_exercises;
  import y86_pkg::*;
  import y86_iss_pkg::*;

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
  y86_asm a;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected datapath values of one exercise; -1 = not checked.
  typedef struct {
    string       name;
    longint      alua, alub, vale, dste, dstm, maddr, mdata, mwe, next_pc;
    int          wreg;      // register to read back after the edge, -1 none
    longint      wval;
  } exp_t;

  exp_t ex [int unsigned];   // keyed by instruction address
  int   seen;

  task automatic c(string what, longint got, longint want, string name);
    if (want == -1) return;
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s %s: got %h want %h", name, what, got, want);
    end
  endtask

  localparam longint STK = 'h3F0, BASE = 'h200;
  int unsigned x_add, x_rm, x_ir, x_mr, x_jle0, x_cme0, x_sub, x_cme1, x_jle1,
               x_call, x_push, x_pop, x_ret, t_jle, f_call, x_halt;

  initial begin
    a = new;
    a.irmov(STK, 4);
    a.irmov(5, 8);
    a.irmov(7, 9);
    a.irmov(BASE, 3);
    x_add  = a.pos; a.op(ALU_ADD, 8, 9);        // addq %r8, %r9
    x_rm   = a.pos; a.rmmov(9, 16, 3);          // rmmovq %r9, 16(%rbx)
    x_ir   = a.pos; a.irmov('h77, 1);           // irmovq $0x77, %rcx
    x_mr   = a.pos; a.mrmov(16, 3, 2);          // mrmovq 16(%rbx), %rdx
    x_jle0 = a.pos; a.jxx(C_LE, 'h180);         // jle (not taken: 12 > 0)
    x_cme0 = a.pos; a.cmov(C_E, 2, 6);          // cmove %rdx, %rsi (not taken)
    x_sub  = a.pos; a.op(ALU_SUB, 2, 9);        // subq %rdx, %r9 -> 0
    x_cme1 = a.pos; a.cmov(C_E, 2, 6);          // cmove %rdx, %rsi (taken)
    x_jle1 = a.pos; a.jxx(C_LE, 'h180);         // jle (taken)
    a.halt();
    t_jle = 'h180;
    a.pos = t_jle;
    x_call = a.pos; a.call('h100);              // call 0x100
    x_halt = a.pos; a.halt();
    f_call = 'h100;
    a.pos = f_call;
    x_push = a.pos; a.push(1);                  // pushq %rcx
    x_pop  = a.pos; a.pop(7);                   // popq %rdi
    x_ret  = a.pos; a.ret();

    //                name      aluA    aluB    valE    dstE dstM maddr   mdata   mwe next_pc          wreg wval
    ex[x_add]  = '{"addq",    5,      7,      12,     9,   15,  -1,     -1,     0,  x_add + 2,       9,   12};
    ex[x_rm]   = '{"rmmovq",  16,     BASE,   BASE+16, 15, 15,  BASE+16, 12,    1,  x_rm + 10,       -1,  0};
    ex[x_ir]   = '{"irmovq",  'h77,   0,      'h77,   1,   15,  -1,     -1,     0,  x_ir + 10,       1,   'h77};
    ex[x_mr]   = '{"mrmovq",  16,     BASE,   BASE+16, 15, 2,   BASE+16, -1,    0,  x_mr + 10,       2,   12};
    ex[x_jle0] = '{"jle(no)", -1,     -1,     -1,     15,  15,  -1,     -1,     0,  x_jle0 + 9,      -1,  0};
    ex[x_cme0] = '{"cmove(no)", 12,   0,      12,     15,  15,  -1,     -1,     0,  x_cme0 + 2,      6,   0};
    ex[x_sub]  = '{"subq",    12,     12,     0,      9,   15,  -1,     -1,     0,  x_sub + 2,       9,   0};
    ex[x_cme1] = '{"cmove",   12,     0,      12,     6,   15,  -1,     -1,     0,  x_cme1 + 2,      6,   12};
    ex[x_jle1] = '{"jle",     -1,     -1,     -1,     15,  15,  -1,     -1,     0,  t_jle,           -1,  0};
    ex[x_call] = '{"call",    8,      STK,    STK-8,  4,   15,  STK-8,  t_jle+9, 1, f_call,          4,   STK-8};
    ex[x_push] = '{"pushq",   8,      STK-8,  STK-16, 4,   15,  STK-16, 'h77,   1,  f_call + 2,      4,   STK-16};
    ex[x_pop]  = '{"popq",    8,      STK-16, STK-8,  4,   7,   STK-16, -1,     0,  f_call + 4,      7,   'h77};
    ex[x_ret]  = '{"ret",     8,      STK-8,  STK,    4,   15,  STK-8,  -1,     0,  x_halt,          4,   STK};

    for (int i = 0; i < 1024; i++) begin
      load_we = 1; load_addr = word_t'(i); load_data = a.code[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;

    seen = 0;
    for (int cyc = 0; cyc < 100 && stat == STAT_AOK; cyc++) begin
      if (ex.exists(int'(pc))) begin
        automatic exp_t e;
        e = ex[int'(pc)];
        seen++;
        c("aluA", dut.alua, e.alua, e.name);
        c("aluB", dut.alub, e.alub, e.name);
        c("valE", dut.vale, e.vale, e.name);
        c("dstE", dut.ctrl.dst_e, e.dste, e.name);
        c("dstM", dut.ctrl.dst_m, e.dstm, e.name);
        c("mem write", dut.ctrl.mem_write, e.mwe, e.name);
        c("dmemAddr", dut.dmem_addr, e.maddr, e.name);
        c("dmemIn", dut.dmem_wdata, e.mdata, e.name);
        @(posedge clk); #1;
        c("next PC", pc, e.next_pc, e.name);
        if (e.wreg >= 0) begin
          dbg_reg_id = regid_t'(e.wreg); #1;
          c("written register", dbg_reg_val, e.wval, e.name);
        end
      end else begin
        @(posedge clk); #1;
      end
    end
    checks++;
    if (seen != ex.num() || stat != STAT_HLT || pc != x_halt) begin
      failures++;
      $display("FAIL ran %0d of %0d exercises, stat %0d pc %h", seen, ex.num(), stat, pc);
    end
    // the value stored by rmmovq and the call's return address are in memory
    checks++;
    if ({dut.u_mem.mem[BASE+23], dut.u_mem.mem[BASE+22], dut.u_mem.mem[BASE+21], dut.u_mem.mem[BASE+20],
         dut.u_mem.mem[BASE+19], dut.u_mem.mem[BASE+18], dut.u_mem.mem[BASE+17], dut.u_mem.mem[BASE+16]} != 64'd12) begin
      failures++;
      $display("FAIL rmmovq value not in memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
