// y86_iss_pkg: instruction-level reference model and assembler helpers
// used by the processor test benches.
//
// y86_iss executes one Y86-64 instruction per call of step() on its own
// copy of memory, registers, condition codes (SF, ZF) and PC, written
// directly from the instruction set's meaning rather than from the
// datapath.  y86_asm appends the byte encodings of instructions to a buffer
// so a test can build programs without an external assembler.
package y86_iss_pkg;

  // ---------------- assembler ----------------
  // Appends instruction encodings to code[] starting at pos.
  class y86_asm;
    logic [7:0]  code [4096];
    int unsigned pos;

    function new();
      pos = 0;
      foreach (code[i]) code[i] = 8'h00;
    endfunction

    function void b8(logic [7:0] v);
      code[pos] = v;
      pos++;
    endfunction
    function void b64(longint unsigned v);
      for (int i = 0; i < 8; i++) b8(8'(v >> (8 * i)));
    endfunction
    // Overwrite the 8-byte constant at byte offset 'at' (forward labels).
    function void patch64(int unsigned at, longint unsigned v);
      for (int i = 0; i < 8; i++) code[at + i] = 8'(v >> (8 * i));
    endfunction
    function void rr(bit [3:0] icode, bit [3:0] ifun, bit [3:0] ra, bit [3:0] rb);
      b8({icode, ifun});
      b8({ra, rb});
    endfunction

    function void halt();                              b8(8'h00); endfunction
    function void nop();                               b8(8'h10); endfunction
    function void ret();                               b8(8'h90); endfunction
    function void cmov(bit [3:0] cnd, bit [3:0] ra, bit [3:0] rb); rr(4'h2, cnd, ra, rb); endfunction
    function void op(bit [3:0] fn, bit [3:0] ra, bit [3:0] rb);    rr(4'h6, fn, ra, rb); endfunction
    function void push(bit [3:0] ra);                  rr(4'hA, 4'h0, ra, 4'hF); endfunction
    function void pop(bit [3:0] ra);                   rr(4'hB, 4'h0, ra, 4'hF); endfunction
    function void irmov(longint unsigned v, bit [3:0] rb);
      rr(4'h3, 4'h0, 4'hF, rb); b64(v);
    endfunction
    function void rmmov(bit [3:0] ra, longint unsigned d, bit [3:0] rb);
      rr(4'h4, 4'h0, ra, rb); b64(d);
    endfunction
    function void mrmov(longint unsigned d, bit [3:0] rb, bit [3:0] ra);
      rr(4'h5, 4'h0, ra, rb); b64(d);
    endfunction
    function void jxx(bit [3:0] cnd, longint unsigned dest);
      b8({4'h7, cnd}); b64(dest);
    endfunction
    function void call(longint unsigned dest);
      b8(8'h80); b64(dest);
    endfunction
  endclass

  // ---------------- reference model ----------------
  class y86_iss;
    int unsigned     mem_bytes;
    byte unsigned    mem[];
    longint unsigned r[15];
    bit              sf, zf;
    longint unsigned pc;
    int              stat;   // 0 AOK, 1 HLT, 2 INS

    function new(int unsigned mem_bytes);
      this.mem_bytes = mem_bytes;
      mem = new[mem_bytes];
      reset();
    endfunction

    function void reset();
      foreach (r[i]) r[i] = 0;
      sf = 0; zf = 1; pc = 0; stat = 0;
    endfunction

    function byte unsigned rd8(longint unsigned a);
      return mem[a % mem_bytes];
    endfunction
    function longint unsigned rd64(longint unsigned a);
      longint unsigned v = 0;
      for (int i = 7; i >= 0; i--) v = (v << 8) | rd8(a + i);
      return v;
    endfunction
    function void wr64(longint unsigned a, longint unsigned v);
      for (int i = 0; i < 8; i++) mem[(a + i) % mem_bytes] = 8'(v >> (8 * i));
    endfunction
    function longint unsigned getr(bit [3:0] id);
      return (id == 4'hF) ? 0 : r[id];
    endfunction
    function void setr(bit [3:0] id, longint unsigned v);
      if (id != 4'hF) r[id] = v;
    endfunction
    function bit cond(bit [3:0] fn);
      case (fn)
        0: return 1;
        1: return sf | zf;
        2: return sf;
        3: return zf;
        4: return !zf;
        5: return !sf;
        6: return !sf && !zf;
        default: return 0;
      endcase
    endfunction

    // Execute the instruction at pc.
    function void step();
      bit [3:0] ic, fn, ra, rb;
      longint unsigned rsp, v, res;
      if (stat != 0) return;
      ic = rd8(pc) >> 4; fn = rd8(pc) & 4'hF;
      ra = rd8(pc + 1) >> 4; rb = rd8(pc + 1) & 4'hF;
      case (ic)
        4'h0: if (fn == 0) stat = 1; else stat = 2;
        4'h1: if (fn == 0) pc += 1; else stat = 2;
        4'h2: if (fn <= 6) begin if (cond(fn)) setr(rb, getr(ra)); pc += 2; end else stat = 2;
        4'h3: if (fn == 0) begin setr(rb, rd64(pc + 2)); pc += 10; end else stat = 2;
        4'h4: if (fn == 0) begin wr64(getr(rb) + rd64(pc + 2), getr(ra)); pc += 10; end else stat = 2;
        4'h5: if (fn == 0) begin setr(ra, rd64(getr(rb) + rd64(pc + 2))); pc += 10; end else stat = 2;
        4'h6: if (fn <= 3) begin
                case (fn)
                  0: res = getr(rb) + getr(ra);
                  1: res = getr(rb) - getr(ra);
                  2: res = getr(rb) & getr(ra);
                  default: res = getr(rb) ^ getr(ra);
                endcase
                setr(rb, res); sf = res[63]; zf = (res == 0); pc += 2;
              end else stat = 2;
        4'h7: if (fn <= 6) pc = cond(fn) ? rd64(pc + 1) : pc + 9; else stat = 2;
        4'h8: if (fn == 0) begin
                rsp = r[4] - 8; wr64(rsp, pc + 9); r[4] = rsp; pc = rd64(pc + 1);
              end else stat = 2;
        4'h9: if (fn == 0) begin
                v = rd64(r[4]); r[4] = r[4] + 8; pc = v;
              end else stat = 2;
        4'hA: if (fn == 0) begin
                v = getr(ra); rsp = r[4] - 8; wr64(rsp, v); r[4] = rsp; pc += 2;
              end else stat = 2;
        4'hB: if (fn == 0) begin
                v = rd64(r[4]); r[4] = r[4] + 8; setr(ra, v); pc += 2;
              end else stat = 2;
        default: stat = 2;
      endcase
    endfunction
  endclass

endpackage
