// tb_y86_fetch: self-checking test of the instruction split and length logic.
// Encodes every instruction type with random operands and checks icode,
// ifun, rA, rB, valC, the length (1, 2, 9 or 10 bytes), valP and validity.
module tb_y86_fetch;
  import y86_pkg::*;
  import y86_iss_pkg::*;

  word_t           pc, valc, valp;
  logic [9:0][7:0] ibytes;
  logic [3:0]      icode, ifun, ilen;
  regid_t          ra, rb;
  logic            instr_valid;
  int              checks = 0, failures = 0;

  y86_fetch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  y86_asm a;

  task automatic try(logic [3:0] eic, logic [3:0] efn, regid_t era, regid_t erb,
                     word_t evc, int elen, logic evalid);
    pc = {$urandom, $urandom};
    for (int i = 0; i < 10; i++) ibytes[i] = (i < int'(a.pos)) ? a.code[i] : 8'($urandom);
    #1;
    checks++;
    if (instr_valid !== evalid ||
        (evalid && (icode !== eic || ifun !== efn || ra !== era || rb !== erb || valc !== evc || ilen !== 4'(elen) ||
                    valp !== pc + word_t'(elen)))) begin
      failures++;
      $display("FAIL %h%h: ic=%h fn=%h ra=%h rb=%h valc=%h len=%0d valp-pc=%0d valid=%b",
               eic, efn, icode, ifun, ra, rb, valc, ilen, valp - pc, instr_valid);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      automatic bit [3:0] r1 = 4'($urandom_range(0, 14)), r2 = 4'($urandom_range(0, 14));
      automatic bit [3:0] cond = 4'($urandom_range(0, 6)), op = 4'($urandom_range(0, 3));
      automatic longint unsigned k = {$urandom, $urandom};
      a = new; a.halt();          try(4'h0, 0,    4'hF, 4'hF, 0, 1, 1);
      a = new; a.nop();           try(4'h1, 0,    4'hF, 4'hF, 0, 1, 1);
      a = new; a.cmov(cond, r1, r2); try(4'h2, cond, r1, r2, 0, 2, 1);
      a = new; a.irmov(k, r2);    try(4'h3, 0,    4'hF, r2,   k, 10, 1);
      a = new; a.rmmov(r1, k, r2); try(4'h4, 0,   r1,   r2,   k, 10, 1);
      a = new; a.mrmov(k, r2, r1); try(4'h5, 0,   r1,   r2,   k, 10, 1);
      a = new; a.op(op, r1, r2);  try(4'h6, op,   r1,   r2,   0, 2, 1);
      a = new; a.jxx(cond, k);    try(4'h7, cond, 4'hF, 4'hF, k, 9, 1);
      a = new; a.call(k);         try(4'h8, 0,    4'hF, 4'hF, k, 9, 1);
      a = new; a.ret();           try(4'h9, 0,    4'hF, 4'hF, 0, 1, 1);
      a = new; a.push(r1);        try(4'hA, 0,    r1,   4'hF, 0, 2, 1);
      a = new; a.pop(r1);         try(4'hB, 0,    r1,   4'hF, 0, 2, 1);
      // invalid encodings
      a = new; a.b8({4'($urandom_range(12, 15)), 4'h0}); try(0, 0, 0, 0, 0, 0, 0);
      a = new; a.b8(8'h64);       try(4'h6, 4'h4, 0, 0, 0, 0, 0);
      a = new; a.b8(8'h77);       try(4'h7, 4'h7, 0, 0, 0, 0, 0);
      a = new; a.b8(8'h11);       try(4'h1, 4'h1, 0, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
