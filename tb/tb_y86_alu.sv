// tb_y86_alu: self-checking test of the 64-bit ALU.
// Drives directed and random operands through all four functions and
// compares valE, SF and ZF with values computed here.
module tb_y86_alu;
  import y86_pkg::*;

  word_t  a, b, e;
  alufn_t fn;
  cc_t    f;
  int     checks = 0, failures = 0;

  y86_alu dut (.alu_a(a), .alu_b(b), .alu_fn(fn), .val_e(e), .new_cc(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t ta, word_t tb_, alufn_t tfn, word_t exp);
    a = ta; b = tb_; fn = tfn;
    #1;
    checks++;
    if (e !== exp || f.sf !== exp[63] || f.zf !== (exp == 0)) begin
      failures++;
      $display("FAIL fn=%0d a=%h b=%h: got %h sf=%b zf=%b, want %h", tfn, ta, tb_, e, f.sf, f.zf, exp);
    end
  endtask

  initial begin
    // directed: pushq/call form rsp-8, popq/ret rsp+8
    check(64'd8, 64'h100, ALU_SUB, 64'hF8);
    check(64'd8, 64'h100, ALU_ADD, 64'h108);
    check(64'd5, 64'd5, ALU_SUB, 64'd0);            // zero
    check(64'd6, 64'd5, ALU_SUB, 64'hFFFF_FFFF_FFFF_FFFF);  // negative
    check(64'hF0F0, 64'hFF00, ALU_AND, 64'hF000);
    check(64'hF0F0, 64'hFF00, ALU_XOR, 64'h0FF0);
    check(64'h1234, 64'h1234, ALU_XOR, 64'h0);
    for (int i = 0; i < 2000; i++) begin
      word_t ra, rb, exp;
      alufn_t rf;
      ra = {$urandom, $urandom};
      rb = {$urandom, $urandom};
      rf = alufn_t'($urandom_range(0, 3));
      case (rf)
        ALU_ADD: exp = rb + ra;
        ALU_SUB: exp = rb + ~ra + 64'd1;
        ALU_AND: exp = ~(~rb | ~ra);
        default: exp = (rb | ra) & ~(rb & ra);
      endcase
      check(ra, rb, rf, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
