// tb_y86_cc: self-checking test of the condition-code register and Cnd MUX.
// Checks the reset flags, that the flags change only when set_cc is high,
// and Cnd for every ifun and flag combination against a truth table.
module tb_y86_cc;
  import y86_pkg::*;

  logic       clk = 0, rst, set_cc;
  cc_t        new_cc, cc;
  logic [3:0] ifun;
  logic       cnd;
  int         checks = 0, failures = 0;

  y86_cc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected Cnd, indexed by ifun; each entry is the 4-bit truth table over
  // {sf, zf} = 00, 01, 10, 11 (bit index = {sf, zf}).
  localparam logic [3:0] TT [16] = '{
    4'b1111,  // always
    4'b1110,  // le: sf|zf
    4'b1100,  // l: sf
    4'b1010,  // e: zf
    4'b0101,  // ne
    4'b0011,  // ge
    4'b0001,  // g
    4'b0, 4'b0, 4'b0, 4'b0, 4'b0, 4'b0, 4'b0, 4'b0, 4'b0};

  task automatic expect_eq(logic got, logic want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b", what, got, want);
    end
  endtask

  initial begin
    rst = 1; set_cc = 0; new_cc = '{sf: 1'b1, zf: 1'b0}; ifun = 0;
    @(posedge clk); #1;
    rst = 0;
    expect_eq(cc.zf, 1'b1, "reset zf");
    expect_eq(cc.sf, 1'b0, "reset sf");
    // no write without set_cc
    @(posedge clk); #1;
    expect_eq(cc.zf, 1'b1, "hold zf");
    for (int s = 0; s < 4; s++) begin
      new_cc = '{sf: s[1], zf: s[0]};
      set_cc = 1;
      @(posedge clk); #1;
      set_cc = 0;
      new_cc = '{sf: ~s[1], zf: ~s[0]};
      expect_eq(cc.sf, s[1], "written sf");
      expect_eq(cc.zf, s[0], "written zf");
      for (int f = 0; f < 16; f++) begin
        ifun = 4'(f);
        #1;
        expect_eq(cnd, TT[f][s], $sformatf("cnd ifun=%0d sf=%b zf=%b", f, s[1], s[0]));
      end
      @(posedge clk); #1;
      expect_eq(cc.sf, s[1], "held sf");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
