// tb_y86_pc_update: self-checking test of the PC register and next-PC MUX.
// Checks the reset address, that each select loads valP, valC, valM or
// holds, and that the new PC appears one clock edge after the select.
module tb_y86_pc_update;
  import y86_pkg::*;

  logic    clk = 0, rst;
  pc_sel_t pc_sel;
  word_t   valp, valc, valm, pc, model;
  int      checks = 0, failures = 0;

  y86_pc_update #(.RESET_PC(64'h40)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pc_sel = PC_VALP; valp = 1; valc = 2; valm = 3;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (pc !== 64'h40) begin failures++; $display("FAIL reset pc %h", pc); end
    model = 64'h40;
    for (int i = 0; i < 500; i++) begin
      pc_sel = pc_sel_t'($urandom_range(0, 3));
      valp = {$urandom, $urandom};
      valc = {$urandom, $urandom};
      valm = {$urandom, $urandom};
      #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc changed before edge"); end
      case (pc_sel)
        PC_VALP: model = valp;
        PC_VALC: model = valc;
        PC_VALM: model = valm;
        default: model = model;
      endcase
      @(posedge clk); #1;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL sel=%0d pc=%h want %h", pc_sel, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
