// tb_y86_regfile: self-checking test of the register file.
// Random writes on both ports against a shadow array; checks the reset
// value, that 0xF reads 0 and writes nothing, that writes appear only after
// the clock edge, and that the M port wins when both ports name a register.
module tb_y86_regfile;
  import y86_pkg::*;

  logic   clk = 0, rst;
  regid_t src_a, src_b, dst_e, dst_m, dbg_id;
  word_t  val_a, val_b, val_e, val_m, dbg_val;
  word_t  shadow [15];
  int     checks = 0, failures = 0;

  y86_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t sh(regid_t id);
    return id == 4'hF ? 64'd0 : shadow[id];
  endfunction

  task automatic check_reads();
    for (int i = 0; i < 16; i++) begin
      src_a = 4'(i); src_b = 4'(15 - i); dbg_id = 4'(i);
      #1;
      checks++;
      if (val_a !== sh(src_a) || val_b !== sh(src_b) || dbg_val !== sh(dbg_id)) begin
        failures++;
        $display("FAIL read r%0d: a=%h b=%h dbg=%h", i, val_a, val_b, dbg_val);
      end
    end
  endtask

  initial begin
    rst = 1; dst_e = 4'hF; dst_m = 4'hF; val_e = 0; val_m = 0;
    src_a = 0; src_b = 0; dbg_id = 0;
    @(posedge clk); #1;
    rst = 0;
    foreach (shadow[i]) shadow[i] = 0;
    check_reads();
    // same register on both ports: M wins
    dst_e = 4'd3; val_e = 64'hEEEE; dst_m = 4'd3; val_m = 64'hAAAA;
    src_a = 4'd3; #1;
    checks++;
    if (val_a !== 64'd0) begin failures++; $display("FAIL write visible before edge"); end
    @(posedge clk); #1;
    shadow[3] = 64'hAAAA;
    dst_e = 4'hF; dst_m = 4'hF;
    check_reads();
    for (int n = 0; n < 400; n++) begin
      dst_e = 4'($urandom_range(0, 15));
      dst_m = 4'($urandom_range(0, 15));
      val_e = {$urandom, $urandom};
      val_m = {$urandom, $urandom};
      @(posedge clk); #1;
      if (dst_e != 4'hF) shadow[dst_e] = val_e;
      if (dst_m != 4'hF) shadow[dst_m] = val_m;
      dst_e = 4'hF; dst_m = 4'hF;
      if (n % 20 == 0) check_reads();
      else begin
        src_a = 4'($urandom_range(0, 15)); src_b = 4'($urandom_range(0, 15));
        #1;
        checks++;
        if (val_a !== sh(src_a) || val_b !== sh(src_b)) begin
          failures++;
          $display("FAIL random read r%0d r%0d", src_a, src_b);
        end
      end
    end
    // reset clears
    rst = 1; @(posedge clk); #1; rst = 0;
    foreach (shadow[i]) shadow[i] = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
