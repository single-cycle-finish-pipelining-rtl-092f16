// tb_y86_memory: self-checking test of the unified memory.
// Loads random bytes through the load port, then checks the 10-byte
// instruction port and the 64-bit little-endian data port at random
// (unaligned, wrapping) addresses against a shadow array; checks that a data
// write lands only at the clock edge and is seen by both read ports.
module tb_y86_memory;
  import y86_pkg::*;

  localparam int N = 1024;   // the memory's default size

  logic            clk = 0;
  word_t           imem_addr, dmem_addr, dmem_rdata, dmem_wdata, load_addr;
  logic [9:0][7:0] imem_bytes;
  logic            dmem_we, load_we;
  logic [7:0]      load_data;
  byte unsigned    shadow [N];
  int              checks = 0, failures = 0;

  y86_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ports();
    word_t w;
    imem_addr = {$urandom, $urandom};
    dmem_addr = {$urandom, $urandom};
    #1;
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (imem_bytes[i] !== shadow[(imem_addr + i) % N]) begin
        failures++;
        $display("FAIL ifetch byte %0d at %h", i, imem_addr);
      end
    end
    w = 0;
    for (int i = 7; i >= 0; i--) w = (w << 8) | word_t'(shadow[(dmem_addr + i) % N]);
    checks++;
    if (dmem_rdata !== w) begin
      failures++;
      $display("FAIL data read at %h: %h want %h", dmem_addr, dmem_rdata, w);
    end
  endtask

  initial begin
    dmem_we = 0; load_we = 0; dmem_wdata = 0; load_addr = 0; load_data = 0;
    imem_addr = 0; dmem_addr = 0;
    for (int i = 0; i < N; i++) begin
      load_we = 1; load_addr = word_t'(i); load_data = 8'($urandom);
      shadow[i] = load_data;
      @(posedge clk); #1;
    end
    load_we = 0;
    repeat (100) check_ports();
    for (int n = 0; n < 100; n++) begin
      automatic word_t a = {$urandom, $urandom};
      automatic word_t v = {$urandom, $urandom};
      dmem_addr = a; dmem_wdata = v; dmem_we = 1;
      imem_addr = a;
      #1;
      checks++;
      if (imem_bytes[0] !== shadow[a % N]) begin
        failures++; $display("FAIL write visible before edge");
      end
      @(posedge clk); #1;
      dmem_we = 0;
      for (int i = 0; i < 8; i++) shadow[(a + i) % N] = 8'(v >> (8 * i));
      checks++;
      if (dmem_rdata !== v) begin failures++; $display("FAIL readback at %h", a); end
      check_ports();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
