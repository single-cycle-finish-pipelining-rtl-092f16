// y86_memory: unified byte-addressed memory of the single-cycle processor.
//
// Instructions and data live in one array, so a program can read and write
// the same bytes it executes.  Three ports share the array:
//   * instruction port: the IFETCH_BYTES (10) bytes starting at imem_addr,
//     read combinationally (the longest Y86-64 instruction is 10 bytes);
//   * data port: the 64-bit little-endian word at dmem_addr, read
//     combinationally (valM); when dmem_we is set the 8 bytes of dmem_wdata
//     are written at the rising clock edge, i.e. at the end of the cycle;
//   * load port: one byte written at the rising edge when load_we is set,
//     used to place a program in memory while the processor is in reset.
// Addresses wrap modulo MEM_BYTES.  Reads need no alignment.
//
// That memory is read as soon as its address is present and written at the
// end of the cycle when the write enable is set follows the single-cycle
// timing of the SEQ processor.  The size, the address wrap and the load port
// are this design's own choices.
module y86_memory
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES    = 1024,
  parameter int unsigned IFETCH_BYTES = 10
) (
  input  logic                          clk,
  // instruction port
  input  word_t                         imem_addr,
  output logic [IFETCH_BYTES-1:0][7:0]  imem_bytes,
  // data port
  input  word_t                         dmem_addr,
  output word_t                         dmem_rdata,
  input  logic                          dmem_we,
  input  word_t                         dmem_wdata,
  // program load port
  input  logic                          load_we,
  input  word_t                         load_addr,
  input  logic [7:0]                    load_data
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  initial begin
    assert (MEM_BYTES == (1 << AW))
      else $error("MEM_BYTES must be a power of two");
  end

  logic [7:0] mem [MEM_BYTES];

  logic [AW-1:0] ibase, dbase;
  assign ibase = imem_addr[AW-1:0];
  assign dbase = dmem_addr[AW-1:0];

  always_comb begin
    for (int i = 0; i < IFETCH_BYTES; i++)
      imem_bytes[i] = mem[AW'(ibase + AW'(i))];
    for (int i = 0; i < 8; i++)
      dmem_rdata[8*i +: 8] = mem[AW'(dbase + AW'(i))];
  end

  always_ff @(posedge clk) begin
    if (dmem_we)
      for (int i = 0; i < 8; i++)
        mem[AW'(dbase + AW'(i))] <= dmem_wdata[8*i +: 8];
    if (load_we)
      mem[load_addr[AW-1:0]] <= load_data;
  end

endmodule
