// y86_pkg: types and constants shared by the single-cycle Y86-64 processor.
//
// Holds the instruction codes (icode), the ALU function codes, the
// condition-function codes (ifun of jXX/cmovXX), the register numbers the
// datapath names directly (%rsp and the "no register" number 0xF), the
// processor status, and the select encodings of the datapath MUXes that the
// control logic drives.  The opcode values, register numbers and ALU codes
// are the standard Y86-64 encoding; the MUX select encodings are this
// design's own.
package y86_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  regid_t;

  // Instruction codes (upper nibble of the first instruction byte).
  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,  // rrmovq and cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // ALU functions (ifun of OPq).
  typedef enum logic [3:0] {
    ALU_ADD = 4'h0,
    ALU_SUB = 4'h1,
    ALU_AND = 4'h2,
    ALU_XOR = 4'h3
  } alufn_t;

  // Condition functions (ifun of jXX and cmovXX).
  localparam logic [3:0] C_ALWAYS = 4'h0;
  localparam logic [3:0] C_LE     = 4'h1;
  localparam logic [3:0] C_L      = 4'h2;
  localparam logic [3:0] C_E      = 4'h3;
  localparam logic [3:0] C_NE     = 4'h4;
  localparam logic [3:0] C_GE     = 4'h5;
  localparam logic [3:0] C_G      = 4'h6;

  localparam regid_t R_RSP  = 4'h4;
  localparam regid_t R_NONE = 4'hF;

  // Processor status.
  typedef enum logic [1:0] {
    STAT_AOK = 2'd0,  // running
    STAT_HLT = 2'd1,  // executed halt
    STAT_INS = 2'd2   // met an invalid instruction
  } stat_t;

  // Condition codes held between instructions.
  typedef struct packed {
    logic sf;  // sign flag
    logic zf;  // zero flag
  } cc_t;

  // MUX selects driven by the control logic.
  typedef enum logic [1:0] {ALUA_VALA, ALUA_VALC, ALUA_EIGHT} alua_sel_t;
  typedef enum logic       {ALUB_VALB, ALUB_ZERO}             alub_sel_t;
  typedef enum logic       {MADDR_VALE, MADDR_VALB}           maddr_sel_t;
  typedef enum logic       {MDATA_VALA, MDATA_VALP}           mdata_sel_t;
  typedef enum logic [1:0] {PC_VALP, PC_VALC, PC_VALM, PC_HOLD} pc_sel_t;

  // Control word produced for one instruction.
  typedef struct packed {
    regid_t     src_a;
    regid_t     src_b;
    regid_t     dst_e;
    regid_t     dst_m;
    alua_sel_t  alua_sel;
    alub_sel_t  alub_sel;
    alufn_t     alu_fn;
    logic       set_cc;
    maddr_sel_t maddr_sel;
    mdata_sel_t mdata_sel;
    logic       mem_read;
    logic       mem_write;
    pc_sel_t    pc_sel;
  } ctrl_t;

endpackage
