// mips_pkg: types and constants shared by the MIPS-lite single-cycle processor.
//
// It holds the instruction field layout (R-type and I-type, 32 bits), the
// opcode and function-code values of the six MIPS-lite instructions, the ALU
// operation encoding (ALUctr), and the bundle of control points that the
// control unit drives into the datapath.
//
// The field positions (op 31:26, rs 25:21, rt 20:16, rd 15:11, shamt 10:6,
// funct 5:0, imm16 15:0) follow the MIPS instruction formats. The numeric
// opcode and funct values are the standard MIPS encodings; the ALUctr
// encoding and the control bundle layout are this design's own choice.
package mips_pkg;

  localparam int unsigned XLEN = 32;   // data path and instruction width
  localparam int unsigned NREGS = 32;  // architectural registers
  localparam int unsigned RADDR = 5;   // register specifier width

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [RADDR-1:0] reg_addr_t;

  // Primary opcode field (bits 31:26).
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ORI   = 6'h0d,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // Function field (bits 5:0) of the R-type instructions used here.
  localparam logic [5:0] FUNCT_ADDU = 6'h21;
  localparam logic [5:0] FUNCT_SUBU = 6'h23;

  // ALU operation. ADD, SUB and OR are what MIPS-lite needs; AND and SLT are
  // the two further operations of the full MIPS ALU.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_OR  = 3'd2,
    ALU_AND = 3'd3,
    ALU_SLT = 3'd4
  } aluctr_e;

  // Next-PC selection.
  typedef enum logic {
    NPC_PLUS4  = 1'b0,  // PC <- PC + 4
    NPC_BRANCH = 1'b1   // PC <- PC + 4 + (sign_ext(Imm16) || 00)
  } npc_sel_e;

  // Control points of the single-cycle datapath.
  typedef struct packed {
    logic     reg_dst;     // 1: write register is rd, 0: rt
    logic     reg_wr;      // register file write enable
    logic     ext_op;      // 1: sign-extend imm16, 0: zero-extend
    logic     alu_src;     // 1: ALU B input is the extended immediate, 0: busB
    aluctr_e  alu_ctr;     // ALU operation
    logic     mem_wr;      // data memory write enable
    logic     mem_to_reg;  // 1: busW comes from data memory, 0: from the ALU
    logic     branch;      // instruction is beq: take the branch if equal
  } ctrl_t;

  // Instruction fields.
  typedef struct packed {
    logic [5:0] op;
    reg_addr_t  rs;
    reg_addr_t  rt;
    reg_addr_t  rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

  typedef struct packed {
    logic [5:0]  op;
    reg_addr_t   rs;
    reg_addr_t   rt;
    logic [15:0] imm16;
  } itype_t;

endpackage
