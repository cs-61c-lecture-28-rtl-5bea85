// ifetch_unit: instruction fetch unit of the single-cycle processor.
//
// The program counter addresses the instruction memory, whose word appears
// combinationally on `instruction`. At every rising clock edge the PC takes
// the address chosen by the next address logic: PC + 4, or the branch target
// when npc_sel = NPC_BRANCH. One instruction is fetched per cycle.
//
// The PC holds only bits 31:2; its two lowest bits are always 00, since
// instructions are word aligned. Reset (synchronous, active high) sets the
// PC to RESET_PC; reset and its value are this design's choices.
module ifetch_unit
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter string       INIT_FILE  = "",
  parameter word_t       RESET_PC   = '0
) (
  input  logic        clk,
  input  logic        rst,
  input  npc_sel_e    npc_sel,
  input  logic [15:0] imm16,
  output word_t       pc,
  output word_t       instruction
);

  logic [XLEN-3:0] pc_hi;
  word_t           pc_plus4;
  word_t           npc;

  wen_register #(.N(XLEN-2), .RESET_VALUE(RESET_PC[XLEN-1:2])) u_pc (
    .clk     (clk),
    .rst     (rst),
    .write_en(1'b1),
    .data_in (npc[XLEN-1:2]),
    .data_out(pc_hi)
  );

  always_comb pc = {pc_hi, 2'b00};

  next_addr_logic u_nal (
    .pc      (pc),
    .imm16   (imm16),
    .npc_sel (npc_sel),
    .pc_plus4(pc_plus4),
    .npc     (npc)
  );

  inst_memory #(.DEPTH(IMEM_DEPTH), .INIT_FILE(INIT_FILE)) u_imem (
    .adr        (pc),
    .instruction(instruction)
  );

endmodule
