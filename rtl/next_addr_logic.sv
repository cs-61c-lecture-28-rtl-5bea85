// next_addr_logic: computes the address of the next instruction.
//
// One adder forms PC + 4. A second adder adds the branch offset to it: the
// PC extender sign-extends imm16 and appends two zero bits (a word offset
// turned into a byte offset). A multiplexer steered by npc_sel then picks
//   NPC_PLUS4:  PC + 4
//   NPC_BRANCH: PC + 4 + (sign_ext(imm16) || 00)
// Purely combinational. The structure (two adders, PC extender, one
// multiplexer) follows the single-cycle datapath drawing.
module next_addr_logic
  import mips_pkg::*;
(
  input  word_t    pc,
  input  logic [15:0] imm16,
  input  npc_sel_e npc_sel,
  output word_t    pc_plus4,
  output word_t    npc
);

  word_t pc_ext;
  word_t branch_target;
  logic  unused_c0;
  logic  unused_c1;

  // PC extender: sign_ext(imm16) || 00
  always_comb pc_ext = {{14{imm16[15]}}, imm16, 2'b00};

  adder #(.WIDTH(XLEN)) u_add4 (
    .a        (pc),
    .b        (word_t'(4)),
    .carry_in (1'b0),
    .sum      (pc_plus4),
    .carry_out(unused_c0)
  );

  adder #(.WIDTH(XLEN)) u_add_br (
    .a        (pc_plus4),
    .b        (pc_ext),
    .carry_in (1'b0),
    .sum      (branch_target),
    .carry_out(unused_c1)
  );

  mux2 #(.WIDTH(XLEN)) u_mux (
    .in0(pc_plus4),
    .in1(branch_target),
    .sel(npc_sel == NPC_BRANCH),
    .y  (npc)
  );

endmodule
