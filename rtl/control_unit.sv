// control_unit: main decoder of the single-cycle MIPS-lite processor.
//
// From the opcode and function fields of the current instruction, and the
// ALU's equal flag, it sets every control point of the datapath for the
// whole cycle. The settings realise each instruction's register transfer:
//
//   instr  RegDst RegWr ExtOp ALUSrc ALUctr MemWr MemtoReg nPC_sel
//   addu   rd     1     -     busB   ADD    0     ALU      +4
//   subu   rd     1     -     busB   SUB    0     ALU      +4
//   ori    rt     1     zero  imm    OR     0     ALU      +4
//   lw     rt     1     sign  imm    ADD    0     Mem      +4
//   sw     -      0     sign  imm    ADD    1     -        +4
//   beq    -      0     -     busB   SUB    0     -        branch if equal
//
// ("-" entries are driven to 0.) Any other instruction writes nothing and
// advances the PC by 4, so it acts as a no-operation. Purely combinational.
// Which signals exist follows the datapath drawing; the decoding of
// unlisted instructions and the don't-care values are this design's choice.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       equal,
  output ctrl_t      ctrl,
  output npc_sel_e   npc_sel
);

  always_comb begin
    ctrl = '{reg_dst: 1'b0, reg_wr: 1'b0, ext_op: 1'b0, alu_src: 1'b0,
             alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0,
             branch: 1'b0};
    case (op)
      OP_RTYPE: begin
        if (funct == FUNCT_ADDU || funct == FUNCT_SUBU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FUNCT_SUBU) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_ctr = ALU_SUB;
        ctrl.branch  = 1'b1;
      end
      default: ;
    endcase
  end

  // nPC_sel depends on the ALU's equal flag, which itself depends on the
  // decoded ALU controls; it is kept apart from the decoded bundle.
  always_comb npc_sel = (ctrl.branch && equal) ? NPC_BRANCH : NPC_PLUS4;

endmodule
