// tb_control_unit: self-checking test of the main decoder.
//
// For each MIPS-lite instruction (and for beq with equal both 0 and 1) it
// compares every control point with a table written out in the testbench.
// Unlisted opcodes and R-type function codes must produce no register write,
// no memory write and PC + 4.
module tb_control_unit;
  import mips_pkg::*;
  logic [5:0] op, funct;
  logic       eq;
  ctrl_t      c;
  npc_sel_e   ns;
  int checks = 0, failures = 0;

  control_unit dut (.op(op), .funct(funct), .equal(eq), .ctrl(c), .npc_sel(ns));

  // expected: {reg_dst, reg_wr, ext_op, alu_src, alu_ctr, mem_wr, mem_to_reg, npc_sel}
  task automatic check_one(string name, logic [5:0] top, logic [5:0] tfn, logic teq,
                           logic e_dst, logic e_wr, logic e_ext, logic e_src,
                           aluctr_e e_alu, logic e_mwr, logic e_m2r, npc_sel_e e_ns,
                           logic care_dst, logic care_ext, logic care_alu);
    op = top; funct = tfn; eq = teq;
    #1;
    checks++;
    if ((care_dst && c.reg_dst !== e_dst) || c.reg_wr !== e_wr ||
        (care_ext && c.ext_op !== e_ext) || c.alu_src !== e_src ||
        (care_alu && c.alu_ctr !== e_alu) || c.mem_wr !== e_mwr ||
        (e_wr && c.mem_to_reg !== e_m2r) || ns !== e_ns) begin
      failures++;
      $display("FAIL %s: dst=%b wr=%b ext=%b src=%b alu=%s mwr=%b m2r=%b ns=%s",
               name, c.reg_dst, c.reg_wr, c.ext_op, c.alu_src, c.alu_ctr.name(),
               c.mem_wr, c.mem_to_reg, ns.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      //                                    dst wr ext src alu     mwr m2r ns          care dst ext alu
      check_one("addu", OP_RTYPE, FUNCT_ADDU, 1'(e), 1, 1, 0, 0, ALU_ADD, 0, 0, NPC_PLUS4, 1, 0, 1);
      check_one("subu", OP_RTYPE, FUNCT_SUBU, 1'(e), 1, 1, 0, 0, ALU_SUB, 0, 0, NPC_PLUS4, 1, 0, 1);
      check_one("ori",  OP_ORI,  6'($urandom), 1'(e), 0, 1, 0, 1, ALU_OR,  0, 0, NPC_PLUS4, 1, 1, 1);
      check_one("lw",   OP_LW,   6'($urandom), 1'(e), 0, 1, 1, 1, ALU_ADD, 0, 1, NPC_PLUS4, 1, 1, 1);
      check_one("sw",   OP_SW,   6'($urandom), 1'(e), 0, 0, 1, 1, ALU_ADD, 1, 0, NPC_PLUS4, 0, 1, 1);
      check_one("beq",  OP_BEQ,  6'($urandom), 1'(e), 0, 0, 0, 0, ALU_SUB, 0, 0,
                e ? NPC_BRANCH : NPC_PLUS4, 0, 0, 1);
    end
    // everything else is a no-operation
    for (int o = 0; o < 64; o++) begin
      if (o == OP_RTYPE || o == OP_ORI || o == OP_LW || o == OP_SW || o == OP_BEQ) continue;
      check_one("other op", 6'(o), 6'($urandom), 1'($urandom), 0, 0, 0, 0, ALU_ADD, 0, 0,
                NPC_PLUS4, 0, 0, 0);
    end
    for (int f = 0; f < 64; f++) begin
      if (f == FUNCT_ADDU || f == FUNCT_SUBU) continue;
      check_one("other funct", OP_RTYPE, 6'(f), 1'($urandom), 0, 0, 0, 0, ALU_ADD, 0, 0,
                NPC_PLUS4, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
