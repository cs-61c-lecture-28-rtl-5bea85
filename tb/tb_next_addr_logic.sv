// tb_next_addr_logic: self-checking test of the next address logic.
//
// For random word-aligned PCs and random 16-bit offsets (including the
// largest forward and backward branches and PC wrap-around), checks that
// pc_plus4 = PC + 4 and that npc is PC + 4 for NPC_PLUS4 and
// PC + 4 + sign_ext(imm16) * 4 for NPC_BRANCH.
module tb_next_addr_logic;
  import mips_pkg::*;
  word_t pc, p4, npc;
  logic [15:0] imm;
  npc_sel_e sel;
  int checks = 0, failures = 0;

  next_addr_logic dut (.pc(pc), .imm16(imm), .npc_sel(sel), .pc_plus4(p4), .npc(npc));

  task automatic check_one(word_t tpc, logic [15:0] timm);
    word_t want_p4, want_br;
    int signed off;
    pc = tpc; imm = timm;
    off = int'($signed(timm)) * 4;
    want_p4 = tpc + 32'd4;
    want_br = want_p4 + word_t'(off);
    sel = NPC_PLUS4; #1;
    checks++;
    if (p4 !== want_p4 || npc !== want_p4) begin
      failures++; $display("FAIL +4 pc=%h p4=%h npc=%h", tpc, p4, npc);
    end
    sel = NPC_BRANCH; #1;
    checks++;
    if (npc !== want_br) begin
      failures++; $display("FAIL branch pc=%h imm=%h npc=%h want %h", tpc, timm, npc, want_br);
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
    check_one(32'h0, 16'h0);
    check_one(32'h0, 16'hFFFF);          // branch to itself: -1 word
    check_one(32'h100, 16'h7FFF);
    check_one(32'h0004_0000, 16'h8000);
    check_one(32'hFFFF_FFFC, 16'h0001);  // wraps
    for (int i = 0; i < 500; i++) check_one($urandom & 32'hFFFF_FFFC, 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
