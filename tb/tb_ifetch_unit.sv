// tb_ifetch_unit: self-checking test of the instruction fetch unit.
//
// Fills a 64-word instruction memory with distinct words (word i holds
// 32'hC0DE_0000 + i), resets the PC, then for many cycles picks a random
// nPC_sel and a random imm16. Each cycle it checks that the instruction
// shown is the word at the PC, and after the edge that the PC moved to
// PC + 4 or to PC + 4 + sign_ext(imm16) * 4. The PC must advance on every
// edge: one fetch per cycle.
module tb_ifetch_unit;
  import mips_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst;
  npc_sel_e sel;
  logic [15:0] imm;
  word_t pc, instr, model_pc;
  int checks = 0, failures = 0, cycles = 0, n_branch = 0, n_seq = 0;

  ifetch_unit #(.IMEM_DEPTH(D), .RESET_PC(32'h40)) dut (
    .clk(clk), .rst(rst), .npc_sel(sel), .imm16(imm), .pc(pc), .instruction(instr));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) dut.u_imem.mem[i] = 32'hC0DE_0000 + word_t'(i);
    rst = 1; sel = NPC_PLUS4; imm = 0;
    @(posedge clk); #1;
    rst = 0;
    model_pc = 32'h40;
    checks++;
    if (pc !== model_pc) begin failures++; $display("FAIL reset pc %h", pc); end
    for (int n = 0; n < 1000; n++) begin
      sel = npc_sel_e'($urandom % 2);
      imm = 16'(int'($urandom % 41) - 20);   // -20 .. +20 words
      #1;
      checks++;
      if (instr !== 32'hC0DE_0000 + word_t'(pc[7:2])) begin
        failures++; $display("FAIL fetch pc=%h instr=%h", pc, instr);
      end
      @(posedge clk); #1;
      if (sel == NPC_BRANCH) begin
        model_pc = model_pc + 4 + word_t'(int'($signed(imm)) * 4);
        n_branch++;
      end else begin
        model_pc = model_pc + 4;
        n_seq++;
      end
      checks++;
      if (pc !== model_pc) begin failures++; $display("FAIL pc=%h want %h", pc, model_pc); end
      checks++;
      if (pc[1:0] !== 2'b00) begin failures++; $display("FAIL pc not word aligned"); end
    end
    if (n_branch == 0 || n_seq == 0) begin failures++; $display("FAIL: both paths not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
