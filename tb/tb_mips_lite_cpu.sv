// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite processor.
//
// The processor runs at its default sizes (1024-word instruction and data
// memories). Programs are placed in the instruction memory and the data
// memory is preset through hierarchical references. Every program ends in
// "halt: beq $0,$0,halt", a branch to itself.
//
// Alongside the processor runs an instruction-level reference model written
// in the testbench, which executes one instruction per step from its own
// copy of the registers, memory and PC. After every clock edge the PC and all
// 32 registers of the processor must equal the model's. The store that the
// processor is about to make and the register write it is about to make
// (RegWr, Rw and busW settled before the edge), and at the end the whole
// data memory, are also compared. The program must reach the halt address after exactly as many
// cycles as it has instructions to execute (one instruction per cycle).
//
// Program 1 is written out by hand: a loop that adds 10 + 9 + ... + 1 and
// stores each count to an array, then a load with a negative offset, a store
// and load of the sum, ori with bit 15 set (zero extension), a write to $0
// and a subtract that wraps to -1. Its final state is also compared with
// constants worked out by hand. Programs 2 onwards are random straight-line
// code with forward branches.
//
// Each mechanism is counted: addu, subu, ori, lw, sw, beq taken, beq not
// taken, an unknown instruction acting as a no-operation, a write to $0 being
// dropped, a negative branch offset, a negative load/store offset, and ori
// zero-extending an immediate with bit 15 set. One that never happens counts
// as a failure.
module tb_mips_lite_cpu;
  import mips_pkg::*;

  localparam int IDEPTH = 1024;
  localparam int DDEPTH = 1024;
  localparam int NRAND  = 40;     // random programs
  localparam int RLEN   = 300;    // instructions in each random program

  logic clk = 0, rst;
  word_t pc, instr, reg_wr_data, mem_addr, mem_wr_data;
  logic reg_wr, mem_wr;
  reg_addr_t reg_wr_addr;

  mips_lite_cpu dut (
    .clk(clk), .rst(rst), .pc(pc), .instr(instr),
    .reg_wr(reg_wr), .reg_wr_addr(reg_wr_addr), .reg_wr_data(reg_wr_data),
    .mem_wr(mem_wr), .mem_addr(mem_addr), .mem_wr_data(mem_wr_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- encoders
  function automatic word_t enc_r(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, fn};
  endfunction
  function automatic word_t addu(int rd, int rs, int rt); return enc_r(FUNCT_ADDU, rd, rs, rt); endfunction
  function automatic word_t subu(int rd, int rs, int rt); return enc_r(FUNCT_SUBU, rd, rs, rt); endfunction
  function automatic word_t enc_i(opcode_e op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t ori(int rt, int rs, int imm); return enc_i(OP_ORI, rt, rs, imm); endfunction
  function automatic word_t lw (int rt, int imm, int rs); return enc_i(OP_LW,  rt, rs, imm); endfunction
  function automatic word_t sw (int rt, int imm, int rs); return enc_i(OP_SW,  rt, rs, imm); endfunction
  function automatic word_t beq(int rs, int rt, int imm); return enc_i(OP_BEQ, rt, rs, imm); endfunction

  // ------------------------------------------------------- reference model
  word_t m_regs [32];
  word_t m_mem  [DDEPTH];
  word_t m_pc;
  word_t prog   [IDEPTH];

  // mechanism counters
  int n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_taken, n_beq_not, n_nop;
  int n_r0_write, n_neg_branch, n_neg_mem_off, n_ori_hi;

  function automatic int didx(word_t a);
    return int'(a[$clog2(DDEPTH)+1:2]);
  endfunction

  // Executes the instruction at m_pc. Returns the store it makes, if any,
  // and the register write it makes, if any (dest may be 0).
  task automatic model_step(output logic st, output word_t st_addr, output word_t st_data,
                            output logic wr, output int dest, output word_t res);
    word_t w, rs_v, rt_v, simm, zimm;
    logic [5:0] op, fn;
    int rs, rt, rd;
    w  = prog[m_pc[$clog2(IDEPTH)+1:2]];
    op = w[31:26]; rs = int'(w[25:21]); rt = int'(w[20:16]); rd = int'(w[15:11]); fn = w[5:0];
    rs_v = m_regs[rs]; rt_v = m_regs[rt];
    simm = word_t'(int'($signed(w[15:0])));
    zimm = {16'h0, w[15:0]};
    st = 0; st_addr = 0; st_data = 0; wr = 0; dest = 0; res = 0;
    m_pc = m_pc + 4;
    if (op == 6'h00 && fn == FUNCT_ADDU) begin
      res = rs_v + rt_v; dest = rd; wr = 1; n_addu++;
    end else if (op == 6'h00 && fn == FUNCT_SUBU) begin
      res = rs_v - rt_v; dest = rd; wr = 1; n_subu++;
    end else if (op == OP_ORI) begin
      res = rs_v | zimm; dest = rt; wr = 1; n_ori++;
      if (w[15]) n_ori_hi++;
    end else if (op == OP_LW) begin
      res = m_mem[didx(rs_v + simm)]; dest = rt; wr = 1; n_lw++;
      if (w[15]) n_neg_mem_off++;
    end else if (op == OP_SW) begin
      st = 1; st_addr = rs_v + simm; st_data = rt_v; n_sw++;
      m_mem[didx(st_addr)] = st_data;
      if (w[15]) n_neg_mem_off++;
    end else if (op == OP_BEQ) begin
      if (rs_v == rt_v) begin
        m_pc = m_pc + (simm << 2); n_beq_taken++;
        if (w[15]) n_neg_branch++;
      end else n_beq_not++;
    end else begin
      n_nop++;
    end
    if (wr) begin
      if (dest == 0) n_r0_write++;
      else m_regs[dest] = res;
    end
  endtask

  // ------------------------------------------------------------ harness
  task automatic load_program(int len, output word_t halt_addr);
    for (int i = 0; i < IDEPTH; i++) begin
      dut.u_ifetch.u_imem.mem[i] = (i < len) ? prog[i] : 32'h0;
    end
    halt_addr = word_t'((len - 1) * 4);
  endtask

  task automatic preset_data(logic randomize);
    for (int i = 0; i < DDEPTH; i++) begin
      m_mem[i] = randomize ? $urandom : 32'h0;
      dut.u_dmem.mem[i] = m_mem[i];
    end
  endtask

  // Resets the processor, then runs until the halt branch is fetched, checking
  // state after every edge. Returns the number of cycles taken.
  task automatic run_and_compare(word_t halt_addr, int max_instr, output int ncyc);
    logic st, rw; word_t sa, sd, rv; int rd;
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    foreach (m_regs[i]) m_regs[i] = '0;
    m_pc = '0;
    ncyc = 0;
    while (pc != halt_addr && ncyc < max_instr) begin
      model_step(st, sa, sd, rw, rd, rv);
      // busW, Rw and RegWr must have settled before the closing edge
      checks++;
      if (reg_wr !== rw || (rw && (int'(reg_wr_addr) != rd || reg_wr_data !== rv))) begin
        failures++;
        $display("FAIL register write at pc=%h: dut wr=%b R%0d<-%h model wr=%b R%0d<-%h",
                 pc, reg_wr, reg_wr_addr, reg_wr_data, rw, rd, rv);
      end
      // the write the processor is about to make at the coming edge
      checks++;
      if (mem_wr !== st || (st && (didx(mem_addr) != didx(sa) || mem_wr_data !== sd))) begin
        failures++;
        $display("FAIL store at pc=%h: dut wr=%b %h<-%h model wr=%b %h<-%h",
                 pc, mem_wr, mem_addr, mem_wr_data, st, sa, sd);
      end
      @(posedge clk); #1;
      ncyc++;
      checks++;
      if (pc !== m_pc) begin
        failures++;
        $display("FAIL pc after cycle %0d: %h want %h", ncyc, pc, m_pc);
        m_pc = pc;
      end
      for (int r = 0; r < 32; r++) begin
        checks++;
        if (dut.u_regfile.regs[r] !== m_regs[r] && !(r == 0)) begin
          failures++;
          $display("FAIL R%0d after cycle %0d: %h want %h", r, ncyc, dut.u_regfile.regs[r], m_regs[r]);
          m_regs[r] = dut.u_regfile.regs[r];
        end
      end
    end
    checks++;
    if (pc != halt_addr) begin failures++; $display("FAIL halt not reached"); end
    for (int i = 0; i < DDEPTH; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== m_mem[i]) begin
        failures++;
        $display("FAIL dmem[%0d]=%h want %h", i, dut.u_dmem.mem[i], m_mem[i]);
      end
    end
  endtask

  function automatic int rreg();
    return int'($urandom % 8);
  endfunction

  task automatic check_eq(string what, word_t got, word_t want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s = %h want %h", what, got, want); end
  endtask

  initial begin
    word_t halt;
    int ncyc, len, expect_cycles;
    rst = 1;
    #1;

    // ---------------- program 1: hand-written loop
    len = 0;
    prog[len++] = ori(1, 0, 10);        // n = 10
    prog[len++] = ori(2, 0, 0);         // sum = 0
    prog[len++] = ori(3, 0, 1);         // one
    prog[len++] = ori(4, 0, 32'h100);   // pointer
    prog[len++] = ori(5, 0, 4);         // stride
    prog[len++] = addu(2, 2, 1);        // 5 loop: sum += n
    prog[len++] = sw(1, 0, 4);          // 6 mem[ptr] = n
    prog[len++] = addu(4, 4, 5);        // 7 ptr += 4
    prog[len++] = subu(1, 1, 3);        // 8 n -= 1
    prog[len++] = beq(1, 0, 1);         // 9 if n == 0 goto 11
    prog[len++] = beq(0, 0, -6);        // 10 goto loop
    prog[len++] = lw(6, -4, 4);         // 11 last stored count
    prog[len++] = sw(2, 32'h200, 0);
    prog[len++] = lw(7, 32'h200, 0);
    prog[len++] = ori(8, 0, 32'h8000);  // zero-extended
    prog[len++] = addu(0, 1, 2);        // dropped
    prog[len++] = subu(9, 0, 3);        // 0 - 1
    prog[len++] = beq(0, 0, -1);        // halt
    load_program(len, halt);
    preset_data(1'b0);
    expect_cycles = 5 + 10 * 5 + 9 + 6;
    run_and_compare(halt, 1000, ncyc);
    checks++;
    if (ncyc != expect_cycles) begin
      failures++;
      $display("FAIL program 1 took %0d cycles, want %0d (one instruction per cycle)", ncyc, expect_cycles);
    end
    check_eq("$1", dut.u_regfile.regs[1], 32'd0);
    check_eq("$2", dut.u_regfile.regs[2], 32'd55);
    check_eq("$4", dut.u_regfile.regs[4], 32'h128);
    check_eq("$6", dut.u_regfile.regs[6], 32'd1);
    check_eq("$7", dut.u_regfile.regs[7], 32'd55);
    check_eq("$8", dut.u_regfile.regs[8], 32'h0000_8000);
    check_eq("$9", dut.u_regfile.regs[9], 32'hFFFF_FFFF);
    for (int k = 0; k < 10; k++) check_eq("array", dut.u_dmem.mem[(32'h100 >> 2) + k], word_t'(10 - k));
    check_eq("mem[0x200]", dut.u_dmem.mem[32'h200 >> 2], 32'd55);
    // the halt branch keeps the PC in place
    repeat (3) @(posedge clk);
    #1;
    check_eq("pc held at halt", pc, halt);
    $display("program 1: %0d instructions in %0d cycles", expect_cycles, ncyc);

    // ---------------- random programs
    for (int p = 0; p < NRAND; p++) begin
      for (int i = 0; i < RLEN - 1; i++) begin
        automatic int kind = int'($urandom % 14);
        case (kind)
          0, 1:  prog[i] = addu(rreg(), rreg(), rreg());
          2, 3:  prog[i] = subu(rreg(), rreg(), rreg());
          4, 5:  prog[i] = ori(rreg(), rreg(), int'($urandom));
          6, 7:  prog[i] = lw(rreg(), int'($urandom % 65536), rreg());
          8, 9:  prog[i] = sw(rreg(), int'($urandom % 65536), rreg());
          10: begin  // compare two registers, forward only
            automatic int off = int'($urandom % 4);
            if (i + 1 + off > RLEN - 1) off = RLEN - 2 - i;
            prog[i] = beq(rreg(), rreg(), off);
          end
          11: begin  // compare a register with itself: always taken
            automatic int off = int'($urandom % 3);
            automatic int r = rreg();
            if (i + 1 + off > RLEN - 1) off = RLEN - 2 - i;
            prog[i] = beq(r, r, off);
          end
          12: prog[i] = {6'h00, $urandom_range(0, 2**20 - 1)[19:0], 6'h20}; // add (not in subset)
          default: prog[i] = {6'h08, 26'($urandom)};                          // addi (not in subset)
        endcase
      end
      prog[RLEN - 1] = beq(0, 0, -1);
      load_program(RLEN, halt);
      preset_data(1'b1);
      run_and_compare(halt, RLEN, ncyc);
    end

    // ---------------- mechanisms
    begin
      static string names [12] = '{"addu", "subu", "ori", "lw", "sw", "beq taken", "beq not taken",
                            "no-operation", "write to $0 dropped", "negative branch offset",
                            "negative load/store offset", "ori with imm16[15]=1"};
      int counts [12];
      counts = '{n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_taken, n_beq_not, n_nop,
                 n_r0_write, n_neg_branch, n_neg_mem_off, n_ori_hi};
      for (int i = 0; i < 12; i++) begin
        $display("mechanism %-28s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
