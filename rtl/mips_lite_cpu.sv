// mips_lite_cpu: single-cycle processor for the MIPS-lite instruction subset.
//
// It executes addu, subu, ori, lw, sw and beq, each within one clock cycle:
// during the cycle the instruction is fetched from the instruction memory at
// PC, its fields address the register file, the control unit decodes it, the
// ALU computes, the data memory is read or prepared for a write, and the
// value for busW settles. At the next rising clock edge the register file,
// the data memory and the PC are all updated together. CPI is 1; the clock
// period must cover the longest of these paths (a load).
//
// Datapath (as on the single-cycle datapath drawing):
//   RegDst mux   picks the write register rw: rd (1) or rt (0)
//   RegFile      ra = rs, rb = rt, rw, busW, write enable RegWr
//   Extender     imm16 -> 32 bits, sign (ExtOp = 1) or zero (ExtOp = 0)
//   ALUSrc mux   ALU B operand: busB (0) or extended immediate (1)
//   ALU          ALUctr; its Equal flag goes to the control unit for beq
//   Data Memory  address = ALU result, data in = busB, WrEn = MemWr
//   MemtoReg mux busW: ALU result (0) or data memory output (1)
//   Fetch unit   PC, next address logic (nPC_sel), instruction memory
//
// Ports: clk, rst (synchronous, active high; PC <- RESET_PC and all
// registers cleared). The remaining ports only let the surroundings observe
// the machine: pc and instr of the current cycle, and the register-file and
// data-memory write that this cycle performs at its closing edge.
module mips_lite_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter string       INIT_FILE  = "",
  parameter word_t       RESET_PC   = '0
) (
  input  logic      clk,
  input  logic      rst,
  output word_t     pc,
  output word_t     instr,
  output logic      reg_wr,
  output reg_addr_t reg_wr_addr,
  output word_t     reg_wr_data,
  output logic      mem_wr,
  output word_t     mem_addr,
  output word_t     mem_wr_data
);

  ctrl_t     ctrl;
  npc_sel_e  npc_sel;
  itype_t    ifields;
  rtype_t    rfields;
  reg_addr_t rw;
  word_t     bus_a, bus_b, bus_w;
  word_t     imm32, alu_b, alu_result, mem_rdata;
  logic      equal;

  always_comb begin
    ifields = itype_t'(instr);
    rfields = rtype_t'(instr);
  end

  ifetch_unit #(
    .IMEM_DEPTH(IMEM_DEPTH),
    .INIT_FILE (INIT_FILE),
    .RESET_PC  (RESET_PC)
  ) u_ifetch (
    .clk        (clk),
    .rst        (rst),
    .npc_sel    (npc_sel),
    .imm16      (ifields.imm16),
    .pc         (pc),
    .instruction(instr)
  );

  control_unit u_ctrl (
    .op     (rfields.op),
    .funct  (rfields.funct),
    .equal  (equal),
    .ctrl   (ctrl),
    .npc_sel(npc_sel)
  );

  mux2 #(.WIDTH(RADDR)) u_regdst_mux (
    .in0(rfields.rt),
    .in1(rfields.rd),
    .sel(ctrl.reg_dst),
    .y  (rw)
  );

  regfile u_regfile (
    .clk     (clk),
    .rst     (rst),
    .write_en(ctrl.reg_wr),
    .rw      (rw),
    .ra      (rfields.rs),
    .rb      (rfields.rt),
    .bus_w   (bus_w),
    .bus_a   (bus_a),
    .bus_b   (bus_b)
  );

  extender u_ext (
    .imm16 (ifields.imm16),
    .ext_op(ctrl.ext_op),
    .imm32 (imm32)
  );

  mux2 #(.WIDTH(XLEN)) u_alusrc_mux (
    .in0(bus_b),
    .in1(imm32),
    .sel(ctrl.alu_src),
    .y  (alu_b)
  );

  alu u_alu (
    .a      (bus_a),
    .b      (alu_b),
    .alu_ctr(ctrl.alu_ctr),
    .result (alu_result),
    .equal  (equal)
  );

  data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk     (clk),
    .write_en(ctrl.mem_wr),
    .addr    (alu_result),
    .data_in (bus_b),
    .data_out(mem_rdata)
  );

  mux2 #(.WIDTH(XLEN)) u_memtoreg_mux (
    .in0(alu_result),
    .in1(mem_rdata),
    .sel(ctrl.mem_to_reg),
    .y  (bus_w)
  );

  always_comb begin
    reg_wr      = ctrl.reg_wr;
    reg_wr_addr = rw;
    reg_wr_data = bus_w;
    mem_wr      = ctrl.mem_wr;
    mem_addr    = alu_result;
    mem_wr_data = bus_b;
  end

endmodule
