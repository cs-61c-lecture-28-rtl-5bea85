// regfile: the 32 x 32-bit register file.
//
// Two read ports and one write port. ra selects the register driven onto
// bus_a and rb the one driven onto bus_b; reads are combinational (an
// address change shows on the bus after the access time, no clock needed).
// On a rising clock edge with write_en = 1, bus_w is written into the
// register selected by rw. A register written in a cycle is read with its
// new value from the next cycle on.
//
// Register 0 always reads as zero and ignores writes, as MIPS register $0
// does, and a synchronous reset clears every register; both are this
// design's choices.
module regfile
  import mips_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      write_en,
  input  reg_addr_t rw,
  input  reg_addr_t ra,
  input  reg_addr_t rb,
  input  word_t     bus_w,
  output word_t     bus_a,
  output word_t     bus_b
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (write_en && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  always_comb begin
    bus_a = (ra == '0) ? '0 : regs[ra];
    bus_b = (rb == '0) ? '0 : regs[rb];
  end

endmodule
