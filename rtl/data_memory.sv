// data_memory: idealized word memory used as the processor's data memory.
//
// One input bus (data_in), one output bus (data_out). The address selects
// the word driven on data_out; the read is combinational, so data_out follows
// the address after the access time with no clock involved. When write_en is
// 1, the word selected by the address takes data_in on the rising clock edge.
//
// Addresses are byte addresses; the word is selected by addr[AW+1:2] and the
// two lowest bits are ignored (word accesses only). The depth, DEPTH words,
// is this design's choice; higher address bits wrap. Contents are not reset.
module data_memory
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic  clk,
  input  logic  write_en,
  input  word_t addr,
  input  word_t data_in,
  output word_t data_out
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];
  logic [AW-1:0] widx;

  always_comb widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (write_en) mem[widx] <= data_in;
  end

  always_comb data_out = mem[widx];

endmodule
