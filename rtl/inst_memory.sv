// inst_memory: read-only instruction memory.
//
// The byte address adr selects a 32-bit instruction word, read
// combinationally (as the idealized memory reads). The word index is
// adr[AW+1:2]; the two lowest bits are ignored and higher bits wrap.
// The contents are loaded at start-up from INIT_FILE (hexadecimal, one word
// per line, $readmemh format) when it is not empty; a testbench may also
// fill the mem array directly. Words not loaded read as zero, which is the
// encoding of "sll $0,$0,0", a no-operation. Depth and loading are this
// design's choices.
module inst_memory
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  word_t adr,
  output word_t instruction
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_comb instruction = mem[adr[AW+1:2]];

endmodule
