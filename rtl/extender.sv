// extender: widens the 16-bit immediate to 32 bits.
//
// ext_op = 1 sign-extends (copies imm16[15] into bits 31:16), as lw, sw and
// beq need; ext_op = 0 zero-extends, as ori needs. Purely combinational.
module extender
  import mips_pkg::*;
(
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output word_t       imm32
);

  always_comb begin
    imm32 = {{16{ext_op & imm16[15]}}, imm16};
  end

endmodule
