// alu: 32-bit arithmetic and logic unit of the MIPS-lite datapath.
//
// alu_ctr selects add, subtract, OR, AND or set-less-than (signed: result is
// 1 if a < b, else 0). Add and subtract share one adder: subtract feeds ~b
// with a carry in of 1. The equal output is 1 when the result is zero, which
// turns a subtract into the a == b test that beq needs. Purely combinational;
// overflow is not reported (addu and subu ignore it).
//
// Add, subtract, OR and the zero test are what MIPS-lite needs; AND and SLT
// are the further operations of the full MIPS ALU. Using a single adder for
// add and subtract is this design's choice.
module alu
  import mips_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  aluctr_e alu_ctr,
  output word_t   result,
  output logic    equal
);

  logic  sub;
  word_t b_in;
  word_t sum;
  logic  carry_out;
  logic  less;

  always_comb begin
    sub  = (alu_ctr == ALU_SUB) || (alu_ctr == ALU_SLT);
    b_in = sub ? ~b : b;
  end

  adder #(.WIDTH(XLEN)) u_adder (
    .a        (a),
    .b        (b_in),
    .carry_in (sub),
    .sum      (sum),
    .carry_out(carry_out)
  );

  always_comb begin
    // Signed a < b: when the signs differ the negative one is smaller,
    // otherwise the sign of a - b decides (no overflow is possible then).
    less = (a[XLEN-1] != b[XLEN-1]) ? a[XLEN-1] : sum[XLEN-1];
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      ALU_AND:          result = a & b;
      ALU_SLT:          result = {{(XLEN-1){1'b0}}, less};
      default:          result = sum;
    endcase
    equal = (result == '0);
  end

endmodule
