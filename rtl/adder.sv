// adder: WIDTH-bit binary adder with carry in and carry out.
//
// sum = a + b + carry_in, carry_out is the bit that falls off the top.
// Purely combinational. The processor uses it for PC + 4, for the branch
// target, and inside the ALU for add and subtract (subtract as
// a + ~b + 1). The ports follow the building-block adder (A, B, CarryIn,
// Sum, CarryOut, 32 bits wide); the behavioural "+" is this design's choice
// of implementation.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             carry_in,
  output logic [WIDTH-1:0] sum,
  output logic             carry_out
);

  always_comb begin
    {carry_out, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, carry_in};
  end

endmodule
