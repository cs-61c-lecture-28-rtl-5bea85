// mux2: two-input multiplexer, WIDTH bits wide.
//
// y = sel ? in1 : in0. Purely combinational. The processor uses it to pick
// the write register (rd or rt), the ALU B operand (busB or the extended
// immediate), the register write data (ALU result or memory) and the next
// PC. Ports follow the building-block multiplexer (A, B, Select, Y, 32 bits);
// input 0 is selected by Select = 0, as printed on the datapath drawing.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    y = sel ? in1 : in0;
  end

endmodule
