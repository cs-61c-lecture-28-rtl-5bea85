// wen_register: N-bit register with write enable.
//
// Like a D flip-flop but N bits wide: on a rising clock edge, if write_en is
// 1, data_out takes data_in; if write_en is 0, data_out does not change.
// A synchronous active-high reset to RESET_VALUE is this design's addition
// so that the program counter starts at a known address.
module wen_register #(
  parameter int unsigned   N           = 32,
  parameter logic [N-1:0]  RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         write_en,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] data_out
);

  always_ff @(posedge clk) begin
    if (rst)           data_out <= RESET_VALUE;
    else if (write_en) data_out <= data_in;
  end

endmodule
