// tb_adder: self-checking test of the 32-bit adder.
//
// Drives corner cases (carry ripple through all bits, all-ones plus one,
// carry in alone) and random operands, and compares {carry_out, sum} with a
// 33-bit reference sum computed in the testbench.
module tb_adder;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  adder #(.WIDTH(32)) dut (.a(a), .b(b), .carry_in(cin), .sum(sum), .carry_out(cout));

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] ref_sum;
    a = ta; b = tb_; cin = tc;
    #1;
    ref_sum = 33'(ta) + 33'(tb_) + 33'(tc);
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %b: got %b_%h want %h", ta, tb_, tc, cout, sum, ref_sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0, 32'h0, 1'b0);
    check_one(32'h0, 32'h0, 1'b1);
    check_one(32'hFFFF_FFFF, 32'h1, 1'b0);
    check_one(32'hFFFF_FFFF, 32'h0, 1'b1);
    check_one(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check_one(32'h7FFF_FFFF, 32'h1, 1'b0);
    check_one(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 500; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
