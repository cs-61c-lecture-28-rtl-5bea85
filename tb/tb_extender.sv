// tb_extender: self-checking test of the immediate extender.
//
// For random and corner-case 16-bit immediates, checks that ext_op = 1
// copies bit 15 into the upper half (sign extension) and ext_op = 0 fills
// the upper half with zeros. The reference uses $signed arithmetic.
module tb_extender;
  import mips_pkg::*;
  logic [15:0] imm;
  logic        op;
  word_t       y;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm), .ext_op(op), .imm32(y));

  task automatic check_one(input logic [15:0] ti);
    int signed sref;
    imm = ti;
    op = 1'b1; #1;
    sref = int'($signed(ti));
    checks++;
    if (y !== word_t'(sref)) begin failures++; $display("FAIL sign %h -> %h", ti, y); end
    op = 1'b0; #1;
    checks++;
    if (y !== {16'h0, ti}) begin failures++; $display("FAIL zero %h -> %h", ti, y); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(16'h0000);
    check_one(16'h7FFF);
    check_one(16'h8000);
    check_one(16'hFFFF);
    check_one(16'h1234);
    for (int i = 0; i < 300; i++) check_one(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
