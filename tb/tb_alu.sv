// tb_alu: self-checking test of the ALU.
//
// For every operation (add, subtract, OR, AND, signed set-less-than) it
// applies corner operands (zero, equal values, sign boundaries, wrap-around)
// and random ones, and compares the result with an expression computed in
// the testbench. The equal flag is checked against result == 0, and
// specifically for subtract of equal and unequal operands (the beq test).
module tb_alu;
  import mips_pkg::*;
  word_t   a, b, r;
  aluctr_e op;
  logic    eq;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(op), .result(r), .equal(eq));

  function automatic word_t model(aluctr_e o, word_t x, word_t y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_OR:  return x | y;
      ALU_AND: return x & y;
      ALU_SLT: return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: return 'x;
    endcase
  endfunction

  task automatic check_one(aluctr_e o, word_t x, word_t y);
    word_t expect_r;
    a = x; b = y; op = o;
    #1;
    expect_r = model(o, x, y);
    checks++;
    if (r !== expect_r) begin
      failures++;
      $display("FAIL %s %h %h: got %h want %h", o.name(), x, y, r, expect_r);
    end
    checks++;
    if (eq !== (expect_r == 0)) begin
      failures++;
      $display("FAIL equal flag %s %h %h: got %b", o.name(), x, y, eq);
    end
  endtask

  word_t corners [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                         32'h8000_0000, 32'h0000_FFFF, 32'h1234_5678, 32'h8000_0001};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aluctr_e ops [5] = '{ALU_ADD, ALU_SUB, ALU_OR, ALU_AND, ALU_SLT};
    foreach (ops[k]) begin
      foreach (corners[i]) foreach (corners[j]) check_one(ops[k], corners[i], corners[j]);
      for (int n = 0; n < 200; n++) check_one(ops[k], $urandom, $urandom);
    end
    // beq comparison: subtract of equal operands must raise equal
    for (int n = 0; n < 50; n++) begin
      word_t v = $urandom;
      check_one(ALU_SUB, v, v);
      checks++;
      if (eq !== 1'b1) begin failures++; $display("FAIL equal not set for %h == %h", v, v); end
      check_one(ALU_SUB, v, v ^ (32'h1 << (n % 32)));
      checks++;
      if (eq !== 1'b0) begin failures++; $display("FAIL equal set for unequal operands"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
