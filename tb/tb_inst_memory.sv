// tb_inst_memory: self-checking test of the instruction memory.
//
// Loads tb/imem_test.hex (16 words, word i = (i * 32'h1000_0001) xor
// (i * 32'h0101_0101)) into a 64-word memory and checks that each byte
// address returns its word combinationally, that the two lowest address bits
// are ignored, that words beyond the file read as zero, and that addresses
// past the depth wrap around.
module tb_inst_memory;
  import mips_pkg::*;
  localparam int D = 64;
  word_t adr, instr;
  int checks = 0, failures = 0;

  inst_memory #(.DEPTH(D), .INIT_FILE("tb/imem_test.hex")) dut (.adr(adr), .instruction(instr));

  function automatic word_t expected(int i);
    if (i < 16) return (word_t'(i) * 32'h1000_0001) ^ (word_t'(i) * 32'h0101_0101);
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < D; i++) begin
      for (int lo = 0; lo < 4; lo++) begin
        adr = word_t'(i * 4 + lo);
        #1;
        checks++;
        if (instr !== expected(i)) begin
          failures++;
          $display("FAIL adr=%h got %h want %h", adr, instr, expected(i));
        end
      end
    end
    for (int i = 0; i < 16; i++) begin
      adr = word_t'((i + D) * 4);
      #1;
      checks++;
      if (instr !== expected(i)) begin failures++; $display("FAIL wrap adr=%h", adr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
