// tb_data_memory: self-checking test of the idealized data memory.
//
// Uses a small depth (64 words). A reference array mirrors the memory. The
// test writes every word, then runs random reads and writes: a read must show
// the addressed word without any clock edge, a write must land only on the
// rising edge and only with write_en = 1, and the two lowest address bits
// must not matter.
module tb_data_memory;
  import mips_pkg::*;
  localparam int D = 64;
  logic clk = 0, we;
  word_t addr, din, dout;
  word_t model [D];
  int checks = 0, failures = 0, cycles = 0;

  data_memory #(.DEPTH(D)) dut (.clk(clk), .write_en(we), .addr(addr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(string tag);
    #1;
    checks++;
    if (dout !== model[addr[7:2]]) begin
      failures++;
      $display("FAIL %s addr=%h got %h want %h", tag, addr, dout, model[addr[7:2]]);
    end
  endtask

  initial begin
    we = 0; addr = 0; din = 0;
    #2;
    for (int i = 0; i < D; i++) begin
      we = 1; addr = word_t'(i * 4); din = $urandom;
      @(posedge clk); #1;
      model[i] = din;
    end
    we = 0;
    for (int i = 0; i < D; i++) begin
      addr = word_t'(i * 4) | word_t'($urandom % 4);
      check_read("readback");
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); addr = word_t'($urandom % (D * 4)); din = $urandom;
      check_read("before edge");
      @(posedge clk);
      if (we) model[addr[7:2]] = din;
      check_read("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
