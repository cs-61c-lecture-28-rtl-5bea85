// tb_regfile: self-checking test of the 32 x 32-bit register file.
//
// A reference array in the testbench mirrors the registers. Each cycle it
// drives a random write (register, data, enable) and random read addresses,
// checks both read buses combinationally against the reference before the
// edge (reads need no clock), then applies the edge and updates the
// reference. Also checks reset to zero, that register 0 stays zero, that a
// write with write_en = 0 changes nothing, and that a write becomes visible
// only after the rising edge.
module tb_regfile;
  import mips_pkg::*;
  logic clk = 0, rst, we;
  reg_addr_t rw, ra, rb;
  word_t bw, ba, bb;
  word_t model [32];
  int checks = 0, failures = 0, cycles = 0;

  regfile dut (.clk(clk), .rst(rst), .write_en(we), .rw(rw), .ra(ra), .rb(rb),
               .bus_w(bw), .bus_a(ba), .bus_b(bb));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads(string tag);
    #1;
    checks++;
    if (ba !== model[ra]) begin failures++; $display("FAIL %s busA R%0d=%h want %h", tag, ra, ba, model[ra]); end
    checks++;
    if (bb !== model[rb]) begin failures++; $display("FAIL %s busB R%0d=%h want %h", tag, rb, bb, model[rb]); end
  endtask

  initial begin
    rst = 1; we = 0; rw = 0; ra = 0; rb = 0; bw = 0;
    @(posedge clk); #1;
    rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin ra = 5'(i); rb = 5'(31 - i); check_reads("reset"); end
    // fill every register
    for (int i = 0; i < 32; i++) begin
      we = 1; rw = 5'(i); bw = $urandom; ra = 5'(i); rb = 5'(i);
      check_reads("before write");  // old value until the edge
      @(posedge clk);
      if (i != 0) model[i] = bw;
      check_reads("after write");
    end
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); rw = 5'($urandom); bw = $urandom;
      ra = 5'($urandom); rb = 5'($urandom);
      check_reads("random");
      @(posedge clk);
      if (we && rw != 0) model[rw] = bw;
      check_reads("random post");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
