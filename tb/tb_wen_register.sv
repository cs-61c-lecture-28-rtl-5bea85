// tb_wen_register: self-checking test of the N-bit write-enabled register.
//
// Keeps a reference copy of the register in the testbench. Each cycle it
// drives random data and a random write enable; after the rising edge the
// output must equal the new data when write_en was 1 and the old value when
// it was 0. Also checks reset to RESET_VALUE, and that the output does not
// change between clock edges.
module tb_wen_register;
  localparam int N = 16;
  localparam logic [N-1:0] RV = 16'hA5C3;
  logic clk = 0, rst, we;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0, cycles = 0;
  int n_hold = 0, n_load = 0;

  wen_register #(.N(N), .RESET_VALUE(RV)) dut (
    .clk(clk), .rst(rst), .write_en(we), .data_in(d), .data_out(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    checks++;
    if (q !== RV) begin failures++; $display("FAIL reset value %h", q); end
    rst = 0;
    model = RV;
    for (int i = 0; i < 300; i++) begin
      d  = N'($urandom);
      we = 1'($urandom);
      #2;  // input changes between edges must not reach the output
      checks++;
      if (q !== model) begin failures++; $display("FAIL changed between edges: %h want %h", q, model); end
      @(posedge clk); #1;
      if (we) begin model = d; n_load++; end else n_hold++;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d we=%b d=%h q=%h want %h", i, we, d, q, model);
      end
    end
    if (n_hold == 0 || n_load == 0) begin failures++; $display("FAIL: hold/load not both exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
