// tb_mux2: self-checking test of the two-input multiplexer.
//
// Applies random pairs of inputs with both select values, at the 32-bit
// width and at the 5-bit width used for the register-destination choice,
// and checks that Select = 0 passes in0 and Select = 1 passes in1.
module tb_mux2;
  logic [31:0] a0, a1, y;
  logic [4:0]  b0, b1, yb;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut32 (.in0(a0), .in1(a1), .sel(sel), .y(y));
  mux2 #(.WIDTH(5))  dut5  (.in0(b0), .in1(b1), .sel(sel), .y(yb));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a0 = $urandom; a1 = $urandom; b0 = 5'($urandom); b1 = 5'($urandom);
      if (a0 == a1) a1 = ~a0;
      if (b0 == b1) b1 = ~b0;
      sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? a1 : a0)) begin
        failures++;
        $display("FAIL 32-bit sel=%b in0=%h in1=%h y=%h", sel, a0, a1, y);
      end
      checks++;
      if (yb !== (sel ? b1 : b0)) begin
        failures++;
        $display("FAIL 5-bit sel=%b in0=%h in1=%h y=%h", sel, b0, b1, yb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
