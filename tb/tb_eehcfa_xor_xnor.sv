// tb_eehcfa_xor_xnor: exhaustive check of the XOR/XNOR cell against the
// truth table written out in the testbench. Ends with a TB_RESULT line.
module tb_eehcfa_xor_xnor;
  logic a, b, x, xn;
  int   checks = 0, failures = 0;
  // Expected {x, xn} for (a, b) = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b01, 2'b10, 2'b10, 2'b01};

  eehcfa_xor_xnor dut (.a(a), .b(b), .x(x), .xn(xn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({x, xn} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%b b=%b x=%b xn=%b", a, b, x, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
