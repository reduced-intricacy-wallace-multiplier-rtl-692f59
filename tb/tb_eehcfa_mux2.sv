// tb_eehcfa_mux2: exhaustive check of the 2:1 multiplexer over all eight
// input combinations. Ends with a TB_RESULT line.
module tb_eehcfa_mux2;
  logic sel, d0, d1, y;
  int   checks = 0, failures = 0;

  eehcfa_mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, d1, d0} = 3'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b y=%b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
