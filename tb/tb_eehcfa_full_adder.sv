// tb_eehcfa_full_adder: exhaustive check of the hybrid full adder. The
// expected outputs are the arithmetic sum a + b + c split into carry and sum
// bits. Ends with a TB_RESULT line.
module tb_eehcfa_full_adder;
  logic a, b, c, sum, cout;
  int   checks = 0, failures = 0;

  eehcfa_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] expect_sum;
      {a, b, c} = 3'(i);
      #1;
      expect_sum = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if ({cout, sum} !== expect_sum) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> cout=%b sum=%b", a, b, c, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
