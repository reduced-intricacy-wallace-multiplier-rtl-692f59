// tb_rcwm_pp_gen: checks every partial-product bit of the default 8 x 8
// generator for random and corner operands, and that the weighted sum of the
// matrix equals a * b. Ends with a TB_RESULT line.
module tb_rcwm_pp_gen;
  localparam int unsigned N = 8;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int                  checks = 0, failures = 0;

  rcwm_pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [2*N-1:0] total;
    #1;
    total = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        checks++;
        if (pp[i][j] !== (a[j] && b[i])) begin
          failures++;
          $display("FAIL a=%h b=%h pp[%0d][%0d]=%b", a, b, i, j, pp[i][j]);
        end
        if (pp[i][j]) total += (2*N)'(1) << (i + j);
      end
    end
    checks++;
    if (total !== (2*N)'(a) * (2*N)'(b)) begin
      failures++;
      $display("FAIL weighted sum %h for a=%h b=%h", total, a, b);
    end
  endtask

  initial begin
    a = '0; b = '0; check_one();
    a = '1; b = '1; check_one();
    a = '1; b = '0; check_one();
    for (int t = 0; t < 200; t++) begin
      a = N'($urandom);
      b = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
