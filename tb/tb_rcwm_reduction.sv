// tb_rcwm_reduction: the reduction must turn any partial-product matrix
// into two rows with the same weighted sum. Random matrices (not only those
// of a real product) and the all-ones matrix are applied to an 8 x 8 and a
// 4 x 4 tree; the reference is the weighted sum of the matrix, worked out bit
// by bit here. The 8 x 8 tree must also take four stages. Ends with a
// TB_RESULT line.
module tb_rcwm_reduction;
  localparam int unsigned N  = 8;
  localparam int unsigned N4 = 4;

  logic [N-1:0][N-1:0]   pp;
  logic [2*N-1:0]        row0, row1;
  logic [N4-1:0][N4-1:0] pp4;
  logic [2*N4-1:0]       r40, r41;
  int                    checks = 0, failures = 0;

  rcwm_reduction #(.N(N))  dut  (.pp(pp),  .row0(row0), .row1(row1));
  rcwm_reduction #(.N(N4)) dut4 (.pp(pp4), .row0(r40),  .row1(r41));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*N-1:0] weighted8(logic [N-1:0][N-1:0] m);
    logic [2*N-1:0] t = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (m[i][j]) t += (2*N)'(1) << (i + j);
    return t;
  endfunction

  function automatic logic [2*N4-1:0] weighted4(logic [N4-1:0][N4-1:0] m);
    logic [2*N4-1:0] t = '0;
    for (int i = 0; i < N4; i++)
      for (int j = 0; j < N4; j++)
        if (m[i][j]) t += (2*N4)'(1) << (i + j);
    return t;
  endfunction

  task automatic check_one();
    #1;
    checks++;
    if (row0 + row1 !== weighted8(pp)) begin
      failures++;
      $display("FAIL N=8 pp=%h rows %h + %h", pp, row0, row1);
    end
    checks++;
    if (r40 + r41 !== weighted4(pp4)) begin
      failures++;
      $display("FAIL N=4 pp=%h rows %h + %h", pp4, r40, r41);
    end
  endtask

  initial begin
    // Stage count of the 8 x 8 tree (8 -> 6 -> 4 -> 3 -> 2 rows).
    checks++;
    if (dut.S != 4) begin
      failures++;
      $display("FAIL stage count %0d", dut.S);
    end
    pp = '0; pp4 = '0; check_one();
    pp = '1; pp4 = '1; check_one();
    for (int t = 0; t < 5000; t++) begin
      pp  = {$urandom, $urandom};
      pp4 = 16'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
