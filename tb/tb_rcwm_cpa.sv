// tb_rcwm_cpa: the final adder of the 8 x 8 multiplier must add its two
// input rows. The inputs obey the contract of the reduction: a row bit is
// only set where the reduction plan (rcwm_pkg) leaves a bit in that column.
// Random rows plus the all-ones pattern (longest carry ripple) are checked
// against a + b computed here. Ends with a TB_RESULT line.
module tb_rcwm_cpa;
  import rcwm_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned W = 2 * N;

  logic [W-1:0] row0, row1, p, mask0, mask1;
  int           checks = 0, failures = 0;
  plan_t        plan;

  rcwm_cpa #(.N(N)) dut (.row0(row0), .row1(row1), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    checks++;
    if (p !== row0 + row1) begin
      failures++;
      $display("FAIL %h + %h -> %h", row0, row1, p);
    end
  endtask

  initial begin
    plan = make_plan(N);
    for (int c = 0; c < W; c++) begin
      mask0[c] = plan.h[num_stages(N)][c] >= 1;
      mask1[c] = plan.h[num_stages(N)][c] >= 2;
    end
    row0 = mask0; row1 = mask1; check_one();
    row0 = mask0; row1 = '0;    check_one();
    for (int t = 0; t < 5000; t++) begin
      row0 = W'($urandom) & mask0;
      row1 = W'($urandom) & mask1;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
