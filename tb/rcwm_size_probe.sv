// rcwm_size_probe: test helper for one multiplier size. It instantiates
// rcwm_multiplier at width N, compares the tree's stage, full-adder and
// half-adder counts with the expected values given as parameters, and then
// applies NTESTS random operand pairs plus the corner cases 0 and 2^N-1,
// comparing each product with a 2N-bit reference multiply. When the run is
// over it raises done and holds its check and failure counts.
module rcwm_size_probe #(
  parameter int unsigned N       = 8,
  parameter int unsigned STAGES  = 4,
  parameter int unsigned FULL_A  = 39,
  parameter int unsigned HALF_A  = 3,
  parameter int unsigned NTESTS  = 1000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import rcwm_pkg::*;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p, expect_p;

  rcwm_multiplier #(.N(N)) dut (.a(a), .b(b), .p(p));

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w = '0;
    for (int i = 0; i < N; i += 32) w = (w << 32) | N'($urandom);
    return w;
  endfunction

  task automatic check_pair(logic [N-1:0] x, logic [N-1:0] y);
    a = x;
    b = y;
    #1;
    expect_p = (2*N)'(x) * (2*N)'(y);
    checks++;
    if (p !== expect_p) begin
      failures++;
      if (failures < 5) $display("FAIL N=%0d %h * %h = %h (expected %h)", N, x, y, p, expect_p);
    end
  endtask

  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    checks += 3;
    if (num_stages(N) != STAGES) failures++;
    if (total_fa(N) != FULL_A) failures++;
    if (total_ha(N) != HALF_A) failures++;
    $display("N=%0d: stages %0d full adders %0d half adders %0d (expected %0d/%0d/%0d)",
             N, num_stages(N), total_fa(N), total_ha(N), STAGES, FULL_A, HALF_A);
    check_pair('0, '0);
    check_pair('1, '1);
    check_pair('1, '0);
    check_pair('1, N'(1));
    for (int t = 0; t < NTESTS; t++) check_pair(rand_word(), rand_word());
    done = 1'b1;
  end
endmodule
