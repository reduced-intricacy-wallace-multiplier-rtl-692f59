// tb_rcwm_multiplier: end-to-end test of the multiplier at its default size
// (8 x 8). Every one of the 65536 operand pairs is applied and the product is
// compared with a * b. The test also counts how often the structural
// situations of the design occur and fails if one never does:
//   zero operand, all-ones operands (every partial product set),
//   a product using the top bit, a carry rippling through at least
//   N columns of the final adder, a carry out of each of the three
//   half adders the 8 x 8 tree places (stage 2 column 8, stage 4 columns 6
//   and 7), and carries out of both the half-adder part (columns 1-5) and
//   the full-adder part (columns 6-14) of the final adder.
// Ends with a TB_RESULT line.
module tb_rcwm_multiplier;
  localparam int unsigned N = 8;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;
  int             n_zero = 0, n_full = 0, n_top = 0, n_long_ripple = 0;
  int             n_ha_s2c8 = 0, n_ha_s4c6 = 0, n_ha_s4c7 = 0;
  int             n_cpa_ha_carry = 0, n_cpa_fa_carry = 0;

  rcwm_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Longest run of consecutive carries in the final adder.
  function automatic int longest_run(logic [2*N:0] cy);
    int run = 0, best = 0;
    for (int i = 0; i <= 2 * N; i++) begin
      run  = cy[i] ? run + 1 : 0;
      best = (run > best) ? run : best;
    end
    return best;
  endfunction

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (p !== (2*N)'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d (expected %0d)", i, j, p, i * j);
        end
        if (a == 0 || b == 0) n_zero++;
        if (&a && &b) n_full++;
        if (p[2*N-1]) n_top++;
        if (longest_run(dut.u_cpa.carry) >= int'(N)) n_long_ripple++;
        if (dut.u_reduction.g_stage[1].g_col[8].g_ha[0].co) n_ha_s2c8++;
        if (dut.u_reduction.g_stage[3].g_col[6].g_ha[0].co) n_ha_s4c6++;
        if (dut.u_reduction.g_stage[3].g_col[7].g_ha[0].co) n_ha_s4c7++;
        if (|dut.u_cpa.carry[6:2]) n_cpa_ha_carry++;
        if (|dut.u_cpa.carry[15:7]) n_cpa_fa_carry++;
      end
    end
    $display("events: zero=%0d all_ones=%0d top_bit=%0d long_ripple=%0d",
             n_zero, n_full, n_top, n_long_ripple);
    $display("events: tree half-adder carries %0d/%0d/%0d, final adder carries ha=%0d fa=%0d",
             n_ha_s2c8, n_ha_s4c6, n_ha_s4c7, n_cpa_ha_carry, n_cpa_fa_carry);
    checks += 9;
    if (n_ha_s2c8 == 0) failures++;
    if (n_ha_s4c6 == 0) failures++;
    if (n_ha_s4c7 == 0) failures++;
    if (n_cpa_ha_carry == 0) failures++;
    if (n_cpa_fa_carry == 0) failures++;
    if (n_zero == 0) failures++;
    if (n_full == 0) failures++;
    if (n_top == 0) failures++;
    if (n_long_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
