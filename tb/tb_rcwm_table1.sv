// tb_rcwm_table1: builds the multiplier at every operand width it was sized
// for (8, 16, 24, 32 and 64 bits) and at 4 bits, the size of
// the worked example. For each width it checks the number of reduction
// stages and of full and half adders against the expected counts and runs random and
// corner-case products against a reference multiply. Ends with a TB_RESULT
// line.
module tb_rcwm_table1;
  localparam int NSIZE = 6;
  logic [NSIZE-1:0] done;
  int               chk [NSIZE];
  int               fl  [NSIZE];
  int               checks = 0, failures = 0;

  // Expected values: stages / full adders / half adders per width. The 4-bit
  // row is worked out by hand (rows 4 -> 3 -> 2).
  rcwm_size_probe #(.N(4),  .STAGES(2),  .FULL_A(5),    .HALF_A(1),  .NTESTS(2000))
    u_n4  (.done(done[0]), .checks(chk[0]), .failures(fl[0]));
  rcwm_size_probe #(.N(8),  .STAGES(4),  .FULL_A(39),   .HALF_A(3),  .NTESTS(2000))
    u_n8  (.done(done[1]), .checks(chk[1]), .failures(fl[1]));
  rcwm_size_probe #(.N(16), .STAGES(6),  .FULL_A(201),  .HALF_A(9),  .NTESTS(2000))
    u_n16 (.done(done[2]), .checks(chk[2]), .failures(fl[2]));
  rcwm_size_probe #(.N(24), .STAGES(7),  .FULL_A(490),  .HALF_A(16), .NTESTS(2000))
    u_n24 (.done(done[3]), .checks(chk[3]), .failures(fl[3]));
  rcwm_size_probe #(.N(32), .STAGES(8),  .FULL_A(907),  .HALF_A(23), .NTESTS(2000))
    u_n32 (.done(done[4]), .checks(chk[4]), .failures(fl[4]));
  rcwm_size_probe #(.N(64), .STAGES(10), .FULL_A(3853), .HALF_A(53), .NTESTS(2000))
    u_n64 (.done(done[5]), .checks(chk[5]), .failures(fl[5]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    for (int i = 0; i < NSIZE; i++) begin
      checks   += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
