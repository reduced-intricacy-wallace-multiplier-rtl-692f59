// rcwm_pp_gen: partial-product generator of the N x N multiplier.
//
// N^2 two-input AND gates. Row i of the matrix is the multiplicand gated by
// bit i of the multiplier, so pp[i][j] = a[j] & b[i] carries weight 2^(i+j).
//
// Interface: a, b (N bits) in; pp[N][N] out. Combinational.
module rcwm_pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output logic [N-1:0][N-1:0] pp
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_bit
      assign pp[i][j] = a[j] & b[i];
    end
  end
endmodule
