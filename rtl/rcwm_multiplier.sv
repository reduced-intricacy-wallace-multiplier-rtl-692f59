// rcwm_multiplier: unsigned N x N reduced-complexity Wallace multiplier built
// from energy-efficient hybrid full adders.
//
// Three steps, all combinational:
//   1. rcwm_pp_gen    N^2 AND gates form the partial-product matrix.
//   2. rcwm_reduction the reduced-complexity Wallace tree compresses it to two
//                     rows in the same number of stages as a standard Wallace
//                     tree (4 for N = 8), using hybrid full adders for every
//                     group of three bits and half adders only where needed
//                     to hold that stage count.
//   3. rcwm_cpa       a carry-propagate adder (half adders in the low
//                     columns, hybrid full adders above) adds the two rows.
// For N = 8 the tree holds 39 full adders and 3 half adders.
//
// Interface: a, b (N bits, unsigned) in; p = a * b (2N bits) out.
// Timing: no clock and no registers; the product is valid one combinational
// delay after the operands settle. N may be set from 2 to 64; the default 8
// is the smallest size the multiplier is evaluated at.
module rcwm_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      row0, row1;

  rcwm_pp_gen #(.N(N)) u_pp_gen (
    .a (a),
    .b (b),
    .pp(pp)
  );

  rcwm_reduction #(.N(N)) u_reduction (
    .pp  (pp),
    .row0(row0),
    .row1(row1)
  );

  rcwm_cpa #(.N(N)) u_cpa (
    .row0(row0),
    .row1(row1),
    .p   (p)
  );
endmodule
