// rcwm_reduction: reduced-complexity Wallace reduction of the partial
// products to two rows.
//
// The N x N partial-product matrix is regrouped by weight into 2N columns
// and then reduced in num_stages(N) stages (4 for N = 8), the same number as
// a standard Wallace tree. In each stage and column, every group of three
// bits goes through a hybrid full adder (eehcfa_full_adder); a leftover pair
// or single bit is passed to the next stage untouched. A half adder is placed
// on a leftover pair only where the column would otherwise exceed the Wallace
// row count of the next stage. The whole placement comes from
// rcwm_pkg::make_plan, so the tree below is just wiring of that plan.
//
// g_lvl[s].col[c] holds the bits of weight 2^c entering stage s, packed from
// slot 0 upward; unused slots are tied to 0. Sums stay in their column, carries
// move to column c+1. Carries out of column 2N-1 always carry value 0 (the
// product fits in 2N bits) and are left unconnected.
//
// Interface: pp[i][j] (weight 2^(i+j)) in; row0, row1 (2N bits) out, with
// row0 + row1 = sum of all partial products. Where a column ends with fewer
// than two bits the missing row bits are 0, which the final adder relies on.
// Timing: purely combinational.
module rcwm_reduction
  import rcwm_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      row0,
  output logic [2*N-1:0]      row1
);
  localparam int unsigned W = 2 * N;
  localparam int unsigned S = num_stages(N);
  localparam plan_t       P = make_plan(N);

  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("rcwm_reduction: N must be between 2 and %0d", MAX_N);
  end
  if (final_max_height(N) > 2) begin : g_bad_plan
    $error("rcwm_reduction: plan leaves more than two rows");
  end

  // One array per level, so the levels are separate nets (level s feeds s+1).
  for (genvar s = 0; s <= S; s++) begin : g_lvl
    logic [N-1:0] col [W];
  end

  // Stage 0: column c holds pp[i][c-i] for every valid row i, lowest i first.
  for (genvar c = 0; c < W; c++) begin : g_init
    localparam int unsigned I0 = (c < N) ? 0 : c - N + 1;
    for (genvar k = 0; k < N; k++) begin : g_slot
      if (k < int'(P.h[0][c])) begin : g_pp
        assign g_lvl[0].col[c][k] = pp[I0+k][c-I0-k];
      end else begin : g_zero
        assign g_lvl[0].col[c][k] = 1'b0;
      end
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int unsigned H    = int'(P.h[s][c]);
      localparam int unsigned F    = int'(P.fa[s][c]);
      localparam int unsigned HA   = int'(P.ha[s][c]);
      localparam int unsigned PASS = H - 3 * F - 2 * HA;
      localparam int unsigned HO   = int'(P.h[s+1][c]);
      // Where this column's carries land in column c+1.
      localparam int unsigned CB_UP = (c + 1 < W) ? int'(P.cb[s][(c+1)%W]) : 0;

      for (genvar k = 0; k < F; k++) begin : g_fa
        logic co;
        eehcfa_full_adder u_fa (
          .a   (g_lvl[s].col[c][3*k]),
          .b   (g_lvl[s].col[c][3*k+1]),
          .c   (g_lvl[s].col[c][3*k+2]),
          .sum (g_lvl[s+1].col[c][k]),
          .cout(co)
        );
        if (c + 1 < W) begin : g_carry
          assign g_lvl[s+1].col[c+1][CB_UP+k] = co;
        end
      end

      for (genvar k = 0; k < HA; k++) begin : g_ha
        logic co;
        rcwm_half_adder u_ha (
          .a   (g_lvl[s].col[c][3*F+2*k]),
          .b   (g_lvl[s].col[c][3*F+2*k+1]),
          .sum (g_lvl[s+1].col[c][F+k]),
          .cout(co)
        );
        if (c + 1 < W) begin : g_carry
          assign g_lvl[s+1].col[c+1][CB_UP+F+k] = co;
        end
      end

      for (genvar k = 0; k < PASS; k++) begin : g_pass
        assign g_lvl[s+1].col[c][F+HA+k] = g_lvl[s].col[c][3*F+2*HA+k];
      end

      for (genvar k = HO; k < N; k++) begin : g_zero
        assign g_lvl[s+1].col[c][k] = 1'b0;
      end
    end
  end

  for (genvar c = 0; c < W; c++) begin : g_out
    assign row0[c] = g_lvl[S].col[c][0];
    assign row1[c] = g_lvl[S].col[c][1];
  end
endmodule
