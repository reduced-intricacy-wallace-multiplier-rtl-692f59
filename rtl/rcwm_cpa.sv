// rcwm_cpa: final carry-propagate adder of the RCW multiplier.
//
// After the reduction every column holds at most two bits. The adder is a
// ripple chain whose cell in each column is chosen from the reduction plan:
// the low columns, which hold a single bit plus at most an incoming carry,
// get half adders (a ripple of num_stages(N)+1 half adders for the sizes the
// tree is built for), and the columns where two row bits and a carry meet get
// hybrid full adders (eehcfa_full_adder). A column with one input just
// passes it on. Ripple carry is this design's choice of propagate adder; the
// cell types follow the plan.
//
// Interface: row0, row1 (2N bits) in, as produced by rcwm_reduction: row1[c]
// (and row0[c] where the column is empty) must be 0 where the plan leaves
// fewer bits, so those inputs are not read. p = row0 + row1 (mod 2^2N) out.
// Timing: purely combinational; the critical path runs through the ripple.
module rcwm_cpa
  import rcwm_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [2*N-1:0] row0,
  input  logic [2*N-1:0] row1,
  output logic [2*N-1:0] p
);
  localparam int unsigned      W  = 2 * N;
  localparam int unsigned      S  = num_stages(N);
  localparam plan_t            P  = make_plan(N);
  localparam logic [MAX_COL:0] CM = cpa_carry_mask(N);

  logic [W:0] carry;
  assign carry[0] = 1'b0;

  for (genvar c = 0; c < W; c++) begin : g_col
    localparam int unsigned HF = int'(P.h[S][c]);
    localparam bit          CI = CM[c];

    if (HF == 2 && CI) begin : g_fa
      eehcfa_full_adder u_fa (
        .a   (row0[c]),
        .b   (row1[c]),
        .c   (carry[c]),
        .sum (p[c]),
        .cout(carry[c+1])
      );
    end else if (HF == 2) begin : g_ha_rows
      rcwm_half_adder u_ha (
        .a   (row0[c]),
        .b   (row1[c]),
        .sum (p[c]),
        .cout(carry[c+1])
      );
    end else if (HF == 1 && CI) begin : g_ha_carry
      rcwm_half_adder u_ha (
        .a   (row0[c]),
        .b   (carry[c]),
        .sum (p[c]),
        .cout(carry[c+1])
      );
    end else if (HF == 1) begin : g_pass_row
      assign p[c]       = row0[c];
      assign carry[c+1] = 1'b0;
    end else if (CI) begin : g_pass_carry
      assign p[c]       = carry[c];
      assign carry[c+1] = 1'b0;
    end else begin : g_empty
      assign p[c]       = 1'b0;
      assign carry[c+1] = 1'b0;
    end
  end
endmodule
