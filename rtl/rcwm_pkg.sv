// rcwm_pkg: elaboration-time planner for the reduced-complexity Wallace (RCW)
// multiplier.
//
// The reduction tree is fixed entirely by the operand width N, so it is
// computed here by constant functions and the RTL simply instantiates what
// the plan says. The rules are:
//   * Stage count: the same as a standard Wallace tree. The number of rows
//     goes r -> 2*floor(r/3) + (r mod 3) per stage until two rows remain
//     (8 -> 6 -> 4 -> 3 -> 2 for N = 8, i.e. four stages).
//   * In every column, each group of three bits gets a full adder; a
//     leftover single bit or pair is passed on unchanged.
//   * A half adder is used on a leftover pair only when passing the pair would
//     make that column taller than the Wallace row count for the next stage,
//     so the RCW tree never needs more stages than the standard one.
// Columns are processed from the least significant one up, because the
// carries arriving from column c-1 count towards the height of column c.
//
// Bit order inside a column at the output of a stage (used by the RTL):
//   [full-adder sums][half-adder sums][passed bits][carries from column c-1]
//
// With these rules the full-adder and half-adder counts come out as
// 39/3, 201/9, 490/16, 907/23 and 3853/53 for N = 8/16/24/32/64.
package rcwm_pkg;

  // Largest supported operand width and the sizes of the plan tables.
  localparam int unsigned MAX_N   = 64;
  localparam int unsigned MAX_COL = 2 * MAX_N;
  localparam int unsigned MAX_ST  = 12;

  typedef logic [7:0] count_t;
  // grid[s][c]: one count per stage s (0 = partial products) and column c.
  typedef count_t [MAX_ST:0][MAX_COL-1:0] grid_t;

  typedef struct packed {
    grid_t h;     // column height entering stage s (s = stages: final height)
    grid_t fa;    // full adders in column c during stage s
    grid_t ha;    // half adders in column c during stage s
    grid_t cb;    // first slot of the carries from column c-1 in the output
                  // of stage s (= fa + ha + passed bits of column c)
  } plan_t;

  // Row count after one Wallace stage.
  function automatic int unsigned next_rows(int unsigned r);
    return (r > 2) ? 2 * (r / 3) + (r % 3) : r;
  endfunction

  // Number of reduction stages for an N x N multiplier.
  function automatic int unsigned num_stages(int unsigned n);
    int unsigned r = n;
    int unsigned k = 0;
    while (r > 2) begin
      r = next_rows(r);
      k++;
    end
    return k;
  endfunction

  // Number of partial-product bits of weight 2^c.
  function automatic int unsigned pp_height(int unsigned n, int unsigned c);
    if (c + 1 >= 2 * n) return 0;
    return (c < n) ? c + 1 : 2 * n - 1 - c;
  endfunction

  function automatic plan_t make_plan(int unsigned n);
    plan_t       p;
    int unsigned rows, s_cnt, cin, f, rem, hh, out;
    for (int unsigned s = 0; s <= MAX_ST; s++) begin
      for (int unsigned c = 0; c < MAX_COL; c++) begin
        p.h[s][c]  = '0;
        p.fa[s][c] = '0;
        p.ha[s][c] = '0;
        p.cb[s][c] = '0;
      end
    end
    s_cnt = num_stages(n);
    for (int unsigned c = 0; c < 2 * n; c++) p.h[0][c] = count_t'(pp_height(n, c));
    rows = n;
    for (int unsigned s = 0; s < s_cnt; s++) begin
      rows = next_rows(rows);
      cin  = 0;
      for (int unsigned c = 0; c < 2 * n; c++) begin
        hh  = int'(p.h[s][c]);
        f   = hh / 3;
        rem = hh % 3;
        out = f + rem + cin;
        p.fa[s][c] = count_t'(f);
        p.ha[s][c] = '0;
        if (out > rows && rem == 2) begin
          p.ha[s][c] = count_t'(1);
          out        = out - 1;
        end
        p.cb[s][c]   = count_t'(out - cin);
        p.h[s+1][c]  = count_t'(out);
        cin          = f + int'(p.ha[s][c]);
      end
    end
    return p;
  endfunction

  // Largest column height left after the last stage (must be 2 or less).
  function automatic int unsigned final_max_height(int unsigned n);
    plan_t       p;
    int unsigned m = 0;
    p = make_plan(n);
    for (int unsigned c = 0; c < 2 * n; c++)
      if (int'(p.h[num_stages(n)][c]) > m) m = int'(p.h[num_stages(n)][c]);
    return m;
  endfunction

  // Total full / half adders of the reduction tree (final adder excluded).
  function automatic int unsigned total_fa(int unsigned n);
    plan_t       p;
    int unsigned t = 0;
    p = make_plan(n);
    for (int unsigned s = 0; s < num_stages(n); s++)
      for (int unsigned c = 0; c < 2 * n; c++) t += int'(p.fa[s][c]);
    return t;
  endfunction

  function automatic int unsigned total_ha(int unsigned n);
    plan_t       p;
    int unsigned t = 0;
    p = make_plan(n);
    for (int unsigned s = 0; s < num_stages(n); s++)
      for (int unsigned c = 0; c < 2 * n; c++) t += int'(p.ha[s][c]);
    return t;
  endfunction

  // Final adder: bit c is set when a carry enters column c. Column c holds
  // h bits from the reduction plus that carry; two or three inputs make a
  // carry into column c+1.
  function automatic logic [MAX_COL:0] cpa_carry_mask(int unsigned n);
    plan_t             p;
    logic [MAX_COL:0]  m;
    int unsigned       k;
    p    = make_plan(n);
    m    = '0;
    for (int unsigned c = 0; c < 2 * n; c++) begin
      k = int'(p.h[num_stages(n)][c]) + (m[c] ? 1 : 0);
      m[c+1] = (k >= 2);
    end
    return m;
  endfunction

endpackage
