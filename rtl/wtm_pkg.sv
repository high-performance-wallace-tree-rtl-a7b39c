// wtm_pkg: elaboration-time schedule of the reduced-complexity Wallace reduction.
//
// The reduction works column by column on the partial-product matrix. Each stage
// j has a row budget r(j+1) = 2*floor(r(j)/3) + r(j) mod 3, starting from
// r(0) = N, which is the row count a conventional Wallace tree reaches after the
// same number of stages. In every column of a stage:
//   * each group of three bits goes into a full adder (sum stays, carry moves up);
//   * a leftover single bit is passed on unchanged;
//   * a leftover pair is passed on unchanged, unless passing it would make that
//     column taller than the stage's row budget. Only then is a half adder used.
// Columns are scheduled from the least significant upward, so the carries a
// column receives are known when its half-adder decision is made.
//
// Using full adders everywhere and half adders only where the stage count would
// otherwise grow is the rule of the reduced-complexity Wallace multiplier. The
// exact "budget" test above is this design's formulation of that rule; for a 4x4
// multiplier it places the full adders and the single half adder exactly as in the
// published 4x4 reduction diagram (two stages, five full adders, one half adder).
// For 8x8 it gives four stages, 39 full adders and 3 half adders.
//
// All functions are constant functions used by rc_wallace_tree at elaboration and
// by testbenches to know the expected structure. They hold no hardware.
package wtm_pkg;

  // Largest operand width the schedule functions support.
  localparam int MAX_N = 32;
  localparam int MAX_W = 2 * MAX_N;

  // Function codes for sched_at().
  localparam int SCHED_HEIGHT_IN  = 0;  // column height entering stage s
  localparam int SCHED_FULL_ADDS  = 1;  // full adders in the column at stage s
  localparam int SCHED_HALF_ADD   = 2;  // 1 if the column uses a half adder at stage s
  localparam int SCHED_HEIGHT_OUT = 3;  // column height leaving stage s
  localparam int SCHED_BUDGET     = 4;  // row budget after stage s (same for all columns)

  // Row count after one Wallace stage.
  function automatic int next_rows(int r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // Number of reduction stages for an n x n multiplier (until at most two rows remain).
  function automatic int num_stages(int n);
    int r;
    int s;
    r = n;
    s = 0;
    while (r > 2) begin
      r = next_rows(r);
      s++;
    end
    return s;
  endfunction

  // Number of partial-product bits of weight 2^c in an n x n product.
  function automatic int pp_height(int n, int c);
    if (c < 0 || c > 2 * n - 2) return 0;
    if (c < n) return c + 1;
    return 2 * n - 1 - c;
  endfunction

  // Lowest row index (multiplier bit y[i]) contributing to column c.
  function automatic int pp_first_row(int n, int c);
    return (c >= n) ? c - n + 1 : 0;
  endfunction

  // One quantity of the schedule for stage s and column c (what = SCHED_*).
  function automatic int sched_at(int n, int s, int c, int what);
    int h  [MAX_W];
    int nh [MAX_W];
    int fa [MAX_W];
    int ha [MAX_W];
    int r;
    int cout;
    int rem;
    int nxt;
    if (c < 0 || c >= 2 * n || c >= MAX_W) return 0;
    for (int k = 0; k < MAX_W; k++) h[k] = pp_height(n, k);
    r = n;
    for (int st = 0; st <= s; st++) begin
      r    = next_rows(r);
      cout = 0;
      for (int k = 0; k < 2 * n; k++) begin
        fa[k] = h[k] / 3;
        rem   = h[k] % 3;
        nxt   = fa[k] + rem + cout;
        ha[k] = 0;
        if (rem == 2 && nxt > r) begin
          ha[k] = 1;
          nxt   = fa[k] + 1 + cout;
        end
        nh[k] = nxt;
        cout  = fa[k] + ha[k];
      end
      if (st == s) begin
        case (what)
          SCHED_HEIGHT_IN:  return h[c];
          SCHED_FULL_ADDS:  return fa[c];
          SCHED_HALF_ADD:   return ha[c];
          SCHED_HEIGHT_OUT: return nh[c];
          SCHED_BUDGET:     return r;
          default:          return 0;
        endcase
      end
      for (int k = 0; k < 2 * n; k++) h[k] = nh[k];
    end
    return 0;
  endfunction

  // Total full adders in the reduction tree of an n x n multiplier.
  function automatic int total_full_adds(int n);
    int t;
    t = 0;
    for (int s = 0; s < num_stages(n); s++)
      for (int c = 0; c < 2 * n; c++) t += sched_at(n, s, c, SCHED_FULL_ADDS);
    return t;
  endfunction

  // Total half adders in the reduction tree of an n x n multiplier.
  function automatic int total_half_adds(int n);
    int t;
    t = 0;
    for (int s = 0; s < num_stages(n); s++)
      for (int c = 0; c < 2 * n; c++) t += sched_at(n, s, c, SCHED_HALF_ADD);
    return t;
  endfunction

endpackage
