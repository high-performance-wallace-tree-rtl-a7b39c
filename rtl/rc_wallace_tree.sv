// rc_wallace_tree: reduced-complexity Wallace reduction of an N x N
// partial-product matrix down to two rows.
//
// The matrix is held as columns of bits, one column per weight 2^c. Stage 0 is
// the partial-product matrix itself (column c holds every pp[i][j] with i+j = c,
// lowest row first). Each stage compresses every column with full adders
// (mux_adder) on groups of three bits; leftover single bits and pairs are passed
// on, and a half adder is used on a leftover pair only where passing it would
// exceed the stage's row budget. The number of stages is that of a conventional
// Wallace tree, following the row sequence N -> 2*floor(N/3) + N mod 3 -> ... -> 2
// (8 -> 6 -> 4 -> 3 -> 2, four stages, for 8x8; 4 -> 3 -> 2 for 4x4).
// The per-column adder counts come from wtm_pkg::sched_at(); see wtm_pkg for the
// rule. Which cells a column gets follows that rule; the order of bits inside a
// column (sums first, then passed bits, then incoming carries) is this design's
// own choice and does not change the result.
//
// Interface: pp[i][j] = x[j] & y[i] (from pp_gen). row_a and row_b are the two
// remaining rows, bit c of each having weight 2^c; row_a + row_b = x * y.
// Some output bits are constant zero by construction (row_b in every column left
// with fewer than two bits, such as column 0, and the top column of an 8x8 or 4x4
// tree, which no carry reaches); they are kept so both rows have the product's
// full width. Purely combinational; the tree is
// num_stages(N) adder levels deep.
module rc_wallace_tree
  import wtm_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      row_a,
  output logic [2*N-1:0]      row_b
);

  localparam int W = 2 * N;             // number of columns
  localparam int S = num_stages(N);     // number of reduction stages
  localparam int H = (N > 2) ? N : 2;   // slots per column (tallest column is N)

  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("rc_wallace_tree: N must be between 2 and %0d", MAX_N);
  end

  // One generate level per stage boundary. g_lvl[s].bits[c][k] is bit k of
  // column c entering stage s (g_lvl[S] holds the final two rows); slots above
  // the column's height are tied to zero. The adders of stage s live in
  // g_lvl[s] and feed g_lvl[s+1].
  for (genvar s = 0; s <= S; s++) begin : g_lvl
    logic [H-1:0] bits     [W];
    logic [H-1:0] fa_sum   [W];
    logic [H-1:0] fa_carry [W];
    logic         ha_sum   [W];
    logic         ha_carry [W];

    // ------------------------------------------------ stage 0: partial products
    if (s == 0) begin : g_pp
      for (genvar c = 0; c < W; c++) begin : g_col
        for (genvar k = 0; k < H; k++) begin : g_slot
          if (k < pp_height(N, c)) begin : g_bit
            assign bits[c][k] = pp[pp_first_row(N, c) + k][c - pp_first_row(N, c) - k];
          end else begin : g_empty
            assign bits[c][k] = 1'b0;
          end
        end
      end
    end else begin : g_next
      // ---------------------------------------- outputs of stage s-1
      for (genvar c = 0; c < W; c++) begin : g_col
        localparam int HIN  = sched_at(N, s - 1, c, SCHED_HEIGHT_IN);
        localparam int NFA  = sched_at(N, s - 1, c, SCHED_FULL_ADDS);
        localparam int HA   = sched_at(N, s - 1, c, SCHED_HALF_ADD);
        localparam int NPAS = (HA != 0) ? 0 : HIN - 3 * NFA;        // bits passed on
        localparam int CFA  = (c > 0) ? sched_at(N, s - 1, c - 1, SCHED_FULL_ADDS) : 0;
        localparam int CHA  = (c > 0) ? sched_at(N, s - 1, c - 1, SCHED_HALF_ADD) : 0;
        localparam int BASE = NFA + HA + NPAS;                       // first carry slot
        localparam int HOUT = BASE + CFA + CHA;

        if (HOUT != sched_at(N, s - 1, c, SCHED_HEIGHT_OUT)
            || HOUT > sched_at(N, s - 1, c, SCHED_BUDGET) || HOUT > H) begin : g_check
          $error("rc_wallace_tree: column %0d exceeds the budget of stage %0d", c, s - 1);
        end

        // Slot order: full-adder sums, half-adder sum, passed bits, carries in.
        for (genvar k = 0; k < H; k++) begin : g_slot
          if (k < NFA) begin : g_sum
            assign bits[c][k] = g_lvl[s-1].fa_sum[c][k];
          end else if (k < NFA + HA) begin : g_hsum
            assign bits[c][k] = g_lvl[s-1].ha_sum[c];
          end else if (k < BASE) begin : g_pass
            assign bits[c][k] = g_lvl[s-1].bits[c][3*NFA + (k - NFA)];
          end else if (k < BASE + CFA) begin : g_cin
            assign bits[c][k] = g_lvl[s-1].fa_carry[c-1][k - BASE];
          end else if (k < HOUT) begin : g_hcin
            assign bits[c][k] = g_lvl[s-1].ha_carry[c-1];
          end else begin : g_empty
            assign bits[c][k] = 1'b0;
          end
        end
      end
    end

    // -------------------------------------------- adders of stage s
    for (genvar c = 0; c < W; c++) begin : g_add
      localparam int NFA = (s < S) ? sched_at(N, s, c, SCHED_FULL_ADDS) : 0;
      localparam int HA  = (s < S) ? sched_at(N, s, c, SCHED_HALF_ADD) : 0;

      // Full adders on groups of three bits.
      for (genvar f = 0; f < H; f++) begin : g_fa
        if (f < NFA) begin : g_cell
          mux_adder u_fa (
            .a     (bits[c][3*f]),
            .b     (bits[c][3*f+1]),
            .c     (bits[c][3*f+2]),
            .sum   (fa_sum[c][f]),
            .carry (fa_carry[c][f])
          );
        end else begin : g_none
          assign fa_sum[c][f]   = 1'b0;
          assign fa_carry[c][f] = 1'b0;
        end
      end

      // Half adder on a leftover pair, only where the schedule asks for it.
      if (HA != 0) begin : g_ha
        half_adder u_ha (
          .a     (bits[c][3*NFA]),
          .b     (bits[c][3*NFA+1]),
          .sum   (ha_sum[c]),
          .carry (ha_carry[c])
        );
      end else begin : g_no_ha
        assign ha_sum[c]   = 1'b0;
        assign ha_carry[c] = 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- outputs
  for (genvar c = 0; c < W; c++) begin : g_rows
    assign row_a[c] = g_lvl[S].bits[c][0];
    assign row_b[c] = g_lvl[S].bits[c][1];
  end

endmodule
