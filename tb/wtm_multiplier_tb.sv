// wtm_multiplier_tb: end-to-end test of the 8x8 multiplier at its default size.
//
// Applies all 65,536 operand pairs to wtm_multiplier (no parameter override) and
// compares product with x * y computed in the testbench. It also counts how
// often each mechanism of the datapath was exercised and fails if one never was:
//   * every half adder of the reduction tree produced a carry at least once;
//   * the final ripple adder propagated a carry into its top bit;
//   * products equal to zero (a zero operand) and the largest product 255*255.
module wtm_multiplier_tb;
  import wtm_pkg::*;

  localparam int N = 8;
  localparam int S = num_stages(N);
  localparam int W = 2 * N;

  logic [N-1:0]   x, y;
  logic [W-1:0]   product;
  int checks   = 0;
  int failures = 0;

  int ha_cells      = 0;   // half adders present in the tree
  int ha_carry_hits = 0;   // operand pairs for which some half adder carried
  int ha_quiet      = 0;   // half adders that never produced a carry
  int top_carry     = 0;   // final adder carries into its top bit
  int zero_products = 0;
  int max_products  = 0;

  wtm_multiplier dut (.x(x), .y(y), .product(product));

  // One flag per (stage, column): set when that half adder's carry was 1.
  bit ha_seen [S][W];
  bit ha_any;

  for (genvar s = 0; s < S; s++) begin : g_s
    for (genvar c = 0; c < W; c++) begin : g_c
      if (sched_at(N, s, c, SCHED_HALF_ADD) != 0) begin : g_ha
        always @(x or y) begin
          #0.5ns;
          if (dut.u_tree.g_lvl[s].ha_carry[c]) ha_seen[s][c] = 1'b1;
        end
      end
    end
  end

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expected;
    for (int s = 0; s < S; s++) for (int c = 0; c < W; c++) ha_seen[s][c] = 1'b0;
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {x, y} = (2 * N)'(v);
      #1ns;
      expected = W'(x) * W'(y);
      checks++;
      if (product !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d", x, y, product, expected);
      end
      if (dut.u_cpa.carry[W-1]) top_carry++;
      if (expected == 0) zero_products++;
      if (x == '1 && y == '1) max_products++;
    end

    for (int s = 0; s < S; s++) begin
      for (int c = 0; c < W; c++) begin
        if (sched_at(N, s, c, SCHED_HALF_ADD) != 0) begin
          ha_cells++;
          if (ha_seen[s][c]) ha_carry_hits++;
          else ha_quiet++;
        end
      end
    end

    $display("half adders %0d, of which carried at least once %0d", ha_cells, ha_carry_hits);
    $display("final-adder carries into the top bit %0d", top_carry);
    $display("zero products %0d, largest products %0d", zero_products, max_products);
    checks++; if (ha_cells != total_half_adds(N)) begin failures++; $display("FAIL half adder count"); end
    checks++; if (ha_cells == 0 || ha_quiet != 0) begin failures++; $display("FAIL half adder never carried"); end
    checks++; if (top_carry == 0) begin failures++; $display("FAIL no carry into the top bit"); end
    checks++; if (zero_products == 0) begin failures++; $display("FAIL no zero product"); end
    checks++; if (max_products == 0) begin failures++; $display("FAIL no largest product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
