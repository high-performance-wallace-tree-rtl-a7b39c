// rc_wallace_tree_tb: checks the reduction tree for 8x8 and 4x4 operands.
//
// Structure: the 4x4 tree must take two stages with five full adders and one
// half adder, the half adder in column 4 of the second stage; the 8x8 tree must
// take four stages, as a conventional Wallace tree does (8 -> 6 -> 4 -> 3 -> 2).
// Function: for every pair of operands (exhaustive for both sizes) the partial
// products are formed in the testbench and the two output rows must add up to
// x * y.
module rc_wallace_tree_tb;
  import wtm_pkg::*;

  logic [7:0]           x8, y8;
  logic [7:0][7:0]      pp8;
  logic [15:0]          a8, b8;
  logic [3:0]           x4, y4;
  logic [3:0][3:0]      pp4;
  logic [7:0]           a4, b4;
  int checks   = 0;
  int failures = 0;

  rc_wallace_tree #(.N(8)) dut8 (.pp(pp8), .row_a(a8), .row_b(b8));
  rc_wallace_tree #(.N(4)) dut4 (.pp(pp4), .row_a(a4), .row_b(b4));

  always_comb begin
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) pp8[i][j] = x8[j] & y8[i];
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) pp4[i][j] = x4[j] & y4[i];
  end

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    expect_int("stages(4)", num_stages(4), 2);
    expect_int("stages(8)", num_stages(8), 4);
    expect_int("full adders(4)", total_full_adds(4), 5);
    expect_int("half adders(4)", total_half_adds(4), 1);
    expect_int("half adder at stage 1 column 4", sched_at(4, 1, 4, SCHED_HALF_ADD), 1);
    for (int c = 0; c < 8; c++)
      expect_int("final height(4) <= 2", int'(sched_at(4, 1, c, SCHED_HEIGHT_OUT) <= 2), 1);
    for (int c = 0; c < 16; c++)
      expect_int("final height(8) <= 2", int'(sched_at(8, 3, c, SCHED_HEIGHT_OUT) <= 2), 1);

    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1ns;
      checks++;
      if (9'(a4) + 9'(b4) !== 9'(x4 * y4)) begin
        failures++;
        $display("FAIL 4x4 %0d*%0d rows %h + %h", x4, y4, a4, b4);
      end
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1ns;
      checks++;
      if (17'(a8) + 17'(b8) !== 17'(16'(x8) * 16'(y8))) begin
        failures++;
        if (failures < 10) $display("FAIL 8x8 %0d*%0d rows %h + %h", x8, y8, a8, b8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
