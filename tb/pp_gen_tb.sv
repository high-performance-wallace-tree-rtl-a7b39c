// pp_gen_tb: checks every partial-product bit of the 8x8 generator against
// x[j] & y[i], and that the weighted sum of all bits equals x * y, for random
// operands plus the all-zero and all-one corners.
module pp_gen_tb;

  localparam int N = 8;

  logic [N-1:0]        x, y;
  logic [N-1:0][N-1:0] pp;
  int checks   = 0;
  int failures = 0;

  pp_gen #(.N(N)) dut (.x(x), .y(y), .pp(pp));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint total;
    total = 0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        checks++;
        if (pp[i][j] !== (x[j] & y[i])) begin
          failures++;
          $display("FAIL x=%h y=%h pp[%0d][%0d]=%0b", x, y, i, j, pp[i][j]);
        end
        if (pp[i][j]) total += longint'(1) << (i + j);
      end
    end
    checks++;
    if (total != longint'(x) * longint'(y)) begin
      failures++;
      $display("FAIL x=%h y=%h weighted sum %0d", x, y, total);
    end
  endtask

  initial begin
    x = '0; y = '0; #1ns; check_one();
    x = '1; y = '1; #1ns; check_one();
    for (int t = 0; t < 500; t++) begin
      x = N'($urandom);
      y = N'($urandom);
      #1ns;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
