// final_adder_tb: checks the 16-bit ripple-carry adder of multiplexer cells
// against a + b modulo 2^16, with random addends and the carry-chain corners
// (all-ones plus one, which ripples through every cell).
module final_adder_tb;

  localparam int WIDTH = 16;

  logic [WIDTH-1:0] a, b, sum;
  int checks   = 0;
  int failures = 0;

  final_adder #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .sum(sum));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [WIDTH-1:0] va, logic [WIDTH-1:0] vb);
    logic [WIDTH:0] expected;
    a = va;
    b = vb;
    #1ns;
    expected = {1'b0, va} + {1'b0, vb};
    checks++;
    if (sum !== expected[WIDTH-1:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", va, vb, sum, expected[WIDTH-1:0]);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, 16'd1);
    check_one(16'd1, '1);
    check_one('1, '1);
    check_one(16'h5555, 16'hAAAA);
    for (int t = 0; t < 5000; t++) check_one(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
