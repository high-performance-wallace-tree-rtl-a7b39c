// mux_adder_tb: exhaustive check of the multiplexer full adder.
//
// Drives all eight input combinations and compares sum and carry with the
// arithmetic sum a + b + c, worked out in the testbench. Also checks the two
// multiplexer cases that define the cell: when b == c the carry equals b and the
// sum equals a; when b != c the carry equals a and the sum equals ~a.
module mux_adder_tb;

  logic a, b, c;
  logic sum, carry;
  int   checks   = 0;
  int   failures = 0;

  mux_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expect_total;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1ns;
      expect_total = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if ({carry, sum} !== expect_total) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> carry=%0b sum=%0b, expected %0d", a, b, c, carry, sum, expect_total);
      end
      checks++;
      if (b == c ? (carry !== b || sum !== a) : (carry !== a || sum !== ~a)) begin
        failures++;
        $display("FAIL multiplexer case a=%0b b=%0b c=%0b", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
