// wtm_4x4_tb: the 4x4 configuration of the multiplier, the size the reduction
// scheme is first illustrated with. Checks all 256 operand pairs against x * y
// and the structure of the 4x4 tree: two stages, five full adders, one half
// adder.
module wtm_4x4_tb;
  import wtm_pkg::*;

  logic [3:0] x, y;
  logic [7:0] product;
  int checks   = 0;
  int failures = 0;

  wtm_multiplier #(.N(4)) dut (.x(x), .y(y), .product(product));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++; if (num_stages(4) != 2)      begin failures++; $display("FAIL stage count"); end
    checks++; if (total_full_adds(4) != 5) begin failures++; $display("FAIL full adder count"); end
    checks++; if (total_half_adds(4) != 1) begin failures++; $display("FAIL half adder count"); end
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1ns;
      checks++;
      if (product !== 8'(x) * 8'(y)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", x, y, product);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
