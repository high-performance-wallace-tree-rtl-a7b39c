// final_adder: ripple-carry adder of WIDTH mux_adder cells.
//
// Adds the two rows left by the reduction tree into the product. Bit k is one
// mux_adder whose third input is the carry from bit k-1; bit 0 takes carry-in 0.
// The carry out of the top bit is discarded: the sum is taken modulo 2^WIDTH,
// which loses nothing when the rows come from a 2N-bit product.
// The type of the final adder is not specified by the design; a ripple-carry
// chain of the same multiplexer adder cell is the simplest adder built from it.
//
// Interface: a, b are WIDTH-bit addends; sum = (a + b) mod 2^WIDTH.
// Purely combinational; the worst-case path runs through all WIDTH cells.
module final_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    mux_adder u_add (
      .a     (a[k]),
      .b     (b[k]),
      .c     (carry[k]),
      .sum   (sum[k]),
      .carry (carry[k+1])
    );
  end

  // carry[WIDTH] is the discarded carry out of the top bit.
  logic unused_carry_out;
  assign unused_carry_out = carry[WIDTH];

endmodule
