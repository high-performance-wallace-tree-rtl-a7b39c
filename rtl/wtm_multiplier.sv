// wtm_multiplier: N x N unsigned Wallace tree multiplier, 8x8 by default.
//
// product = x * y, computed in three steps:
//   1. pp_gen forms the N*N partial-product bits x[j] & y[i];
//   2. rc_wallace_tree compresses them, column by column, to two rows using the
//      multiplexer full adder (mux_adder) everywhere and a half adder only where
//      the number of stages would otherwise exceed a conventional Wallace tree
//      (8x8: four stages, 39 full adders, 3 half adders);
//   3. final_adder, a ripple chain of the same mux_adder cell, adds the two rows.
// The port names and widths (x[7:0], y[7:0], product[15:0]) are those of the
// design's 8x8 block symbol. The choice of a ripple-carry final adder and the
// unsigned operands are this design's own reading.
//
// Interface: x, y are N-bit unsigned operands; product is 2N bits. Purely
// combinational: no clock, no reset, the product is valid one propagation delay
// after the operands change.
module wtm_multiplier #(
  parameter int N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] product
);

  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      row_a;
  logic [2*N-1:0]      row_b;

  pp_gen #(.N(N)) u_pp (
    .x  (x),
    .y  (y),
    .pp (pp)
  );

  rc_wallace_tree #(.N(N)) u_tree (
    .pp    (pp),
    .row_a (row_a),
    .row_b (row_b)
  );

  final_adder #(.WIDTH(2 * N)) u_cpa (
    .a   (row_a),
    .b   (row_b),
    .sum (product)
  );

endmodule
