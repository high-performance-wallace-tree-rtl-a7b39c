// half_adder: one-bit half adder in the same multiplexer style as mux_adder.
//
// The reduction tree uses a half adder only where a leftover pair of bits would
// otherwise make a column too tall for the stage. The cell is the mux_adder with
// its third input tied to zero, simplified: b is the select line,
//   sum   = b ? ~a : a            (a xor b)
//   carry = b ?  a : 1'b0         (a and b)
// The design only names the half adder; this multiplexer form is a choice made
// here to keep one cell style across the tree.
//
// Interface: inputs a, b; outputs sum, carry. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = b ? ~a : a;
    carry = b ? a : 1'b0;
  end

endmodule
