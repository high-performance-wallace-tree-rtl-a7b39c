// mux_adder: one-bit full adder built from an XOR and two 2:1 multiplexers.
//
// This is the adder cell used for every full addition in the multiplier, both in
// the reduction tree and in the final carry-propagate adder. The XOR of B and C
// is the select line of two multiplexers:
//   sel   = B ^ C
//   sum   = sel ? ~A : A          (A xor B xor C)
//   carry = sel ?  A : B          (majority of A, B, C: if B == C the carry is B,
//                                  otherwise it is decided by A)
// These are the sum and carry expressions the design is based on, and the cell
// drawing prints A and ~A on the sum multiplexer and B and A on the carry
// multiplexer. Which multiplexer leg is selected by sel = 0 and which by sel = 1
// follows from the expressions, not from the drawing.
//
// Interface: three one-bit inputs a, b, c and outputs sum, carry. Purely
// combinational, no clock.
module mux_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic sel;

  always_comb begin
    sel   = b ^ c;
    sum   = sel ? ~a : a;
    carry = sel ? a : b;
  end

endmodule
