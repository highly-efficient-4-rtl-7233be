// Carry-based approximate full adder, variant II (CBAA II).
//
// An exact full adder needs XOR gates for its sum. This cell drops them: the
// carry is approximated by one AND and one OR gate, carry = a | (b & c), and
// the sum is simply the inverted carry. Eight truth-table rows collapse to two
// gates plus an inverter, at the cost of wrong sum/carry values on some input
// patterns (for a=b=c=0 the sum is 1, for a=1 the carry is 1 whatever b, c).
//
// Interface: a goes straight to the OR gate, b and c to the AND gate. This
// follows the published gate drawing of the cell; the assignment of compressor
// signals to a, b, c is made by the instantiating compressor.
//
// Timing: purely combinational, two gate levels to carry, three to sum.
module cbaa2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic carry,
  output logic sum
);

  always_comb begin
    carry = a | (b & c);
    sum   = ~carry;
  end

endmodule
