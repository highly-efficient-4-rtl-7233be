// Carry-based approximate full adder, variant IV (CBAA IV).
//
// The carry is the exact full-adder carry, the majority of the three inputs,
// built from three two-input AND gates whose outputs are merged by two OR
// gates: carry = (a & b) | (b & c) | (a & c). The XOR-based sum of an exact
// full adder is replaced by the inverted carry, sum = ~carry, which is right
// on six of the eight input patterns (wrong for 000 and 111).
//
// Interface: three symmetric one-bit inputs, carry and sum outputs.
// The gate structure follows the published drawing of the cell.
//
// Timing: purely combinational, three gate levels to carry, four to sum.
module cbaa4 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic carry,
  output logic sum
);

  logic ab, bc, ac;

  always_comb begin
    ab    = a & b;
    bc    = b & c;
    ac    = a & c;
    carry = (ab | bc) | ac;
    sum   = ~carry;
  end

endmodule
