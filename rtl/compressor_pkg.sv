// Shared types for the approximate 4:2 compressors.
//
// A 4:2 compressor takes five bits of equal weight, X1..X4 and a carry-in Cin
// from the neighbouring column, and returns Sum (weight 1) plus two bits of
// weight 2, Cout (passed to the next column's Cin) and Carry. The exact value
// relation is X1+X2+X3+X4+Cin = Sum + 2*(Cout + Carry); the approximate
// compressors here trade that equality for fewer gates.
//
// The input and output bundles are packed structs so that a compressor column
// can be wired as one vector. The grouping is a choice of this design.
package compressor_pkg;

  typedef struct packed {
    logic x1;
    logic x2;
    logic x3;
    logic x4;
    logic cin;
  } comp_in_t;

  typedef struct packed {
    logic cout;
    logic carry;
    logic sum;
  } comp_out_t;

endpackage
