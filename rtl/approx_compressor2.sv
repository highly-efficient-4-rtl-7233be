// Approximate 4:2 compressor, design II: two CBAA IV cells in series.
//
// The conventional 4:2 compressor is two full adders in series: the first adds
// X1, X2, X3 and hands its carry out as Cout, the second adds the first sum,
// X4 and Cin and gives Carry and Sum. This design keeps that structure and
// replaces both full adders with the carry-based approximate adder CBAA IV
// (see cbaa4.sv), whose sum is the inverted carry, so neither stage has an
// XOR gate.
//
//   stage 1: cbaa4(a=X1, b=X2, c=X3)      -> Cout = carry, s1 = sum
//   stage 2: cbaa4(a=s1, b=X4, c=Cin)     -> Carry = carry, Sum = sum
//
// The stage wiring follows the published gate drawing of this compressor;
// bundling the ports as packed structs (compressor_pkg) is this design's
// choice.
//
// Interface: x = {x1, x2, x3, x4, cin}, y = {cout, carry, sum}.
// Timing: purely combinational, no clock or reset. Cout does not depend on
// Cin, so a row of these compressors has no ripple from column to column.
module approx_compressor2
  import compressor_pkg::*;
(
  input  comp_in_t  x,
  output comp_out_t y
);

  logic s1;  // stage-1 sum, the first input of stage 2

  cbaa4 u_stage1 (
    .a     (x.x1),
    .b     (x.x2),
    .c     (x.x3),
    .carry (y.cout),
    .sum   (s1)
  );

  cbaa4 u_stage2 (
    .a     (s1),
    .b     (x.x4),
    .c     (x.cin),
    .carry (y.carry),
    .sum   (y.sum)
  );

endmodule
