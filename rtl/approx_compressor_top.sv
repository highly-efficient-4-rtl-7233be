// Top level: both approximate 4:2 compressors side by side.
//
// Design I (two CBAA II cells) and design II (two CBAA IV cells) are
// alternatives; this top drives both from the same five inputs and brings out
// each one's Cout, Carry and Sum, so that the two can be compared bit by bit
// or either can be picked up by a multiplier's reduction tree. Sharing the
// inputs is a choice of this design.
//
// Interface: x = {x1, x2, x3, x4, cin}; y1 = outputs of design I,
// y2 = outputs of design II, each {cout, carry, sum}.
// Timing: purely combinational.
module approx_compressor_top
  import compressor_pkg::*;
(
  input  comp_in_t  x,
  output comp_out_t y1,
  output comp_out_t y2
);

  approx_compressor1 u_comp1 (
    .x (x),
    .y (y1)
  );

  approx_compressor2 u_comp2 (
    .x (x),
    .y (y2)
  );

endmodule
