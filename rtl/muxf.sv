// muxf: the slice's wide-function 2:1 multiplexer (MUXF7 / MUXF8).
//
// MUXF7 joins two 6-input LUT outputs into a function of 7 inputs and MUXF8
// joins two MUXF7 outputs into a function of 8 inputs; both are this same
// 2:1 multiplexer, o = s ? i1 : i0. Purely combinational.
//
// Which data input a select of 1 picks is this design's reading of the 4x4
// multiplier's diagram, where the path to the top product bit only works
// if the upper input (i1 here) is taken when the select is 1.
module muxf (
  input  logic i0,
  input  logic i1,
  input  logic s,
  output logic o
);
  assign o = s ? i1 : i0;
endmodule
