// rem_merge: one level of the hierarchical region error mask computation.
//
// The mask of a 2s x 2s region is the bitwise OR of the masks of the four
// s x s regions it is made of (south-west, south-east, north-west,
// north-east). Applied level after level it builds REM^2 from four REM^1,
// REM^4 from four REM^2, and so on. Purely combinational.
module rem_merge #(
  parameter int unsigned FLIT_W = 64
) (
  input  logic [FLIT_W-1:0] rem_sw,
  input  logic [FLIT_W-1:0] rem_se,
  input  logic [FLIT_W-1:0] rem_nw,
  input  logic [FLIT_W-1:0] rem_ne,
  output logic [FLIT_W-1:0] rem
);

  assign rem = rem_sw | rem_se | rem_nw | rem_ne;

endmodule
