// rem1_unit: region error mask of size 1 (REM^1) for one router.
//
// A set bit in an error mask marks a faulty bit position of the flit data
// path. The 1x1 region of a router holds the router itself (buffers and
// crossbar) and its local, north and east interconnections, so its mask is the
// bitwise OR of those four masks. The masks come from a fault diagnosis
// (built-in self-test) that lies outside this design. Purely combinational.
module rem1_unit #(
  parameter int unsigned FLIT_W = 64
) (
  input  logic [FLIT_W-1:0] em_router,
  input  logic [FLIT_W-1:0] em_local,
  input  logic [FLIT_W-1:0] em_north,
  input  logic [FLIT_W-1:0] em_east,
  output logic [FLIT_W-1:0] rem
);

  assign rem = em_router | em_local | em_north | em_east;

endmodule
