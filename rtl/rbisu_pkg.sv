// rbisu_pkg: constants and types shared by the region-based bit-shuffling
// (R-BiSu) NoC. The defaults are those of the evaluated configuration: an
// 8x8 mesh carrying 64-bit flits split into 4-bit subflits, protected by
// regions of 2x2 routers. Port numbering and the header layout are this
// design's own choices.
package rbisu_pkg;

  // Evaluated configuration.
  localparam int unsigned MESH_W_DEF   = 8;   // routers per row
  localparam int unsigned MESH_H_DEF   = 8;   // routers per column
  localparam int unsigned FLIT_W_DEF   = 64;  // S_F, flit size in bits
  localparam int unsigned SUBFLIT_W_DEF = 4;  // S_SF, subflit size in bits
  localparam int unsigned REGION_DEF   = 2;   // region edge, in routers
  localparam int unsigned PKT_FLITS    = 16;  // flits per packet

  // Router ports.
  localparam int unsigned NPORTS = 5;
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

endpackage
