// region_rem: region error mask of one REGION x REGION region.
//
// Input rem1[y*REGION + x] is the size-1 mask of the router at column x, row
// y of the region (row 0 is the south row). When REGION is a power of two the
// mask is built as a quad tree of rem_merge nodes: level k holds the masks of
// the 2^k x 2^k sub-regions, each the OR of four level k-1 masks. For any
// other REGION (the method allows other sizes) every size-1 mask is ORed
// directly; the result is the same. Purely combinational.
module region_rem #(
  parameter int unsigned FLIT_W = 64,
  parameter int unsigned REGION = 2
) (
  input  logic [FLIT_W-1:0] rem1 [REGION*REGION],
  output logic [FLIT_W-1:0] rem
);

  localparam int unsigned LEVELS = $clog2(REGION);
  localparam bit          POW2   = ((1 << LEVELS) == REGION);

  if (POW2 && LEVELS > 0) begin : g_tree
    // g_lvl[k].m[y*REGION + x] holds the mask of sub-region (x, y) of edge
    // 2^k; entries beyond (REGION >> k) per edge are unused and tied to 0.
    for (genvar k = 0; k <= LEVELS; k++) begin : g_lvl
      localparam int unsigned E = REGION >> k;   // sub-regions per edge
      logic [FLIT_W-1:0] m [REGION*REGION];
      for (genvar y = 0; y < REGION; y++) begin : g_y
        for (genvar x = 0; x < REGION; x++) begin : g_x
          if (k == 0) begin : g_leaf
            assign m[y*REGION + x] = rem1[y*REGION + x];
          end else if (x < E && y < E) begin : g_node
            rem_merge #(.FLIT_W(FLIT_W)) u_merge (
              .rem_sw (g_lvl[k-1].m[(2*y)  *REGION + 2*x]),
              .rem_se (g_lvl[k-1].m[(2*y)  *REGION + 2*x+1]),
              .rem_nw (g_lvl[k-1].m[(2*y+1)*REGION + 2*x]),
              .rem_ne (g_lvl[k-1].m[(2*y+1)*REGION + 2*x+1]),
              .rem    (m[y*REGION + x])
            );
          end else begin : g_unused
            assign m[y*REGION + x] = '0;
          end
        end
      end
    end

    assign rem = g_lvl[LEVELS].m[0];
  end else begin : g_flat
    always_comb begin
      rem = '0;
      for (int i = 0; i < REGION*REGION; i++) rem |= rem1[i];
    end
  end

endmodule
