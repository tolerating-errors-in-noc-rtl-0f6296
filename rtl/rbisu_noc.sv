// rbisu_noc: mesh Network-on-Chip protected by region-based bit-shuffling
// (R-BiSu).
//
// MESH_W x MESH_H xy_routers (router r = y*MESH_W + x, row 0 south, column 0
// west) are grouped into square regions of REGION x REGION routers, numbered
// the same way. A region owns its routers, their local links and the links to
// their north and east neighbours. Each flit travels through a region in that
// region's shuffled subflit order, so faulty bit positions anywhere in the
// region carry the least significant subflits of the data:
//   * an S block shuffles every flit injected by a local IP, and a D block
//     restores the order of every flit delivered to one;
//   * on each link between two regions, a region_border (D of the region left,
//     S of the region entered) sits at the end of the link next to the north
//     or east router, so the link itself carries the order of its owner;
//   * each router's routing controller de-shuffles head flits to read the
//     destination.
// Per region, rem1_unit and region_rem build the region error mask (REM) from
// the diagnosed error masks em_* of the router and its local, north and east
// links, and reg_compute turns the REM into the S and D selections. A pulse
// on cfg_start recomputes every region at once; cfg_busy stays high until all
// S and D registers are loaded (N_SF*(N_SF+2)+1 cycles). Registers should be
// updated while no packet is in flight.
//
// fi_* are fault-emulation inputs: a set bit flips that data bit on every flit
// crossing the router (at its crossbar) or the link (both directions). In
// normal use they are zero and em_* come from a fault diagnosis.
//
// Local ports use valid/ready with head/tail side-band bits; a head flit
// holds the destination row in its CW most significant bits and the column
// in the CW bits below (see xy_router). The shuffling scheme, REM hierarchy
// and mesh/flit/subflit/region sizes follow the published R-BiSu method; the link ownership
// at region borders, the placement of the border blocks, the router and the
// fault-emulation inputs are this design's choices.
module rbisu_noc
  import rbisu_pkg::*;
#(
  parameter int unsigned MESH_W     = MESH_W_DEF,
  parameter int unsigned MESH_H     = MESH_H_DEF,
  parameter int unsigned FLIT_W     = FLIT_W_DEF,
  parameter int unsigned SUBFLIT_W  = SUBFLIT_W_DEF,
  parameter int unsigned REGION     = REGION_DEF,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned NR        = MESH_W * MESH_H,
  localparam int unsigned NSF       = FLIT_W / SUBFLIT_W,
  localparam int unsigned SELW      = (NSF > 1) ? $clog2(NSF) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // local injection (IP -> NoC)
  input  logic [NR-1:0]              inj_valid,
  output logic [NR-1:0]              inj_ready,
  input  logic [NR-1:0][FLIT_W-1:0]  inj_data,
  input  logic [NR-1:0]              inj_head,
  input  logic [NR-1:0]              inj_tail,
  // local ejection (NoC -> IP)
  output logic [NR-1:0]              ej_valid,
  input  logic [NR-1:0]              ej_ready,
  output logic [NR-1:0][FLIT_W-1:0]  ej_data,
  output logic [NR-1:0]              ej_head,
  output logic [NR-1:0]              ej_tail,
  // diagnosed error masks (from fault diagnosis)
  input  logic [NR-1:0][FLIT_W-1:0]  em_router,
  input  logic [NR-1:0][FLIT_W-1:0]  em_local,
  input  logic [NR-1:0][FLIT_W-1:0]  em_north,
  input  logic [NR-1:0][FLIT_W-1:0]  em_east,
  // fault emulation (bit flips on the data path)
  input  logic [NR-1:0][FLIT_W-1:0]  fi_router,
  input  logic [NR-1:0][FLIT_W-1:0]  fi_local,
  input  logic [NR-1:0][FLIT_W-1:0]  fi_north,
  input  logic [NR-1:0][FLIT_W-1:0]  fi_east,
  // register update
  input  logic                       cfg_start,
  output logic                       cfg_busy
);

  localparam int unsigned NRX  = (MESH_W + REGION - 1) / REGION;
  localparam int unsigned NRY  = (MESH_H + REGION - 1) / REGION;
  localparam int unsigned NREG = NRX * NRY;

  function automatic int unsigned region_of(int unsigned x, int unsigned y);
    return (y / REGION) * NRX + (x / REGION);
  endfunction

  // ------------------------------------------------------ region masks
  logic [FLIT_W-1:0]             rem1 [NR];
  logic [FLIT_W-1:0]             rem  [NREG];
  logic [NREG-1:0]               reg_load, reg_busy;
  logic [NSF-1:0][SELW-1:0]      reg_ssel [NREG];
  logic [NSF-1:0][SELW-1:0]      reg_dsel [NREG];

  for (genvar r = 0; r < NR; r++) begin : g_rem1
    rem1_unit #(.FLIT_W(FLIT_W)) u_rem1 (
      .em_router (em_router[r]),
      .em_local  (em_local[r]),
      .em_north  (em_north[r]),
      .em_east   (em_east[r]),
      .rem       (rem1[r])
    );
  end

  for (genvar gy = 0; gy < NRY; gy++) begin : g_ry
    for (genvar gx = 0; gx < NRX; gx++) begin : g_rx
      localparam int unsigned G = gy * NRX + gx;
      logic [FLIT_W-1:0] sub [REGION*REGION];

      for (genvar ly = 0; ly < REGION; ly++) begin : g_ly
        for (genvar lx = 0; lx < REGION; lx++) begin : g_lx
          localparam int unsigned X = gx * REGION + lx;
          localparam int unsigned Y = gy * REGION + ly;
          if (X < MESH_W && Y < MESH_H) begin : g_in
            assign sub[ly*REGION + lx] = rem1[Y*MESH_W + X];
          end else begin : g_out
            assign sub[ly*REGION + lx] = '0;
          end
        end
      end

      region_rem #(.FLIT_W(FLIT_W), .REGION(REGION)) u_rem (
        .rem1 (sub),
        .rem  (rem[G])
      );

      reg_compute #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_comp (
        .clk   (clk),
        .rst_n (rst_n),
        .start (cfg_start),
        .rem   (rem[G]),
        .busy  (reg_busy[G]),
        .load  (reg_load[G]),
        .ssel  (reg_ssel[G]),
        .dsel  (reg_dsel[G])
      );
    end
  end

  assign cfg_busy = |reg_busy;

  // ------------------------------------------------------ routers
  wire [NPORTS-1:0]             rt_in_valid  [NR];
  wire [NPORTS-1:0]             rt_in_ready  [NR];
  wire [NPORTS-1:0][FLIT_W-1:0] rt_in_data   [NR];
  wire [NPORTS-1:0]             rt_in_head   [NR];
  wire [NPORTS-1:0]             rt_in_tail   [NR];
  wire [NPORTS-1:0]             rt_out_valid [NR];
  wire [NPORTS-1:0]             rt_out_ready [NR];
  wire [NPORTS-1:0][FLIT_W-1:0] rt_out_data  [NR];
  wire [NPORTS-1:0]             rt_out_head  [NR];
  wire [NPORTS-1:0]             rt_out_tail  [NR];

  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int unsigned R = y * MESH_W + x;
      localparam int unsigned G = region_of(x, y);

      xy_router #(
        .FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W), .MESH_W(MESH_W),
        .MESH_H(MESH_H), .X(x), .Y(y), .FIFO_DEPTH(FIFO_DEPTH)
      ) u_router (
        .clk       (clk),
        .rst_n     (rst_n),
        .cfg_load  (reg_load[G]),
        .cfg_dsel  (reg_dsel[G]),
        .fi_mask   (fi_router[R]),
        .in_valid  (rt_in_valid[R]),
        .in_ready  (rt_in_ready[R]),
        .in_data   (rt_in_data[R]),
        .in_head   (rt_in_head[R]),
        .in_tail   (rt_in_tail[R]),
        .out_valid (rt_out_valid[R]),
        .out_ready (rt_out_ready[R]),
        .out_data  (rt_out_data[R]),
        .out_head  (rt_out_head[R]),
        .out_tail  (rt_out_tail[R])
      );

      // ---- local link: S on injection, D on ejection
      logic [FLIT_W-1:0] inj_shuf, ej_shuf;

      sd_block #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_inj_s (
        .clk(clk), .rst_n(rst_n), .cfg_load(reg_load[G]),
        .cfg_sel(reg_ssel[G]), .din(inj_data[R]), .dout(inj_shuf)
      );
      assign rt_in_valid[R][P_LOCAL]  = inj_valid[R];
      assign inj_ready[R]             = rt_in_ready[R][P_LOCAL];
      assign rt_in_data[R][P_LOCAL]   = inj_shuf ^ fi_local[R];
      assign rt_in_head[R][P_LOCAL]   = inj_head[R];
      assign rt_in_tail[R][P_LOCAL]   = inj_tail[R];

      assign ej_shuf                  = rt_out_data[R][P_LOCAL] ^ fi_local[R];
      sd_block #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_ej_d (
        .clk(clk), .rst_n(rst_n), .cfg_load(reg_load[G]),
        .cfg_sel(reg_dsel[G]), .din(ej_shuf), .dout(ej_data[R])
      );
      assign ej_valid[R]              = rt_out_valid[R][P_LOCAL];
      assign rt_out_ready[R][P_LOCAL] = ej_ready[R];
      assign ej_head[R]               = rt_out_head[R][P_LOCAL];
      assign ej_tail[R]               = rt_out_tail[R][P_LOCAL];

      // ---- north link, owned by this router's region
      if (y + 1 < MESH_H) begin : g_north
        localparam int unsigned RN = R + MESH_W;
        localparam int unsigned GN = region_of(x, y + 1);
        logic [FLIT_W-1:0] up_link, up_in, dn_out, dn_link;

        assign up_link = rt_out_data[R][P_NORTH] ^ fi_north[R];
        assign dn_link = dn_out ^ fi_north[R];
        if (GN != G) begin : g_border
          region_border #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_up (
            .clk(clk), .rst_n(rst_n),
            .from_load(reg_load[G]),  .from_dsel(reg_dsel[G]),
            .to_load  (reg_load[GN]), .to_ssel  (reg_ssel[GN]),
            .din(up_link), .dout(up_in)
          );
          region_border #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_dn (
            .clk(clk), .rst_n(rst_n),
            .from_load(reg_load[GN]), .from_dsel(reg_dsel[GN]),
            .to_load  (reg_load[G]),  .to_ssel  (reg_ssel[G]),
            .din(rt_out_data[RN][P_SOUTH]), .dout(dn_out)
          );
        end else begin : g_inner
          assign up_in  = up_link;
          assign dn_out = rt_out_data[RN][P_SOUTH];
        end

        assign rt_in_valid[RN][P_SOUTH] = rt_out_valid[R][P_NORTH];
        assign rt_out_ready[R][P_NORTH] = rt_in_ready[RN][P_SOUTH];
        assign rt_in_data[RN][P_SOUTH]  = up_in;
        assign rt_in_head[RN][P_SOUTH]  = rt_out_head[R][P_NORTH];
        assign rt_in_tail[RN][P_SOUTH]  = rt_out_tail[R][P_NORTH];

        assign rt_in_valid[R][P_NORTH]  = rt_out_valid[RN][P_SOUTH];
        assign rt_out_ready[RN][P_SOUTH] = rt_in_ready[R][P_NORTH];
        assign rt_in_data[R][P_NORTH]   = dn_link;
        assign rt_in_head[R][P_NORTH]   = rt_out_head[RN][P_SOUTH];
        assign rt_in_tail[R][P_NORTH]   = rt_out_tail[RN][P_SOUTH];
      end else begin : g_north_edge
        assign rt_in_valid[R][P_NORTH]  = 1'b0;
        assign rt_in_data[R][P_NORTH]   = '0;
        assign rt_in_head[R][P_NORTH]   = 1'b0;
        assign rt_in_tail[R][P_NORTH]   = 1'b0;
        assign rt_out_ready[R][P_NORTH] = 1'b1;
      end

      // ---- east link, owned by this router's region
      if (x + 1 < MESH_W) begin : g_east
        localparam int unsigned RE = R + 1;
        localparam int unsigned GE = region_of(x + 1, y);
        logic [FLIT_W-1:0] ea_link, ea_in, we_out, we_link;

        assign ea_link = rt_out_data[R][P_EAST] ^ fi_east[R];
        assign we_link = we_out ^ fi_east[R];
        if (GE != G) begin : g_border
          region_border #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_ea (
            .clk(clk), .rst_n(rst_n),
            .from_load(reg_load[G]),  .from_dsel(reg_dsel[G]),
            .to_load  (reg_load[GE]), .to_ssel  (reg_ssel[GE]),
            .din(ea_link), .dout(ea_in)
          );
          region_border #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_we (
            .clk(clk), .rst_n(rst_n),
            .from_load(reg_load[GE]), .from_dsel(reg_dsel[GE]),
            .to_load  (reg_load[G]),  .to_ssel  (reg_ssel[G]),
            .din(rt_out_data[RE][P_WEST]), .dout(we_out)
          );
        end else begin : g_inner
          assign ea_in  = ea_link;
          assign we_out = rt_out_data[RE][P_WEST];
        end

        assign rt_in_valid[RE][P_WEST]  = rt_out_valid[R][P_EAST];
        assign rt_out_ready[R][P_EAST]  = rt_in_ready[RE][P_WEST];
        assign rt_in_data[RE][P_WEST]   = ea_in;
        assign rt_in_head[RE][P_WEST]   = rt_out_head[R][P_EAST];
        assign rt_in_tail[RE][P_WEST]   = rt_out_tail[R][P_EAST];

        assign rt_in_valid[R][P_EAST]   = rt_out_valid[RE][P_WEST];
        assign rt_out_ready[RE][P_WEST] = rt_in_ready[R][P_EAST];
        assign rt_in_data[R][P_EAST]    = we_link;
        assign rt_in_head[R][P_EAST]    = rt_out_head[RE][P_WEST];
        assign rt_in_tail[R][P_EAST]    = rt_out_tail[RE][P_WEST];
      end else begin : g_east_edge
        assign rt_in_valid[R][P_EAST]   = 1'b0;
        assign rt_in_data[R][P_EAST]    = '0;
        assign rt_in_head[R][P_EAST]    = 1'b0;
        assign rt_in_tail[R][P_EAST]    = 1'b0;
        assign rt_out_ready[R][P_EAST]  = 1'b1;
      end

      // ---- mesh edges on the south and west sides
      if (y == 0) begin : g_south_edge
        assign rt_in_valid[R][P_SOUTH]  = 1'b0;
        assign rt_in_data[R][P_SOUTH]   = '0;
        assign rt_in_head[R][P_SOUTH]   = 1'b0;
        assign rt_in_tail[R][P_SOUTH]   = 1'b0;
        assign rt_out_ready[R][P_SOUTH] = 1'b1;
      end
      if (x == 0) begin : g_west_edge
        assign rt_in_valid[R][P_WEST]   = 1'b0;
        assign rt_in_data[R][P_WEST]    = '0;
        assign rt_in_head[R][P_WEST]    = 1'b0;
        assign rt_in_tail[R][P_WEST]    = 1'b0;
        assign rt_out_ready[R][P_WEST]  = 1'b1;
      end
    end
  end

endmodule
