// xy_router: five-port wormhole mesh router with XY routing, extended for
// bit-shuffling.
//
// Ports are numbered as rbisu_pkg::port_e (local, north, east, south, west).
// Every input has a flit_fifo buffer; every output has an arbiter and a
// crossbar multiplexer. A packet is a head flit, body flits and a tail flit,
// marked by the head/tail side-band bits that travel next to the FLIT_W data
// bits. The flits a router sees are in the shuffled order of its region, so
// the routing controller (CTRL) reads the destination of a head flit through
// its own de-shuffler (one sd_block per input, loaded with the region's
// de-shuffle selection). The destination sits in the most significant logical
// bits of the head flit: [FLIT_W-1 -: CW] is the row (y), the next CW bits
// the column (x), CW = clog2 of the larger mesh edge. XY routing sends the
// packet along x first, then along y; destinations beyond the mesh edge are
// clamped to it so that a corrupted header can never leave the mesh.
//
// Arbitration: a free output grants, round robin, one of the inputs whose
// head flit asks for it, and forwards that head flit in the same cycle. The
// output then stays locked to that input until the tail flit has passed.
// Flow control is valid/ready on every port; in_ready is "buffer not full".
// Faults inside the router (buffers, crossbar) are emulated by fi_mask,
// XORed onto the data of every flit that leaves through the crossbar.
//
// The R-BiSu method names the router's parts (buffers, crossbar, CTRL with an
// extra D block, arbiter) and its XY routing but takes the router itself from
// an existing NoC; buffer depth, flow control, arbitration and header layout
// are this design's choices. Latency: one cycle from a flit entering an empty
// buffer to it leaving on its output, when the output is free.
module xy_router
  import rbisu_pkg::*;
#(
  parameter int unsigned FLIT_W     = 64,
  parameter int unsigned SUBFLIT_W  = 4,
  parameter int unsigned MESH_W     = 8,
  parameter int unsigned MESH_H     = 8,
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned NSF       = FLIT_W / SUBFLIT_W,
  localparam int unsigned SELW      = (NSF > 1) ? $clog2(NSF) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // region configuration of the CTRL de-shufflers
  input  logic                          cfg_load,
  input  logic [NSF-1:0][SELW-1:0]      cfg_dsel,
  // fault emulation: bit flips applied to all flits crossing the router
  input  logic [FLIT_W-1:0]             fi_mask,
  // input ports
  input  logic [NPORTS-1:0]             in_valid,
  output logic [NPORTS-1:0]             in_ready,
  input  logic [NPORTS-1:0][FLIT_W-1:0] in_data,
  input  logic [NPORTS-1:0]             in_head,
  input  logic [NPORTS-1:0]             in_tail,
  // output ports
  output logic [NPORTS-1:0]             out_valid,
  input  logic [NPORTS-1:0]             out_ready,
  output logic [NPORTS-1:0][FLIT_W-1:0] out_data,
  output logic [NPORTS-1:0]             out_head,
  output logic [NPORTS-1:0]             out_tail
);

  localparam int unsigned CW  = ($clog2(MESH_W) > $clog2(MESH_H)) ?
                                (($clog2(MESH_W) > 0) ? $clog2(MESH_W) : 1) :
                                (($clog2(MESH_H) > 0) ? $clog2(MESH_H) : 1);
  localparam int unsigned PW  = $clog2(NPORTS);

  // ---------------------------------------------------------------- buffers
  logic [NPORTS-1:0][FLIT_W-1:0] q_data;
  logic [NPORTS-1:0]             q_head, q_tail, q_empty, q_full, q_pop;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.W(FLIT_W+2), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (in_valid[i] && in_ready[i]),
      .din   ({in_head[i], in_tail[i], in_data[i]}),
      .pop   (q_pop[i]),
      .dout  ({q_head[i], q_tail[i], q_data[i]}),
      .full  (q_full[i]),
      .empty (q_empty[i])
    );
    assign in_ready[i] = !q_full[i];
  end

  // ------------------------------------------------- CTRL: header + routing
  logic [NPORTS-1:0][FLIT_W-1:0] hdr;      // de-shuffled buffer heads
  port_e                         route [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_ctrl
    sd_block #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_ctrl_d (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg_load (cfg_load),
      .cfg_sel  (cfg_dsel),
      .din      (q_data[i]),
      .dout     (hdr[i])
    );

    logic [CW-1:0] dy, dx;
    int            cy, cx;
    assign dy = hdr[i][FLIT_W-1 -: CW];
    assign dx = hdr[i][FLIT_W-1-CW -: CW];

    always_comb begin
      cx = 32'(dx);
      cy = 32'(dy);
      if (cx > int'(MESH_W) - 1) cx = int'(MESH_W) - 1;
      if (cy > int'(MESH_H) - 1) cy = int'(MESH_H) - 1;
      if      (cx > int'(X)) route[i] = P_EAST;
      else if (cx < int'(X)) route[i] = P_WEST;
      else if (cy > int'(Y)) route[i] = P_NORTH;
      else if (cy < int'(Y)) route[i] = P_SOUTH;
      else                  route[i] = P_LOCAL;
    end
  end

  // ------------------------------------------------- arbiters and crossbar
  logic [NPORTS-1:0]          lock;
  logic [NPORTS-1:0][PW-1:0]  owner;
  logic [NPORTS-1:0][PW-1:0]  rr;
  logic [NPORTS-1:0][PW-1:0]  sel;
  logic [NPORTS-1:0]          fire;

  // req[o][i]: input i holds a head flit routed to output o
  logic [NPORTS-1:0][NPORTS-1:0] req;
  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = !q_empty[i] && q_head[i] && (route[i] == port_e'(o));
  end

  always_comb begin
    logic        found;
    int unsigned idx;
    q_pop     = '0;
    sel       = owner;
    out_valid = '0;
    out_data  = '0;
    out_head  = '0;
    out_tail  = '0;
    fire      = '0;
    found     = 1'b0;
    idx       = 0;
    for (int o = 0; o < NPORTS; o++) begin
      if (!lock[o]) begin
        // round robin: first requester at or after rr[o]
        found = 1'b0;
        for (int k = 0; k < NPORTS; k++) begin
          idx = (int'(rr[o]) + k) % NPORTS;
          if (!found && req[o][idx]) begin
            sel[o] = PW'(idx);
            found  = 1'b1;
          end
        end
        out_valid[o] = found;
      end else begin
        out_valid[o] = !q_empty[owner[o]];
      end
      out_data[o] = q_data[sel[o]] ^ fi_mask;
      out_head[o] = q_head[sel[o]];
      out_tail[o] = q_tail[sel[o]];
      fire[o]     = out_valid[o] && out_ready[o];
      if (fire[o]) q_pop[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock  <= '0;
      owner <= '0;
      rr    <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (fire[o]) begin
          if (out_head[o] && !out_tail[o]) begin
            lock[o]  <= 1'b1;
            owner[o] <= sel[o];
          end
          if (out_tail[o]) lock[o] <= 1'b0;
          if (out_head[o]) rr[o] <= (sel[o] == PW'(NPORTS-1)) ? '0 : sel[o] + 1'b1;
        end
      end
    end
  end

  // A body or tail flit at the head of a buffer belongs to a packet whose
  // output is already locked to that input.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    logic owned;
    always_comb begin
      owned = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (lock[o] && owner[o] == PW'(i)) owned = 1'b1;
    end
    a_framing: assert property (@(posedge clk) disable iff (!rst_n)
                                (!q_empty[i] && !q_head[i]) |-> owned)
      else $error("xy_router: body flit without an open packet on input %0d", i);
  end

endmodule
