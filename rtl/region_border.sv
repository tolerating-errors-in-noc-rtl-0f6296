// region_border: conversion of a flit crossing from one region to another.
//
// Inside a region every flit travels in that region's shuffled order. Where
// a link crosses a region border the flit is first de-shuffled with the
// D registers of the region it leaves, then shuffled with the S registers of
// the region it enters: a D block followed by an S block. Each block keeps its
// own copy of the selection registers and loads it on the load pulse of its
// region's register computation. Combinational data path; register loads
// take effect on the next clock edge.
module region_border #(
  parameter int unsigned FLIT_W    = 64,
  parameter int unsigned SUBFLIT_W = 4,
  localparam int unsigned NSF      = FLIT_W / SUBFLIT_W,
  localparam int unsigned SELW     = (NSF > 1) ? $clog2(NSF) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     from_load,   // leaving region's update
  input  logic [NSF-1:0][SELW-1:0] from_dsel,
  input  logic                     to_load,     // entered region's update
  input  logic [NSF-1:0][SELW-1:0] to_ssel,
  input  logic [FLIT_W-1:0]        din,
  output logic [FLIT_W-1:0]        dout
);

  logic [FLIT_W-1:0] plain;

  sd_block #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_d (
    .clk(clk), .rst_n(rst_n), .cfg_load(from_load), .cfg_sel(from_dsel),
    .din(din), .dout(plain)
  );

  sd_block #(.FLIT_W(FLIT_W), .SUBFLIT_W(SUBFLIT_W)) u_s (
    .clk(clk), .rst_n(rst_n), .cfg_load(to_load), .cfg_sel(to_ssel),
    .din(plain), .dout(dout)
  );

endmodule
